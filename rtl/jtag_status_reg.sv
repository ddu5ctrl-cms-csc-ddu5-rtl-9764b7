// jtag_status_reg: capture-and-shift JTAG readout register (CHECK_16 style).
// The register is clocked by the data-register clock and enabled when both
// DVCENB and SEL2 are high. With LSHFT low it captures the parallel STATUS
// word; with LSHFT high it shifts one place toward bit 0, taking TDI into the
// top bit. TDO is bit 0, so the word leaves LSB first. W is the register
// length (15, 16, 24 or 32 bits in this design).
// Timing: one capture or shift per enabled clock edge.
module jtag_status_reg #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         dvcenb,
  input  logic         sel2,
  input  logic         lshft,
  input  logic         tdi,
  input  logic [W-1:0] status,
  output logic         tdo,
  output logic [W-1:0] q
);
  logic clkena;
  assign clkena = dvcenb & sel2;

  always_ff @(posedge clk) begin
    if (rst)         q <= '0;
    else if (clkena) q <= lshft ? {tdi, q[W-1:1]} : status;
  end

  assign tdo = q[0];
endmodule
