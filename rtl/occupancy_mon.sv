// occupancy_mon: CSC board occupancy tracker, 15 fibers x 4 boards.
// For every event (`evt` pulse) each fiber reports which of its four boards
// sent data (`present`, per fiber {CFEB, TMB, ALCT, DMB} from bit 3 to 0);
// the matching 32-bit counters advance. Counters saturate at all ones and are
// all zeroed by reset. Word i = 4*fiber + board is read on `rd_data` for
// `rd_addr` = i (60 words, read in a loop over JTAG).
// Timing: counters update one cycle after `evt`; the read is combinational.
// The board order and saturation are this design's choices.
module occupancy_mon #(
  parameter int unsigned NFIB = 15,
  parameter int unsigned NBRD = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 evt,
  input  logic [NFIB*NBRD-1:0] present,
  input  logic [5:0]           rd_addr,
  output logic [31:0]          rd_data
);
  localparam int unsigned N = NFIB * NBRD;
  logic [31:0] cnt [N];

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (rst)                                     cnt[i] <= '0;
      else if (evt && present[i] && cnt[i] != '1)  cnt[i] <= cnt[i] + 1'b1;
    end
  end

  assign rd_data = (32'(rd_addr) < N) ? cnt[rd_addr] : 32'h0;
endmodule
