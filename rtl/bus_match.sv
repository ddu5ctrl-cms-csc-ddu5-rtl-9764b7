// bus_match: bus-matching register that packs N narrow words into one wide
// word (FD16-64CE: 4 x 16 -> 64 bits; FD8-16CE: 2 x 8 -> 16 bits). Each
// enabled input word is written into the next slot, the first word into the
// least significant slot; when the last slot is written the assembled word
// appears on `dout` with a one-cycle `valid`. `rst` clears the register and
// the slot pointer. Slot order is this design's choice.
module bus_match #(
  parameter int unsigned IN_W = 16,
  parameter int unsigned N    = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  input  logic [IN_W-1:0]   din,
  output logic [IN_W*N-1:0] dout,
  output logic              valid
);
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;
  logic [PW-1:0]       ptr;
  logic [IN_W*N-1:0]   acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0; acc <= '0; dout <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (ce) begin
        acc[ptr*IN_W +: IN_W] <= din;
        if (ptr == PW'(N - 1)) begin
          ptr   <= '0;
          valid <= 1'b1;
          dout  <= acc;
          dout[ptr*IN_W +: IN_W] <= din;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end
endmodule
