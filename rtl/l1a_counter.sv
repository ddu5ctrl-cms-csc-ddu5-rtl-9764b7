// l1a_counter: 24-bit level-1-accept event number. Reset and sync reset
// clear it; each L1A pulse increments it, so the first L1A after a reset is
// event 1 (this design's choice). It wraps at 2^24. Timing: the new number is
// visible the cycle after the L1A pulse.
module l1a_counter #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sync_rst,
  input  logic         l1a,
  output logic [W-1:0] l1a_num
);
  always_ff @(posedge clk) begin
    if (rst || sync_rst) l1a_num <= '0;
    else if (l1a)        l1a_num <= l1a_num + 1'b1;
  end
endmodule
