// ifddr36: 36-pin double-data-rate input register with asynchronous clear.
// Each clock period the pins carry two 36-bit halves. The rising edge of clk
// captures the upper half (word bits 71:36) and the falling edge the lower
// half (bits 35:0); the lower half is then moved back to the rising-edge
// domain (QS), so the whole 72-bit word `dat` = {Q[71:36], QS[35:0]} changes
// only on rising edges. Timing: a word whose upper half is on the pins at a
// rising edge and lower half at the following falling edge is on `dat` after
// the next rising edge. Which half travels first is this design's reading.
module ifddr36 (
  input  logic        clk,
  input  logic        clr,      // asynchronous clear
  input  logic [35:0] din,
  output logic [71:0] dat
);
  logic [35:0] q_hi, q_hi_d, q_lo, qs;

  always_ff @(posedge clk or posedge clr) begin
    if (clr) q_hi <= '0;
    else     q_hi <= din;
  end

  always_ff @(negedge clk or posedge clr) begin
    if (clr) q_lo <= '0;
    else     q_lo <= din;
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr) begin
      qs     <= '0;
      q_hi_d <= '0;
    end else begin
      qs     <= q_lo;
      q_hi_d <= q_hi;
    end
  end

  assign dat = {q_hi_d, qs};
endmodule
