// reset_seq: orders the soft reset and the master reset (MRST).
// On a request the soft reset rises first, MRST follows PRE cycles later and
// lasts MRST_LEN cycles, and the soft reset is held POST cycles beyond the end
// of MRST. With a 12.5 ns clock the defaults give the documented minimums:
// 25 ns of soft reset before MRST, 37.5 ns of MRST, 12.5 ns after it. A
// request arriving while a sequence runs is ignored. `busy` is high during the
// whole sequence. The clock period is this design's reading of the numbers.
module reset_seq #(
  parameter int unsigned PRE      = 2,
  parameter int unsigned MRST_LEN = 3,
  parameter int unsigned POST     = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic req,
  output logic soft_rst,
  output logic mrst,
  output logic busy
);
  localparam int unsigned TOTAL = PRE + MRST_LEN + POST;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  logic [CW-1:0] cnt;   // counts down from TOTAL; 0 = idle

  always_ff @(posedge clk) begin
    if (rst)                  cnt <= '0;
    else if (cnt != 0)        cnt <= cnt - 1'b1;
    else if (req)             cnt <= CW'(TOTAL);
  end

  // elapsed = TOTAL - cnt, 0 .. TOTAL-1 while busy
  logic [CW-1:0] elapsed;
  assign elapsed  = CW'(TOTAL) - cnt;
  assign busy     = (cnt != 0);
  assign soft_rst = busy;
  assign mrst     = busy && (elapsed >= CW'(PRE)) && (elapsed < CW'(PRE + MRST_LEN));
endmodule
