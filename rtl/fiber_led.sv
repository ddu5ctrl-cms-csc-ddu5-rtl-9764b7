// fiber_led: LED drive for one fiber input (active-high LEDs).
// FOK LED: lit when the link is present and ready, blinking slowly when it is
// present but not ready, off when no link is present. DAV LED: lit while data
// is being sent. The blink comes from the top bit of a free-running
// BLINK_BITS-wide counter (2^24 cycles at 40 MHz is about 0.4 s per phase);
// DAV is stretched to 2^(BLINK_BITS-4)-1 cycles so single events are visible.
// Counter sizes are this design's choices.
module fiber_led #(
  parameter int unsigned BLINK_BITS = 24
) (
  input  logic clk,
  input  logic rst,
  input  logic present,
  input  logic ready,
  input  logic dav,
  output logic fok_led,
  output logic dav_led
);
  logic [BLINK_BITS-1:0]   blink_cnt;
  logic [BLINK_BITS-5:0]   dav_cnt;

  always_ff @(posedge clk) begin
    if (rst) blink_cnt <= '0;
    else     blink_cnt <= blink_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)               dav_cnt <= '0;
    else if (dav)          dav_cnt <= '1;
    else if (dav_cnt != 0) dav_cnt <= dav_cnt - 1'b1;
  end

  assign fok_led = present && (ready || blink_cnt[BLINK_BITS-1]);
  assign dav_led = dav || (dav_cnt != 0);
endmodule
