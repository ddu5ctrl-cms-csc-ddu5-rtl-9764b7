// tb_fiber_led: with a 6-bit blink counter, checks FOK LED lit / blinking
// with period 64 / off for the three link states, and the DAV LED stretch.
module tb_fiber_led;
  logic clk = 0, rst = 1, present = 0, ready = 0, dav = 0;
  logic fok_led, dav_led;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fiber_led #(.BLINK_BITS(6)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int on, toggles;
    logic last;
    repeat (2) @(negedge clk); rst = 0;
    // off
    on = 0; repeat (128) begin @(negedge clk); on += fok_led; end
    chk(on == 0, "off when not present");
    // lit
    present = 1; ready = 1;
    on = 0; repeat (128) begin @(negedge clk); on += fok_led; end
    chk(on == 128, "lit when ready");
    // blink: half the time on, 4 toggles in 128 cycles
    ready = 0; #1; on = 0; toggles = 0; last = fok_led;
    repeat (128) begin @(negedge clk); on += fok_led; toggles += (fok_led != last); last = fok_led; end
    chk(on == 64, $sformatf("blink duty %0d", on));
    chk(toggles == 4, $sformatf("blink toggles %0d", toggles));
    // DAV stretch: lit 2^(6-4)-1 = 3 cycles in all, the pulse cycle included
    dav = 1; @(negedge clk); chk(dav_led, "dav lit"); dav = 0;
    on = 0; repeat (10) begin @(negedge clk); on += dav_led; end
    chk(on == 2, $sformatf("dav stretch %0d", on));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
