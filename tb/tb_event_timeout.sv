// tb_event_timeout: at the full default limits, checks that the start timeout
// fires after 128 cycles (288 in calibration mode) and not before, that the
// end timeout fires after 38914 cycles, that normal events raise no flag and
// that the longest begin-to-done time is kept.
module tb_event_timeout;
  logic clk = 0, rst = 1, cal_mode = 0, l1a = 0, begin_data = 0, done = 0;
  logic start_to, end_to, waiting, active;
  logic [15:0] max_count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  event_timeout dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse(ref logic s);
    s = 1; @(negedge clk); s = 0;
  endtask

  // cycles from a pulse on l1a until start_to rises
  task automatic measure_start(output int n);
    pulse(l1a); n = 1;
    while (!start_to && n < 2000) begin @(negedge clk); n++; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(negedge clk); rst = 0;
    measure_start(n);
    chk(n == 128, $sformatf("start timeout after %0d", n));
    pulse(begin_data); pulse(done); @(negedge clk);
    cal_mode = 1;
    measure_start(n);
    chk(n == 288, $sformatf("cal start timeout after %0d", n));
    cal_mode = 0;
    // normal event: data after 50, done after 1000 more
    pulse(begin_data); pulse(done);
    pulse(l1a); repeat (49) @(negedge clk);
    chk(!start_to && waiting, "no early start timeout, flag cleared");
    pulse(begin_data); repeat (999) @(negedge clk);
    pulse(done); @(negedge clk);
    chk(!start_to && !end_to, "normal event no flags");
    chk(max_count == 16'd1000, $sformatf("max count %0d", max_count));
    // long event: end timeout
    pulse(l1a); pulse(begin_data); n = 1;
    while (!end_to && n < 50000) begin @(negedge clk); n++; end
    chk(n == 38914, $sformatf("end timeout after %0d", n));
    pulse(done); @(negedge clk);
    chk(max_count >= 16'd38914, "max count after long event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
