// tb_l1a_counter: random L1A pulses against a software count, sync resets,
// and the 24-bit wrap.
module tb_l1a_counter;
  logic clk = 0, rst = 1, sync_rst = 0, l1a = 0;
  logic [23:0] l1a_num;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  l1a_counter dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 2000; i++) begin
      l1a = ($urandom % 3 == 0);
      sync_rst = (i % 500 == 499);
      @(negedge clk);
      if (sync_rst) exp = 0; else if (l1a) exp++;
      chk(l1a_num == 24'(exp), $sformatf("num %0d exp %0d", l1a_num, exp));
    end
    l1a = 0; sync_rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
