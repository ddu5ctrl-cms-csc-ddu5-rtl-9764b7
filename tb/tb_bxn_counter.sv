// tb_bxn_counter: checks the count 0..3563 and wrap to 0 one cycle after the
// limit, the reset value of the limit, loading the SPS limit 923, and BC0.
module tb_bxn_counter;
  logic clk = 0, rst = 1, bc0 = 0, lim_load = 0;
  logic [11:0] lim_din = '0, bxn, bx_lim;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bxn_counter dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp, wraps;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    chk(bx_lim == 12'd3563, "default limit 3563");
    exp = 0; wraps = 0;
    for (int i = 0; i < 8000; i++) begin
      chk(bxn == 12'(exp), $sformatf("bxn %0d exp %0d", bxn, exp));
      if (exp == 3563) wraps++;
      exp = (exp == 3563) ? 0 : exp + 1;
      @(negedge clk);
    end
    chk(wraps == 2, "two orbits");
    lim_din = 12'd923; lim_load = 1;
    @(negedge clk); lim_load = 0;
    chk(bx_lim == 12'd923, "load 923");
    // after load, let the counter pass the new limit
    repeat (4000) @(negedge clk);
    chk(bxn <= 12'd923, "bxn within SPS orbit");
    @(negedge clk); bc0 = 1;
    @(negedge clk); bc0 = 0;
    chk(bxn == 0, "bc0 clears");
    @(negedge clk);
    chk(bxn == 1, "counts after bc0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
