// tb_close_l1a: drives L1As with a running BXN counter and checks for every
// L1A: the output comes DEPTH+1 = 19 cycles later, carries the BXN of the
// L1A's own crossing (including across the orbit wrap), and bit 12 is set
// exactly when another L1A is fewer than 18 crossings away.
module tb_close_l1a;
  logic clk = 0, rst = 1, l1a = 0;
  logic [11:0] bxn = '0, bx_lim = 12'd3563;
  logic l1a_out, close;
  logic [12:0] bxn_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  close_l1a dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_ff @(posedge clk) bxn <= (bxn >= bx_lim) ? 12'd0 : bxn + 1'b1;

  int unsigned t_l1a [$];      // cycle of each L1A
  int unsigned bx_l1a [$];
  int unsigned cyc = 0, nout = 0, nclose = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: match outputs in order
  int k = 0;
  always @(negedge clk) if (!rst && l1a_out) begin
    bit exp_close;
    exp_close = 0;
    for (int j = 0; j < t_l1a.size(); j++)
      if (j != k && ((t_l1a[j] > t_l1a[k] ? t_l1a[j] - t_l1a[k] : t_l1a[k] - t_l1a[j]) < 18)) exp_close = 1;
    chk(cyc - t_l1a[k] == 19, $sformatf("latency %0d", cyc - t_l1a[k]));
    chk(bxn_out[11:0] == 12'(bx_l1a[k]), $sformatf("bxn %0d exp %0d", bxn_out[11:0], bx_l1a[k]));
    chk(bxn_out[12] == exp_close, $sformatf("close %0d exp %0d (l1a %0d t %0d prev %0d next %0d)", bxn_out[12], exp_close, k, t_l1a[k], k>0?t_l1a[k-1]:0, k+1<t_l1a.size()?t_l1a[k+1]:0));
    nout++; if (exp_close) nclose++;
    k++;
  end

  initial begin
    int gap;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 300; i++) begin
      gap = (i % 4 == 0) ? 1 + $urandom % 17 : 1 + $urandom % 60;
      repeat (gap - 1) @(negedge clk);
      l1a = 1;
      t_l1a.push_back(cyc);
      bx_l1a.push_back(bxn);
      @(negedge clk); l1a = 0;
    end
    repeat (60) @(negedge clk);
    chk(nout == 300, $sformatf("outputs %0d", nout));
    chk(nclose > 20 && nclose < 300, $sformatf("close count %0d", nclose));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
