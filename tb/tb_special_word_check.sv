// tb_special_word_check: drives random and constructed 64-bit words and
// compares the per-bit disagreement flags, the 2-of-4 vote and the latched
// outputs with a reference computed here from the lane bits.
module tb_special_word_check;
  logic clk = 0, rst = 1, gold = 0;
  logic [63:0] dat = '0;
  logic [3:0] sp_err, voted_q;
  logic spwd_err_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  special_word_check dut (.*);

  function automatic logic [3:0] lanes(input logic [63:0] d, input int b);
    return {d[60+b], d[44+b], d[28+b], d[12+b]};
  endfunction

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
    logic [3:0] exp_err, exp_vote;
    logic [63:0] w;
    logic [3:0] nib, l;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      w = {$urandom, $urandom};
      if (n % 3 == 0) begin   // consistent special word: same nibble in every lane
        nib = 4'($urandom);
        for (int k = 0; k < 4; k++) w[16*k+12 +: 4] = nib;
      end
      for (int b = 0; b < 4; b++) begin
        l = lanes(w, b);
        exp_err[b]  = (l != 4'h0) && (l != 4'hF);
        exp_vote[b] = ($countones(l) >= 2);
      end
      dat  <= w;
      gold <= (n % 5 != 4);
      #1;
      @(negedge clk);
      chk(sp_err == exp_err, $sformatf("sp_err %h exp %h", sp_err, exp_err));
      @(posedge clk); #1;
      if (n % 5 != 4) begin
        chk(voted_q == exp_vote, $sformatf("voted %h exp %h", voted_q, exp_vote));
        chk(spwd_err_q == |exp_err, "spwd_err");
      end
      if (n % 3 == 0) chk(sp_err == 4'h0, "consistent word flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
