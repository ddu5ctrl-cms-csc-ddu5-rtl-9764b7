// tb_kill_reg: reset value (all alive), loads of random words, fiber enables
// and the check-disable decode (a zero in bits 16..19 disables a check only
// when bit 15 is one).
module tb_kill_reg;
  logic clk = 0, rst = 1, load = 0;
  logic [19:0] din = '0, kill;
  logic [14:0] fiber_en;
  logic chk_alct_en, chk_tmb_en, chk_cfeb_en, chk_dmb_en;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  kill_reg dut (.*);

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
    logic [19:0] w, held;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    chk(kill == 20'hFFFFF && fiber_en == 15'h7FFF, "reset all alive");
    chk(chk_alct_en && chk_tmb_en && chk_cfeb_en && chk_dmb_en, "checks on after reset");
    held = kill;
    for (int i = 0; i < 300; i++) begin
      w = 20'($urandom);
      din = w; load = ($urandom % 2);
      @(negedge clk);
      if (load) held = w;
      chk(kill == held, "kill value");
      chk(fiber_en == held[14:0], "fiber enables");
      chk(chk_alct_en == !(held[15] && !held[16]), "alct check");
      chk(chk_tmb_en  == !(held[15] && !held[17]), "tmb check");
      chk(chk_cfeb_en == !(held[15] && !held[18]), "cfeb check");
      chk(chk_dmb_en  == !(held[15] && !held[19]), "dmb check");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
