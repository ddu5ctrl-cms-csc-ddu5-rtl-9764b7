// tb_gbe_ordered_set: checks the 4-code sync cycle during sync, the 2-code
// idle cycle afterwards, that every change of mode starts on K28.5, and the
// output enable.
module tb_gbe_ordered_set;
  import ddu_pkg::*;
  logic clk = 0, rst = 1, sync = 1, oe = 1;
  logic [8:0] code;
  logic comma;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  gbe_ordered_set dut (.*);

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

  // expected stream built from whole cycles
  logic [8:0] exp_q [$];
  initial begin
    logic [8:0] syncs [4] = '{9'h1BC, 9'h0B5, 9'h1BC, 9'h042};
    logic [8:0] idles [2] = '{9'h1BC, 9'h050};
    bit m;
    repeat (2) @(negedge clk);
    sync = 1; rst = 0;
    for (int r = 0; r < 20; r++) begin
      m = (r % 7 < 3);       // mode of this cycle, set up during the previous one
      if (m) foreach (syncs[i]) begin
        chk(code == syncs[i], $sformatf("sync r%0d i%0d got %h", r, i, code));
        chk(comma == (syncs[i] == K28_5), "comma flag");
        if (i == 3) sync = ((r + 1) % 7 < 3);
        @(negedge clk);
      end else foreach (idles[i]) begin
        chk(code == idles[i], $sformatf("idle r%0d i%0d got %h", r, i, code));
        if (i == 1) sync = ((r + 1) % 7 < 3);
        @(negedge clk);
      end
    end
    oe = 0; #1;
    chk(code == 0 && !comma, "output disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
