// tb_reset_seq: requests a reset and checks the cycle-by-cycle shape at the
// default 12.5 ns clock: soft reset 2 cycles (25 ns) before MRST, MRST for
// 3 cycles (37.5 ns), soft reset 1 more cycle (12.5 ns); a request during the
// sequence is ignored.
module tb_reset_seq;
  logic clk = 0, rst = 1, req = 0;
  logic soft_rst, mrst, busy;
  int checks = 0, failures = 0;
  always #6.25 clk = ~clk;

  reset_seq dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected shape after the request edge: S S SM SM SM S -
    logic [1:0] shape [8] = '{2'b10, 2'b10, 2'b11, 2'b11, 2'b11, 2'b10, 2'b00, 2'b00};
    repeat (2) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk); #1;
    chk(!soft_rst && !mrst && !busy, "idle after reset");
    for (int r = 0; r < 3; r++) begin
      @(negedge clk); req = 1;
      @(negedge clk); req = (r == 1);   // hold the request in round 1
      #0;
      for (int i = 0; i < 8; i++) begin
        if (i > 0) @(negedge clk);
        if (i == 3) req = 0;
        chk({soft_rst, mrst} == shape[i], $sformatf("round %0d step %0d got %b", r, i, {soft_rst, mrst}));
      end
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
