// tb_bus_match: packs random 16-bit words four at a time (with idle cycles in
// between) and checks every 64-bit result, first word in the low slot, and
// the valid pulse; a 9-to-18 instance is checked the same way.
module tb_bus_match;
  logic clk = 0, rst = 1, ce = 0, ce2 = 0;
  logic [15:0] din = '0;
  logic [63:0] dout;
  logic valid;
  logic [8:0] d9 = '0;
  logic [17:0] d18;
  logic v18;
  int checks = 0, failures = 0, nvalid = 0, nv18 = 0;
  always #5 clk = ~clk;

  bus_match #(.IN_W(16), .N(4)) dut (.clk, .rst, .ce, .din, .dout, .valid);
  bus_match #(.IN_W(9), .N(2)) dut2 (.clk, .rst, .ce(ce2), .din(d9), .dout(d18), .valid(v18));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [63:0] exp_q [$];
  logic [17:0] exp18 [$];
  always @(negedge clk) if (!rst) begin
    if (valid) begin
      chk(exp_q.size() > 0 && dout == exp_q[0], $sformatf("word %h", dout));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      nvalid++;
    end
    if (v18) begin
      chk(exp18.size() > 0 && d18 == exp18[0], $sformatf("18-bit %h", d18));
      if (exp18.size() > 0) void'(exp18.pop_front());
      nv18++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] w;
    logic [17:0] w18;
    int k = 0, k18 = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 800; i++) begin
      ce = ($urandom % 3 != 0); din = 16'($urandom);
      ce2 = ($urandom % 2 == 0); d9 = 9'($urandom);
      if (ce) begin w[16*k +: 16] = din; k++; if (k == 4) begin exp_q.push_back(w); k = 0; end end
      if (ce2) begin w18[9*k18 +: 9] = d9; k18++; if (k18 == 2) begin exp18.push_back(w18); k18 = 0; end end
      @(negedge clk);
    end
    ce = 0; ce2 = 0;
    repeat (3) @(negedge clk);
    chk(nvalid > 100 && exp_q.size() == 0, $sformatf("valid count %0d left %0d", nvalid, exp_q.size()));
    chk(nv18 > 100 && exp18.size() == 0, "18-bit count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
