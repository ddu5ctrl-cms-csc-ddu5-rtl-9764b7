// tb_ifddr36: drives a new 36-bit half on the pins before every clock edge
// (upper half for the rising edge, lower half for the falling edge) and
// checks the reassembled 72-bit words and their latency; checks the
// asynchronous clear.
module tb_ifddr36;
  logic clk = 0, clr = 1;
  logic [35:0] din = '0;
  logic [71:0] dat;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ifddr36 dut (.*);

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
    logic [71:0] words [$];
    logic [71:0] w;
    repeat (2) @(negedge clk);
    #1; chk(dat == 0, "cleared");
    clr = 0;
    for (int i = 0; i < 200; i++) begin
      w = {4'($urandom), $urandom, 4'($urandom), $urandom};
      words.push_back(w);
      // upper half before the rising edge, lower half before the falling edge
      @(negedge clk); #1;
      din = w[71:36];
      @(posedge clk); #1;
      din = w[35:0];
      // the word completed at the previous falling edge is out after this rising edge
      if (i >= 1) chk(dat == words[i-1], $sformatf("word %0d: %h exp %h", i-1, dat, words[i-1]));
    end
    #2 clr = 1; #1;
    chk(dat == 0, "async clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
