// tb_occupancy_mon: random board patterns per event against a software
// count for each of the 60 counters, read back through the address port;
// checks zeroing on reset.
module tb_occupancy_mon;
  logic clk = 0, rst = 1, evt = 0;
  logic [59:0] present = '0;
  logic [5:0] rd_addr = '0;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;
  int unsigned model [60];
  always #5 clk = ~clk;

  occupancy_mon dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic read_all();
    for (int i = 0; i < 60; i++) begin
      rd_addr = 6'(i); #1;
      chk(rd_data == model[i], $sformatf("counter %0d = %0d exp %0d", i, rd_data, model[i]));
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    foreach (model[i]) model[i] = 0;
    read_all();
    for (int e = 0; e < 500; e++) begin
      present = {28'($urandom), $urandom};
      evt = ($urandom % 4 != 0);
      @(negedge clk);
      if (evt) for (int i = 0; i < 60; i++) if (present[i]) model[i]++;
    end
    evt = 0;
    read_all();
    rst = 1; @(negedge clk); rst = 0;
    foreach (model[i]) model[i] = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
