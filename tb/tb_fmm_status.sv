// tb_fmm_status: checks BUSY and the held-off upper bits before system
// ready, each of the six error conditions setting the sticky ERROR bit until
// reset, the lost-sync flag cleared by sync reset, and WARN following its input.
module tb_fmm_status;
  logic clk = 0, rst = 1, system_rdy = 0, sync_rst = 0, busy_in = 0, warn_in = 0, sync_err_in = 0;
  logic [5:0] err_cond = '0;
  logic [3:0] fmm;
  logic hard_err, sync_err;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fmm_status dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(2); rst = 0;
    warn_in = 1; sync_err_in = 1; tick(2); sync_err_in = 0;
    chk(fmm == 4'b0001, $sformatf("not ready: %b", fmm));
    system_rdy = 1; tick(2);
    chk(fmm == 4'b0110, $sformatf("ready, warn+sync: %b", fmm));
    sync_rst = 1; tick(); sync_rst = 0; tick(2);
    chk(fmm == 4'b0010 && !sync_err, "sync reset clears lost sync");
    warn_in = 0; tick(2);
    chk(fmm == 4'b0000, "all clear");
    busy_in = 1; tick(2); chk(fmm == 4'b0001, "busy"); busy_in = 0;
    for (int b = 0; b < 6; b++) begin
      rst = 1; tick(); rst = 0; tick(2);
      chk(fmm == 4'b0000 && !hard_err, "clear after reset");
      err_cond[b] = 1; tick(); err_cond = '0; tick(3);
      chk(hard_err && fmm == 4'b1000, $sformatf("cond %0d sets error: %b", b, fmm));
      sync_rst = 1; tick(); sync_rst = 0; tick(2);
      chk(fmm[3], "error survives sync reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
