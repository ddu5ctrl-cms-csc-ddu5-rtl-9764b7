// tb_ccb_cmd_decode: puts every documented command on the inverted bus (and
// the non-inverted bus in Track-Finder mode), holds it for several cycles and
// checks that exactly one pulse of the right output appears, two cycles
// later; checks that fake-L1A mode blocks L1A, sync reset and BC0.
module tb_ccb_cmd_decode;
  import ddu_pkg::*;
  logic clk = 0, rst = 1, tf_mode = 0, kill_ttc = 0, l1a_n = 1;
  logic [5:0] ccb_cmd_n = 6'h3F;
  logic soft_rst, sync_rst, start_dt, stop_dt, bc0, l1a;
  logic [2:0] cfeb_cal;
  logic [5:0] cmd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ccb_cmd_decode dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [8:0] outs();
    return {soft_rst, sync_rst, start_dt, stop_dt, bc0, cfeb_cal, l1a};
  endfunction

  // expected one-hot output vector for a code
  function automatic logic [8:0] exp_for(input logic [5:0] c, input bit killed);
    case (c)
      6'h1C: return 9'b100000000;
      6'h03: return killed ? 9'h0 : 9'b010000000;
      6'h06: return 9'b001000000;
      6'h07: return 9'b000100000;
      6'h01: return killed ? 9'h0 : 9'b000010000;
      6'h14: return 9'b000001000;
      6'h15: return 9'b000000100;
      6'h16: return 9'b000000010;
      default: return 9'h0;
    endcase
  endfunction

  task automatic send(input logic [5:0] code, input bit tf, input bit killed);
    logic [8:0] acc;
    int pulses, first;
    acc = '0; pulses = 0; first = -1;
    @(negedge clk);
    tf_mode = tf; kill_ttc = killed;
    ccb_cmd_n = tf ? 6'h00 : 6'h3F;
    l1a_n = !tf;
    repeat (4) @(negedge clk);
    ccb_cmd_n = tf ? code : ~code;
    for (int i = 0; i < 6; i++) begin
      @(posedge clk); #1;
      if (outs() != 0) begin
        pulses++; acc |= outs();
        if (first < 0) first = i;
      end
    end
    @(negedge clk);
    ccb_cmd_n = tf ? 6'h00 : 6'h3F;
    repeat (3) @(posedge clk);
    chk(acc == exp_for(code, killed), $sformatf("code %h tf %0d kill %0d got %b", code, tf, killed, acc));
    if (exp_for(code, killed) != 0) begin
      chk(pulses == 1, $sformatf("code %h pulses %0d", code, pulses));
      chk(first == 1, $sformatf("code %h latency %0d", code, first));
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] codes [9] = '{6'h1C, 6'h03, 6'h06, 6'h07, 6'h01, 6'h14, 6'h15, 6'h16, 6'h2A};
    int n;
    repeat (2) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    foreach (codes[i]) send(codes[i], 0, 0);
    foreach (codes[i]) send(codes[i], 1, 0);
    foreach (codes[i]) send(codes[i], 0, 1);
    // documented example: software 0x7000 -> 0x1C -> bus 0x23 -> soft reset
    @(negedge clk); tf_mode = 0; kill_ttc = 0; ccb_cmd_n = 6'h23;
    repeat (2) @(posedge clk); #1;
    chk(soft_rst && cmd == CMD_SOFT_RST, "bus 0x23 is soft reset");
    @(negedge clk); ccb_cmd_n = 6'h3F;
    // L1A: low-true line, one pulse per falling edge
    repeat (3) @(posedge clk);
    n = 0;
    @(negedge clk); l1a_n = 0;
    repeat (5) begin @(posedge clk); #1; n += l1a; end
    @(negedge clk); l1a_n = 1;
    repeat (3) begin @(posedge clk); #1; n += l1a; end
    chk(n == 1, $sformatf("l1a pulses %0d", n));
    n = 0; kill_ttc = 1;
    @(negedge clk); l1a_n = 0;
    repeat (5) begin @(posedge clk); #1; n += l1a; end
    @(negedge clk); l1a_n = 1;
    chk(n == 0, "l1a killed in fake mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
