// tb_jtag_ctrl: drives the two user chains like a boundary-scan primitive:
// loads opcodes, reads back registers (L1A number, board ID, BX limit,
// occupancy loop) and writes the kill register and BX limit, checking the
// update strobes and the pulse opcodes.
module tb_jtag_ctrl;
  logic clk = 0, rst = 1;
  logic sel1 = 0, sel2 = 0, capture = 0, shift = 0, update = 0, tdi = 0;
  logic tdo1, tdo2;
  logic [7:0] opcode;
  logic [23:0] l1a_num = 24'h123456;
  logic [31:0] status32 = 32'hDEAD_BEEF;
  logic [15:0] out_path_stat = 16'hC3A5;
  logic [14:0] crc_err_fib = 15'h2B4D;
  logic [19:0] kill = 20'hABCDE;
  logic [15:0] err_a = 16'h0A0A, err_b = 16'h0B0B, err_c = 16'h0C0C;
  logic [14:0] dmb_live = 15'h1234, p_dmb_live = 15'h4321;
  logic [15:0] warn_mon = 16'h5555, max_timeout = 16'h7777, board_id = 16'h0042;
  logic [11:0] bx_lim = 12'd3563;
  logic [31:0] occ_data;
  logic [5:0]  occ_addr;
  logic kill_load, bxlim_load, fpga_rst, cfebcal_toggle, vme_l1a;
  logic [19:0] kill_din;
  logic [11:0] bxlim_din;
  int checks = 0, failures = 0;
  int n_kill = 0, n_bx = 0, n_rst = 0, n_cal = 0, n_l1a = 0;
  always #5 clk = ~clk;

  assign occ_data = 32'hC0DE_0000 | 32'(occ_addr);

  jtag_ctrl dut (.*);

  always @(negedge clk) begin
    n_kill += kill_load; n_bx += bxlim_load; n_rst += fpga_rst;
    n_cal += cfebcal_toggle; n_l1a += vme_l1a;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load_op(input logic [7:0] op);
    @(negedge clk); sel1 = 1; shift = 1;
    for (int i = 0; i < 8; i++) begin tdi = op[i]; @(negedge clk); end
    shift = 0; update = 1; @(negedge clk); update = 0; sel1 = 0;
    @(negedge clk);
  endtask

  // capture then shift n bits out (returned) while shifting `din` in, then update
  task automatic dr_scan(input int n, input logic [31:0] din, output logic [31:0] dout);
    dout = '0;
    @(negedge clk); sel2 = 1; capture = 1; @(negedge clk); capture = 0; shift = 1;
    for (int i = 0; i < n; i++) begin
      dout[i] = tdo2; tdi = din[i]; @(negedge clk);
    end
    shift = 0; update = 1; @(negedge clk); update = 0; sel2 = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    load_op(8'd2);  chk(opcode == 8'd2, "opcode load");
    dr_scan(24, 0, r); chk(r[23:0] == l1a_num, $sformatf("L1A num %h", r));
    load_op(8'd32); dr_scan(16, 0, r); chk(r[15:0] == board_id, "board id");
    load_op(8'd3);  dr_scan(32, 0, r); chk(r == status32, "status32");
    load_op(8'd5);  dr_scan(16, 0, r); chk(r[15:0] == status32[31:16], "status hi");
    load_op(8'd23); dr_scan(16, 0, r); chk(r[15:0] == err_b, "err b");
    load_op(8'd26); dr_scan(15, 0, r); chk(r[14:0] == p_dmb_live, "p dmb live");
    load_op(8'd6);  dr_scan(16, 0, r); chk(r[15:0] == out_path_stat, "output path status");
    load_op(8'd10); dr_scan(15, 0, r); chk(r[14:0] == crc_err_fib, "CRC error fibers");
    load_op(8'd30); dr_scan(12, 0, r); chk(r[11:0] == bx_lim, "bx lim read");
    load_op(8'd13); dr_scan(20, 0, r); chk(r[19:0] == kill, "kill read");
    // write kill register
    load_op(8'd14); dr_scan(20, 32'h5A5A5, r);
    chk(n_kill == 1 && kill_din == 20'h5A5A5, $sformatf("kill load %0d %h", n_kill, kill_din));
    // write BX limit
    load_op(8'd29); dr_scan(12, 32'd923, r);
    chk(n_bx == 1 && bxlim_din == 12'd923, "bx limit load");
    // pulse opcodes
    load_op(8'd1);  dr_scan(1, 0, r);
    load_op(8'd31); dr_scan(1, 0, r);
    load_op(8'd33); dr_scan(1, 0, r); dr_scan(1, 0, r);
    chk(n_rst == 1 && n_cal == 1 && n_l1a == 2, $sformatf("pulses %0d %0d %0d", n_rst, n_cal, n_l1a));
    chk(n_kill == 1 && n_bx == 1, "no stray loads");
    // occupancy loop: 60 words then back to 0
    load_op(8'd34);
    for (int i = 0; i < 62; i++) begin
      dr_scan(32, 0, r);
      chk(r == (32'hC0DE_0000 | 32'(i % 60)), $sformatf("occ word %0d: %h", i, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
