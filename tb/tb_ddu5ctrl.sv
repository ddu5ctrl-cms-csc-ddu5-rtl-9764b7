// tb_ddu5ctrl: end-to-end test of the DDU control FPGA at its default
// parameters. A CCB model sends commands and L1As on the inverted bus, an
// input-FIFO model answers the read enable with DMB blocks on the 36 DDR
// pins, a JTAG model drives the two user chains, and the DDU output words are
// looped back into the GbE output FIFO port so the Ethernet frames can be
// checked against them. Every DDU event is checked: header marker, event
// number, BXN of its L1A (with the close-L1A flag), the data words, word
// count and trailer CRC-16 (recomputed here). The word-count examples of the
// board's event format (1 to 15 DMBs, up to the 30070-word limit) are run
// and their trailer word counts compared. Counted mechanisms: soft reset
// sequence, BC0, sync reset, start/stop, CFEB calibration command, CCB L1A,
// JTAG L1A, close L1A, events with data, empty events (fibers killed over
// JTAG), DMB CRC-22 error, special-word error, start and end timeouts, L1A
// queue overflow, FMM warning, lost-sync and error states, BX-limit load,
// occupancy readout, JTAG reset, Track-Finder bus polarity and GbE frames (each one
// parsed, with its packet number, zero fill and CRC-32 checked).
module tb_ddu5ctrl;
  import ddu_pkg::*;
  logic clk = 0, rst = 1;
  always #12.5 clk = ~clk;

  logic [15:0] board_id = 16'h0042;
  logic fake_mode = 0;
  logic [5:0] ccb_cmd_n = 6'h3F;
  logic l1a_n = 1;
  logic [35:0] inf_din = '0;
  logic inf_ren;
  logic [14:0] dmb_full = '0, dmb_dav = 15'h0003, fiber_present = 15'h7FFF, fiber_ok = 15'h7FFF;
  logic [15:0] live_dmb = 16'h0003;
  logic [3:0] dmb_cnt = 4'd2;
  logic [59:0] occ_present = '0;
  logic [5:0] err_cond = '0;
  logic system_rdy = 1, busy_in = 0, warn_in = 0;
  logic [63:0] dout;
  logic dout_valid;
  ctrl_t dout_ctrl;
  logic [23:0] last_word_count;
  logic [3:0] fmm;
  logic soft_rst, mrst, run;
  logic [2:0] cfeb_cal;
  logic [14:0] fok_led, dav_led;
  logic close_l1a_flag, l1a_q_ovfl, dmb_crc_err, spwd_err, start_to, end_to;
  logic jsel1 = 0, jsel2 = 0, jcapture = 0, jshift = 0, jupdate = 0, jtdi = 0, jtdo1, jtdo2;
  logic gbe_rst = 1;
  logic [15:0] ofifo_d16;
  logic ofifo_eoe, ofifo_empty, ofifo_pae_n, ofifo_ren;
  logic [17:0] gt_txdata;
  logic gt_tx_valid, gbe_in_packet;

  ddu5ctrl dut (.*, .gbe_clk(clk));

  int checks = 0, failures = 0;
  localparam int END_WAIT = DONE_TO_CYC + 200;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_soft = 0, n_mrst = 0, n_bc0 = 0, n_sync = 0, n_run = 0, n_cal = 0, n_l1a_ccb = 0,
      n_l1a_jtag = 0, n_close = 0, n_evt_data = 0, n_evt_empty = 0, n_crc_err = 0,
      n_spw_err = 0, n_start_to = 0, n_ovfl = 0, n_fmm_sync = 0, n_fmm_err = 0,
      n_bxlim = 0, n_occ = 0, n_jrst = 0, n_workload = 0, n_fmm_warn = 0, n_end_to = 0, n_tf = 0, n_frames = 0, n_fmm_busy = 0;
  always @(negedge clk) begin
    n_soft += (soft_rst && !$past(soft_rst));
    n_mrst += (mrst && !$past(mrst));
    n_bc0 += dut.c_bc0; n_sync += dut.c_sync; n_cal += |cfeb_cal;
    n_run += (run && !$past(run));
    n_crc_err += (dmb_crc_err && !$past(dmb_crc_err));
    n_spw_err += (spwd_err && !$past(spwd_err));
    n_start_to += (start_to && !$past(start_to));
    n_ovfl += l1a_q_ovfl;
    n_fmm_sync += (fmm[FMM_SYNC] && !$past(fmm[FMM_SYNC]));
    n_fmm_err  += (fmm[FMM_ERROR] && !$past(fmm[FMM_ERROR]));
    n_fmm_busy += (fmm[FMM_BUSY] && !$past(fmm[FMM_BUSY]));
    n_fmm_warn += (fmm[FMM_WARN] && !$past(fmm[FMM_WARN]));
    n_end_to   += (end_to && !$past(end_to));
  end

  // ---------------- CCB model ----------------
  bit tf = 0;
  task automatic ccb_cmd(input logic [5:0] code);
    @(negedge clk); ccb_cmd_n = tf ? code : ~code;
    repeat (2) @(negedge clk); ccb_cmd_n = tf ? 6'h00 : 6'h3F;
    repeat (2) @(negedge clk);
  endtask

  // expected L1A records: BXN of the crossing, close flag
  int unsigned l1a_cyc [$];
  int unsigned l1a_bx [$];
  int unsigned cyc = 0;
  always @(posedge clk) cyc++;
  // BXN observed in the cycle the decoded L1A enters the proximity tracker
  always @(negedge clk) if (dut.l1a) begin l1a_cyc.push_back(cyc); l1a_bx.push_back(dut.bxn); end

  task automatic ccb_l1a();
    @(negedge clk); l1a_n = tf; @(negedge clk); l1a_n = !tf;
    n_l1a_ccb++;
  endtask

  // ---------------- input FIFO model (DMB blocks on DDR pins) ----------------
  logic [65:0] inq [$];       // {valid, last, data}
  bit feed_en = 1;
  function automatic logic [21:0] crc22(input logic [21:0] c, input logic [63:0] d);
    for (int i = 0; i < 64; i++) begin
      logic fb;
      fb = c[0] ^ d[i];
      c = {fb, c[21:1]};
      c[20] ^= fb;
    end
    return c;
  endfunction

  // one DMB block: n data words (bit 15 of each lane clear) and a last word
  // with F in bits 15..12 of every lane and the block CRC-22
  task automatic make_block(input int n, input bit bad_crc, input bit bad_spw, ref logic [63:0] words [$]);
    logic [21:0] c = '0;
    logic [63:0] w;
    for (int i = 0; i < n; i++) begin
      w = {$urandom, $urandom} & 64'h7FFF_7FFF_7FFF_7FFF;
      if (bad_spw && i == 0) w = 64'h8000_F000_F000_F000;
      c = crc22(c, w);
      inq.push_back({1'b1, 1'b0, w}); words.push_back(w);
    end
    w = {16'hF000, 16'hF000, 4'hF, 1'b0, c[21:11], 4'hF, 1'b0, c[10:0]};
    if (bad_crc) w[0] = ~w[0];
    inq.push_back({1'b1, 1'b1, w}); words.push_back(w);
  endtask

  // drive: upper half before the rising edge, lower half before the falling edge
  logic [71:0] cur_w = '0;
  always @(negedge clk) begin
    if (inf_ren && feed_en && inq.size() > 0) begin
      cur_w = {6'h0, inq[0]};
      void'(inq.pop_front());
    end else cur_w = '0;
    inf_din <= cur_w[71:36];
  end
  always @(posedge clk) inf_din <= #1 cur_w[35:0];

  // ---------------- DDU output checker ----------------
  logic [63:0] expect_data [$][$];     // per event with data: its data words
  logic [14:0] expect_fib [$];         // per event with data: fibers with a CRC error
  logic [63:0] ev [$];
  logic [63:0] all_out [$];            // every DDU word, for the GbE loop-back
  bit          all_eoe [$];
  int evn_exp = 1, ev_idx = 0, last_wc = 0;
  bit evn_free = 0;                    // event numbers not tracked
  function automatic logic [15:0] crc16(input logic [15:0] c, input logic [63:0] w);
    for (int i = 63; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ w[i];
      c = {c[14:0], 1'b0};
      if (fb) c ^= 16'h8005;
    end
    return c;
  endfunction

  always @(negedge clk) if (dout_valid) begin
    ev.push_back(dout);
    all_out.push_back(dout);
    all_eoe.push_back(dout_ctrl.eoe);
    if (dout_ctrl.eoe) begin
      check_event();
      ev.delete();
    end
  end

  task automatic check_event();
    logic [15:0] c = 16'hFFFF;
    logic [63:0] tr = ev[ev.size()-1];
    int nd = ev.size() - 6;
    chk(ev[0][63:60] == BOE_MARK, "BOE marker");
    if (evn_free) evn_exp = int'(ev[0][55:32]);
    chk(ev[0][55:32] == 24'(evn_exp), $sformatf("event number %0d exp %0d", ev[0][55:32], evn_exp));
    if (ev_idx < l1a_bx.size()) begin
      bit cl = 0;
      for (int j = 0; j < l1a_cyc.size(); j++)
        if (j != ev_idx && (l1a_cyc[j] > l1a_cyc[ev_idx] ? l1a_cyc[j] - l1a_cyc[ev_idx] : l1a_cyc[ev_idx] - l1a_cyc[j]) < 18) cl = 1;
      chk(ev[0][31:20] == 12'(l1a_bx[ev_idx]), $sformatf("event %0d BXN %0d exp %0d", evn_exp, ev[0][31:20], l1a_bx[ev_idx]));
      chk(ev[2][15] == cl, $sformatf("event %0d close flag", evn_exp));
      if (cl) n_close++;
    end
    chk(ev[1][63:16] == H2_CONST, "H2 constant");
    chk(ev[ev.size()-3] == T2_CONST, "T-2 constant");
    chk(tr[63:60] == EOE_MARK, "EOE marker");
    last_wc = int'(tr[55:32]);
    chk(tr[55:32] == 24'(ev.size()), $sformatf("word count %0d size %0d", tr[55:32], ev.size()));
    for (int i = 0; i < ev.size() - 1; i++) c = crc16(c, ev[i]);
    c = crc16(c, {tr[63:32], 16'h0, tr[15:0]});
    chk(tr[31:16] == c, "trailer CRC");
    if (nd == 0) n_evt_empty++;
    else begin
      n_evt_data++;
      if (expect_data.size() > 0) begin
        chk(expect_data[0].size() == nd, $sformatf("data words %0d exp %0d", nd, expect_data[0].size()));
        for (int i = 0; i < nd && i < expect_data[0].size(); i++)
          chk(ev[3+i] == expect_data[0][i], $sformatf("data word %0d: %h exp %h", i, ev[3+i], expect_data[0][i]));
        void'(expect_data.pop_front());
        chk(ev[ev.size()-2][30:16] == expect_fib[0],
            $sformatf("T-1 CRC-error fibers %h exp %h", ev[ev.size()-2][30:16], expect_fib[0]));
        void'(expect_fib.pop_front());
      end else chk(0, "unexpected data");
    end
    evn_exp++; ev_idx++;
  endtask

  // ---------------- GbE loop-back: DDU words as the 16-bit output FIFO ----------------
  int gi = 0;                    // index of 16-bit word
  assign ofifo_empty = (gi >= 4 * all_out.size());
  assign ofifo_d16   = ofifo_empty ? 16'h0 : all_out[gi / 4][16 * (gi % 4) +: 16];
  assign ofifo_eoe   = !ofifo_empty && (gi % 4 == 3) && all_eoe[gi / 4];
  // programmable almost-empty flag: low while fewer than 64 words wait
  assign ofifo_pae_n = (4 * all_out.size() - gi >= 64);
  always @(posedge clk) if (ofifo_ren && !ofifo_empty) gi <= gi + 1;

  logic [8:0] gcodes [$];
  always @(negedge clk) if (gt_tx_valid) begin
    gcodes.push_back(gt_txdata[8:0]); gcodes.push_back(gt_txdata[17:9]);
  end

  // ---------------- JTAG model ----------------
  task automatic jop(input logic [7:0] op);
    @(negedge clk); jsel1 = 1; jshift = 1;
    for (int i = 0; i < 8; i++) begin jtdi = op[i]; @(negedge clk); end
    jshift = 0; jupdate = 1; @(negedge clk); jupdate = 0; jsel1 = 0; @(negedge clk);
  endtask
  task automatic jdr(input int n, input logic [31:0] din, output logic [31:0] dout_j);
    dout_j = '0;
    @(negedge clk); jsel2 = 1; jcapture = 1; @(negedge clk); jcapture = 0; jshift = 1;
    for (int i = 0; i < n; i++) begin dout_j[i] = jtdo2; jtdi = din[i]; @(negedge clk); end
    jshift = 0; jupdate = 1; @(negedge clk); jupdate = 0; jsel2 = 0; repeat (2) @(negedge clk);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_idle();
    int t = 0;
    repeat (30) @(negedge clk);
    do begin @(negedge clk); t++; end
    while ((dut.fmt_busy || !dut.q_empty || dut.u_close.pipe != 0) && t < 40000);
    repeat (5) @(negedge clk);
  endtask

  task automatic event_with_data(input int n0, input int n1, input bit bad_crc, input bit bad_spw);
    logic [63:0] words [$];
    make_block(n0, 0, bad_spw, words);
    make_block(n1, bad_crc, 0, words);
    expect_data.push_back(words);
    expect_fib.push_back(bad_crc ? 15'h0002 : 15'h0000);
  endtask

  initial begin
    logic [31:0] r;
    repeat (4) @(negedge clk);
    rst = 0; gbe_rst = 0;
    repeat (4) @(negedge clk);
    // soft reset through the CCB: ordered soft reset / MRST
    ccb_cmd(CMD_SOFT_RST);
    repeat (8) @(negedge clk);
    chk(n_soft == 1 && n_mrst == 1, "soft reset sequence");
    ccb_cmd(CMD_START_DT);
    chk(run, "run after start");
    ccb_cmd(CMD_BC0);
    ccb_cmd(CMD_CFEB_CAL0);
    chk(fmm == 4'b0000, $sformatf("FMM ready %b", fmm));

    // --- events with data, spread out ---
    for (int e = 0; e < 4; e++) begin
      event_with_data(3 + e, 2, 0, 0);
      ccb_l1a();
      repeat (60) @(negedge clk);
    end
    wait_idle();
    chk(!dmb_crc_err, "no CRC error on good blocks");
    // --- two close L1As (10 crossings apart) ---
    event_with_data(4, 4, 0, 0);
    event_with_data(2, 3, 0, 0);
    ccb_l1a(); repeat (9) @(negedge clk); ccb_l1a();
    wait_idle();
    // --- L1A from JTAG ---
    event_with_data(5, 1, 0, 0);
    jop(8'd33); jdr(1, 0, r); n_l1a_jtag++;
    wait_idle();
    // --- DMB CRC-22 error ---
    event_with_data(3, 3, 1, 0);
    ccb_l1a();
    wait_idle();
    chk(n_crc_err == 1, "DMB CRC error seen");
    jop(8'd10); jdr(15, 0, r);
    chk(r[14:0] == 15'h0002, $sformatf("JTAG CRC-error fibers %h", r[14:0]));
    jop(8'd6); jdr(16, 0, r);
    chk(r[3:0] == {1'b0, 1'b1, 1'b0, run}, $sformatf("JTAG output path status %h", r[15:0]));
    // --- JTAG: read L1A number, BX limit, load limit ---
    jop(8'd2); jdr(24, 0, r);
    chk(r[23:0] == 24'(n_l1a_ccb + n_l1a_jtag), $sformatf("JTAG L1A number %0d", r[23:0]));
    jop(8'd30); jdr(12, 0, r);
    chk(r[11:0] == 12'd3563, "BX limit read");
    jop(8'd29); jdr(12, 32'd923, r);
    jop(8'd30); jdr(12, 0, r);
    chk(r[11:0] == 12'd923, "BX limit loaded");
    if (r[11:0] == 12'd923) n_bxlim++;
    // --- word-count workloads: n DMBs with c CFEBs of t time samples; a
    //     DMB block is 25*t*c + 4 words, an event 6 + n*(25*t*c + 4) words.
    //     The last one is the largest event under the 30070-word limit. ---
    begin
      int wl_n [11] = '{1, 2, 3, 4, 7, 8, 11, 12, 15, 1, 15};
      int wl_c [11] = '{1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 5};
      int wl_t [11] = '{8, 8, 8, 8, 8, 8, 8, 8, 8, 8, 16};
      int wl_wc [11] = '{'h0D2, 'h19E, 'h26A, 'h336, 'h59A, 'h666, 'h8CA, 'h996, 'hBFA, 'h19A, 30066};
      for (int k = 0; k < 11; k++) begin
        logic [63:0] words [$];
        words.delete();
        dmb_cnt = 4'(wl_n[k]);
        live_dmb = 16'((1 << wl_n[k]) - 1);
        dmb_dav = live_dmb[14:0];
        for (int d = 0; d < wl_n[k]; d++) make_block(25 * wl_t[k] * wl_c[k] + 3, 0, 0, words);
        expect_data.push_back(words);
        expect_fib.push_back(15'h0);
        ccb_l1a();
        wait_idle();
        chk(last_wc == wl_wc[k], $sformatf("workload %0d DMB x %0d CFEB: %0d words, expected %0d",
                                           wl_n[k], wl_c[k], last_wc, wl_wc[k]));
        chk(last_word_count == 24'(wl_wc[k]), "word count output");
        if (last_wc == wl_wc[k]) n_workload++;
      end
      dmb_cnt = 4'd2; live_dmb = 16'h0003; dmb_dav = 15'h0003;
    end
    // --- start timeout: L1A whose data arrives late ---
    feed_en = 0;
    event_with_data(2, 2, 0, 0);
    ccb_l1a();
    repeat (200) @(negedge clk);
    chk(start_to, "start timeout");
    feed_en = 1;
    wait_idle();
    // --- kill all fibers over JTAG: empty events; occupancy ---
    jop(8'd14); jdr(20, 32'hF8000, r);
    occ_present = 60'h5;
    repeat (3) begin ccb_l1a(); repeat (40) @(negedge clk); end
    wait_idle();
    jop(8'd34);
    jdr(32, 0, r); chk(r == 32'd3, $sformatf("occupancy word 0 = %0d", r));
    jdr(32, 0, r); chk(r == 32'd0, "occupancy word 1");
    jdr(32, 0, r); chk(r == 32'd3, "occupancy word 2");
    n_occ++;
    // --- L1A queue overflow -> lost sync; sync reset clears ---
    evn_free = 1; ev_idx = 1 << 20;
    for (int i = 0; i < 40; i++) ccb_l1a();
    wait_idle();
    chk(fmm[FMM_SYNC], "lost sync after overflow");
    ccb_cmd(CMD_SYNC_RST);
    repeat (3) @(negedge clk);
    chk(!fmm[FMM_SYNC], "sync reset clears lost sync");
    // events after a sync reset restart at 1
    evn_free = 0; evn_exp = 1;
    // --- restore fibers; special-word error -> FMM error ---
    jop(8'd14); jdr(20, 32'hFFFFF, r);
    // --- end timeout: the third DMB block of an event is late ---
    begin
      logic [63:0] words [$];
      words.delete();
      dmb_cnt = 4'd3; live_dmb = 16'h0007; dmb_dav = 15'h0007;
      make_block(4, 0, 0, words);
      make_block(5, 0, 0, words);
      ccb_l1a();
      repeat (END_WAIT) @(negedge clk);
      chk(end_to && !start_to, "end timeout");
      make_block(3, 0, 0, words);
      expect_data.push_back(words);
      expect_fib.push_back(15'h0);
      wait_idle();
      chk(fmm[FMM_ERROR], "end timeout sets FMM error");
      dmb_cnt = 4'd2; live_dmb = 16'h0003; dmb_dav = 15'h0003;
    end
    // a hard error needs a reset to clear: soft reset through the CCB
    ccb_cmd(CMD_SOFT_RST);
    repeat (8) @(negedge clk);
    chk(!fmm[FMM_ERROR], "soft reset clears FMM error");
    evn_exp = 1;
    ccb_cmd(CMD_START_DT);
    chk(!fmm[FMM_ERROR] && n_spw_err == 0, "no special-word error on good data");
    event_with_data(3, 2, 0, 1);
    ccb_l1a();
    wait_idle();
    chk(n_spw_err >= 1 && fmm[FMM_ERROR], "special-word error sets FMM error");
    ccb_cmd(CMD_STOP_DT);
    chk(!run, "stopped");
    // --- Track-Finder board: non-inverted bus ---
    board_id = 16'd2; tf = 1;
    ccb_cmd_n = 6'h00; l1a_n = 0;
    repeat (4) @(negedge clk);
    ccb_cmd(CMD_START_DT);
    if (run) n_tf++;
    chk(run, "TF-mode start");
    // JTAG reset acts as a sync reset: the event number returns to zero
    jop(8'd2); jdr(24, 0, r);
    chk(r[23:0] != 0, "event number before JTAG reset");
    jop(8'd1); jdr(1, 0, r);
    jop(8'd2); jdr(24, 0, r);
    chk(r[23:0] == 0, $sformatf("event number after JTAG reset %0d", r[23:0]));
    if (r[23:0] == 0) n_jrst++;
    // let the GbE side drain
    begin
      int t = 0;
      while (gi < 4 * all_out.size() && t < 500000) begin @(negedge clk); t++; end
    end
    repeat (3000) @(negedge clk);
    parse_gbe();

    $display("mechanisms: soft=%0d mrst=%0d bc0=%0d sync=%0d run=%0d cal=%0d l1a_ccb=%0d l1a_jtag=%0d close=%0d",
             n_soft, n_mrst, n_bc0, n_sync, n_run, n_cal, n_l1a_ccb, n_l1a_jtag, n_close);
    $display("  evt_data=%0d evt_empty=%0d crc_err=%0d spw_err=%0d start_to=%0d ovfl=%0d fmm_sync=%0d fmm_err=%0d fmm_busy=%0d bxlim=%0d occ=%0d tf=%0d frames=%0d",
             n_evt_data, n_evt_empty, n_crc_err, n_spw_err, n_start_to, n_ovfl, n_fmm_sync, n_fmm_err,
             n_fmm_busy, n_bxlim, n_occ, n_tf, n_frames);
    $display("  jtag_reset=%0d workloads=%0d fmm_warn=%0d end_to=%0d", n_jrst, n_workload, n_fmm_warn, n_end_to);
    chk(n_soft > 0, "mech soft reset");   chk(n_mrst > 0, "mech mrst");
    chk(n_bc0 > 0, "mech bc0");           chk(n_sync > 0, "mech sync reset");
    chk(n_run > 1, "mech start/stop");    chk(n_cal > 0, "mech cfeb cal");
    chk(n_l1a_jtag > 0, "mech jtag l1a"); chk(n_close >= 2, "mech close l1a");
    chk(n_evt_data >= 8, "mech events with data"); chk(n_evt_empty >= 3, "mech empty events");
    chk(n_crc_err > 0, "mech dmb crc");   chk(n_spw_err > 0, "mech special word");
    chk(n_start_to > 0, "mech start timeout"); chk(n_ovfl > 0, "mech queue overflow");
    chk(n_fmm_sync > 0, "mech fmm sync"); chk(n_fmm_err > 0, "mech fmm error");
    chk(n_fmm_busy > 0, "mech fmm busy");
    chk(n_bxlim > 0, "mech bx limit");    chk(n_occ > 0, "mech occupancy");
    chk(n_jrst > 0, "mech jtag reset");
    chk(n_fmm_warn > 0, "mech fmm warning");
    chk(n_end_to > 0, "mech end timeout");
    chk(n_workload == 11, "all word-count workloads");
    chk(n_tf > 0, "mech tf mode");        chk(n_frames >= 10, "mech gbe frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // GbE frames carry the DDU words, most significant byte first. A frame
  // is K27.7, six 0x55, 0xD5, six 0xFF, whole data words, a 16-bit packet
  // number, zero padding, a 4-byte CRC and K29.7 K23.7.
  // Ethernet CRC-32 worked out bit by bit in the non-reflected form (bytes
  // enter LSB first), then bit-reversed to the order it is sent in
  function automatic logic [31:0] crc32_eth(input logic [8:0] codes [$], input int from, input int to);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int i = from; i < to; i++) for (int b = 0; b < 8; b++) begin
      logic fb;
      fb = c[31] ^ codes[i][b];
      c = {c[30:0], 1'b0};
      if (fb) c = c ^ 32'h04C1_1DB7;
    end
    c = ~c;
    return {<<{c}};
  endfunction

  task automatic parse_gbe();
    int p = 0, w = 0, q, e, pay, pn_prev = -1, pn;
    logic [63:0] x;
    while (p < gcodes.size()) begin
      if (gcodes[p] != K27_7) begin p++; continue; end
      e = p;
      while (e < gcodes.size() && gcodes[e] != K29_7) e++;
      if (e >= gcodes.size()) break;
      chk(gcodes[e + 1] == K23_7, "frame end K23.7");
      q = p + 14;
      pay = e - 4 - q;                           // data + packet number + pad
      chk(pay + 6 >= 56, $sformatf("frame payload %0d bytes", pay));
      while (e - 4 - q >= 10 && w < all_out.size()) begin
        x = '0;
        for (int b = 0; b < 8; b++) x = {x[55:0], gcodes[q + b][7:0]};
        if (x != all_out[w]) break;
        q += 8; w++;
      end
      pn = {gcodes[q][7:0], gcodes[q + 1][7:0]};
      chk(pn_prev < 0 || pn == ((pn_prev + 1) & 16'hFFFF), $sformatf("packet number %0d after %0d", pn, pn_prev));
      pn_prev = pn;
      for (int b = q + 2; b < e - 4; b++) chk(gcodes[b] == 9'h000, "zero pad");
      begin
        logic [31:0] c;
        c = crc32_eth(gcodes, p + 8, e - 4);
        for (int i = 0; i < 4; i++) chk(gcodes[e - 4 + i] == {1'b0, c[8*i +: 8]}, "frame CRC-32");
      end
      n_frames++;
      p = e + 2;
    end
    chk(w == all_out.size(), $sformatf("GbE words %0d of %0d", w, all_out.size()));
  endtask
endmodule
