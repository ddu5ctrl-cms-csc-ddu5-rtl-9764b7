// ddu5ctrl: central control FPGA of the CSC DDU5 readout board (top level).
// The DDU collects the data of up to 15 DMBs (cathode-strip-chamber
// motherboards) for every level-1 accept and sends one event record per L1A
// downstream and, optionally, as Ethernet frames on a gigabit link.
//
// Trigger side (clk, 40 MHz): the CCB command bus and L1A line are decoded
// (ccb_cmd_decode; a Track-Finder board, IDs 1-3, uses them non-inverted).
// L1As come from the CCB or from the JTAG "VME L1A" opcode. bxn_counter
// keeps the bunch crossing, l1a_counter the event number; close_l1a delays
// each L1A by 18 crossings, marks L1As closer than 450 ns and recovers the
// crossing of each L1A. A second l1a_counter numbers the delayed L1As; the
// {event number, BXN} pairs wait in an L1A queue (sync_fifo).
// Readout side: the input FIFOs deliver 72 bits per clock over 36 DDR pins
// (ifddr36); bits 63:0 are DMB data, bit 64 marks a DMB's last word and bit
// 65 a valid word (this design's assignment). The read enable runs ahead
// into an 8-word skid FIFO, so the input FIFOs' read latency loses nothing.
// For each queued L1A the
// event_formatter writes the DDU header, the data and the trailer with word
// count and CRC-16. The DMB words feed the special-word check (control
// words only, i.e. bit 15 set in some lane: this design's choice) and a CRC-22
// over each DMB block, checked against the block's last word. event_timeout
// watches the start and end of the readout; occupancy_mon counts boards per
// fiber per event; fmm_status reports busy/warn/lost-sync/error to the FMM.
// Control: jtag_ctrl serves the opcode table (L1A number, status, output
// path status, per-fiber CRC errors, kill register, error registers, BX per
// orbit, board ID, occupancy). Block k of an event is charged to the k-th
// live, enabled fiber (this design's mapping).
// kill_reg masks fibers. reset_seq orders the soft and master resets after a
// CCB soft reset (25 ns / 50 ns / 25 ns at 40 MHz); the JTAG reset opcode
// acts like a CCB sync reset, as the document describes.
// GbE side (gbe_clk): 16-bit words from the external output FIFO are packed
// to 64 bits (bus_match), buffered, framed by gbe_tx and packed two bytes at
// a time for the transceiver (bus_match 9 -> 18 bits).
// Timing: an L1A reaches the queue about 21 clocks after its CCB strobe; an event
// record starts one clock after the formatter is free. All resets are
// synchronous except the DDR input registers, cleared by the board reset.
// Error register bits follow the documented assignments where there is a
// source here (A15 timeout, B0 a DMB full, C7 critical/hard error); A14
// start timeout, A9 special-word disagreement and C1 checks enabled are this
// design's; the rest of the registers (A10 single warning included) reads
// zero, since the input FPGAs and DMB checks that feed them are not built.
module ddu5ctrl
  import ddu_pkg::*;
#(
  parameter int unsigned L1A_Q_DEPTH = 16,
  parameter int unsigned GBE_DEPTH   = 16,
  parameter int unsigned LED_BITS    = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [15:0]  board_id,
  input  logic         fake_mode,
  // CCB
  input  logic [5:0]   ccb_cmd_n,
  input  logic         l1a_n,
  // input FIFOs / DMBs
  input  logic [35:0]  inf_din,
  output logic         inf_ren,
  input  logic [14:0]  dmb_full,
  input  logic [15:0]  live_dmb,
  input  logic [14:0]  dmb_dav,
  input  logic [3:0]   dmb_cnt,
  input  logic [14:0]  fiber_present,
  input  logic [14:0]  fiber_ok,
  input  logic [59:0]  occ_present,
  input  logic [5:0]   err_cond,
  input  logic         system_rdy,
  input  logic         busy_in,
  input  logic         warn_in,
  // DDU event output
  output logic [63:0]  dout,
  output logic         dout_valid,
  output ctrl_t        dout_ctrl,
  output logic [23:0]  last_word_count,
  output logic [3:0]   fmm,
  // control outputs
  output logic         soft_rst,
  output logic         mrst,
  output logic         run,
  output logic [2:0]   cfeb_cal,
  output logic [14:0]  fok_led,
  output logic [14:0]  dav_led,
  output logic         close_l1a_flag,
  output logic         l1a_q_ovfl,
  output logic         dmb_crc_err,
  output logic         spwd_err,
  output logic         start_to,
  output logic         end_to,
  // JTAG
  input  logic         jsel1,
  input  logic         jsel2,
  input  logic         jcapture,
  input  logic         jshift,
  input  logic         jupdate,
  input  logic         jtdi,
  output logic         jtdo1,
  output logic         jtdo2,
  // GbE
  input  logic         gbe_clk,
  input  logic         gbe_rst,
  input  logic [15:0]  ofifo_d16,
  input  logic         ofifo_eoe,
  input  logic         ofifo_empty,
  input  logic         ofifo_pae_n,
  output logic         ofifo_ren,
  output logic [17:0]  gt_txdata,
  output logic         gt_tx_valid,
  output logic         gbe_in_packet
);
  // ---------------- trigger side ----------------
  logic tf_mode, srst;
  logic c_soft, c_sync, c_start, c_stop, c_bc0, c_l1a;
  logic [5:0] c_cmd;
  logic j_kill_load, j_bx_load, j_fpga_rst, j_cal_toggle, j_vme_l1a;
  logic [19:0] j_kill_din, kill;
  logic [11:0] j_bx_din, bxn, bx_lim;
  logic l1a, sync_rst;

  assign tf_mode = (board_id == 16'd1) || (board_id == 16'd2) || (board_id == 16'd3);

  ccb_cmd_decode u_ccb (
    .clk(clk), .rst(rst), .tf_mode(tf_mode), .kill_ttc(fake_mode),
    .ccb_cmd_n(ccb_cmd_n), .l1a_n(l1a_n),
    .soft_rst(c_soft), .sync_rst(c_sync), .start_dt(c_start), .stop_dt(c_stop),
    .bc0(c_bc0), .cfeb_cal(cfeb_cal), .l1a(c_l1a), .cmd(c_cmd)
  );

  reset_seq #(.PRE(1), .MRST_LEN(2), .POST(1)) u_rseq (
    .clk(clk), .rst(rst), .req(c_soft),
    .soft_rst(soft_rst), .mrst(mrst), .busy()
  );

  assign srst     = rst | mrst;
  // the JTAG reset opcode acts like a sync reset
  assign sync_rst = c_sync | j_fpga_rst;
  assign l1a      = c_l1a | j_vme_l1a;

  always_ff @(posedge clk) begin
    if (srst)         run <= 1'b0;
    else if (c_start) run <= 1'b1;
    else if (c_stop)  run <= 1'b0;
  end

  bxn_counter u_bxn (
    .clk(clk), .rst(srst), .bc0(c_bc0), .lim_load(j_bx_load), .lim_din(j_bx_din),
    .bxn(bxn), .bx_lim(bx_lim)
  );

  logic [23:0] l1a_num, evn;
  l1a_counter u_l1a_cnt (.clk(clk), .rst(srst), .sync_rst(sync_rst), .l1a(l1a), .l1a_num(l1a_num));

  logic        l1a_dly;
  logic [12:0] l1a_bxn;
  close_l1a u_close (
    .clk(clk), .rst(srst | sync_rst), .l1a(l1a), .bxn(bxn), .bx_lim(bx_lim),
    .l1a_out(l1a_dly), .bxn_out(l1a_bxn), .close()
  );
  l1a_counter u_evn_cnt (.clk(clk), .rst(srst), .sync_rst(sync_rst), .l1a(l1a_dly), .l1a_num(evn));

  // L1A queue: {event number, close flag, BXN}
  logic [36:0] q_dout;
  logic        q_empty, q_full, q_rd, q_ovfl;
  logic [$clog2(L1A_Q_DEPTH):0] q_count;
  sync_fifo #(.W(37), .DEPTH(L1A_Q_DEPTH)) u_l1a_q (
    .clk(clk), .rst(srst | sync_rst), .wr(l1a_dly), .din({evn + 24'd1, l1a_bxn}),
    .rd(q_rd), .dout(q_dout), .empty(q_empty), .full(q_full), .ovfl(q_ovfl), .count(q_count)
  );
  assign l1a_q_ovfl = q_ovfl;

  always_ff @(posedge clk) begin
    if (srst || sync_rst)       close_l1a_flag <= 1'b0;
    else if (l1a_dly && l1a_bxn[12]) close_l1a_flag <= 1'b1;
  end

  // ---------------- readout side ----------------
  logic [71:0] dat;
  logic        w_valid, w_last, fmt_busy, fmt_done, din_ready;
  logic [3:0]  sp_err, voted;
  logic [23:0] fmt_wc;
  logic [14:0] fiber_en;
  logic        chk_alct, chk_tmb, chk_cfeb, chk_dmb;
  logic [3:0]  blk_cnt;
  logic        fmt_start;
  logic        w_mid_block_n;

  ifddr36 u_ddr (.clk(clk), .clr(rst), .din(inf_din), .dat(dat));

  // Skid buffer: the input FIFOs answer the read enable a few clocks late,
  // so words are read ahead into a small FIFO while it has room for the
  // words still in flight; the formatter pulls from it.
  localparam int SKID = 8;
  logic [64:0] s_dout;
  logic        s_empty, s_ovfl;
  logic [$clog2(SKID):0] s_count;
  sync_fifo #(.W(65), .DEPTH(SKID)) u_skid (
    .clk(clk), .rst(srst), .wr(dat[65]), .din(dat[64:0]),
    .rd(w_valid), .dout(s_dout), .empty(s_empty), .full(), .ovfl(s_ovfl), .count(s_count)
  );
  assign w_valid = !s_empty && din_ready;
  assign w_last  = s_dout[64];
  assign inf_ren = (32'(s_count) + 4 <= SKID);

  // Only control words (bit 15 set in any lane) carry a special-word code;
  // plain data words are not checked.
  logic spw_gold;
  assign spw_gold = w_valid && (s_dout[15] || s_dout[31] || s_dout[47] || s_dout[63]);

  special_word_check u_spw (
    .clk(clk), .rst(srst), .gold(spw_gold), .dat(s_dout[63:0]),
    .sp_err(sp_err), .voted_q(voted), .spwd_err_q(spwd_err)
  );

  // CRC-22 over each DMB block; its last word carries the CRC
  // (low 11 bits in bits 10:0, high 11 bits in bits 26:16)
  logic [21:0] dcrc, dcrc_next;
  crc22_64 u_dcrc (
    .clk(clk), .rst(srst), .load_zero(w_valid && w_last), .en(w_valid),
    .din(s_dout[63:0]), .crc(dcrc), .crc_next(dcrc_next)
  );
  logic crc_fail;
  assign crc_fail = w_valid && w_last && chk_dmb && ({s_dout[26:16], s_dout[10:0]} != dcrc);
  always_ff @(posedge clk) begin
    if (srst || (q_rd)) dmb_crc_err <= 1'b0;
    else if (crc_fail)  dmb_crc_err <= 1'b1;
  end

  // DMB blocks arrive in fiber order over the live, enabled fibers: block k
  // belongs to the k-th such fiber. A CRC error is flagged on that fiber for
  // the event (trailer DMB-error field) and kept until a reset (JTAG 10).
  logic [14:0] blk_fib, crc_err_fib, evt_crc_fib;
  always_comb begin
    logic [3:0] k;
    k = '0;
    blk_fib = '0;
    for (int i = 0; i < 15; i++)
      if (live_dmb[i] && fiber_en[i]) begin
        if (k == blk_cnt) blk_fib[i] = 1'b1;
        k = k + 1'b1;
      end
  end
  always_ff @(posedge clk) begin
    if (srst || sync_rst)  crc_err_fib <= '0;
    else if (crc_fail)     crc_err_fib <= crc_err_fib | blk_fib;
    if (srst || fmt_start) evt_crc_fib <= '0;
    else if (crc_fail)     evt_crc_fib <= evt_crc_fib | blk_fib;
  end

  // start the formatter when an L1A is queued and it is idle
  assign fmt_start = !q_empty && !fmt_busy && !q_rd;
  always_ff @(posedge clk) begin
    if (srst) q_rd <= 1'b0;
    else      q_rd <= fmt_start;
  end

  logic        nodata;
  assign nodata = ((live_dmb[14:0] & fiber_en) == 15'h0);

  logic [31:0] eof_status;
  logic [15:0] err_a, err_b, err_c, out_stat;
  logic        hard_err, sync_err;
  logic [15:0] max_to;
  assign eof_status = {fmm, hard_err, sync_err, start_to, end_to, close_l1a_flag, dmb_crc_err,
                       spwd_err, q_ovfl, s_ovfl, 3'h0, voted, 12'h0};
  assign out_stat   = {12'h0, q_full, q_empty, fmt_busy, run};

  event_formatter u_fmt (
    .clk(clk), .rst(srst), .start(fmt_start), .nodata(nodata),
    .evt_type(4'h1), .l1a_num(q_dout[36:13]), .bxn(q_dout[11:0]),
    .src_id(tf_mode ? TF_SRC_ID : board_id[11:0]),
    .dmb_full(dmb_full), .live_dmb(live_dmb & {1'b1, fiber_en}), .out_stat(out_stat),
    .dmb_dav(dmb_dav & fiber_en), .boe_stat({q_dout[12], 11'h0}), .dmb_cnt(dmb_cnt),
    .din(s_dout[63:0]), .din_valid(!s_empty), .din_last(w_last && !w_mid_block_n),
    .sp_voted(voted), .din_ready(din_ready),
    .eof_status(eof_status), .dmb_err(evt_crc_fib), .dmb_warn(16'h0),
    .trl_stat({hard_err, sync_err, dmb_crc_err, spwd_err, start_to, end_to, close_l1a_flag, q_dout[12]}),
    .tts(fmm),
    .dout(dout), .dout_valid(dout_valid), .ctrl(dout_ctrl), .busy(fmt_busy),
    .done(fmt_done), .word_count(fmt_wc)
  );
  assign last_word_count = fmt_wc;

  // The event's data ends with the last word of the last DMB block: count
  // the DMB blocks against dmb_cnt.
  always_ff @(posedge clk) begin
    if (srst || fmt_start)     blk_cnt <= '0;
    else if (w_valid && w_last) blk_cnt <= blk_cnt + 1'b1;
  end
  assign w_mid_block_n = (blk_cnt + 4'd1 < dmb_cnt);

  // first data word of the event
  logic first_seen;
  always_ff @(posedge clk) begin
    if (srst || fmt_start) first_seen <= 1'b0;
    else if (w_valid)      first_seen <= 1'b1;
  end

  logic cal_mode;
  always_ff @(posedge clk) begin
    if (srst)            cal_mode <= 1'b0;
    else if (|cfeb_cal)  cal_mode <= 1'b1;
    else if (fmt_done)   cal_mode <= 1'b0;
  end

  event_timeout u_to (
    .clk(clk), .rst(srst), .cal_mode(cal_mode), .l1a(fmt_start),
    .begin_data((w_valid && !first_seen) || (fmt_busy && nodata)),
    .done(fmt_done), .start_to(start_to), .end_to(end_to),
    .waiting(), .active(), .max_count(max_to)
  );

  logic [5:0]  occ_addr;
  logic [31:0] occ_data;
  occupancy_mon u_occ (
    .clk(clk), .rst(srst), .evt(fmt_done), .present(occ_present),
    .rd_addr(occ_addr), .rd_data(occ_data)
  );

  for (genvar i = 0; i < 15; i++) begin : g_led
    fiber_led #(.BLINK_BITS(LED_BITS)) u_led (
      .clk(clk), .rst(srst), .present(fiber_present[i]), .ready(fiber_ok[i]),
      .dav(fmt_busy && dmb_dav[i] && fiber_en[i]), .fok_led(fok_led[i]), .dav_led(dav_led[i])
    );
  end

  fmm_status u_fmm (
    .clk(clk), .rst(srst), .system_rdy(system_rdy), .sync_rst(sync_rst),
    .busy_in(busy_in || q_full), .warn_in(warn_in || (q_count >= ($clog2(L1A_Q_DEPTH)+1)'(L1A_Q_DEPTH/2))),
    .sync_err_in(q_ovfl),
    .err_cond(err_cond | {1'b0, 1'b0, 1'b0, end_to, 1'b0, spwd_err}),
    .fmm(fmm), .hard_err(hard_err), .sync_err(sync_err)
  );

  // ---------------- control ----------------
  kill_reg u_kill (
    .clk(clk), .rst(rst), .load(j_kill_load), .din(j_kill_din), .kill(kill),
    .fiber_en(fiber_en), .chk_alct_en(chk_alct), .chk_tmb_en(chk_tmb),
    .chk_cfeb_en(chk_cfeb), .chk_dmb_en(chk_dmb)
  );

  assign err_a = {end_to, start_to, 4'h0, |sp_err, 9'h0};
  assign err_b = {15'h0, |dmb_full};
  assign err_c = {8'h0, hard_err, 5'h0, chk_alct & chk_tmb & chk_cfeb, 1'b0};

  logic cfebcal_auto;
  always_ff @(posedge clk) begin
    if (rst)               cfebcal_auto <= 1'b1;
    else if (j_cal_toggle) cfebcal_auto <= !cfebcal_auto;
  end

  jtag_ctrl u_jtag (
    .clk(clk), .rst(rst), .sel1(jsel1), .sel2(jsel2), .capture(jcapture),
    .shift(jshift), .update(jupdate), .tdi(jtdi), .tdo1(jtdo1), .tdo2(jtdo2), .opcode(),
    .l1a_num(l1a_num), .status32({eof_status[31:1], cfebcal_auto}), .kill(kill),
    .out_path_stat(out_stat), .crc_err_fib(crc_err_fib),
    .err_a(err_a), .err_b(err_b), .err_c(err_c), .dmb_live(live_dmb[14:0] & fiber_en),
    .p_dmb_live(live_dmb[14:0]), .warn_mon({12'h0, fmm}), .max_timeout(max_to),
    .bx_lim(bx_lim), .board_id(board_id), .occ_data(occ_data), .occ_addr(occ_addr),
    .kill_load(j_kill_load), .kill_din(j_kill_din), .bxlim_load(j_bx_load),
    .bxlim_din(j_bx_din), .fpga_rst(j_fpga_rst), .cfebcal_toggle(j_cal_toggle),
    .vme_l1a(j_vme_l1a)
  );

  // ---------------- GbE side ----------------
  logic [63:0] g_w64;
  logic        g_w64_valid, g_eoe_acc, g_full, g_empty, g_rd, g_ovfl;
  logic [64:0] g_dout;
  logic [$clog2(GBE_DEPTH):0] g_count;
  logic        g_ren;

  assign g_ren     = !ofifo_empty && (g_count < ($clog2(GBE_DEPTH)+1)'(GBE_DEPTH - 2));
  assign ofifo_ren = g_ren;

  bus_match #(.IN_W(16), .N(4)) u_bm64 (
    .clk(gbe_clk), .rst(gbe_rst), .ce(g_ren), .din(ofifo_d16),
    .dout(g_w64), .valid(g_w64_valid)
  );

  // an event end seen on any of the four 16-bit words marks the 64-bit word
  logic g_eoe_q;
  always_ff @(posedge gbe_clk) begin
    if (gbe_rst)                      g_eoe_acc <= 1'b0;
    else if (g_w64_valid)             g_eoe_acc <= g_ren && ofifo_eoe;
    else if (g_ren && ofifo_eoe)      g_eoe_acc <= 1'b1;
  end
  assign g_eoe_q = g_eoe_acc;

  sync_fifo #(.W(65), .DEPTH(GBE_DEPTH)) u_gbuf (
    .clk(gbe_clk), .rst(gbe_rst), .wr(g_w64_valid), .din({g_eoe_q, g_w64}),
    .rd(g_rd), .dout(g_dout), .empty(g_empty), .full(g_full), .ovfl(g_ovfl), .count(g_count)
  );

  logic [8:0] g_code;
  gbe_tx u_gtx (
    .clk(gbe_clk), .rst(gbe_rst), .fifo_dout(g_dout[63:0]), .fifo_eoe(g_dout[64]),
    .fifo_empty(g_empty), .fifo_pae_n(ofifo_pae_n), .fifo_ren(g_rd), .code(g_code),
    .in_packet(gbe_in_packet), .pkt_num()
  );

  bus_match #(.IN_W(9), .N(2)) u_bm18 (
    .clk(gbe_clk), .rst(gbe_rst), .ce(1'b1), .din(g_code),
    .dout(gt_txdata), .valid(gt_tx_valid)
  );
endmodule
