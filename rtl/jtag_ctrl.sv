// jtag_ctrl: JTAG instruction decode and data-register multiplexer.
// Two user chains of a boundary-scan primitive are used: chain 1 (sel1)
// carries an 8-bit opcode, chain 2 (sel2) a 32-bit data register. On capture
// in chain 2 the register selected by the opcode is loaded right-justified;
// bits shift out LSB first while TDI enters bit 31, so after shifting N bits
// the last N bits shifted in sit in the top N positions. On update the
// write opcodes take those N bits: 14 loads the 20-bit kill register, 29 the
// 12-bit BX-per-orbit limit. Opcodes 1 (FPGA reset), 31 (toggle CFEB-cal
// auto-L1A) and 33 (VME L1A) pulse an output on update. Opcode 34 reads the
// occupancy counters: each capture reads the current address and advances it,
// looping over 60 words. Opcode 6 reads the 16-bit output path status and
// 10 the 15 per-fiber CRC error flags.
// The opcode numbers and register widths follow the documented opcode table;
// the two-chain arrangement, the 8-bit opcode and the justification are this
// design's choices. Timing: all in the `clk` (JTAG) domain; strobes last one
// cycle.
module jtag_ctrl #(
  parameter int unsigned OCC_WORDS = 60
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sel1,
  input  logic        sel2,
  input  logic        capture,
  input  logic        shift,
  input  logic        update,
  input  logic        tdi,
  output logic        tdo1,
  output logic        tdo2,
  output logic [7:0]  opcode,
  // readable registers
  input  logic [23:0] l1a_num,
  input  logic [31:0] status32,
  input  logic [15:0] out_path_stat,
  input  logic [14:0] crc_err_fib,
  input  logic [19:0] kill,
  input  logic [15:0] err_a,
  input  logic [15:0] err_b,
  input  logic [15:0] err_c,
  input  logic [14:0] dmb_live,
  input  logic [14:0] p_dmb_live,
  input  logic [15:0] warn_mon,
  input  logic [15:0] max_timeout,
  input  logic [11:0] bx_lim,
  input  logic [15:0] board_id,
  input  logic [31:0] occ_data,
  output logic [5:0]  occ_addr,
  // write strobes
  output logic        kill_load,
  output logic [19:0] kill_din,
  output logic        bxlim_load,
  output logic [11:0] bxlim_din,
  output logic        fpga_rst,
  output logic        cfebcal_toggle,
  output logic        vme_l1a
);
  typedef enum logic [7:0] {
    OP_NOOP      = 8'd0,  OP_RESET     = 8'd1,  OP_L1A_NUM   = 8'd2,
    OP_STATUS    = 8'd3,  OP_STAT_LO   = 8'd4,  OP_STAT_HI   = 8'd5,
    OP_OUT_STAT  = 8'd6,  OP_CRC_ERR   = 8'd10,
    OP_KILL_RD   = 8'd13, OP_KILL_LD   = 8'd14, OP_ERR_A     = 8'd22,
    OP_ERR_B     = 8'd23, OP_ERR_C     = 8'd24, OP_DMB_LIVE  = 8'd25,
    OP_PDMB_LIVE = 8'd26, OP_WARN_MON  = 8'd27, OP_MAX_TO    = 8'd28,
    OP_BXLIM_SET = 8'd29, OP_BXLIM_RD  = 8'd30, OP_CFEBCAL   = 8'd31,
    OP_BOARD_ID  = 8'd32, OP_VME_L1A   = 8'd33, OP_OCC       = 8'd34
  } op_e;

  // ---- instruction chain ----
  logic [7:0] ir;
  always_ff @(posedge clk) begin
    if (rst) begin
      ir     <= '0;
      opcode <= OP_NOOP;
    end else if (sel1) begin
      if (shift)  ir     <= {tdi, ir[7:1]};
      if (update) opcode <= ir;
    end
  end
  assign tdo1 = ir[0];

  // ---- data chain ----
  logic [31:0] cap_val, dr;
  always_comb begin
    unique case (opcode)
      OP_L1A_NUM:   cap_val = {8'h0, l1a_num};
      OP_STATUS:    cap_val = status32;
      OP_STAT_LO:   cap_val = {16'h0, status32[15:0]};
      OP_STAT_HI:   cap_val = {16'h0, status32[31:16]};
      OP_OUT_STAT:  cap_val = {16'h0, out_path_stat};
      OP_CRC_ERR:   cap_val = {17'h0, crc_err_fib};
      OP_KILL_RD,
      OP_KILL_LD:   cap_val = {12'h0, kill};
      OP_ERR_A:     cap_val = {16'h0, err_a};
      OP_ERR_B:     cap_val = {16'h0, err_b};
      OP_ERR_C:     cap_val = {16'h0, err_c};
      OP_DMB_LIVE:  cap_val = {17'h0, dmb_live};
      OP_PDMB_LIVE: cap_val = {17'h0, p_dmb_live};
      OP_WARN_MON:  cap_val = {16'h0, warn_mon};
      OP_MAX_TO:    cap_val = {16'h0, max_timeout};
      OP_BXLIM_SET,
      OP_BXLIM_RD:  cap_val = {20'h0, bx_lim};
      OP_BOARD_ID:  cap_val = {16'h0, board_id};
      OP_OCC:       cap_val = occ_data;
      default:      cap_val = 32'h0;
    endcase
  end

  jtag_status_reg #(.W(32)) u_dr (
    .clk(clk), .rst(rst), .dvcenb(capture | shift), .sel2(sel2), .lshft(shift),
    .tdi(tdi), .status(cap_val), .tdo(tdo2), .q(dr)
  );

  // occupancy read address: advance after each capture, loop at OCC_WORDS
  always_ff @(posedge clk) begin
    if (rst || (sel1 && update)) occ_addr <= '0;
    else if (sel2 && capture && !shift && opcode == OP_OCC)
      occ_addr <= (occ_addr == 6'(OCC_WORDS - 1)) ? 6'd0 : occ_addr + 1'b1;
  end

  // update strobes
  logic upd2;
  assign upd2 = sel2 && update;
  always_ff @(posedge clk) begin
    if (rst) begin
      kill_load <= 1'b0; bxlim_load <= 1'b0; fpga_rst <= 1'b0;
      cfebcal_toggle <= 1'b0; vme_l1a <= 1'b0;
      kill_din <= '0; bxlim_din <= '0;
    end else begin
      kill_load      <= upd2 && opcode == OP_KILL_LD;
      bxlim_load     <= upd2 && opcode == OP_BXLIM_SET;
      fpga_rst       <= upd2 && opcode == OP_RESET;
      cfebcal_toggle <= upd2 && opcode == OP_CFEBCAL;
      vme_l1a        <= upd2 && opcode == OP_VME_L1A;
      if (upd2 && opcode == OP_KILL_LD)   kill_din  <= dr[31:12];
      if (upd2 && opcode == OP_BXLIM_SET) bxlim_din <= dr[31:20];
    end
  end
endmodule
