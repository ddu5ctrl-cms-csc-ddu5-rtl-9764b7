// event_formatter: builds the DDU event record around the DMB data.
// On `start` (one L1A to read out) it latches the event fields and emits,
// one 64-bit word per cycle:
//   H1  {5, evt_type, L1A[23:0], BXN[11:0], source ID[11:0], FOV=5, 0}
//   H2  {8000_0001_8000, 1, DMB full[14:0]}
//   H3  {live DMB[15:0], output status[15:0], 0, DMB DAV[14:0], BOE status[11:0], DMB count[3:0]}
//   (HDR_GAP-1 idle cycles, so data starts HDR_GAP cycles after the last header word)
//   data words taken from din while din_valid (din_ready high), up to din_last
//   T-2 8000_FFFF_8000_8000
//   T-1 {EOF status[31:0], 0, DMB error[14:0], DMB warning[15:0]}
//   TR  {A, 0, word count[23:0], CRC[15:0], trailer status[7:0], TTS[3:0], 0}
// `nodata` at start skips the data phase (an empty event is 6 words). The word
// count includes all six header/trailer words. The CRC (crc16_64) covers every
// word from H1 to TR with TR's CRC field as zero.
// The word order, constants and word count follow the documented format; the
// exact placement of the status sub-fields, the idle gap and the CRC coverage
// are this design's reading. The output has no back-pressure: the downstream
// FIFO is expected to throttle readout through the FMM busy/warn lines.
// Timing: dout/dout_valid/ctrl are registered; H1 appears two cycles after start.
module event_formatter
  import ddu_pkg::*;
#(
  parameter int unsigned HDR_GAP = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        nodata,
  input  logic [3:0]  evt_type,
  input  logic [23:0] l1a_num,
  input  logic [11:0] bxn,
  input  logic [11:0] src_id,
  input  logic [14:0] dmb_full,
  input  logic [15:0] live_dmb,
  input  logic [15:0] out_stat,
  input  logic [14:0] dmb_dav,
  input  logic [11:0] boe_stat,
  input  logic [3:0]  dmb_cnt,
  input  logic [63:0] din,
  input  logic        din_valid,
  input  logic        din_last,
  input  logic [3:0]  sp_voted,
  output logic        din_ready,
  input  logic [31:0] eof_status,
  input  logic [14:0] dmb_err,
  input  logic [15:0] dmb_warn,
  input  logic [7:0]  trl_stat,
  input  logic [3:0]  tts,
  output logic [63:0] dout,
  output logic        dout_valid,
  output ctrl_t       ctrl,
  output logic        busy,
  output logic        done,
  output logic [23:0] word_count
);
  typedef enum logic [2:0] {S_IDLE, S_HDR, S_GAP, S_DATA, S_TRL} state_e;
  state_e     state;
  logic [1:0] idx;          // word index inside header/trailer, gap counter
  logic [63:0] h1, h2, h3;
  logic        skip_data, first_data;
  logic [23:0] wc;

  // ---- word selection ----
  logic [63:0] word, tr_zero;
  logic        emit, is_tr;
  logic [15:0] crc, crc_next;

  assign tr_zero = {EOE_MARK, 4'h0, wc + 24'd1, 16'h0000, trl_stat, tts, 4'h0};
  assign is_tr   = (state == S_TRL) && (idx == 2'd2);
  assign din_ready = (state == S_DATA);

  always_comb begin
    word = '0;
    emit = 1'b0;
    unique case (state)
      S_HDR: begin
        emit = 1'b1;
        word = (idx == 2'd0) ? h1 : (idx == 2'd1) ? h2 : h3;
      end
      S_DATA: begin
        emit = din_valid;
        word = din;
      end
      S_TRL: begin
        emit = 1'b1;
        if (idx == 2'd0)      word = T2_CONST;
        else if (idx == 2'd1) word = {eof_status, 1'b0, dmb_err, dmb_warn};
        else                  word = tr_zero;
      end
      default: ;
    endcase
  end

  crc16_64 u_crc (
    .clk(clk), .rst(rst), .init(start && state == S_IDLE), .en(emit),
    .din(word), .crc(crc), .crc_next(crc_next)
  );

  // ---- sequencer ----
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; idx <= '0; wc <= '0; skip_data <= 1'b0; first_data <= 1'b0;
      h1 <= '0; h2 <= '0; h3 <= '0;
      dout <= '0; dout_valid <= 1'b0; ctrl <= '0; done <= 1'b0; word_count <= '0;
    end else begin
      dout_valid <= emit;
      done       <= 1'b0;
      ctrl       <= '0;
      if (emit) begin
        dout <= is_tr ? {tr_zero[63:32], crc_next, tr_zero[15:0]} : word;
        wc   <= wc + 24'd1;
        ctrl.gold       <= (state == S_DATA);
        ctrl.first_word <= (state == S_DATA) && first_data;
        ctrl.do_hdr     <= (state == S_HDR);
        ctrl.wc_en      <= (state == S_HDR) || (state == S_DATA);
        ctrl.sp_voted   <= sp_voted;
        ctrl.eoe        <= is_tr;
      end
      unique case (state)
        S_IDLE: if (start) begin
          h1 <= {BOE_MARK, evt_type, l1a_num, bxn, src_id, DDU_FOV, 4'h0};
          h2 <= {H2_CONST, 1'b1, dmb_full};
          h3 <= {live_dmb, out_stat, 1'b0, dmb_dav, boe_stat, dmb_cnt};
          skip_data <= nodata;
          wc    <= '0;
          idx   <= '0;
          state <= S_HDR;
        end
        S_HDR: begin
          idx <= idx + 1'b1;
          if (idx == 2'd2) begin
            idx   <= '0;
            state <= (HDR_GAP > 1) ? S_GAP : (skip_data ? S_TRL : S_DATA);
            first_data <= 1'b1;
          end
        end
        S_GAP: begin
          idx <= idx + 1'b1;
          if (32'(idx) + 2 >= HDR_GAP) begin
            idx   <= '0;
            state <= skip_data ? S_TRL : S_DATA;
          end
        end
        S_DATA: if (din_valid) begin
          first_data <= 1'b0;
          if (din_last) state <= S_TRL;
        end
        S_TRL: begin
          idx <= idx + 1'b1;
          if (idx == 2'd2) begin
            idx        <= '0;
            state      <= S_IDLE;
            done       <= 1'b1;
            word_count <= wc + 24'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
