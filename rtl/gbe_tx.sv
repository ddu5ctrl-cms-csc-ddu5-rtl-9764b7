// gbe_tx: packs DDU output-FIFO words into Ethernet frames for the gigabit
// transceiver, one 9-bit code-group {K flag, byte} per clock.
// During reset the link carries the sync ordered set, afterwards idles (both
// from gbe_ordered_set). When the FIFO holds data and the inter-packet wait
// has passed, a frame is sent on an idle boundary:
//   /S/ (K27.7) + six 0x55 + 0xD5 (8-byte header)
//   six 0xFF (broadcast destination MAC)
//   FIFO words, 8 bytes each, most significant byte first
//   16-bit packet number
//   zero fill until the bytes after the header reach MIN_BYTES (56)
//   CRC-32 (IEEE 802.3, over the bytes after the header, low byte first)
//   /T/ (K29.7) /R/ (K23.7), then the idle pattern again.
// A frame ends after a word marked end-of-event, when the FIFO runs empty, or
// once MAX_DATA_BYTES (8960) of data have gone out, so an event end is always
// a frame end. Between frames the transmitter waits WAIT_CYC cycles (0x500 =
// 20.48 us at 16 ns) unless `fifo_pae_n` is high, i.e. the FIFO already holds
// a lot of data.
// The FIFO is first-word-fall-through: `fifo_dout` is valid while
// `fifo_empty` is low and `fifo_ren` pops it. The idle/sync codes, the
// 8-byte header, the FF destination bytes, the packet number, the 56-byte
// minimum and the limits follow the documented sequence; the preamble bytes,
// the /S/ /T/ /R/ delimiters, the byte order and the CRC-32 are this design's
// choices based on standard gigabit Ethernet.
module gbe_tx
  import ddu_pkg::*;
#(
  parameter int unsigned MAX_DATA_BYTES = 8960,
  parameter int unsigned MIN_BYTES      = 56,
  parameter int unsigned WAIT_CYC       = 32'h500
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] fifo_dout,
  input  logic        fifo_eoe,     // this word ends an event
  input  logic        fifo_empty,
  input  logic        fifo_pae_n,   // high: FIFO above its almost-empty mark
  output logic        fifo_ren,
  output logic [8:0]  code,
  output logic        in_packet,
  output logic [15:0] pkt_num
);
  typedef enum logic [3:0] {
    S_IDLE, S_WAIT, S_HDR, S_DMAC, S_DATA, S_PNUM, S_PAD, S_CRC, S_TRL
  } state_e;

  state_e      state;
  logic [3:0]  bcnt;           // byte index within the current field
  logic [63:0] word;           // word being sent
  logic        word_eoe;
  logic [15:0] nbytes;         // bytes after the header
  logic [15:0] dbytes;         // data bytes in this frame
  logic [31:0] crc, crc_upd;
  logic [31:0] wait_cnt;
  logic [8:0]  os_code, nxt;
  logic        os_comma;
  logic        fcs_byte;       // nxt is covered by the CRC

  gbe_ordered_set u_os (
    .clk(clk), .rst(rst), .sync(1'b0), .oe(1'b1), .code(os_code), .comma(os_comma)
  );

  function automatic logic [31:0] crc32_byte(input logic [31:0] c_in, input logic [7:0] b);
    logic [31:0] c;
    c = c_in;
    for (int i = 0; i < 8; i++) begin
      if (c[0] ^ b[i]) c = (c >> 1) ^ 32'hEDB8_8320;
      else             c = c >> 1;
    end
    return c;
  endfunction

  logic [31:0] fcs;
  assign fcs = ~crc;

  // ---- byte multiplexer ----
  always_comb begin
    nxt      = os_code;
    fcs_byte = 1'b0;
    unique case (state)
      S_HDR:  nxt = (bcnt == 0) ? K27_7 : (bcnt == 4'd7) ? 9'h0D5 : 9'h055;
      S_DMAC: begin nxt = 9'h0FF; fcs_byte = 1'b1; end
      S_DATA: begin nxt = {1'b0, word[63 - 8*bcnt[2:0] -: 8]}; fcs_byte = 1'b1; end
      S_PNUM: begin nxt = {1'b0, (bcnt == 0) ? pkt_num[15:8] : pkt_num[7:0]}; fcs_byte = 1'b1; end
      S_PAD:  begin nxt = 9'h000; fcs_byte = 1'b1; end
      S_CRC:  nxt = {1'b0, fcs[8*bcnt[1:0] +: 8]};
      S_TRL:  nxt = (bcnt == 0) ? K29_7 : K23_7;
      default: nxt = os_code;
    endcase
  end

  assign crc_upd  = crc32_byte(crc, nxt[7:0]);
  assign in_packet = (state != S_IDLE) && (state != S_WAIT);

  // a frame may start in place of a K28.5 once the wait is over
  logic can_start;
  assign can_start = !fifo_empty && os_comma && (wait_cnt == 0 || fifo_pae_n);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; bcnt <= '0; word <= '0; word_eoe <= 1'b0;
      nbytes <= '0; dbytes <= '0; crc <= '1; wait_cnt <= '0; pkt_num <= '0;
      code <= K28_5; fifo_ren <= 1'b0;
    end else begin
      code     <= nxt;
      fifo_ren <= 1'b0;
      if (fcs_byte) begin
        crc    <= crc_upd;
        nbytes <= nbytes + 1'b1;
      end
      if (wait_cnt != 0) wait_cnt <= wait_cnt - 1'b1;
      unique case (state)
        S_IDLE, S_WAIT: if (can_start) begin
          state <= S_HDR; bcnt <= 4'd1; code <= K27_7;
          crc <= '1; nbytes <= '0; dbytes <= '0;
        end
        S_HDR: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 4'd7) begin state <= S_DMAC; bcnt <= '0; end
        end
        S_DMAC: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 4'd4) begin      // pop the first word one cycle ahead
            word     <= fifo_dout;
            word_eoe <= fifo_eoe;
            fifo_ren <= 1'b1;
          end
          if (bcnt == 4'd5) begin state <= S_DATA; bcnt <= '0; end
        end
        S_DATA: begin
          bcnt   <= bcnt + 1'b1;
          dbytes <= dbytes + 1'b1;
          if (bcnt == 4'd7) begin
            bcnt <= '0;
            if (word_eoe || fifo_empty || fifo_ren || 32'(dbytes) + 1 >= MAX_DATA_BYTES)
              state <= S_PNUM;
            else begin
              word     <= fifo_dout;
              word_eoe <= fifo_eoe;
              fifo_ren <= 1'b1;
            end
          end
        end
        S_PNUM: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 4'd1) begin
            bcnt  <= '0;
            state <= (32'(nbytes) + 1 >= MIN_BYTES) ? S_CRC : S_PAD;
          end
        end
        S_PAD: if (32'(nbytes) + 1 >= MIN_BYTES) state <= S_CRC;
        S_CRC: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 4'd3) begin state <= S_TRL; bcnt <= '0; end
        end
        S_TRL: begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 4'd1) begin
            bcnt     <= '0;
            state    <= S_WAIT;
            pkt_num  <= pkt_num + 1'b1;
            wait_cnt <= WAIT_CYC;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
