// special_word_check: vote and consistency check of the DMB "special word" bits.
// A 64-bit DMB word is four 16-bit lanes; in a special (control) word bits
// 12..15 of every lane carry the same 4-bit code. For each of the four bit
// positions the block votes 2-or-more-of-4 (control bits 2-5) and flags a
// disagreement among the four lanes with an ANYORALL gate (SP0..SP3 errors,
// OR'ed into SPWD_ERR). Lane k bit b is word bit 16*k+12+b, as in the
// documented wiring (e.g. bits 13, 29, 45, 61 for SP1).
// Timing: when `gold` is high the voted bits and the error are latched; the
// registered outputs follow one cycle later. `sp_err` is combinational.
// Clearing on reset and latching only on good data are this design's choices.
module special_word_check (
  input  logic        clk,
  input  logic        rst,
  input  logic        gold,        // good data on dat this cycle
  input  logic [63:0] dat,
  output logic [3:0]  sp_err,      // per-bit lane disagreement (combinational)
  output logic [3:0]  voted_q,     // latched voted bits 15..12
  output logic        spwd_err_q   // latched OR of sp_err
);
  logic [3:0] voted;

  for (genvar b = 0; b < 4; b++) begin : g_bit
    logic [3:0] lanes;
    logic any_b, all_b;
    assign lanes = {dat[48+12+b], dat[32+12+b], dat[16+12+b], dat[12+b]};
    anyorall u_aoa (.b(lanes), .any(any_b), .all(all_b), .notall(sp_err[b]));
    // at least two of four lanes set
    assign voted[b] = (lanes[0] & lanes[1]) | (lanes[0] & lanes[2]) | (lanes[0] & lanes[3])
                    | (lanes[1] & lanes[2]) | (lanes[1] & lanes[3]) | (lanes[2] & lanes[3]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      voted_q    <= '0;
      spwd_err_q <= 1'b0;
    end else if (gold) begin
      voted_q    <= voted;
      spwd_err_q <= |sp_err;
    end
  end
endmodule
