// crc16_64: 16-bit CRC over 64-bit words for the DDU event trailer.
// Generator x^16 + x^15 + x^2 + 1 (the documented polynomial). The register
// is a left-shifting LFSR fed MSB first (bit 63 down to bit 0) and starts at
// 16'hFFFF; bit order and start value are this design's choices.
// Timing: `init` presets the register, `en` folds in `din`; the result is on
// `crc` one cycle later and `crc_next` gives it combinationally.
module crc16_64 (
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        en,
  input  logic [63:0] din,
  output logic [15:0] crc,
  output logic [15:0] crc_next
);
  localparam logic [15:0] POLY = 16'h8005;

  function automatic logic [15:0] step64(input logic [15:0] c_in, input logic [63:0] d);
    logic [15:0] c;
    logic fb;
    c = c_in;
    for (int i = 63; i >= 0; i--) begin
      fb = c[15] ^ d[i];
      c  = {c[14:0], 1'b0} ^ (fb ? POLY : 16'h0000);
    end
    return c;
  endfunction

  assign crc_next = step64(crc, din);

  always_ff @(posedge clk) begin
    if (rst || init) crc <= 16'hFFFF;
    else if (en)     crc <= crc_next;
  end
endmodule
