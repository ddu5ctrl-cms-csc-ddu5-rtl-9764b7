// crc22_64: 22-bit CRC over 64-bit words, used to check DMB and trigger-board
// trailers. Generator x^22 + x + 1 in a right-shifting LFSR: per data bit d,
// fb = crc[0] ^ d, the register shifts right, fb enters bit 21 and is also
// XORed into bit 20. Data bits enter D0 first. This form reproduces the
// documented parallel equations (e.g. CRC0 = C0^C1^C20^D0^D1^D20^D22^D42^D43).
// Timing: `load_zero` clears the register (the "Load with ZERO" step), `en`
// folds `din` in; the new CRC appears on `crc` the next cycle. `crc_next` is
// the combinational value for the word on `din`.
module crc22_64 (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_zero,
  input  logic        en,
  input  logic [63:0] din,
  output logic [21:0] crc,
  output logic [21:0] crc_next
);
  function automatic logic [21:0] step64(input logic [21:0] c_in, input logic [63:0] d);
    logic [21:0] c;
    logic fb;
    c = c_in;
    for (int i = 0; i < 64; i++) begin
      fb = c[0] ^ d[i];
      c  = {fb, c[21:1]};
      c[20] = c[20] ^ fb;
    end
    return c;
  endfunction

  assign crc_next = step64(crc, din);

  always_ff @(posedge clk) begin
    if (rst || load_zero) crc <= '0;
    else if (en)          crc <= crc_next;
  end
endmodule
