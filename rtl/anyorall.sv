// anyorall: four-input agreement gate. ANY is the OR of the inputs, ALL their
// AND, and NOTALL = ANY xor ALL, which is high when the inputs disagree. The
// gate structure follows the documented macro. Purely combinational.
module anyorall (
  input  logic [3:0] b,
  output logic       any,
  output logic       all,
  output logic       notall
);
  always_comb begin
    any    = |b;
    all    = &b;
    notall = any ^ all;
  end
endmodule
