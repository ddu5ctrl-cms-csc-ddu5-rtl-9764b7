// tb_crc16_64: compares the 64-bit-parallel CRC-16 with a bit-serial model
// of x^16 + x^15 + x^2 + 1 (MSB first, start 0xFFFF), with random enables
// and re-initialisations.
module tb_crc16_64;
  logic clk = 0, rst = 1, init = 0, en = 0;
  logic [63:0] din = '0;
  logic [15:0] crc, crc_next;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  crc16_64 dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [15:0] ref_bit(input logic [15:0] c, input logic d);
    logic fb = c[15] ^ d;
    logic [15:0] n = {c[14:0], 1'b0};
    if (fb) begin n[0] = ~n[0]; n[2] = ~n[2]; n[15] = ~n[15]; end
    return n;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] model;
    logic [63:0] w;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    chk(crc == 16'hFFFF, "reset value");
    model = 16'hFFFF;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      w = {$urandom, $urandom};
      din = w; en = ($urandom % 3 != 0); init = (n % 41 == 40);
      if (init) model = 16'hFFFF;
      else if (en) for (int i = 63; i >= 0; i--) model = ref_bit(model, w[i]);
      @(posedge clk); #1;
      chk(crc == model, $sformatf("crc %h model %h", crc, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
