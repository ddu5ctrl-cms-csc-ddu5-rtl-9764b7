// tb_crc22_64: checks the 22-bit CRC against a bit-serial reference model
// (x^22 + x + 1, right-shifting, D0 first) and against the printed
// parallel equations for CRC bits 0..3 for a first word from zero.
module tb_crc22_64;
  logic clk = 0, rst = 1, load_zero = 0, en = 0;
  logic [63:0] din = '0;
  logic [21:0] crc, crc_next;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  crc22_64 dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // serial reference, written bit by bit as an LFSR with explicit taps
  function automatic logic [21:0] ref_step(input logic [21:0] c, input logic [63:0] d);
    logic [21:0] n;
    for (int i = 0; i < 64; i++) begin
      logic fb = c[0] ^ d[i];
      for (int j = 0; j < 21; j++) n[j] = c[j+1];
      n[21] = fb;
      n[20] = c[21] ^ fb;
      c = n;
    end
    return c;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [21:0] model;
    logic [63:0] w;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    chk(crc == 0, "reset value");
    // printed equations, state zero
    for (int n = 0; n < 50; n++) begin
      w = {$urandom, $urandom};
      din = w; #1;
      chk(crc_next[0] == (w[0]^w[1]^w[20]^w[22]^w[42]^w[43]), "CRC0 eq");
      chk(crc_next[1] == (w[0]^w[1]^w[2]^w[21]^w[23]^w[43]^w[44]), "CRC1 eq");
      chk(crc_next[2] == (w[0]^w[1]^w[2]^w[3]^w[22]^w[24]^w[44]^w[45]), "CRC2 eq");
      chk(crc_next[3] == (w[1]^w[2]^w[3]^w[4]^w[23]^w[25]^w[45]^w[46]), "CRC3 eq");
    end
    // running CRC against the model, with periodic load-zero
    model = '0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      w = {$urandom, $urandom};
      din = w;
      en = ($urandom % 4 != 0);
      load_zero = (n % 37 == 36);
      if (load_zero) model = '0;
      else if (en) model = ref_step(model, w);
      @(posedge clk); #1;
      chk(crc == model, $sformatf("crc %h model %h", crc, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
