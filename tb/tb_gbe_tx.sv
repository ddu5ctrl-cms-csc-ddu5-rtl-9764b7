// tb_gbe_tx: feeds events (64-bit words, end-of-event flag on the last) into
// a first-word-fall-through FIFO model, records the code-group stream and
// parses it: idle pattern between frames, 8-byte header, FF destination,
// data bytes MSB first, packet number, zero fill to 56 bytes, CRC-32 of the
// frame body (computed here bit by bit with the non-reflected generator
// 04C11DB7 on bit-reversed bytes), /T/ /R/ trailer, and the wait between
// frames. Uses MAX_DATA_BYTES = 64 so long events are split into frames.
module tb_gbe_tx;
  import ddu_pkg::*;
  localparam int MAXB = 64, WAITC = 40;
  logic clk = 0, rst = 1;
  logic [63:0] fifo_dout;
  logic fifo_eoe, fifo_empty, fifo_pae_n = 0, fifo_ren, in_packet;
  logic [8:0] code;
  logic [15:0] pkt_num;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  gbe_tx #(.MAX_DATA_BYTES(MAXB), .WAIT_CYC(WAITC)) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // FIFO model
  logic [64:0] fq [$];
  assign fifo_empty = (fq.size() == 0);
  assign fifo_dout  = fifo_empty ? 64'h0 : fq[0][63:0];
  assign fifo_eoe   = fifo_empty ? 1'b0 : fq[0][64];
  always @(posedge clk) if (fifo_ren && fq.size() > 0) void'(fq.pop_front());

  logic [8:0] stream [$];
  always @(negedge clk) if (!rst) stream.push_back(code);

  // expected frames: list of word lists
  logic [63:0] frames [$][$];

  function automatic logic [31:0] crc32_msb(input logic [7:0] bytes [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (bytes[i]) for (int b = 0; b < 8; b++) begin
      logic fb;
      fb = c[31] ^ bytes[i][b];          // bytes go LSB first on the wire
      c = {c[30:0], 1'b0};
      if (fb) c = c ^ 32'h04C1_1DB7;
    end
    c = ~c;
    return {<<{c}};                      // bit-reverse to wire order
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nsplit = 0, npad = 0;
  initial begin
    int sizes [6] = '{1, 3, 8, 20, 2, 9};
    logic [63:0] w;
    logic [63:0] cur [$];
    repeat (3) @(negedge clk); rst = 0;
    repeat (10) @(negedge clk);
    foreach (sizes[e]) begin
      cur.delete();
      for (int i = 0; i < sizes[e]; i++) begin
        w = {$urandom, $urandom};
        fq.push_back({(i == sizes[e] - 1), w});
        cur.push_back(w);
        if (cur.size() == MAXB / 8 || i == sizes[e] - 1) begin
          frames.push_back(cur);
          if (i != sizes[e] - 1) nsplit++;
          cur.delete();
        end
      end
      fifo_pae_n = (e == 4);
      while (fq.size() > 0 || in_packet) @(negedge clk);
      repeat ($urandom % 30) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    parse();
    chk(nsplit >= 2, "long events were split");
    chk(npad >= 2, "short frames were padded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic parse();
    int p = 0, f = 0, last_end = -1000;
    logic [7:0] body [$];
    logic [31:0] c;
    while (p < stream.size()) begin
      if (stream[p] != K27_7) begin
        // idle pattern (the first cycle after reset is still a sync cycle)
        chk(stream[p] == K28_5 || stream[p] == D16_2 || (p < 6 && (stream[p] == D21_5 || stream[p] == D2_2)), $sformatf("idle code %h at %0d", stream[p], p));
        p++;
        continue;
      end
      chk(f < frames.size(), "unexpected frame");
      if (f >= frames.size()) return;
      if (f > 0 && f != 6) chk(p - last_end >= WAITC, $sformatf("frame %0d gap %0d", f, p - last_end));
      for (int i = 1; i < 7; i++) chk(stream[p+i] == 9'h055, "preamble");
      chk(stream[p+7] == 9'h0D5, "SFD");
      p += 8;
      body.delete();
      for (int i = 0; i < 6; i++) body.push_back(8'hFF);
      foreach (frames[f][k]) for (int b = 7; b >= 0; b--) body.push_back(frames[f][k][8*b +: 8]);
      body.push_back(8'(f >> 8)); body.push_back(8'(f));
      if (body.size() < 56) npad++;
      while (body.size() < 56) body.push_back(8'h00);
      foreach (body[i]) chk(stream[p+i] == {1'b0, body[i]}, $sformatf("frame %0d byte %0d: %h exp %h", f, i, stream[p+i], body[i]));
      p += body.size();
      c = crc32_msb(body);
      for (int i = 0; i < 4; i++) chk(stream[p+i] == {1'b0, c[8*i +: 8]}, $sformatf("frame %0d crc byte %0d", f, i));
      p += 4;
      chk(stream[p] == K29_7 && stream[p+1] == K23_7, "trailer");
      p += 2;
      last_end = p;
      f++;
    end
    chk(f == frames.size(), $sformatf("frames %0d exp %0d", f, frames.size()));
  endtask
endmodule
