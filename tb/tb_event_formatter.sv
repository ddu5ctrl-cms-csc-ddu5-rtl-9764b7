// tb_event_formatter: runs events through the formatter and compares every
// output word with a reference record built here: the three header words,
// the data, the three trailer words, word count and a bit-serial CRC-16.
// Event sizes follow the documented word-count rule
// 6 + 25*Nts*nCFEB + 4*nDMB (8 time samples): the empty event (6 words),
// 1 DMB/1 CFEB (210 = 0xD2), 2 DMB/1 CFEB each (414 = 0x19E) and
// 2 DMB/2 CFEB each (814 = 0x32E). Also checks that the first data word comes
// 3 cycles after the last header word, the control bits, and random
// data-valid gaps.
module tb_event_formatter;
  import ddu_pkg::*;
  logic clk = 0, rst = 1, start = 0, nodata = 0;
  logic [3:0] evt_type = 4'h1, dmb_cnt = '0, tts = 4'h0, sp_voted = 4'h0;
  logic [23:0] l1a_num = '0;
  logic [11:0] bxn = '0, src_id = 12'h2F8, boe_stat = '0;
  logic [14:0] dmb_full = '0, dmb_dav = '0, dmb_err = '0;
  logic [15:0] live_dmb = '0, out_stat = '0, dmb_warn = '0;
  logic [63:0] din = '0;
  logic din_valid = 0, din_last = 0, din_ready;
  logic [31:0] eof_status = '0;
  logic [7:0] trl_stat = '0;
  logic [63:0] dout;
  logic dout_valid, busy, done;
  ctrl_t ctrl;
  logic [23:0] word_count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  event_formatter dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [15:0] crc_word(input logic [15:0] c, input logic [63:0] w);
    for (int i = 63; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ w[i];
      c = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h8005;
    end
    return c;
  endfunction

  logic [63:0] got [$];
  int          got_cyc [$];
  int          cyc = 0;
  ctrl_t       got_ctrl [$];
  always @(negedge clk) begin
    cyc++;
    if (dout_valid) begin got.push_back(dout); got_cyc.push_back(cyc); got_ctrl.push_back(ctrl); end
  end

  task automatic run_event(input int ndata, input bit gaps, input int exp_wc);
    logic [63:0] exp [$];
    logic [63:0] data [$];
    logic [15:0] c;
    logic [63:0] tr;
    int wc;
    got.delete(); got_cyc.delete(); got_ctrl.delete();
    l1a_num = 24'($urandom); bxn = 12'($urandom); live_dmb = 16'($urandom);
    dmb_full = 15'($urandom); dmb_dav = 15'($urandom); boe_stat = 12'($urandom);
    dmb_cnt = 4'($urandom); out_stat = 16'($urandom);
    eof_status = $urandom; dmb_err = 15'($urandom); dmb_warn = 16'($urandom);
    trl_stat = 8'($urandom); tts = 4'($urandom);
    for (int i = 0; i < ndata; i++) data.push_back({$urandom, $urandom});
    exp.push_back({4'h5, evt_type, l1a_num, bxn, src_id, 4'h5, 4'h0});
    exp.push_back({48'h8000_0001_8000, 1'b1, dmb_full});
    exp.push_back({live_dmb, out_stat, 1'b0, dmb_dav, boe_stat, dmb_cnt});
    foreach (data[i]) exp.push_back(data[i]);
    exp.push_back(64'h8000_FFFF_8000_8000);
    exp.push_back({eof_status, 1'b0, dmb_err, dmb_warn});
    wc = exp.size() + 1;
    tr = {4'hA, 4'h0, 24'(wc), 16'h0, trl_stat, tts, 4'h0};
    c = 16'hFFFF;
    foreach (exp[i]) c = crc_word(c, exp[i]);
    c = crc_word(c, tr);
    tr[31:16] = c;
    exp.push_back(tr);
    chk(wc == exp_wc, $sformatf("reference word count %0d exp %0d", wc, exp_wc));
    // drive
    @(negedge clk); nodata = (ndata == 0); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < ndata; ) begin
      din_valid = gaps ? ($urandom % 3 != 0) : 1'b1;
      din = data[i]; din_last = (i == ndata - 1);
      #1;
      if (din_valid && din_ready) i++;   // taken at the coming rising edge
      @(negedge clk);
    end
    din_valid = 0; din_last = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(got.size() == exp.size(), $sformatf("words %0d exp %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      chk(got[i] == exp[i], $sformatf("word %0d: %h exp %h", i, got[i], exp[i]));
    chk(word_count == 24'(exp_wc), $sformatf("word_count %0d", word_count));
    chk(got_ctrl[0].do_hdr && got_ctrl[2].do_hdr && !got_ctrl[3].do_hdr, "do_hdr bits");
    chk(got_ctrl[got_ctrl.size()-1].eoe, "eoe on last word");
    if (ndata > 0) begin
      chk(got_cyc[3] - got_cyc[2] >= 3, $sformatf("header-to-data gap %0d", got_cyc[3] - got_cyc[2]));
      chk(got_ctrl[3].gold && got_ctrl[3].first_word && got_ctrl[3].wc_en, "first data ctrl");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    run_event(0, 0, 6);                        // no data: 0x006
    run_event(25*8*1 + 4*1, 0, 'hD2);          // 1 DMB, 1 CFEB
    run_event(25*8*2 + 4*2, 1, 'h19E);         // 2 DMB, 1 CFEB each
    run_event(25*8*4 + 4*2, 0, 'h32E);         // 2 DMB, 2 CFEB each
    run_event(1, 1, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
