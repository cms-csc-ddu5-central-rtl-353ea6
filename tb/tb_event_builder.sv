// tb_event_builder: events of several sizes are framed and every output word
// is compared with a model built from the DDU format: H1/H2/H3, the data
// words, T-2, T-1 and TR with the word count and a CRC-16/CMS computed byte
// by byte over all words (TR's CRC field as zero). Sizes include the
// documented cases: an empty event (6 words) and one DMB with one CFEB and
// 8 time samples (6 + 25*8*1 + 4 = 210 words = 0x0D2). The first events run
// with no stalls and must take exactly one clock per word; later ones have
// random gaps on the input and random back-pressure on the output. One
// event is cut short by 'cut'.
module tb_event_builder;
  import ddu_pkg::*;
  logic clk = 0, rst = 1, start = 0, no_data = 0, abort = 0;
  ddu_hdr_t hdr;
  ddu_trl_t trl;
  logic busy, in_valid = 0, in_last = 0, in_ready, out_valid, out_boe, out_eoe, out_ready = 1;
  logic [63:0] in_data = '0, out_data;
  logic [23:0] last_wc;
  int checks = 0, failures = 0;
  logic [63:0] expq[$];
  always #5 clk = ~clk;
  event_builder dut (.clk(clk), .rst(rst), .start(start), .no_data(no_data), .cut(abort),
    .hdr(hdr), .trl(trl), .trl_hold(1'b0), .busy(busy), .in_valid(in_valid), .in_data(in_data), .in_last(in_last),
    .in_ready(in_ready), .out_valid(out_valid), .out_data(out_data), .out_boe(out_boe),
    .out_eoe(out_eoe), .out_ready(out_ready), .last_wc(last_wc));

  function automatic logic [15:0] crc_b(input logic [15:0] c, input logic [7:0] b);
    c = c ^ {b, 8'h00};
    for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h8005) : (c << 1);
    return c;
  endfunction

  // output monitor
  int nout = 0;
  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    logic [63:0] e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected word"); end
    else begin
      e = expq.pop_front();
      if (out_data !== e) begin failures++; $display("word %0d got %h exp %h", nout, out_data, e); end
    end
    nout++;
  end

  logic stall_en = 0;
  always @(posedge clk) out_ready <= stall_en ? ($urandom % 4 != 0) : 1'b1;

  task automatic run_event(input int ndata, input bit nd, input int cut);
    logic [63:0] d[$], words[$];
    logic [15:0] c;
    int sent, t0, t1, nexp;
    hdr = {24'($urandom), 12'($urandom), 12'd760, 4'h0, 4'h8, 16'($urandom), 16'($urandom),
           16'($urandom), 16'($urandom), 12'($urandom), 4'($urandom)};
    trl = {32'($urandom), 16'($urandom), 16'($urandom), 8'($urandom), 4'($urandom), 4'($urandom)};
    for (int i = 0; i < ndata; i++) d.push_back({$urandom, $urandom});
    nexp = (cut >= 0) ? cut : (nd ? 0 : ndata);
    words.push_back({4'h5, 4'h1, hdr.l1a, hdr.bxn, hdr.src_id, hdr.fov, hdr.kstat});
    words.push_back({48'h8000_0001_8000, hdr.dmb_full});
    words.push_back({hdr.live, hdr.ostar, hdr.dav, hdr.boe_stat, hdr.ndmb});
    for (int i = 0; i < nexp; i++) words.push_back(d[i]);
    words.push_back(64'h8000_FFFF_8000_8000);
    words.push_back({trl.ddu_status, trl.dmb_err, trl.dmb_warn});
    words.push_back({4'hA, 4'h0, 24'(nexp + 6), 16'h0, trl.eof_stat, trl.mstat, trl.kstat});
    c = 16'hFFFF;
    foreach (words[i]) for (int b = 7; b >= 0; b--) c = crc_b(c, words[i][8*b +: 8]);
    words[words.size()-1][31:16] = c;
    foreach (words[i]) expq.push_back(words[i]);
    no_data = nd; start = 1; @(posedge clk); #1; start = 0;
    t0 = $time;
    sent = 0;
    while (busy) begin
      if (cut >= 0 && sent == cut) begin
        in_valid = 0; abort = 1; @(posedge clk); #1; abort = 0; break;
      end
      if (!nd && sent < ndata) begin
        in_valid = stall_en ? ($urandom % 3 != 0) : 1'b1;
        in_data = d[sent]; in_last = (sent == ndata - 1);
      end else in_valid = 0;
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      #1;
    end
    while (busy) begin @(posedge clk); #1; end
    t1 = $time;
    in_valid = 0;
    checks += 2;
    if (last_wc !== 24'(nexp + 6)) begin failures++; $display("wc %0d", last_wc); end
    if (expq.size() != 0) begin failures++; $display("%0d words missing", expq.size()); expq.delete(); end
    if (!stall_en && cut < 0) begin
      checks++;
      if ((t1 - t0) / 10 != nexp + 6) begin failures++; $display("clocks %0d for %0d words", (t1 - t0) / 10, nexp + 6); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    run_event(0, 1, -1);            // "no data" event: 6 words
    run_event(204, 0, -1);          // one DMB, one CFEB: 210 words
    run_event(408, 0, -1);          // 2 DMB x 1 CFEB: 414 words
    stall_en = 1;
    for (int k = 0; k < 12; k++) run_event(1 + $urandom % 60, 0, -1);
    run_event(30, 0, 10);           // aborted after 10 data words
    checks++; if (nout == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
