// tb_dmb_check: DMB events are streamed through the checker, some with a
// corrupted CRC, some with a wrong L1A number, one with a data word whose
// special bits disagree, and one with checks disabled. After each trailer 2
// the crc_err / l1a_err flags must match what was injected, and sp_err must
// pulse exactly for the inconsistent word.
module tb_dmb_check;
  import ddu_pkg::*;
  import dmb_tb_pkg::*;
  logic clk = 0, rst = 1, valid = 0, chk_dis = 0;
  logic [63:0] data = '0;
  logic [23:0] exp_l1a = '0;
  dmb_word_e wclass;
  logic dmb_start, dmb_end, crc_err, l1a_err, sp_err;
  int checks = 0, failures = 0, n_end = 0, n_sp = 0, n_start = 0;
  int n_crc_seen = 0, n_l1a_seen = 0;
  always #5 clk = ~clk;
  dmb_check dut (.clk(clk), .rst(rst), .valid(valid), .data(data), .exp_l1a(exp_l1a),
    .chk_dis(chk_dis), .wclass(wclass), .dmb_start(dmb_start), .dmb_end(dmb_end),
    .crc_err(crc_err), .l1a_err(l1a_err), .sp_err(sp_err));

  bit exp_crc, exp_l1;
  always @(posedge clk) if (!rst) begin
    if (dmb_start) n_start++;
    if (sp_err) n_sp++;
    if (dmb_end) begin
      n_end++;
      checks += 2;
      if (crc_err !== exp_crc) begin failures++; $display("crc_err %b exp %b", crc_err, exp_crc); end
      if (l1a_err !== exp_l1) begin failures++; $display("l1a_err %b exp %b", l1a_err, exp_l1); end
      if (crc_err) n_crc_seen++;
      if (l1a_err) n_l1a_seen++;
    end
  end

  initial begin
    logic [63:0] q[$];
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int e = 0; e < 24; e++) begin
      bit bad_crc, bad_l1a, bad_sp;
      q.delete();
      bad_crc = (e % 4 == 1);
      bad_l1a = (e % 5 == 2);
      bad_sp  = (e == 7);
      chk_dis = (e == 9);
      exp_l1a = 24'(e * 4099 + 1);
      make_dmb(bad_l1a ? exp_l1a ^ 24'h800 : exp_l1a, 1 + e % 6, bad_crc, q);
      if (bad_sp) q[2][12] = ~q[2][12];
      exp_crc = !chk_dis && (bad_crc || bad_sp);
      exp_l1  = !chk_dis && bad_l1a;
      foreach (q[i]) begin
        valid = 1; data = q[i];
        @(posedge clk); #1;
        if (i % 3 == 1) begin valid = 0; @(posedge clk); #1; end   // gaps
      end
      valid = 0;
      repeat (4) @(posedge clk); #1;
    end
    checks += 4;
    if (n_end != 24) failures++;
    if (n_start != 24) failures++;
    if (n_sp != 1) begin failures++; $display("sp %0d", n_sp); end
    if (n_crc_seen == 0 || n_l1a_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
