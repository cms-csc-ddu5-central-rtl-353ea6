// tb_special_word_check: random 64-bit words through the special-bit voter.
// For each bit 12..15 the expected vote is "2 or more of the four copies" and
// the expected error is "copies not all equal", computed by counting.
module tb_special_word_check;
  logic clk = 0, rst = 1, en = 0;
  logic [63:0] din;
  logic [3:0] voted, sp_err;
  logic any_err;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  special_word_check dut (.clk(clk), .rst(rst), .en(en), .din(din),
    .voted(voted), .sp_err(sp_err), .any_err(any_err));
  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 400; k++) begin
      logic [3:0] ev, ee;
      din = {$urandom, $urandom};
      if (k % 3 == 0) din = {4{4'(k), 12'h0}} | (din & 64'h0FFF_0FFF_0FFF_0FFF);
      en = 1;
      for (int n = 0; n < 4; n++) begin
        int c;
        c = din[12+n] + din[28+n] + din[44+n] + din[60+n];
        ev[n] = (c >= 2);
        ee[n] = (c != 0 && c != 4);
      end
      @(posedge clk); #1;
      checks += 3;
      if (voted !== ev) failures++;
      if (sp_err !== ee) failures++;
      if (any_err !== |ee) failures++;
    end
    // disabled: outputs hold
    begin
      logic [3:0] hv, he;
      hv = voted; he = sp_err;
      en = 0; din = ~din; @(posedge clk); #1;
      checks++;
      if (voted !== hv || sp_err !== he) failures++;
    end
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
