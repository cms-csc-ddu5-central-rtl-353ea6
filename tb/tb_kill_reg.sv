// tb_kill_reg: random 20-bit Kill register values. Fiber enables are bits
// 14:0; a check is disabled only when bit 15 is one and its own bit
// (16 ALCT, 17 TMB, 18 CFEB, 19 DMB) is zero.
module tb_kill_reg;
  logic [19:0] kill;
  logic [14:0] fe;
  logic a, t, c, d;
  int checks = 0, failures = 0;
  kill_reg dut (.kill(kill), .fiber_en(fe), .alct_chk_dis(a), .tmb_chk_dis(t),
    .cfeb_chk_dis(c), .dmb_chk_dis(d));
  initial begin
    for (int k = 0; k < 500; k++) begin
      kill = (k == 0) ? 20'hFFFFF : 20'($urandom);
      #1;
      checks += 2;
      if (fe !== kill[14:0]) failures++;
      if ({d, c, t, a} !== (kill[15] ? ~kill[19:16] : 4'b0000)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
