// tb_anyorall: exhaustive test of the four-input agreement gate.
// All 16 input patterns are applied; ANY, ALL and NOTALL are compared with
// counts of set bits (any: >0, all: ==4, notall: 1..3).
module tb_anyorall;
  logic [3:0] b;
  logic any_o, all_o, notall_o;
  int checks = 0, failures = 0;
  anyorall dut (.b(b), .any_o(any_o), .all_o(all_o), .notall_o(notall_o));
  initial begin
    for (int i = 0; i < 16; i++) begin
      int n;
      b = 4'(i);
      #1;
      n = $countones(b);
      checks += 3;
      if (any_o !== (n > 0))               failures++;
      if (all_o !== (n == 4))              failures++;
      if (notall_o !== (n > 0 && n < 4))   failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
