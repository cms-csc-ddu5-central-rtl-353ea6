// tb_jtag_instr_decode: all 256 instruction values. Register lengths must
// match the JTAG instruction table (24 for opcode 2, 32 for 3 and 34, 20 for
// 13/14, 12 for 29/30, 192 for 21, 15 or 16 for the others, none for
// 0/1/31/33), opcodes above 34 must be unknown, and each strobe must be
// active for its own opcode only.
module tb_jtag_instr_decode;
  import ddu_pkg::*;
  logic [7:0] instr, len;
  jtag_op_e op;
  logic known, kill_rd, kill_ld, bxo_rd, bxo_ld, frst, cal, vl1a;
  int checks = 0, failures = 0;
  jtag_instr_decode dut (.instr(instr), .op(op), .known(known), .len(len), .kill_rd(kill_rd),
    .kill_ld(kill_ld), .bxorbit_rd(bxo_rd), .bxorbit_ld(bxo_ld), .fpga_rst(frst),
    .cal_toggle(cal), .vme_l1a(vl1a));
  int lens[35] = '{0, 0, 24, 32, 16, 16, 16, 16, 16, 16, 15, 16, 15, 20, 20, 15, 15, 15, 15, 16,
                   16, 192, 16, 16, 16, 15, 15, 16, 16, 12, 12, 0, 16, 0, 32};
  initial begin
    for (int i = 0; i < 256; i++) begin
      instr = 8'(i); #1;
      checks += 3;
      if (known !== (i <= 34)) failures++;
      if (len !== ((i <= 34) ? 8'(lens[i]) : 8'd0)) begin failures++; $display("op %0d len %0d", i, len); end
      if ({kill_rd, kill_ld, bxo_rd, bxo_ld, frst, cal, vl1a} !==
          {i == 13, i == 14, i == 30, i == 29, i == 1, i == 31, i == 33}) failures++;
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
