// jtag_instr_decode: decode of the JTAG user instruction.
// Maps the 8-bit instruction to the documented operations: 'len' is the
// length of the data register the instruction reads (24 for the L1A number,
// 32 for the status word, 16/15/12/20 bits for the error, kill and BX
// registers, 192 for the critical error trap, 32 for the occupancy
// scalers), 'known' is low for an undefined opcode, and the strobes select
// the registers that can be written (Kill register, BX per orbit) or that
// trigger an action (FPGA reset, calibration toggle, VME L1A).
// Combinational.
module jtag_instr_decode
  import ddu_pkg::*;
(
  input  logic [7:0] instr,
  output jtag_op_e   op,
  output logic       known,
  output logic [7:0] len,
  output logic       kill_rd,
  output logic       kill_ld,
  output logic       bxorbit_rd,
  output logic       bxorbit_ld,
  output logic       fpga_rst,
  output logic       cal_toggle,
  output logic       vme_l1a
);
  always_comb begin
    op    = jtag_op_e'(instr);
    known = 1'b1;
    unique case (instr)
      8'd0, 8'd1, 8'd31, 8'd33:                len = 8'd0;
      8'd2:                                    len = 8'd24;
      8'd3, 8'd34:                             len = 8'd32;
      8'd10, 8'd12, 8'd15, 8'd16, 8'd17, 8'd18,
      8'd25, 8'd26:                            len = 8'd15;
      8'd13, 8'd14:                            len = 8'd20;
      8'd21:                                   len = 8'd192;
      8'd29, 8'd30:                            len = 8'd12;
      8'd4, 8'd5, 8'd6, 8'd7, 8'd8, 8'd9, 8'd11, 8'd19, 8'd20,
      8'd22, 8'd23, 8'd24, 8'd27, 8'd28, 8'd32: len = 8'd16;
      default: begin
        len   = 8'd0;
        known = 1'b0;
      end
    endcase
    kill_rd    = (instr == 8'(OP_KILL_RD));
    kill_ld    = (instr == 8'(OP_KILL_LD));
    bxorbit_rd = (instr == 8'(OP_BXORBIT_RD));
    bxorbit_ld = (instr == 8'(OP_BXORBIT_LD));
    fpga_rst   = (instr == 8'(OP_RESET));
    cal_toggle = (instr == 8'(OP_CAL_TOGGLE));
    vme_l1a    = (instr == 8'(OP_VME_L1A));
  end
endmodule
