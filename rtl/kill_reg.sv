// kill_reg: meaning of the 20-bit Kill register.
// A zero kills a path, a one keeps it alive. Bits [14:0] enable the DMB
// input fibers. Bit 15 enables the check-disable bits: only when it is set
// does a zero in bit 16 (ALCT), 17 (TMB), 18 (CFEB) or 19 (DMB, Track-Finder
// use) disable the corresponding data checks. Bit assignments are the
// DDU's; the decode is combinational.
module kill_reg (
  input  logic [19:0] kill,
  output logic [14:0] fiber_en,
  output logic        alct_chk_dis,
  output logic        tmb_chk_dis,
  output logic        cfeb_chk_dis,
  output logic        dmb_chk_dis
);
  always_comb begin
    fiber_en     = kill[14:0];
    alct_chk_dis = kill[15] & ~kill[16];
    tmb_chk_dis  = kill[15] & ~kill[17];
    cfeb_chk_dis = kill[15] & ~kill[18];
    dmb_chk_dis  = kill[15] & ~kill[19];
  end
endmodule
