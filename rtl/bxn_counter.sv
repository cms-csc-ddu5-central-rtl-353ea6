// bxn_counter: bunch-crossing number counter.
// Counts one per 40 MHz clock from 0 up to bx_lim and returns to 0 on the
// clock after it reached bx_lim (LHC: 0..3563; the SPS setting used 923).
// A BC0 command or a BX-counter reset forces the count to 0 on the next clock.
// bx_lim comes from the JTAG-loadable BX-per-orbit register, whose reset
// value is 3563. 'orbit' pulses in the cycle where the count wraps.
module bxn_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc0,
  input  logic [11:0] bx_lim,
  output logic [11:0] bxn,
  output logic        orbit
);
  assign orbit = (bxn >= bx_lim);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)              bxn <= '0;
    else if (bc0 || orbit) bxn <= '0;
    else                  bxn <= bxn + 12'd1;
  end
endmodule
