// close_l1a_monitor: L1A proximity tracker.
// Every L1A is carried through a PIPE-stage shift register (PIPE = 40 clocks
// = 1000 ns at 40 MHz). When an L1A enters while another one is still in the
// pipe, both are marked "close". When an L1A leaves the pipe, l1a_out pulses
// with its close flag, and the bunch-crossing number is corrected for the
// pipe delay (BXN - 40, modulo the orbit length bx_lim+1). The stored BXN is
// 13 bits wide with the close flag in bit 12 (SBXN12), which the DMB checks
// use: L1As more than 1000 ns apart must have good L1A numbers in the first
// two CFEB samples. Pipe length, BX-40 correction and bit 12 follow the DDU
// notes; flagging both members of a close pair is this design's reading of
// "if more than 1 then set CloseL1A bit".
module close_l1a_monitor #(
  parameter int unsigned PIPE = 40
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        l1a_in,
  input  logic [11:0] bxn,       // running BX counter
  input  logic [11:0] bx_lim,    // last BX of the orbit
  output logic        l1a_out,   // L1A delayed by PIPE clocks
  output logic        close_l1a,
  output logic [12:0] sbxn       // {close, corrected BXN}
);
  logic [PIPE-1:0] p, c;
  logic            others;

  assign others = |p[PIPE-2:0];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      p <= '0;
      c <= '0;
    end else begin
      p <= {p[PIPE-2:0], l1a_in};
      if (l1a_in && others) c <= {c[PIPE-2:0] | p[PIPE-2:0], 1'b1};
      else                  c <= {c[PIPE-2:0], 1'b0};
    end
  end

  logic [11:0] bx_corr;
  always_comb begin
    if (bxn >= 12'(PIPE)) bx_corr = bxn - 12'(PIPE);
    else                  bx_corr = bxn + bx_lim + 12'd1 - 12'(PIPE);
  end

  assign l1a_out   = p[PIPE-1];
  assign close_l1a = p[PIPE-1] & c[PIPE-1];
  assign sbxn      = {close_l1a, bx_corr};
endmodule
