// ifddr36: 36-bit double-data-rate input register.
// The input bus carries two 36-bit halves per clock. The half present at the
// falling edge of clk is captured then (the lowest 36 bits of the word), the
// half present at the next rising edge is captured as the upper 36 bits, and
// at that rising edge the falling-edge half is moved into the rising-edge
// domain (QS). The result is one 72-bit word per clock, q = {upper, QS}.
// Asynchronous clear, clock enable. Follows the DDU IFDDR36C macro timing:
// CLK^ -- DIN[35:0] -- CLK falling -- Q[35:0], DIN[71:36] -- CLK^.
module ifddr36 (
  input  logic        clk,
  input  logic        clr,
  input  logic        ce,
  input  logic [35:0] din,
  output logic [71:0] q
);
  logic [35:0] q_lo_fall;

  always_ff @(negedge clk or posedge clr) begin
    if (clr)     q_lo_fall <= '0;
    else if (ce) q_lo_fall <= din;
  end

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     q <= '0;
    else if (ce) q <= {din, q_lo_fall};
  end
endmodule
