// jtag_load_reg: JTAG-writable control register (Kill register, BX per orbit).
// A W-bit shift register on drck is enabled by CLKENA = (read | load) & sel2.
// With lshft low it captures the present value (so a read returns it), with
// lshft high it shifts right, tdi into the top bit, tdo from bit 0. On the
// rising edge of 'update' the holding register takes the shifted value if
// 'load' is set, as in the DDU macro FD12B3563 (clock = UPDATE, CE = LOAD).
// The holding register resets to RESET_VAL (3563 for BX per orbit).
module jtag_load_reg #(
  parameter int unsigned W         = 12,
  parameter logic [W-1:0] RESET_VAL = W'(3563)
) (
  input  logic         drck,
  input  logic         update,
  input  logic         rst,
  input  logic         sel2,
  input  logic         read,
  input  logic         load,
  input  logic         lshft,
  input  logic         tdi,
  output logic         tdo,
  output logic [W-1:0] q
);
  logic [W-1:0] sr;
  logic         rd, clkena;

  assign rd     = read | load;
  assign clkena = rd & sel2;

  always_ff @(posedge drck or posedge rst) begin
    if (rst)                  sr <= '0;
    else if (clkena && !lshft) sr <= q;
    else if (clkena)          sr <= (W > 1) ? {tdi, sr[W-1:1]} : W'(tdi);
  end

  always_ff @(posedge update or posedge rst) begin
    if (rst)       q <= RESET_VAL;
    else if (load) q <= sr;
  end

  assign tdo = sr[0];
endmodule
