// jtag_status_reg: capture-and-shift readout register for one JTAG status word.
// Clocked by the JTAG data-register clock (drck). The register is active when
// CLKENA = dvcenb & sel2. With lshft low (NSHFT high) it captures the
// parallel status word; with lshft high it shifts right one bit per clock,
// taking tdi into the top bit, and tdo is bit 0. This matches the DDU
// CHECK_16 macro and its 15/16/24-bit variants; W sets the length.
module jtag_status_reg #(
  parameter int unsigned W = 16
) (
  input  logic         drck,
  input  logic         rst,
  input  logic         dvcenb,
  input  logic         sel2,
  input  logic         lshft,
  input  logic         tdi,
  input  logic [W-1:0] status,
  output logic         tdo
);
  logic [W-1:0] sr;
  logic         clkena, nshft;

  assign clkena = dvcenb & sel2;
  assign nshft  = ~lshft;

  always_ff @(posedge drck or posedge rst) begin
    if (rst)                   sr <= '0;
    else if (clkena && nshft)  sr <= status;
    else if (clkena)           sr <= (W > 1) ? {tdi, sr[W-1:1]} : W'(tdi);
  end

  assign tdo = sr[0];
endmodule
