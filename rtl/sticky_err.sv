// sticky_err: error flag that latches the first error and holds it.
// D = in_memerr | fferr, clock enable = not(flag): once the flag is set it
// no longer loads, so it stays set until the asynchronous reset clears it.
// This is the FF_ERR circuit of the DDU schematic (FDCE with CE from its own
// inverted output). The flag rises one clock after the first error.
module sticky_err (
  input  logic clk,
  input  logic rst,        // asynchronous clear, active high
  input  logic in_memerr,
  input  logic fferr,
  output logic ff_err
);
  logic fferror_or;
  assign fferror_or = in_memerr | fferr;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)          ff_err <= 1'b0;
    else if (!ff_err) ff_err <= fferror_or;
  end
endmodule
