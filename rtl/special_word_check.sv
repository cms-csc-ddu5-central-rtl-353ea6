// special_word_check: voting and consistency check of the "special" bits.
// Every 16-bit word of the DMB data stream carries code bits in positions
// 12..15, and the DDU sees four such words side by side in a 64-bit word.
// For each code bit n (12..15) the four copies (bits n, n+16, n+32, n+48)
// go to an anyorall gate: the voted bit is set when 2 or more of the 4
// copies are set, and sp_err[n-12] (NOTALL) flags copies that disagree.
// The voted nibble and the error flags are registered when 'en' is high, as
// the DDU latches its voted special bits (control bits 2..5); one clock of
// latency. The 2-of-4 vote follows the DDU control bit list; the register
// with enable and reset is this design's own framing.
module special_word_check (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [63:0] din,
  output logic [3:0]  voted,     // latched voted bits 15..12
  output logic [3:0]  sp_err,    // latched SP0..SP3 errors (bits 12..15)
  output logic        any_err
);
  logic [3:0] vote_c, err_c;

  for (genvar n = 0; n < 4; n++) begin : g_bit
    logic [3:0] copies;
    logic       a_any, a_all;
    assign copies = {din[48+12+n], din[32+12+n], din[16+12+n], din[12+n]};
    anyorall u_aoa (.b(copies), .any_o(a_any), .all_o(a_all), .notall_o(err_c[n]));
    // 2 or more out of 4
    assign vote_c[n] = (copies[0] & copies[1]) | (copies[0] & copies[2]) |
                       (copies[0] & copies[3]) | (copies[1] & copies[2]) |
                       (copies[1] & copies[3]) | (copies[2] & copies[3]);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      voted  <= '0;
      sp_err <= '0;
    end else if (en) begin
      voted  <= vote_c;
      sp_err <= err_c;
    end
  end

  assign any_err = |sp_err;
endmodule
