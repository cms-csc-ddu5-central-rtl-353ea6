// crc22_64: one-clock update of the DMB / trigger CRC-22 over a 64-bit word.
// The register is a right-shifting LFSR for x^22 + x + 1 in reflected form:
// per data bit (D0 first) feedback = C[0] ^ D, the state shifts down by one,
// and the feedback enters bits 21 and 20. Unrolling 64 such steps gives the
// parallel equations of the DDU schematic (for example
// CRC0 = C0^C1^C20^D0^D1^D20^D22^D42^D43); the loop below lets synthesis
// build all 22 of them. 'load0' clears the register (the DDU loads zero on
// the DMB second trailer and on the ALCT/TMB trailer); 'en' adds one word.
// crc_next is the combinational result for the current word, crc the
// registered value (one clock latency).
module crc22_64 (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        load0,
  input  logic [63:0] d,
  output logic [21:0] crc,
  output logic [21:0] crc_next
);
  function automatic logic [21:0] step64(input logic [21:0] c, input logic [63:0] w);
    logic [21:0] s;
    logic        fb;
    s = c;
    for (int j = 0; j < 64; j++) begin
      fb     = s[0] ^ w[j];
      s      = {fb, s[21:1]};
      s[20]  = s[20] ^ fb;
    end
    return s;
  endfunction

  assign crc_next = step64(crc, d);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        crc <= '0;
    else if (load0) crc <= '0;
    else if (en)    crc <= crc_next;
  end
endmodule
