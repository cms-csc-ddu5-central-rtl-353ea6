// crc16_64: one-clock update of the 16-bit DDU event CRC over a 64-bit word.
// The generator is x^16 + x^15 + x^2 + 1 (the USB CRC-16 polynomial, as the
// DDU documentation states). Bit order and start value are this design's
// choice, since the documentation gives only the polynomial: the word is fed
// MSB first (bit 63 first) into a left-shifting register, which starts at
// 0xFFFF after 'init'. 'en' adds one word; crc_next is the combinational
// result, crc the registered value.
module crc16_64 (
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        en,
  input  logic [63:0] d,
  output logic [15:0] crc,
  output logic [15:0] crc_next
);
  localparam logic [15:0] POLY = 16'h8005;   // x^15 + x^2 + 1 taps

  function automatic logic [15:0] step64(input logic [15:0] c, input logic [63:0] data);
    logic [15:0] s;
    logic        fb;
    s = c;
    for (int j = 63; j >= 0; j--) begin
      fb = s[15] ^ data[j];
      s  = {s[14:0], 1'b0};
      if (fb) s = s ^ POLY;
    end
    return s;
  endfunction

  assign crc_next = step64(crc, d);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       crc <= 16'hFFFF;
    else if (init) crc <= 16'hFFFF;
    else if (en)   crc <= crc_next;
  end
endmodule
