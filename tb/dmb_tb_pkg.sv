// dmb_tb_pkg: test-data helpers shared by the DMB-level testbenches.
// make_dmb builds the 64-bit words of one DMB event: header 1 (special
// nibble 9 in all four 16-bit words, L1A number split as HDR2[11:0] =
// L1A[11:0] and HDR3[11:0] = L1A[23:12]), header 2 (nibble A), data words
// whose special nibbles agree and stay below 8, trailer 1 (nibble F) and
// trailer 2 (nibble E) carrying the CRC-22 of all words up to trailer 1 as
// {bits 26:16, bits 10:0}. The CRC reference is a bit-serial model of the
// x^22 + x + 1 register (shift right, feedback into bits 21 and 20, bit 0 of
// each word first). crc_bad flips one CRC bit; l1a is written as given.
package dmb_tb_pkg;
  function automatic logic [21:0] crc22_ref(input logic [21:0] c, input logic [63:0] w);
    for (int j = 0; j < 64; j++) begin
      logic fb;
      fb = c[0] ^ w[j];
      c = c >> 1;
      if (fb) begin c[21] = 1'b1; c[20] = ~c[20]; end
    end
    return c;
  endfunction

  function automatic logic [15:0] q16(input logic [3:0] nib, input logic [11:0] v);
    return {nib, v};
  endfunction

  task automatic make_dmb(input logic [23:0] l1a, input int ndata, input bit crc_bad,
                          ref logic [63:0] q[$]);
    logic [21:0] c;
    logic [63:0] w;
    c = '0;
    w = {q16(4'h9, 12'h123), q16(4'h9, l1a[23:12]), q16(4'h9, l1a[11:0]), q16(4'h9, 12'h01F)};
    q.push_back(w); c = crc22_ref(c, w);
    w = {q16(4'hA, 12'(ndata)), q16(4'hA, 12'h0), q16(4'hA, 12'h0), q16(4'hA, 12'h0)};
    q.push_back(w); c = crc22_ref(c, w);
    for (int i = 0; i < ndata; i++) begin
      logic [3:0] n;
      n = 4'($urandom % 8);
      w = {q16(n, 12'($urandom)), q16(n, 12'($urandom)), q16(n, 12'($urandom)), q16(n, 12'($urandom))};
      q.push_back(w); c = crc22_ref(c, w);
    end
    w = {q16(4'hF, 12'h0), q16(4'hF, 12'h0), q16(4'hF, 12'h0), q16(4'hF, 12'h0)};
    q.push_back(w); c = crc22_ref(c, w);
    if (crc_bad) c[5] = ~c[5];
    w = {q16(4'hE, 12'h0), q16(4'hE, 12'h0), q16(4'hE, {1'b0, c[21:11]}), q16(4'hE, {1'b0, c[10:0]})};
    q.push_back(w);
  endtask
endpackage
