// tb_crc16_64: checks the 64-bit parallel DDU CRC-16 (x^16+x^15+x^2+1).
// The reference is the byte-wise CRC-16/CMS algorithm (poly 0x8005, start
// 0xFFFF, no reflection; its catalogue check value 0xAEE7 for "123456789"
// is verified first), applied to the words' bytes, most significant first.
module tb_crc16_64;
  logic clk = 0, rst = 1, init = 0, en = 0;
  logic [63:0] d;
  logic [15:0] crc, crc_next;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  crc16_64 dut (.clk(clk), .rst(rst), .init(init), .en(en), .d(d), .crc(crc), .crc_next(crc_next));

  function automatic logic [15:0] ref_byte(input logic [15:0] c, input logic [7:0] b);
    c = c ^ {b, 8'h00};
    for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h8005) : (c << 1);
    return c;
  endfunction

  initial begin
    logic [15:0] r;
    string s;
    s = "123456789";
    r = 16'hFFFF;
    for (int i = 0; i < 9; i++) r = ref_byte(r, s[i]);
    checks++; if (r !== 16'hAEE7) begin failures++; $display("check value %h", r); end
    d = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++; if (crc !== 16'hFFFF) begin failures++; $display("reset crc %h", crc); end
    d = 64'h0123456789ABCDEF; en = 1; @(posedge clk); #1;
    d = 64'hFEDCBA9876543210; @(posedge clk); #1; en = 0;
    checks++; if (crc !== 16'h1295) begin failures++; $display("two-word crc %h", crc); end
    for (int t = 0; t < 20; t++) begin
      init = 1; @(posedge clk); #1; init = 0;
      r = 16'hFFFF;
      for (int k = 0; k < 1 + t % 5; k++) begin
        d = {$urandom, $urandom};
        for (int b = 7; b >= 0; b--) r = ref_byte(r, d[8*b +: 8]);
        en = 1; @(posedge clk); #1; en = 0;
      end
      checks++;
      if (crc !== r) begin failures++; $display("crc %h exp %h", crc, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
