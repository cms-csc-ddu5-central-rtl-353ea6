// tb_crc22_64: checks the 64-bit parallel CRC-22.
// (1) For random state and data, CRC bits 0..3 must equal the XOR equations
// printed in the DDU schematic, e.g. CRC0 = C0^C1^C20^D0^D1^D20^D22^D42^D43.
// (2) Known values from an independent model: from zero, word
// 0x0123456789ABCDEF gives 0x150D7F; the sequence 0x0123456789ABCDEF,
// all ones, 0x1 gives 0x34AC22. (3) load0 clears, en=0 holds.
module tb_crc22_64;
  logic clk = 0, rst = 1, en = 0, load0 = 0;
  logic [63:0] d;
  logic [21:0] crc, crc_next;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  crc22_64 dut (.clk(clk), .rst(rst), .en(en), .load0(load0), .d(d), .crc(crc), .crc_next(crc_next));

  task automatic chk(input logic [21:0] got, input logic [21:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("mismatch got %h exp %h", got, exp); end
  endtask

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // random state / data against printed equations
    for (int k = 0; k < 200; k++) begin
      logic [21:0] c;
      logic [3:0] e;
      d = {$urandom, $urandom};
      en = 1; @(posedge clk); #1; en = 0;
      c = crc;
      d = {$urandom, $urandom}; #1;
      e[0] = c[0]^c[1]^c[20]^d[0]^d[1]^d[20]^d[22]^d[42]^d[43];
      e[1] = c[0]^c[1]^c[2]^c[21]^d[0]^d[1]^d[2]^d[21]^d[23]^d[43]^d[44];
      e[2] = c[0]^c[1]^c[2]^c[3]^d[0]^d[1]^d[2]^d[3]^d[22]^d[24]^d[44]^d[45];
      e[3] = c[1]^c[2]^c[3]^c[4]^d[1]^d[2]^d[3]^d[4]^d[23]^d[25]^d[45]^d[46];
      checks++;
      if (crc_next[3:0] !== e) failures++;
    end
    load0 = 1; @(posedge clk); #1; load0 = 0;
    chk(crc, 22'h0);
    d = 64'h0123456789ABCDEF; en = 1; @(posedge clk); #1;
    chk(crc, 22'h150D7F);
    d = 64'hFFFFFFFFFFFFFFFF; @(posedge clk); #1;
    d = 64'h1; @(posedge clk); #1; en = 0;
    chk(crc, 22'h34AC22);
    d = 64'hDEAD; @(posedge clk); #1;
    chk(crc, 22'h34AC22);
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
