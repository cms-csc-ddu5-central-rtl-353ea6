// tb_bxn_counter: the BX counter must run 0..3563 and return to 0 one clock
// after 3563 (orbit of 3564 clocks), follow a smaller limit (923, SPS) and
// clear on BC0. A software model counts alongside.
module tb_bxn_counter;
  logic clk = 0, rst = 1, bc0 = 0;
  logic [11:0] bx_lim = 12'd3563, bxn, m;
  logic orbit;
  int checks = 0, failures = 0, orbits = 0;
  always #5 clk = ~clk;
  bxn_counter dut (.clk(clk), .rst(rst), .bc0(bc0), .bx_lim(bx_lim), .bxn(bxn), .orbit(orbit));
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m = 0;
    for (int i = 0; i < 3 * 3564 + 10; i++) begin
      checks++;
      if (bxn !== m) failures++;
      if (orbit) orbits++;
      @(posedge clk); #1;
      m = (m == 12'd3563) ? 12'd0 : m + 12'd1;
    end
    checks++; if (orbits != 3) failures++;
    bx_lim = 12'd923;
    bc0 = 1; @(posedge clk); #1; bc0 = 0;
    m = 0;
    for (int i = 0; i < 2000; i++) begin
      checks++;
      if (bxn !== m) failures++;
      @(posedge clk); #1;
      m = (m == 12'd923) ? 12'd0 : m + 12'd1;
    end
    // BC0 in the middle of an orbit
    bc0 = 1; @(posedge clk); #1; bc0 = 0;
    checks++; if (bxn !== 12'd0) failures++;
    @(posedge clk); #1;
    checks++; if (bxn !== 12'd1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
