// tb_fiber_led: with DIV = 4 the blink period is 16 clocks. The FOK LED must
// be off with no link, on with a ready link, and blink (8 clocks on, 8 off)
// for a link that is present but not ready. The DAV LED follows dav one
// clock later.
module tb_fiber_led;
  logic clk = 0, rst = 1, present = 0, ready = 0, dav = 0, fok, davl;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  fiber_led #(.DIV(4)) dut (.clk(clk), .rst(rst), .present(present), .ready(ready), .dav(dav),
    .fok_led(fok), .dav_led(davl));
  initial begin
    int on;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (32) begin @(posedge clk); #1; checks++; if (fok !== 0) failures++; end
    present = 1; ready = 1; @(posedge clk); #1;
    repeat (32) begin @(posedge clk); #1; checks++; if (fok !== 1) failures++; end
    ready = 0; @(posedge clk); #1;
    on = 0;
    repeat (64) begin @(posedge clk); #1; on += fok; end
    checks++; if (on != 32) begin failures++; $display("on %0d", on); end
    dav = 1; @(posedge clk); #1; checks++; if (davl !== 1) failures++;
    dav = 0; @(posedge clk); #1; checks++; if (davl !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
