// tb_sticky_err: the flag must stay low without error, rise one clock after
// either error input, stay high when the inputs drop, and clear on reset.
module tb_sticky_err;
  logic clk = 0, rst = 1, a = 0, b = 0, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  sticky_err dut (.clk(clk), .rst(rst), .in_memerr(a), .fferr(b), .ff_err(q));
  task automatic exp(input logic e);
    @(posedge clk); #1; checks++; if (q !== e) failures++;
  endtask
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    exp(0); exp(0);
    a = 1; exp(1);
    a = 0; exp(1); exp(1);
    rst = 1; #1; rst = 0; checks++; if (q !== 0) failures++;
    exp(0);
    b = 1; exp(1);
    b = 0; exp(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
