// tb_ifddr36: random 36-bit halves are presented at each falling and rising
// clock edge. After each rising edge q must be {half at that rising edge,
// half at the preceding falling edge}. Clock enable low must hold q.
module tb_ifddr36;
  logic clk = 0, clr = 1, ce = 1;
  logic [35:0] din = '0;
  logic [71:0] q;
  int checks = 0, failures = 0;
  ifddr36 dut (.clk(clk), .clr(clr), .ce(ce), .din(din), .q(q));
  initial begin
    logic [35:0] lo, hi;
    #3 clr = 0;
    for (int k = 0; k < 200; k++) begin
      lo = 36'({$urandom, $urandom});
      hi = 36'({$urandom, $urandom});
      ce = (k % 17 != 5);
      din = lo; #5 clk = 0;      // falling edge takes the low half
      #1 din = hi; #4 clk = 1;   // rising edge takes the high half
      #1;
      if (k > 0) begin
        checks++;
        if (ce && q !== {hi, lo}) failures++;
      end
      if (!ce) begin checks++; if (q === {hi, lo}) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
