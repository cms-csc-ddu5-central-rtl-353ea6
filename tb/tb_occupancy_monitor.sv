// tb_occupancy_monitor: 15 x 4 scalers. After reset the clearing sweep must
// take 60 clocks (ready low) and leave every scaler at zero. Then random
// increment requests (fiber, board mask) are issued whenever ready is high;
// each set board costs one read and one write clock, so a request with n
// boards must keep ready low for exactly 2n clocks. Finally all 60 scalers
// are read and compared with a software count.
module tb_occupancy_monitor;
  logic clk = 0, rst = 1, inc = 0, ready;
  logic [3:0] fiber = 0, boards = 0;
  logic [5:0] rd_addr = 0;
  logic [31:0] rd_data;
  int unsigned model[60];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  occupancy_monitor #(.NFIB(15), .NBRD(4)) dut (.clk(clk), .rst(rst), .inc(inc), .fiber(fiber),
    .boards(boards), .ready(ready), .rd_addr(rd_addr), .rd_data(rd_data));
  initial begin
    int n;
    // fill the RAM with garbage first so the clearing matters
    repeat (2) @(posedge clk);
    #1 rst = 0;
    n = 0;
    while (!ready) begin @(posedge clk); #1; n++; end
    checks++; if (n != 60) begin failures++; $display("clear %0d", n); end
    foreach (model[i]) model[i] = 0;
    for (int k = 0; k < 300; k++) begin
      int nb, busy;
      fiber = 4'($urandom % 15);
      boards = 4'($urandom);
      if (k % 37 == 0) boards = 4'hF;
      nb = $countones(boards);
      for (int b = 0; b < 4; b++) if (boards[b]) model[fiber*4+b]++;
      inc = 1; @(posedge clk); #1; inc = 0;
      busy = 0;
      while (!ready) begin @(posedge clk); #1; busy++; end
      checks++;
      if (busy != 2 * nb) begin failures++; $display("busy %0d boards %b", busy, boards); end
    end
    for (int a = 0; a < 60; a++) begin
      rd_addr = 6'(a); @(posedge clk); #1;
      checks++;
      if (rd_data !== model[a]) begin failures++; $display("addr %0d got %0d exp %0d", a, rd_data, model[a]); end
    end
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
