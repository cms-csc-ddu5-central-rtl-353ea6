// tb_fmm_status: drives each condition and checks the documented FMM bit
// (0 busy, 1 warning, 2 lost sync, 3 error) one clock later, the stickiness
// of lost sync (until sync reset) and error (until hard reset), and busy
// while data taking is stopped.
module tb_fmm_status;
  logic clk = 0, rst = 1, running = 0, busy = 0, warn = 0, serr = 0, herr = 0, srst = 0;
  logic [3:0] fmm;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  fmm_status dut (.clk(clk), .rst(rst), .running(running), .busy_in(busy), .warn_in(warn),
    .sync_err_in(serr), .hard_err_in(herr), .sync_rst(srst), .fmm(fmm));
  task automatic step(input logic [3:0] exp);
    @(posedge clk); #1;
    checks++;
    if (fmm !== exp) begin failures++; $display("fmm %b exp %b", fmm, exp); end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    step(4'b0001);              // not running -> busy
    running = 1; step(4'b0000);
    busy = 1; step(4'b0001);
    busy = 0; warn = 1; step(4'b0010);
    warn = 0; step(4'b0000);
    serr = 1; step(4'b0100);
    serr = 0; step(4'b0100);    // sticky
    step(4'b0100);
    srst = 1; step(4'b0000);
    srst = 0; step(4'b0000);
    herr = 1; step(4'b1000);
    herr = 0; step(4'b1000);
    srst = 1; step(4'b1000);    // sync reset does not clear error
    srst = 0;
    rst = 1; #1; rst = 0;
    step(4'b0000);
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
