// tb_event_timeout: with the default limits, checks that the start timeout
// fires after exactly 128 clocks (288 in calibration mode) without data,
// that the end timeout fires 38914 clocks after the data started, that
// neither fires when data and done arrive in time, and that the largest
// count at done is kept.
module tb_event_timeout;
  logic clk = 0, rst = 1, arm = 0, cal = 0, dstart = 0, done = 0;
  logic start_to, end_to, active;
  logic [15:0] max_cnt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  event_timeout dut (.clk(clk), .rst(rst), .arm(arm), .cal_mode(cal), .data_start(dstart),
    .done(done), .start_to(start_to), .end_to(end_to), .active(active), .max_cnt(max_cnt));

  task automatic pulse(ref logic s);
    s = 1; @(posedge clk); #1; s = 0;
  endtask

  // clocks from arm until start_to rises
  task automatic measure_start(input logic c, output int n);
    cal = c; pulse(arm); n = 0;
    while (!start_to && n < 2000) begin @(posedge clk); #1; n++; end
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    measure_start(0, n);
    checks++; if (n != 128) begin failures++; $display("start %0d", n); end
    measure_start(1, n);
    checks++; if (n != 288) begin failures++; $display("cal start %0d", n); end
    // data in time, done in time
    cal = 0; pulse(arm);
    repeat (50) @(posedge clk); #1;
    pulse(dstart);
    repeat (1000) @(posedge clk); #1;
    pulse(done);
    repeat (3) @(posedge clk); #1;
    checks += 3;
    if (start_to || end_to || active) failures++;
    if (max_cnt !== 16'd1000) begin failures++; $display("max %0d", max_cnt); end
    // end timeout
    pulse(arm);
    pulse(dstart);
    n = 0;
    while (!end_to && n < 50000) begin @(posedge clk); #1; n++; end
    checks++; if (n != 38914) begin failures++; $display("end %0d", n); end
    checks++; if (start_to) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
