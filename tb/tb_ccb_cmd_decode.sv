// tb_ccb_cmd_decode: every 6-bit command value is strobed in normal and
// Track-Finder polarity; exactly the documented codes must produce their
// pulse one clock later (0x1C soft reset, 0x06 start, 0x07 stop, 0x01 BC0,
// 0x03 sync reset, 0x14/0x15/0x16 CFEB_Cal[2]/[1]/[0]). The L1A, EvCntRes
// and BCntRes lines are checked with and without fake mode.
module tb_ccb_cmd_decode;
  logic clk = 0, rst = 1;
  logic [5:0] cmd_bus = '0;
  logic cmd_strobe = 0, l1a_bus = 0, evc = 0, bcr = 0, tf_mode = 0, fake_mode = 0;
  logic soft_rst, sync_rst, bc0, start_daq, stop_daq, l1a, evcntres, bcntres;
  logic [2:0] cfeb_cal;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ccb_cmd_decode dut (.clk(clk), .rst(rst), .cmd_bus(cmd_bus), .cmd_strobe(cmd_strobe),
    .l1a_bus(l1a_bus), .evcntres_in(evc), .bcntres_in(bcr), .tf_mode(tf_mode), .fake_mode(fake_mode),
    .soft_rst(soft_rst), .sync_rst(sync_rst), .bc0(bc0), .start_daq(start_daq), .stop_daq(stop_daq),
    .cfeb_cal(cfeb_cal), .l1a(l1a), .evcntres(evcntres), .bcntres(bcntres));

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int tf = 0; tf < 2; tf++) begin
      tf_mode = tf[0];
      l1a_bus = tf[0];   // idle level of the L1A line in each polarity
      for (int c = 0; c < 64; c++) begin
        logic [7:0] exp;
        cmd_bus = tf[0] ? ~6'(c) : 6'(c);
        cmd_strobe = 1;
        @(posedge clk); #1;
        cmd_strobe = 0;
        exp = {c == 'h1C, c == 'h03, c == 'h01, c == 'h06, c == 'h07,
               c == 'h14, c == 'h15, c == 'h16};
        checks++;
        if ({soft_rst, sync_rst, bc0, start_daq, stop_daq, cfeb_cal} !== exp) failures++;
        checks++;
        if (l1a !== 1'b0) failures++;
        @(posedge clk); #1;
        checks++;
        if ({soft_rst, sync_rst, bc0, start_daq, stop_daq, cfeb_cal} !== 8'h0) failures++;
      end
    end
    // L1A / resets, TF polarity still set
    l1a_bus = 0; evc = 1; bcr = 1; @(posedge clk); #1;
    checks++; if ({l1a, evcntres, bcntres} !== 3'b111) failures++;
    tf_mode = 0; l1a_bus = 1; @(posedge clk); #1;
    checks++; if ({l1a, evcntres, bcntres} !== 3'b111) failures++;
    fake_mode = 1; @(posedge clk); #1;
    checks++; if ({l1a, evcntres, bcntres} !== 3'b000) failures++;
    cmd_bus = 6'h01; cmd_strobe = 1; @(posedge clk); #1; cmd_strobe = 0;
    checks++; if (bc0 !== 1'b0) failures++;
    cmd_bus = 6'h06; cmd_strobe = 1; @(posedge clk); #1; cmd_strobe = 0;
    checks++; if (start_daq !== 1'b1) failures++;
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
