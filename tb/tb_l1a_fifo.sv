// tb_l1a_fifo: small FIFO (DEPTH 16, warn 12/8, busy 15/13) against a queue
// model. Random pushes and pops check data order, empty/full, count, the
// hysteresis of warn and busy (on at the high level, off only at the low
// level) and the sticky overflow flag.
module tb_l1a_fifo;
  localparam int D = 16;
  logic clk = 0, rst = 1, wr = 0, rd = 0;
  logic [36:0] wdata, rdata;
  logic empty, full, warn, busy, ovfl;
  logic [4:0] count;
  logic [36:0] q[$];
  logic mwarn = 0, mbusy = 0, movfl = 0;
  int checks = 0, failures = 0, warn_rises = 0, busy_rises = 0;
  always #5 clk = ~clk;
  l1a_fifo #(.W(37), .DEPTH(D), .WARN_ON(12), .WARN_OFF(8), .BUSY_ON(15), .BUSY_OFF(13)) dut (
    .clk(clk), .rst(rst), .wr(wr), .wdata(wdata), .rd(rd), .rdata(rdata), .empty(empty),
    .full(full), .count(count), .warn(warn), .busy(busy), .ovfl(ovfl));
  initial begin
    wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 3000; k++) begin
      int phase;
      phase = (k / 200) % 2;     // alternately filling and draining
      wr = ($urandom % 100) < (phase ? 30 : 70);
      rd = ($urandom % 100) < (phase ? 70 : 30);
      wdata = {$urandom, 5'($urandom)};
      #1;
      checks += 3;
      if (empty !== (q.size() == 0)) failures++;
      if (full !== (q.size() == D)) failures++;
      if (count !== 5'(q.size())) failures++;
      if (q.size() > 0) begin checks++; if (rdata !== q[0]) failures++; end
      @(posedge clk);
      begin
        int n;
        bit dw, dr;
        dw = wr && q.size() < D;
        dr = rd && q.size() > 0;
        if (wr && q.size() == D) movfl = 1;
        n = q.size();
        if (n >= 12) mwarn = 1; else if (n <= 8) mwarn = 0;
        if (n >= 15) mbusy = 1; else if (n <= 13) mbusy = 0;
        if (dr) void'(q.pop_front());
        if (dw) q.push_back(wdata);
      end
      #1;
      checks += 3;
      if (warn !== mwarn) failures++;
      if (busy !== mbusy) failures++;
      if (ovfl !== movfl) failures++;
      if (warn && !mwarn) ; 
      if (mwarn) warn_rises++;
      if (mbusy) busy_rises++;
      wr = 0; rd = 0;
    end
    checks++; if (warn_rises == 0 || busy_rises == 0 || !movfl) failures++;
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
