// tb_close_l1a_monitor: L1As are sent at chosen BX times. Each must come out
// exactly 40 clocks later with its original BXN (BX-40 correction across the
// orbit wrap included) and the close flag set exactly when another L1A is
// less than 40 clocks away. The expected values come from the list of
// injection times.
module tb_close_l1a_monitor;
  logic clk = 0, rst = 1, l1a_in = 0;
  logic [11:0] bxn, bx_lim = 12'd3563;
  logic l1a_out, close_l1a;
  logic [12:0] sbxn;
  int checks = 0, failures = 0, nout = 0, nclose = 0;
  int times[$];
  int cyc = 0;
  always #5 clk = ~clk;
  bxn_counter ubx (.clk(clk), .rst(rst), .bc0(1'b0), .bx_lim(bx_lim), .bxn(bxn), .orbit());
  close_l1a_monitor #(.PIPE(40)) dut (.clk(clk), .rst(rst), .l1a_in(l1a_in), .bxn(bxn),
    .bx_lim(bx_lim), .l1a_out(l1a_out), .close_l1a(close_l1a), .sbxn(sbxn));

  // injection times (cycle numbers after reset)
  int inj[] = '{100, 200, 239, 400, 441, 460, 3550, 3590, 3700};

  always @(posedge clk) if (!rst) cyc <= cyc + 1;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    fork
      begin
        foreach (inj[i]) begin
          while (cyc < inj[i]) begin @(posedge clk); #1; end
          l1a_in = 1; @(posedge clk); #1 l1a_in = 0;
        end
      end
      begin
        forever begin
          @(posedge clk); #1;
          if (l1a_out) begin
            int t, exp_bx;
            bit exp_close;
            t = inj[nout];
            exp_bx = t % 3564;
            exp_close = 0;
            foreach (inj[j]) if (j != nout && (inj[j] - t < 40) && (t - inj[j] < 40)) exp_close = 1;
            checks += 3;
            if (cyc - t != 40) begin failures++; $display("delay %0d", cyc - t); end
            if (sbxn[11:0] !== 12'(exp_bx)) begin failures++; $display("bx %0d exp %0d", sbxn[11:0], exp_bx); end
            if (close_l1a !== exp_close || sbxn[12] !== exp_close) failures++;
            if (close_l1a) nclose++;
            nout++;
          end
        end
      end
    join_none
    while (cyc < 3800) @(posedge clk);
    checks++; if (nout != inj.size()) failures++;
    checks++; if (nclose != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
