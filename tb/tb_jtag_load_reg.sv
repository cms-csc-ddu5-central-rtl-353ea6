// tb_jtag_load_reg: the BX-per-orbit register (12 bits) must come out of
// reset at 3563, read back that value, take a shifted-in value on the
// update edge only while 'load' is set, and read the new value back.
module tb_jtag_load_reg;
  logic drck = 0, update = 0, rst = 0, sel2 = 1, read = 0, load = 0, lshft = 0, tdi = 0;
  logic tdo;
  logic [11:0] q;
  int checks = 0, failures = 0;
  always #5 drck = ~drck;
  jtag_load_reg #(.W(12), .RESET_VAL(12'd3563)) dut (.drck(drck), .update(update), .rst(rst),
    .sel2(sel2), .read(read), .load(load), .lshft(lshft), .tdi(tdi), .tdo(tdo), .q(q));

  task automatic shift_io(input logic [11:0] din, output logic [11:0] dout);
    lshft = 0; @(posedge drck); #1;       // capture
    lshft = 1;
    for (int i = 0; i < 12; i++) begin
      dout[i] = tdo; tdi = din[i];
      @(posedge drck); #1;
    end
    lshft = 0;
  endtask
  task automatic upd();
    update = 1; #2; update = 0; #2;
  endtask

  initial begin
    logic [11:0] r;
    #1 rst = 1;
    repeat (2) @(posedge drck);
    #1 rst = 0;
    checks++; if (q !== 12'd3563) begin failures++; $display("q3563 %0d at %0t", q, $time); end
    read = 1; shift_io(12'h000, r); read = 0; upd();
    checks++; if (r !== 12'd3563) begin failures++; $display("r %0d", r); end
    checks++; if (q !== 12'd3563) begin failures++; $display("q3563 %0d at %0t", q, $time); end      // update without load: no change
    load = 1; shift_io(12'd923, r); upd(); load = 0;
    checks++; if (q !== 12'd923) begin failures++; $display("q923 %0d", q); end
    read = 1; shift_io(12'h000, r); read = 0;
    checks++; if (r !== 12'd923) begin failures++; $display("r923 %0d", r); end
    for (int k = 0; k < 10; k++) begin
      logic [11:0] v;
      v = 12'($urandom);
      load = 1; shift_io(v, r); upd(); load = 0;
      checks++; if (q !== v) begin failures++; $display("q %h v %h", q, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge drck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
