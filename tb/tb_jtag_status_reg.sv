// tb_jtag_status_reg: 16-bit and 24-bit readout registers. A status word is
// captured (lshft low) and shifted out LSB first while tdi bits enter at the
// top; the bits seen on tdo must be the status word followed by the tdi
// bits. Without sel2 or dvcenb the register must not change.
module tb_jtag_status_reg;
  logic drck = 0, rst = 1, dvcenb = 0, sel2 = 0, lshft = 0, tdi = 0;
  logic [15:0] st16;
  logic [23:0] st24;
  logic tdo16, tdo24;
  int checks = 0, failures = 0;
  always #5 drck = ~drck;
  jtag_status_reg #(.W(16)) d16 (.drck(drck), .rst(rst), .dvcenb(dvcenb), .sel2(sel2),
    .lshft(lshft), .tdi(tdi), .status(st16), .tdo(tdo16));
  jtag_status_reg #(.W(24)) d24 (.drck(drck), .rst(rst), .dvcenb(dvcenb), .sel2(sel2),
    .lshft(lshft), .tdi(tdi), .status(st24), .tdo(tdo24));
  initial begin
    repeat (2) @(posedge drck);
    #1 rst = 0;
    for (int t = 0; t < 10; t++) begin
      logic [15:0] got16, tin;
      logic [23:0] got24;
      st16 = 16'($urandom); st24 = 24'($urandom); tin = 16'($urandom);
      dvcenb = 1; sel2 = 1; lshft = 0;
      @(posedge drck); #1;
      lshft = 1;
      for (int i = 0; i < 40; i++) begin
        if (i < 16) got16[i] = tdo16;
        if (i < 24) got24[i] = tdo24;
        if (i >= 16 && i < 32) begin checks++; if (tdo16 !== tin[i-16]) failures++; end
        tdi = (i < 16) ? tin[i] : 1'b0;
        if (i >= 24) tdi = tin[i-24];
        if (i >= 24 && i < 40) begin checks++; if (tdo24 !== tin[i-24]) failures++; end
        @(posedge drck); #1;
      end
      checks += 2;
      if (got16 !== st16) failures++;
      if (got24 !== st24) failures++;
    end
    // disabled: no capture
    st16 = 16'hA5A5; lshft = 0; sel2 = 0;
    @(posedge drck); #1;
    begin
      logic prev_tdo;
      prev_tdo = tdo16;
      sel2 = 1; dvcenb = 0; @(posedge drck); #1;
      checks++; if (tdo16 !== prev_tdo) failures++;
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
