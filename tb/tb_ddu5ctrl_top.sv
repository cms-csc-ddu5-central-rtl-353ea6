// tb_ddu5ctrl_top: end-to-end test of the DDU central control FPGA at its
// default size (15 fibers, 256-entry L1A FIFO).
// The bench plays the CCB (commands and L1A, also with the Track-Finder
// inverted polarity), the input FPGAs (DMB events on the 36-bit DDR bus, low
// half before the falling edge, high half before the rising edge, paused
// while in_rd_en is low), the DCC/S-Link (random back-pressure on out_ready),
// the external GbE spy FIFO and the JTAG controller. DMB events are built
// with their CRC-22 by dmb_tb_pkg. Every output event is checked for its
// framing, word count and CRC-16 (reference computed byte-serially here);
// the L1A number, DMB count and data words are compared with what was sent.
// The bench steps through: JTAG reads/loads of the Kill and BX-orbit
// registers, filling the L1A FIFO past warn/busy to overflow (FMM error),
// soft reset, start, normal and back-pressured events, close L1As, a bad
// DMB CRC, a wrong DMB L1A number (FMM lost sync) and a sync reset, a
// no-data event, a start timeout, a calibration event with its longer start
// timeout and the JTAG toggle that turns it off, an end timeout, a killed
// fiber, Track-Finder mode, fake
// and JTAG L1As, BC0, occupancy readout, and the GbE spy path. Each of these
// mechanisms is counted, and one that never happened counts as a failure.
// The documented event sizes (210, 410, 414 and 814 words, and a 30066-word
// event just under the 30070-word limit) are run last and their word counts
// checked. Checked latencies: L1A to delayed L1A 40 clocks, start timeout
// 128 clocks, calibration start timeout 288 clocks, end timeout 38914
// clocks (each flag is seen one edge after the edge that sets it).
`timescale 1ns/1ps
module tb_ddu5ctrl_top;
  import ddu_pkg::*;
  import dmb_tb_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, gbe_clk = 0, rst = 0;
  always #12.5 clk = ~clk;
  always #8 gbe_clk = ~gbe_clk;

  logic [5:0]  ccb_cmd = '0;
  logic        ccb_cmd_strobe = 0, ccb_l1a = 0, ccb_evcntres = 0, ccb_bcntres = 0;
  logic        tf_mode = 0, fake_mode = 0, fake_l1a = 0;
  logic [11:0] board_id = 12'h2A5;
  logic [11:0] exp_src  = 12'h2A5;   // 760 in Track-Finder mode
  logic [35:0] in_ddr = '0;
  logic        in_rd_en;
  logic [14:0] dmb_live = 15'h7FFF, dmb_full = '0, dmb_dav = '0;
  logic        out_valid, out_boe, out_eoe, out_ready = 1;
  logic [63:0] out_data;
  logic        spy_wr;
  logic [64:0] spy_wdata;
  logic        gbe_fifo_empty, gbe_fifo_pae_n, gbe_fifo_rd;
  logic [64:0] gbe_fifo_rdata;
  logic [15:0] gbe_txd;
  logic [1:0]  gbe_txk;
  logic [3:0]  fmm;
  logic        drck = 0, update = 0, sel2 = 0, dvcenb = 0, shift = 0, tdi = 0;
  logic [7:0]  instr = '0;
  logic        tdo;
  logic        fib0_present = 1, fib0_ready = 1, fib0_fok_led, fib0_dav_led;

  ddu5ctrl_top dut (.*);

  // ------------------------------------------------ GbE spy FIFO model
  logic [64:0] gq[$];
  logic [63:0] spyref[$];
  int          gbe_words = 0;
  always @(posedge clk) if (!rst && spy_wr) gq.push_back(spy_wdata);
  assign gbe_fifo_empty = (gq.size() == 0);
  assign gbe_fifo_rdata = gbe_fifo_empty ? 65'h0 : gq[0];
  assign gbe_fifo_pae_n = (gq.size() > 32);
  always @(posedge gbe_clk) if (gbe_fifo_rd && gq.size() > 0) begin
    #1;
    checks++;
    if (spyref.size() == 0 || gq[0][63:0] !== spyref[0]) begin
      failures++; $display("GbE word %0d out of order", gbe_words);
    end
    if (spyref.size() > 0) void'(spyref.pop_front());
    void'(gq.pop_front());
    gbe_words++;
  end

  // ------------------------------------------------ DDR input sender
  logic [71:0] sq[$];
  always @(posedge clk) begin
    logic [71:0] cur;
    #2;
    cur = (in_rd_en && sq.size() > 0) ? sq.pop_front() : 72'h0;
    in_ddr = cur[35:0];
    @(negedge clk); #2;
    in_ddr = cur[71:36];
  end

  // ------------------------------------------------ output monitor
  function automatic logic [15:0] crc_b(input logic [15:0] c, input logic [7:0] b);
    c = c ^ {b, 8'h00};
    for (int i = 0; i < 8; i++) c = c[15] ? ((c << 1) ^ 16'h8005) : (c << 1);
    return c;
  endfunction

  logic [63:0] cur_ev[$], last_ev[$];
  int nev = 0, total_words = 0;
  logic bp_en = 0;
  always @(posedge clk) out_ready <= bp_en ? ($urandom % 3 != 0) : 1'b1;

  always @(posedge clk) if (!rst && out_valid && out_ready) begin
    if (cur_ev.size() == 0) begin
      checks++;
      if (!out_boe) begin failures++; $display("first word without BOE"); end
    end
    cur_ev.push_back(out_data);
    spyref.push_back(out_data);
    total_words++;
    if (out_eoe) begin
      logic [15:0] c;
      logic [63:0] tr;
      int n;
      n = cur_ev.size();
      tr = cur_ev[n-1];
      c = 16'hFFFF;
      for (int i = 0; i < n; i++) begin
        logic [63:0] w;
        w = cur_ev[i];
        if (i == n - 1) w[31:16] = 16'h0;
        for (int b = 7; b >= 0; b--) c = crc_b(c, w[8*b +: 8]);
      end
      checks += 6;
      if (cur_ev[0][63:56] !== 8'h51) begin failures++; $display("ev %0d bad H1 %h", nev, cur_ev[0]); end
      if (cur_ev[1][63:16] !== H2_CONST) begin failures++; $display("ev %0d bad H2", nev); end
      if (cur_ev[n-3] !== T2_CONST) begin failures++; $display("ev %0d bad T-2", nev); end
      if (tr[63:56] !== 8'hA0) begin failures++; $display("ev %0d bad TR %h", nev, tr); end
      if (tr[55:32] !== 24'(n)) begin failures++; $display("ev %0d WC %0d for %0d words", nev, tr[55:32], n); end
      if (tr[31:16] !== c) begin failures++; $display("ev %0d CRC %h exp %h", nev, tr[31:16], c); end
      last_ev = cur_ev;
      cur_ev.delete();
      nev++;
    end
  end

  // ------------------------------------------------ mechanism counters
  int n_stall = 0, n_throttle = 0, n_close = 0, n_warn = 0, n_busy = 0, n_ovfl = 0;
  int n_fmm_err = 0, n_fmm_sync = 0, n_fmm_warn = 0, n_orbit = 0, n_crc = 0, n_l1aerr = 0;
  int n_start_to = 0, n_nodata = 0, n_tf = 0, n_fake = 0, n_vme = 0, n_kill = 0;
  int n_softrst = 0, n_syncrst = 0, n_bc0 = 0, n_occ = 0, n_jtag = 0, n_size = 0;
  int n_cal_to = 0, n_cal_tog = 0, n_end_to = 0;
  int cyc = 0, l1a_cyc = -1;
  always @(posedge clk) begin
    cyc++;
    if (out_valid && !out_ready) n_stall++;
    if (!in_rd_en) n_throttle++;
    if (dut.l1a_dly && dut.close_l1a) n_close++;
    if (dut.lf_warn) n_warn++;
    if (dut.lf_busy) n_busy++;
    if (dut.lf_ovfl) n_ovfl++;
    if (fmm[FMM_ERR]) n_fmm_err++;
    if (fmm[FMM_SYNC]) n_fmm_sync++;
    if (fmm[FMM_WARN]) n_fmm_warn++;
    if (dut.orbit) n_orbit++;
    if (dut.l1a_any) l1a_cyc = cyc;
    if (dut.l1a_dly && l1a_cyc >= 0 && !dut.close_l1a) begin
      checks++;
      if (cyc - l1a_cyc != 40) begin failures++; $display("L1A delay %0d", cyc - l1a_cyc); end
    end
  end

  // ------------------------------------------------ stimulus helpers
  task automatic clocks(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic ccb(input logic [5:0] c);
    ccb_cmd = tf_mode ? ~c : c;
    ccb_cmd_strobe = 1;
    clocks(1);
    ccb_cmd_strobe = 0;
    ccb_cmd = tf_mode ? 6'h3F : 6'h0;
    clocks(3);
  endtask

  task automatic l1a_pulse();
    ccb_l1a = ~tf_mode;
    clocks(1);
    ccb_l1a = tf_mode;
  endtask

  task automatic jtag(input logic [7:0] ins, input int n, input logic [31:0] din,
                      output logic [31:0] dout, input bit do_update);
    dout = '0;
    instr = ins; #30;
    sel2 = 1; dvcenb = 1; shift = 0;
    #30 drck = 1; #30 drck = 0;
    shift = 1;
    for (int i = 0; i < n; i++) begin
      dout[i] = tdo; tdi = din[i];
      #30 drck = 1; #30 drck = 0;
    end
    shift = 0;
    if (do_update) begin #30 update = 1; #30 update = 0; end
    sel2 = 0; dvcenb = 0;
    #30 drck = 1; #30 drck = 0;
    instr = '0;
    #30 drck = 1; #30 drck = 0;
    n_jtag++;
  endtask

  // queue one event's DMB data: one DMB per listed fiber
  logic [63:0] expd[$];
  task automatic send_data(input logic [23:0] l1a, input logic [14:0] fibs, input int ndata,
                           input int bad_crc_fib, input int bad_l1a_fib);
    logic [63:0] q[$];
    int last_fib;
    expd.delete();
    last_fib = -1;
    for (int f = 0; f < 15; f++) if (fibs[f]) last_fib = f;
    for (int f = 0; f < 15; f++) if (fibs[f]) begin
      q.delete();
      make_dmb((f == bad_l1a_fib) ? l1a + 24'd5 : l1a, ndata, f == bad_crc_fib, q);
      foreach (q[i]) begin
        sq.push_back({2'b00, 4'(f), (f == last_fib && i == q.size() - 1), 1'b1, q[i]});
        expd.push_back(q[i]);
      end
    end
  endtask

  task automatic wait_event(input int n0);
    int t;
    t = 0;
    while (nev == n0 && t < 60000) begin clocks(1); t++; end
    checks++;
    if (nev == n0) begin failures++; $display("no event after L1A (event %0d)", n0); end
  endtask

  // check the last event against what was sent
  task automatic check_event(input logic [23:0] l1a, input int ndmb, input bit with_data);
    int n;
    n = last_ev.size();
    checks += 3;
    if (last_ev[0][55:32] !== l1a) begin failures++; $display("L1A %0d exp %0d", last_ev[0][55:32], l1a); end
    if (last_ev[2][3:0] !== 4'(ndmb)) begin failures++; $display("ndmb %0d exp %0d", last_ev[2][3:0], ndmb); end
    if (last_ev[0][19:8] !== exp_src) begin failures++; $display("source ID %h", last_ev[0][19:8]); end
    if (with_data) begin
      checks++;
      if (n != expd.size() + 6) begin failures++; $display("%0d words, exp %0d", n, expd.size() + 6); end
      else foreach (expd[i]) if (last_ev[3 + i] !== expd[i]) begin
        failures++; $display("data word %0d got %h exp %h", i, last_ev[3 + i], expd[i]); break;
      end
    end
  endtask

  // one L1A with data on the given fibers; returns the event's T-1 word
  logic [23:0] l1a_ctr = 0;
  task automatic run_event(input logic [14:0] fibs, input int ndata, input int bad_crc,
                           input int bad_l1a, output logic [63:0] t1);
    int n0;
    n0 = nev;
    dmb_dav = fibs;
    l1a_ctr++;
    l1a_pulse();
    send_data(l1a_ctr, fibs, ndata, bad_crc, bad_l1a);
    wait_event(n0);
    check_event(l1a_ctr, $countones(fibs), 1);
    t1 = last_ev[last_ev.size() - 2];
  endtask

  // ------------------------------------------------ main sequence
  logic [31:0] jd;
  logic [63:0] t1;
  initial begin
    #1 rst = 1;
    clocks(5);
    rst = 0;
    clocks(100);

    // JTAG: Kill and BX-orbit registers
    jtag(8'(OP_KILL_RD), 20, 32'h0, jd, 0);
    checks++; if (jd[19:0] !== 20'hFFFFF) begin failures++; $display("kill reset %h", jd); end
    jtag(8'(OP_BXORBIT_RD), 12, 32'h0, jd, 0);
    checks++; if (jd[11:0] !== 12'd3563) begin failures++; $display("bx orbit reset %0d", jd); end
    jtag(8'(OP_BXORBIT_LD), 12, 32'd3563, jd, 1);
    jtag(8'(OP_BXORBIT_RD), 12, 32'h0, jd, 0);
    checks++; if (jd[11:0] !== 12'd3563) begin failures++; $display("bx orbit load %0d", jd); end
    jtag(8'(OP_BOARD_ID), 32, 32'h0, jd, 0);
    checks++; if (jd !== 32'(board_id)) begin failures++; $display("board id %h", jd); end

    // L1As before data taking: fill the L1A FIFO to warn, busy and overflow
    for (int i = 0; i < 260; i++) begin l1a_pulse(); clocks(1); end
    clocks(60);
    checks += 3;
    if (dut.lf_count != 256) begin failures++; $display("L1A FIFO count %0d", dut.lf_count); end
    if (!fmm[FMM_ERR] || !fmm[FMM_WARN]) begin failures++; $display("FMM %b after overflow", fmm); end
    jtag(8'(OP_L1A_NUM), 32, 32'h0, jd, 0);
    if (jd !== 32'd260) begin failures++; $display("L1A number %0d", jd); end

    // soft reset clears everything
    ccb(CMD_SOFT_RST); n_softrst++;
    clocks(100);
    checks++;
    if (fmm[FMM_ERR] || dut.lf_count != 0) begin failures++; $display("soft reset left FMM %b", fmm); end

    // start data taking
    ccb(CMD_START);
    checks++; if (fmm[FMM_BUSY]) begin failures++; $display("busy after start"); end
    ccb(CMD_BC0); clocks(2); n_bc0++;
    checks++; if (dut.bxn > 5) begin failures++; $display("BXN %0d after BC0", dut.bxn); end

    // plain events, one and two DMBs
    run_event(15'h0001, 5, -1, -1, t1);
    run_event(15'h0009, 12, -1, -1, t1);
    // back-pressure and a long event that fills the input FIFO
    bp_en = 1;
    run_event(15'h0107, 40, -1, -1, t1);
    run_event(15'h4001, 7, -1, -1, t1);
    bp_en = 0;

    // two close L1As
    begin
      int n0;
      n0 = nev;
      dmb_dav = 15'h0001;
      l1a_pulse(); clocks(10); l1a_pulse();
      send_data(l1a_ctr + 1, 15'h0001, 3, -1, -1);
      wait_event(n0);
      check_event(l1a_ctr + 1, 1, 1);
      checks++; if (!last_ev[2][8]) begin failures++; $display("close flag missing"); end
      send_data(l1a_ctr + 2, 15'h0001, 3, -1, -1);
      wait_event(n0 + 1);
      check_event(l1a_ctr + 2, 1, 1);
      checks++; if (!last_ev[2][8]) begin failures++; $display("close flag missing"); end
      l1a_ctr += 2;
    end

    // bad CRC on fiber 3
    run_event(15'h0009, 4, 3, -1, t1);
    checks += 2;
    if (t1[63:32] & 32'h8000) n_crc++; else begin failures++; $display("CRC error not flagged %h", t1); end
    if (t1[31:16] !== 16'h0008) begin failures++; $display("DMB error field %h", t1[31:16]); end
    jtag(8'(OP_CRC_ERR), 16, 32'h0, jd, 0);
    checks++; if (jd[14:0] !== 15'h0008) begin failures++; $display("CRC error register %h", jd); end

    // wrong L1A number from fiber 0: lost sync, cleared by a sync reset
    run_event(15'h0001, 4, -1, 0, t1);
    clocks(3);
    checks += 2;
    if (t1[63:32] & 32'h4000) n_l1aerr++; else begin failures++; $display("L1A error not flagged"); end
    if (!fmm[FMM_SYNC]) begin failures++; $display("no lost sync"); end
    ccb(CMD_SYNC_RST); n_syncrst++;
    l1a_ctr = 0;
    checks++; if (fmm[FMM_SYNC]) begin failures++; $display("lost sync after sync reset"); end

    // no-data event: six words
    begin
      int n0;
      n0 = nev;
      dmb_dav = '0;
      l1a_ctr++;
      l1a_pulse();
      wait_event(n0);
      expd.delete();
      check_event(l1a_ctr, 0, 1);
      if (last_ev.size() == 6) n_nodata++;
    end

    // start timeout: DAV set but no data comes
    begin
      int n0, t0, t_to;
      n0 = nev;
      dmb_dav = 15'h0001;
      l1a_ctr++;
      l1a_pulse();
      t0 = -1; t_to = -1;
      while (nev == n0 && t_to < 0) begin
        @(posedge clk);
        if (dut.eb_start) t0 = cyc;
        // the flag set by the 128th edge is seen at the next one
      if (dut.to_start && t0 >= 0 && cyc > t0) t_to = cyc;
        #1;
      end
      wait_event(n0);
      checks += 2;
      if (t_to - t0 != 129) begin failures++; $display("start timeout after %0d clocks", t_to - t0); end
      t1 = last_ev[last_ev.size() - 2];
      if (t1[63:32] & 32'h2000) n_start_to++; else begin failures++; $display("start timeout not flagged"); end
    end

    // calibration event: 288-clock start timeout; after JTAG instruction 31
    // has toggled the calibration trigger off, the normal 128 clocks again
    for (int k = 0; k < 2; k++) begin
      int n0, t0, t_to;
      if (k == 1) jtag(8'(OP_CAL_TOGGLE), 1, 32'h0, jd, 0);
      ccb(CMD_CAL0);
      n0 = nev;
      dmb_dav = 15'h0001;
      l1a_ctr++;
      l1a_pulse();
      t0 = -1; t_to = -1;
      while (nev == n0 && t_to < 0) begin
        @(posedge clk);
        if (dut.eb_start) t0 = cyc;
        if (dut.to_start && t0 >= 0 && cyc > t0) t_to = cyc;
        #1;
      end
      wait_event(n0);
      checks++;
      if (t_to - t0 != ((k == 0) ? 289 : 129)) begin
        failures++; $display("calibration start timeout after %0d clocks", t_to - t0);
      end else if (k == 0) n_cal_to++;
      else n_cal_tog++;
    end
    jtag(8'(OP_CAL_TOGGLE), 1, 32'h0, jd, 0);

    // end timeout: the data start but the last word is never flagged
    begin
      int n0, t0, t_to;
      n0 = nev;
      dmb_dav = 15'h0001;
      l1a_ctr++;
      l1a_pulse();
      send_data(l1a_ctr, 15'h0001, 3, -1, -1);
      sq[sq.size() - 1][65] = 1'b0;
      t0 = -1; t_to = -1;
      while (nev == n0 && t_to < 0) begin
        @(posedge clk);
        if (dut.dxfer && !dut.data_seen) t0 = cyc;
        if (dut.to_end && t0 >= 0 && cyc > t0) t_to = cyc;
        #1;
      end
      wait_event(n0);
      checks += 2;
      if (t_to - t0 != 38915) begin failures++; $display("end timeout after %0d clocks", t_to - t0); end
      t1 = last_ev[last_ev.size() - 2];
      if (t1[63:32] & 32'h1000) n_end_to++; else begin failures++; $display("end timeout not flagged"); end
    end

    // kill fiber 3 through JTAG: its DAV no longer counts
    jtag(8'(OP_KILL_LD), 20, 32'hFFFF7, jd, 1);
    jtag(8'(OP_KILL_RD), 20, 32'h0, jd, 0);
    checks++; if (jd[19:0] !== 20'hFFFF7) begin failures++; $display("kill readback %h", jd); end
    begin
      int n0;
      n0 = nev;
      dmb_dav = 15'h0009;
      l1a_ctr++;
      l1a_pulse();
      send_data(l1a_ctr, 15'h0001, 4, -1, -1);
      wait_event(n0);
      check_event(l1a_ctr, 1, 1);
      checks++;
      if (last_ev[2][31:16] === 16'h0001) n_kill++;
      else begin failures++; $display("DAV field %h with fiber 3 killed", last_ev[2][31:16]); end
    end
    jtag(8'(OP_KILL_LD), 20, 32'hFFFFF, jd, 1);

    // Track-Finder mode: inverted command bus and L1A
    ccb_l1a = 1; tf_mode = 1; exp_src = 12'd760;
    clocks(5);
    run_event(15'h0001, 6, -1, -1, t1);
    exp_src = board_id;
    n_tf++;
    ccb(CMD_STOP);
    checks++; if (!fmm[FMM_BUSY]) begin failures++; $display("not busy after stop (TF)"); end
    ccb(CMD_START);
    tf_mode = 0; ccb_l1a = 0;
    clocks(5);

    // fake L1A mode: TTC L1A ignored, fake and JTAG L1As accepted
    fake_mode = 1;
    begin
      int n0;
      n0 = nev;
      l1a_pulse();
      clocks(300);
      checks++; if (nev != n0) begin failures++; $display("TTC L1A taken in fake mode"); end
      dmb_dav = 15'h0001;
      l1a_ctr++;
      fake_l1a = 1; clocks(1); fake_l1a = 0;
      send_data(l1a_ctr, 15'h0001, 3, -1, -1);
      wait_event(n0);
      check_event(l1a_ctr, 1, 1);
      n_fake++;
      l1a_ctr++;
      jtag(8'(OP_VME_L1A), 1, 32'h0, jd, 0);
      send_data(l1a_ctr, 15'h0001, 3, -1, -1);
      wait_event(n0 + 1);
      check_event(l1a_ctr, 1, 1);
      n_vme++;
    end
    fake_mode = 0;

    // occupancy scalers of fiber 0, boards 0 and 1
    begin
      int nf0;
      nf0 = 13;   // DMB headers seen on fiber 0 so far
      jtag(8'(OP_OCCUPANCY), 32, 32'h0, jd, 0);
      checks++;
      if (jd == 32'(nf0)) n_occ++; else begin failures++; $display("occupancy %0d exp %0d", jd, nf0); end
    end

    // event sizes from the DDU word-count table: 8 time samples of 25 words
    // per CFEB, 4 words per DMB, 6 DDU words; the largest event stays below
    // the 30070-word limit (15 DMBs of 2000 data words: 30066 words)
    begin
      int ndat[5];
      logic [14:0] fb[5];
      int wcx[5];
      ndat = '{200, 400, 200, 400, 2000};
      fb   = '{15'h0001, 15'h0001, 15'h0011, 15'h0011, 15'h7FFF};
      wcx  = '{210, 410, 414, 814, 30066};
      for (int k = 0; k < 5; k++) begin
        run_event(fb[k], ndat[k], -1, -1, t1);
        checks++;
        if (last_ev[last_ev.size() - 1][55:32] == 24'(wcx[k])) n_size++;
        else begin failures++; $display("word count %0d exp %0d", last_ev[last_ev.size() - 1][55:32], wcx[k]); end
      end
    end

    // let the orbit wrap and the GbE spy FIFO drain
    clocks(4000);
    begin
      int t;
      t = 0;
      while ((gq.size() != 0 || dut.u_gbe.in_frame) && t < 300000) begin clocks(1); t++; end
    end
    checks += 2;
    if (gbe_words != total_words) begin failures++; $display("GbE sent %0d of %0d words", gbe_words, total_words); end
    if (dut.u_gbe.pkt_num < 16'(nev)) begin failures++; $display("%0d GbE frames for %0d events", dut.u_gbe.pkt_num, nev); end

    $display("events %0d words %0d stall %0d throttle %0d close %0d warn %0d busy %0d ovfl %0d",
             nev, total_words, n_stall, n_throttle, n_close, n_warn, n_busy, n_ovfl);
    $display("fmm err %0d sync %0d warn %0d orbit %0d crc %0d l1aerr %0d start_to %0d nodata %0d",
             n_fmm_err, n_fmm_sync, n_fmm_warn, n_orbit, n_crc, n_l1aerr, n_start_to, n_nodata);
    $display("tf %0d fake %0d vme %0d kill %0d softrst %0d syncrst %0d bc0 %0d occ %0d jtag %0d frames %0d sizes %0d",
             n_tf, n_fake, n_vme, n_kill, n_softrst, n_syncrst, n_bc0, n_occ, n_jtag, dut.u_gbe.pkt_num, n_size);
    begin
      int m[$];
      m = '{n_stall, n_throttle, n_close, n_warn, n_busy, n_ovfl, n_fmm_err, n_fmm_sync,
            n_fmm_warn, n_orbit, n_crc, n_l1aerr, n_start_to, n_nodata, n_tf, n_fake, n_vme,
            n_kill, n_softrst, n_syncrst, n_bc0, n_occ, n_jtag, int'(dut.u_gbe.pkt_num), n_size, n_cal_to, n_cal_tog, n_end_to};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
