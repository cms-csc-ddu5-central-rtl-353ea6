// ddu5ctrl_top: central control FPGA of the CMS CSC DDU (detector dependent unit).
//
// The DDU collects the data of up to 15 DMBs (one per input fiber) for each
// Level-1 accept and sends them on as one event in the DDU format. This FPGA
// does the central control:
//  * CCB commands and L1A are decoded (ccb_cmd_decode); a BX counter runs
//    0..bx_lim (bxn_counter). Each L1A is delayed 1000 ns (40 clocks) in the
//    close-L1A monitor, which returns the corrected BXN with the close flag
//    in bit 12; the delayed L1A advances the 24-bit L1A number and pushes
//    {L1A number, stored BXN} into the L1A FIFO.
//  * The readout FSM takes the oldest L1A FIFO entry when the event builder
//    is idle and data taking has been started, arms the start/end timeouts
//    and starts the event builder. DMB words arrive from the input FPGAs on
//    a 36-bit DDR bus (ifddr36, 72 bits per clock: data[63:0], valid [64],
//    last word of event [65], fiber number [69:66]). They are buffered in a
//    16-word input FIFO (in_rd_en tells the sender to pause when it is almost
//    full) and pass through dmb_check (special bits, DMB CRC-22, L1A number)
//    into the event builder, which adds the three header and three trailer
//    words with word count and CRC-16.
//  * The DDU output is a valid/ready stream towards the DCC/S-Link; every
//    output word is also written to the external GbE spy FIFO. The GbE
//    packetizer reads that FIFO on the 62.5 MHz gbe_clk and drives the spy
//    link transceiver (two 8b/10b characters per clock).
//  * Sticky per-fiber error registers (CRC, L1A mismatch), the FMM status,
//    the CSC occupancy scalers and the Kill and BX-per-orbit registers are
//    read and written through the JTAG user interface (one shared 32-bit
//    capture/shift register selected by the instruction, two loadable
//    registers). The first fiber LED pair is driven by fiber_led.
// Clocks: clk is the 40 MHz LHC clock, drck/update the JTAG data-register
// clock and update strobe, gbe_clk the GbE clock. rst is the asynchronous
// FPGA reset; the CCB soft and sync resets are combined with it.
// A CFEB_Cal command makes the next event a calibration event with the
// 288-clock start timeout; JTAG instruction 31 toggles this off and on.
// The source ID in the header is the board ID, or 760 on the Track-Finder
// DDU (tf_mode). The block functions and all numbers follow the DDU
// documentation; how the
// blocks are wired together here, the input bus layout and the readout FSM
// are this design's own, as no top-level diagram of the FPGA is available.
module ddu5ctrl_top
  import ddu_pkg::*;
#(
  parameter int unsigned NFIB      = 15,
  parameter int unsigned L1A_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst,
  // CCB backplane
  input  logic [5:0]  ccb_cmd,
  input  logic        ccb_cmd_strobe,
  input  logic        ccb_l1a,
  input  logic        ccb_evcntres,
  input  logic        ccb_bcntres,
  input  logic        tf_mode,
  input  logic        fake_mode,
  input  logic        fake_l1a,
  input  logic [11:0] board_id,
  // input FPGAs
  input  logic [35:0] in_ddr,
  output logic        in_rd_en,
  input  logic [14:0] dmb_live,
  input  logic [14:0] dmb_full,
  input  logic [14:0] dmb_dav,
  // DDU output to DCC / S-Link
  output logic        out_valid,
  output logic [63:0] out_data,
  output logic        out_boe,
  output logic        out_eoe,
  input  logic        out_ready,
  // external GbE spy FIFO and link
  output logic        spy_wr,
  output logic [64:0] spy_wdata,       // {end of event, word}
  input  logic        gbe_clk,
  input  logic        gbe_fifo_empty,
  input  logic        gbe_fifo_pae_n,
  input  logic [64:0] gbe_fifo_rdata,
  output logic        gbe_fifo_rd,
  output logic [15:0] gbe_txd,
  output logic [1:0]  gbe_txk,
  // FMM
  output logic [3:0]  fmm,
  // JTAG user interface
  input  logic        drck,
  input  logic        update,
  input  logic        sel2,
  input  logic        dvcenb,
  input  logic        shift,
  input  logic        tdi,
  input  logic [7:0]  instr,
  output logic        tdo,
  // LEDs of fiber 0
  input  logic        fib0_present,
  input  logic        fib0_ready,
  output logic        fib0_fok_led,
  output logic        fib0_dav_led
);
  // ---------------------------------------------------------------- resets
  logic soft_rst, sync_rst, bc0, start_daq, stop_daq;
  logic [2:0] cfeb_cal;
  logic l1a_ttc, evcntres, bcntres;
  logic rst_all;            // hard + soft reset, for counters and FIFOs
  logic rst_l1af;          // also cleared by a sync reset
  logic rst_q, rs_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rst_q <= 1'b1;
      rs_q  <= 1'b1;
    end else begin
      rst_q <= soft_rst;
      rs_q  <= soft_rst | sync_rst;
    end
  end
  assign rst_all  = rst | rst_q;
  assign rst_l1af = rst | rs_q;

  ccb_cmd_decode u_ccb (
    .clk(clk), .rst(rst), .cmd_bus(ccb_cmd), .cmd_strobe(ccb_cmd_strobe),
    .l1a_bus(ccb_l1a), .evcntres_in(ccb_evcntres), .bcntres_in(ccb_bcntres),
    .tf_mode(tf_mode), .fake_mode(fake_mode),
    .soft_rst(soft_rst), .sync_rst(sync_rst), .bc0(bc0), .start_daq(start_daq),
    .stop_daq(stop_daq), .cfeb_cal(cfeb_cal), .l1a(l1a_ttc),
    .evcntres(evcntres), .bcntres(bcntres)
  );

  logic running;
  always_ff @(posedge clk or posedge rst_all) begin
    if (rst_all)        running <= 1'b0;
    else if (start_daq) running <= 1'b1;
    else if (stop_daq)  running <= 1'b0;
  end

  // ---------------------------------------------------------- JTAG decode
  jtag_op_e   op;
  logic       op_known;
  logic [7:0] op_len;
  logic kill_rd, kill_ld, bxo_rd, bxo_ld, jtag_fpga_rst, cal_toggle, vme_l1a;

  jtag_instr_decode u_idec (
    .instr(instr), .op(op), .known(op_known), .len(op_len),
    .kill_rd(kill_rd), .kill_ld(kill_ld), .bxorbit_rd(bxo_rd), .bxorbit_ld(bxo_ld),
    .fpga_rst(jtag_fpga_rst), .cal_toggle(cal_toggle), .vme_l1a(vme_l1a)
  );

  logic [19:0] kill;
  logic [11:0] bx_lim;
  logic        tdo_kill, tdo_bxo, tdo_stat;

  jtag_load_reg #(.W(20), .RESET_VAL(20'hFFFFF)) u_killreg (
    .drck(drck), .update(update), .rst(rst), .sel2(sel2), .read(kill_rd),
    .load(kill_ld), .lshft(shift), .tdi(tdi), .tdo(tdo_kill), .q(kill)
  );
  jtag_load_reg #(.W(12), .RESET_VAL(12'd3563)) u_bxoreg (
    .drck(drck), .update(update), .rst(rst), .sel2(sel2), .read(bxo_rd),
    .load(bxo_ld), .lshft(shift), .tdi(tdi), .tdo(tdo_bxo), .q(bx_lim)
  );

  logic [14:0] fiber_en;
  logic alct_dis, tmb_dis, cfeb_dis, dmb_dis;
  kill_reg u_kill (
    .kill(kill), .fiber_en(fiber_en), .alct_chk_dis(alct_dis),
    .tmb_chk_dis(tmb_dis), .cfeb_chk_dis(cfeb_dis), .dmb_chk_dis(dmb_dis)
  );

  // ------------------------------------------------------------ BX / L1A
  logic [11:0] bxn;
  logic        orbit;
  bxn_counter u_bx (
    .clk(clk), .rst(rst_all), .bc0(bc0 | bcntres), .bx_lim(bx_lim),
    .bxn(bxn), .orbit(orbit)
  );

  // VME/JTAG L1A (DDU-only) in fake mode: one pulse per rising edge of the
  // instruction select, brought into the clk domain
  logic [2:0] vme_l1a_s;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) vme_l1a_s <= '0;
    else     vme_l1a_s <= {vme_l1a_s[1:0], vme_l1a & sel2};
  end

  // calibration: a CFEB_Cal command marks the next event as a calibration
  // event (longer start timeout) unless JTAG instruction 31 has toggled the
  // calibration trigger off
  logic [2:0] cal_tog_s;
  logic       cal_dis, cal_pending;
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cal_tog_s <= '0; cal_dis <= 1'b0;
    end else begin
      cal_tog_s <= {cal_tog_s[1:0], cal_toggle & sel2};
      if (cal_tog_s[1] & ~cal_tog_s[2]) cal_dis <= ~cal_dis;
    end
  end

  logic l1a_any, l1a_dly, close_l1a;
  logic [12:0] sbxn;
  assign l1a_any = l1a_ttc | (fake_mode & (fake_l1a | (vme_l1a_s[1] & ~vme_l1a_s[2])));

  close_l1a_monitor #(.PIPE(40)) u_close (
    .clk(clk), .rst(rst_all), .l1a_in(l1a_any), .bxn(bxn), .bx_lim(bx_lim),
    .l1a_out(l1a_dly), .close_l1a(close_l1a), .sbxn(sbxn)
  );

  logic [23:0] l1a_num;
  always_ff @(posedge clk or posedge rst_all) begin
    if (rst_all)                 l1a_num <= '0;
    else if (evcntres || sync_rst) l1a_num <= '0;
    else if (l1a_dly)            l1a_num <= l1a_num + 24'd1;
  end

  localparam int unsigned LW = 37;
  logic          lf_rd, lf_empty, lf_full, lf_warn, lf_busy, lf_ovfl;
  logic [LW-1:0] lf_rdata;
  logic [$clog2(L1A_DEPTH):0] lf_count;

  l1a_fifo #(.W(LW), .DEPTH(L1A_DEPTH), .WARN_ON(L1A_DEPTH*3/4), .WARN_OFF(L1A_DEPTH/2),
             .BUSY_ON(L1A_DEPTH*15/16), .BUSY_OFF(L1A_DEPTH*25/32)) u_l1af (
    .clk(clk), .rst(rst_l1af), .wr(l1a_dly), .wdata({l1a_num + 24'd1, sbxn}),
    .rd(lf_rd), .rdata(lf_rdata), .empty(lf_empty), .full(lf_full), .count(lf_count),
    .warn(lf_warn), .busy(lf_busy), .ovfl(lf_ovfl)
  );

  // ------------------------------------------------------- DMB data input
  logic [71:0] ddr_q;
  ifddr36 u_ddr (.clk(clk), .clr(rst), .ce(1'b1), .din(in_ddr), .q(ddr_q));

  logic        df_rd, df_empty, df_full, df_warn, df_busy, df_ovfl;
  logic [69:0] df_rdata;
  logic [4:0]  df_count;
  l1a_fifo #(.W(70), .DEPTH(16), .WARN_ON(10), .WARN_OFF(6), .BUSY_ON(14), .BUSY_OFF(12)) u_datf (
    .clk(clk), .rst(rst_all), .wr(ddr_q[64]), .wdata({ddr_q[69:64], ddr_q[63:0]}),
    .rd(df_rd), .rdata(df_rdata), .empty(df_empty), .full(df_full), .count(df_count),
    .warn(df_warn), .busy(df_busy), .ovfl(df_ovfl)
  );
  assign in_rd_en = !df_warn;

  // -------------------------------------------------------- event builder
  ddu_hdr_t hdr;
  ddu_trl_t trl;
  logic eb_start, eb_busy, eb_in_ready, eb_abort, eb_no_data;
  logic [23:0] last_wc;
  logic [23:0] cur_l1a;
  logic [14:0] evt_crc_err, evt_l1a_err;
  logic        evt_sp_err;
  logic        to_start, to_end, to_active;
  logic [15:0] to_max;
  logic [3:0]  ndmb;

  always_comb begin
    ndmb = '0;
    for (int i = 0; i < NFIB; i++) ndmb = ndmb + 4'(dmb_dav[i] & fiber_en[i]);
  end

  // readout FSM: one event at a time
  typedef enum logic [1:0] {R_IDLE, R_START, R_RUN} rd_e;
  rd_e rst_st;
  assign lf_rd      = (rst_st == R_IDLE) && running && !lf_empty && !eb_busy;
  assign eb_start   = (rst_st == R_START);
  assign eb_no_data = ((dmb_dav & fiber_en) == '0);
  assign eb_abort   = to_start | to_end;

  always_ff @(posedge clk or posedge rst_all) begin
    if (rst_all) begin
      rst_st <= R_IDLE; cur_l1a <= '0; hdr <= '0;
    end else begin
      unique case (rst_st)
        R_IDLE: if (lf_rd) begin
          rst_st       <= R_START;
          cur_l1a      <= lf_rdata[36:13];
          hdr.l1a      <= lf_rdata[36:13];
          hdr.bxn      <= lf_rdata[11:0];
          hdr.src_id   <= tf_mode ? TF_SRC_ID : board_id;
          hdr.fov      <= 4'h0;
          hdr.kstat    <= fmm;
          hdr.dmb_full <= {1'b0, dmb_full};
          hdr.live     <= {1'b0, dmb_live & fiber_en};
          hdr.ostar    <= '0;
          hdr.dav      <= {1'b0, dmb_dav & fiber_en};
          hdr.boe_stat <= {7'h0, lf_rdata[12], lf_warn, lf_busy, lf_full, lf_ovfl};
          hdr.ndmb     <= ndmb;
        end
        R_START: rst_st <= R_RUN;
        R_RUN:   if (!eb_busy) rst_st <= R_IDLE;
        default: rst_st <= R_IDLE;
      endcase
    end
  end

  logic        dxfer;
  logic [63:0] dword;
  logic        dlast;
  logic [3:0]  dfib;
  assign dword = df_rdata[63:0];
  assign dlast = df_rdata[65];
  assign dfib  = df_rdata[69:66];
  assign df_rd = eb_in_ready && !df_empty;
  assign dxfer = df_rd;

  // the DMB checks report two clocks after the last word and the error
  // registers one clock later: T-2 waits for them
  logic [2:0] last_pend;
  logic       trl_hold;
  always_ff @(posedge clk or posedge rst_all) begin
    if (rst_all) last_pend <= '0;
    else         last_pend <= {last_pend[1:0], dxfer && dlast};
  end
  assign trl_hold = |last_pend;

  logic        o_valid;
  event_builder u_eb (
    .clk(clk), .rst(rst_all), .start(eb_start), .no_data(eb_no_data), .cut(eb_abort),
    .hdr(hdr), .trl(trl), .trl_hold(trl_hold), .busy(eb_busy),
    .in_valid(!df_empty), .in_data(dword), .in_last(dlast), .in_ready(eb_in_ready),
    .out_valid(o_valid), .out_data(out_data), .out_boe(out_boe), .out_eoe(out_eoe),
    .out_ready(out_ready), .last_wc(last_wc)
  );
  assign out_valid = o_valid;
  assign spy_wr    = o_valid && out_ready;
  assign spy_wdata = {out_eoe, out_data};

  // ------------------------------------------------------------ timeouts
  always_ff @(posedge clk or posedge rst_all) begin
    if (rst_all)                      cal_pending <= 1'b0;
    else if ((|cfeb_cal) && !cal_dis) cal_pending <= 1'b1;
    else if (eb_start)                cal_pending <= 1'b0;
  end

  logic data_seen;
  always_ff @(posedge clk or posedge rst_all) begin
    if (rst_all)       data_seen <= 1'b0;
    else if (eb_start) data_seen <= 1'b0;
    else if (dxfer)    data_seen <= 1'b1;
  end

  event_timeout u_to (
    .clk(clk), .rst(rst_all), .arm(eb_start && !eb_no_data), .cal_mode(cal_pending),
    .data_start(dxfer && !data_seen), .done(dxfer && dlast),
    .start_to(to_start), .end_to(to_end), .active(to_active), .max_cnt(to_max)
  );

  // ------------------------------------------------------------ DMB check
  dmb_word_e wclass;
  logic dmb_start, dmb_end, crc_err, l1a_err, sp_err;
  dmb_check u_dmb (
    .clk(clk), .rst(rst_all), .valid(dxfer), .data(dword), .exp_l1a(cur_l1a),
    .chk_dis(dmb_dis), .wclass(wclass), .dmb_start(dmb_start), .dmb_end(dmb_end),
    .crc_err(crc_err), .l1a_err(l1a_err), .sp_err(sp_err)
  );

  // fiber tag and CFEB DAV bits aligned to the dmb_check stages
  logic [3:0] fib1, fib2, fib3;
  logic       cfeb1;
  always_ff @(posedge clk or posedge rst_all) begin
    if (rst_all) begin
      fib1 <= '0; fib2 <= '0; fib3 <= '0; cfeb1 <= 1'b0;
    end else begin
      if (dxfer) begin fib1 <= dfib; cfeb1 <= |dword[4:0]; end
      fib2 <= fib1;
      fib3 <= fib2;
    end
  end

  // per-event and sticky per-fiber error registers
  logic [14:0] crc_err_reg, l1a_err_reg;
  always_ff @(posedge clk or posedge rst_all) begin
    if (rst_all) begin
      evt_crc_err <= '0; evt_l1a_err <= '0; evt_sp_err <= 1'b0;
      crc_err_reg <= '0; l1a_err_reg <= '0;
    end else begin
      if (eb_start) begin
        evt_crc_err <= '0; evt_l1a_err <= '0; evt_sp_err <= 1'b0;
      end
      if (dmb_end && fib2 < 4'(NFIB)) begin
        if (crc_err) begin evt_crc_err[fib2] <= 1'b1; crc_err_reg[fib2] <= 1'b1; end
        if (l1a_err) begin evt_l1a_err[fib2] <= 1'b1; l1a_err_reg[fib2] <= 1'b1; end
      end
      if (sp_err) evt_sp_err <= 1'b1;
      if (sync_rst) l1a_err_reg <= '0;
    end
  end

  logic hard_err_flag;
  sticky_err u_herr (.clk(clk), .rst(rst_all), .in_memerr(lf_ovfl), .fferr(df_ovfl | sp_err),
                     .ff_err(hard_err_flag));

  always_comb begin
    trl.ddu_status = {8'h0, 3'h0, close_l1a, lf_warn, lf_busy, hard_err_flag, evt_sp_err,
                      |evt_crc_err, |evt_l1a_err, to_start, to_end, 4'h0, 8'h0};
    trl.dmb_err    = {1'b0, evt_crc_err | evt_l1a_err};
    trl.dmb_warn   = '0;
    trl.eof_stat   = {4'h0, evt_sp_err, |evt_crc_err, |evt_l1a_err, to_start | to_end};
    trl.mstat      = {alct_dis, tmb_dis, cfeb_dis, dmb_dis};
    trl.kstat      = fmm;
  end

  // ------------------------------------------------------------------ FMM
  fmm_status u_fmm (
    .clk(clk), .rst(rst_all), .running(running), .busy_in(lf_busy), .warn_in(lf_warn),
    .sync_err_in(dmb_end & l1a_err), .hard_err_in(hard_err_flag), .sync_rst(sync_rst),
    .fmm(fmm)
  );

  // ------------------------------------------------------------ occupancy
  logic       occ_ready;
  logic [5:0] occ_addr;
  logic [31:0] occ_data;
  occupancy_monitor #(.NFIB(15), .NBRD(4)) u_occ (
    .clk(clk), .rst(rst_all), .inc(dmb_start && fib1 < 4'(NFIB) && occ_ready),
    .fiber(fib1), .boards({2'b00, cfeb1, 1'b1}), .ready(occ_ready),
    .rd_addr(occ_addr), .rd_data(occ_data)
  );

  // ------------------------------------------------------ JTAG status read
  logic [31:0] jstat;
  always_comb begin
    unique case (op)
      OP_L1A_NUM:    jstat = {8'h0, l1a_num};
      OP_STATUS32:   jstat = trl.ddu_status;
      OP_STATUS_LO:  jstat = {16'h0, trl.ddu_status[15:0]};
      OP_STATUS_HI:  jstat = {16'h0, trl.ddu_status[31:16]};
      OP_FULL:       jstat = {22'h0, lf_full, df_full, 8'h0};
      OP_CRC_ERR:    jstat = {17'h0, crc_err_reg};
      OP_TIMEOUTS:   jstat = {16'h0, 4'h0, 3'h0, to_end, 3'h0, to_start, 4'h0};
      OP_DMB_ERR:    jstat = {17'h0, l1a_err_reg | crc_err_reg};
      OP_DMB_LIVE:   jstat = {17'h0, dmb_live};
      OP_OUT_STATUS: jstat = {16'h0, 8'h0, fmm, eb_busy, running, out_ready, in_rd_en};
      OP_MAX_TO:     jstat = {16'h0, to_max};
      OP_BOARD_ID:   jstat = {20'h0, board_id};
      OP_OCCUPANCY:  jstat = occ_data;
      default:       jstat = '0;
    endcase
  end

  // the occupancy loop steps to the next scaler after each capture
  logic [1:0] cap_s;
  always_ff @(posedge drck or posedge rst) begin
    if (rst) begin
      occ_addr <= '0; cap_s <= '0;
    end else begin
      cap_s <= {cap_s[0], dvcenb & sel2 & ~shift};
      if (op != OP_OCCUPANCY) occ_addr <= '0;
      else if (cap_s == 2'b10) occ_addr <= (occ_addr == 6'd59) ? 6'd0 : occ_addr + 6'd1;
    end
  end

  jtag_status_reg #(.W(32)) u_jstat (
    .drck(drck), .rst(rst), .dvcenb(dvcenb), .sel2(sel2), .lshft(shift), .tdi(tdi),
    .status(jstat), .tdo(tdo_stat)
  );

  always_comb begin
    if (kill_rd || kill_ld)     tdo = tdo_kill;
    else if (bxo_rd || bxo_ld)  tdo = tdo_bxo;
    else                        tdo = tdo_stat;
  end

  // ------------------------------------------------------------ GbE spy
  logic        g_rd;
  logic        g_in_frame;
  logic [15:0] g_pkt;
  gbe_packetizer u_gbe (
    .clk(gbe_clk), .rst(rst), .fifo_empty(gbe_fifo_empty), .fifo_pae_n(gbe_fifo_pae_n),
    .fifo_data(gbe_fifo_rdata[63:0]), .fifo_eoe(gbe_fifo_rdata[64]), .fifo_rd(g_rd),
    .txd(gbe_txd), .txk(gbe_txk), .in_frame(g_in_frame), .pkt_num(g_pkt)
  );
  assign gbe_fifo_rd = g_rd;

  // ----------------------------------------------------------------- LEDs
  fiber_led #(.DIV(22)) u_led0 (
    .clk(clk), .rst(rst), .present(fib0_present), .ready(fib0_ready),
    .dav(dmb_dav[0] & eb_busy), .fok_led(fib0_fok_led), .dav_led(fib0_dav_led)
  );
endmodule
