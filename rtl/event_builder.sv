// event_builder: frames one event in the DDU output format.
// After 'start' (with the header fields in 'hdr') the builder sends three
// header words, then passes the event's DMB data words through unchanged
// until the word flagged 'in_last', then sends three trailer words:
//   H1  {5, 1, L1A[23:0], BXN[11:0], source ID[11:0], FOV[3:0], K-status[3:0]}
//   H2  {0x8000_0001_8000, DMB full[15:0]}
//   H3  {live DMBs[15:0], O-star[15:0], DMB DAV[15:0], BOE status[11:0], #DMB[3:0]}
//   T-2 0x8000_FFFF_8000_8000
//   T-1 {DDU status[31:0], DMB error[15:0], DMB warning[15:0]}
//   TR  {A, 0, word count[23:0], CRC-16[15:0], EOF status[7:0], M[3:0], K[3:0]}
// An event with 'no_data' set skips the data phase (6 words in all, as the
// DDU documents). The word count includes all header and trailer words. The
// 'cut' ends the data phase at once (used on a readout timeout). The
// CRC-16 runs over every output word, with the CRC field of TR taken as zero.
// The trailer fields in 'trl' are sampled while T-2 is sent; 'trl_hold'
// delays T-2 (out_valid low) until late error flags have settled. Output is a
// valid/ready stream; data words move only when both in_valid and out_ready
// are high, and one word per clock is sent when out_ready stays high.
// The word layout follows the DDU format page; the handshake, the CRC's
// bit order and start value, and the packing of the 3-digit H3 field are
// this design's choices.
module event_builder
  import ddu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        no_data,
  input  logic        cut,        // end the data phase early (timeout)
  input  ddu_hdr_t    hdr,
  input  ddu_trl_t    trl,
  input  logic        trl_hold,   // wait before T-2 until 'trl' is final
  output logic        busy,
  // DMB data in
  input  logic        in_valid,
  input  logic [63:0] in_data,
  input  logic        in_last,
  output logic        in_ready,
  // DDU data out
  output logic        out_valid,
  output logic [63:0] out_data,
  output logic        out_boe,
  output logic        out_eoe,
  input  logic        out_ready,
  output logic [23:0] last_wc
);
  typedef enum logic [2:0] {S_IDLE, S_H1, S_H2, S_H3, S_DATA, S_T2, S_T1, S_TR} st_e;
  st_e         st;
  ddu_hdr_t    h;
  ddu_trl_t    t;
  logic        nd;
  logic [23:0] wc;
  logic        xfer;
  logic [63:0] word;
  logic [15:0] crc, crc_next;

  assign busy = (st != S_IDLE);

  always_comb begin
    word = '0;
    unique case (st)
      S_H1:   word = {BOE_NIBBLE, EVT_TYPE, h.l1a, h.bxn, h.src_id, h.fov, h.kstat};
      S_H2:   word = {H2_CONST, h.dmb_full};
      S_H3:   word = {h.live, h.ostar, h.dav, h.boe_stat, h.ndmb};
      S_DATA: word = in_data;
      S_T2:   word = T2_CONST;
      S_T1:   word = {t.ddu_status, t.dmb_err, t.dmb_warn};
      S_TR:   word = {EOE_NIBBLE, 4'h0, wc + 24'd1, 16'h0000, t.eof_stat, t.mstat, t.kstat};
      default: word = '0;
    endcase
  end

  always_comb begin
    out_valid = (st == S_DATA) ? in_valid : (st == S_T2) ? !trl_hold : (st != S_IDLE);
    out_data  = (st == S_TR) ? {word[63:32], crc_next, word[15:0]} : word;
    out_boe   = (st == S_H1);
    out_eoe   = (st == S_TR);
    in_ready  = (st == S_DATA) && out_ready;
    xfer      = out_valid && out_ready;
  end

  crc16_64 u_crc (
    .clk(clk), .rst(rst), .init(start && st == S_IDLE), .en(xfer), .d(word),
    .crc(crc), .crc_next(crc_next)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st <= S_IDLE; h <= '0; t <= '0; nd <= 1'b0; wc <= '0; last_wc <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          h <= hdr; nd <= no_data; wc <= '0; st <= S_H1;
        end
        S_H1: if (xfer) st <= S_H2;
        S_H2: if (xfer) st <= S_H3;
        S_H3: if (xfer) st <= nd ? S_T2 : S_DATA;
        S_DATA: if ((xfer && in_last) || cut) st <= S_T2;
        S_T2: if (xfer) begin st <= S_T1; t <= trl; end
        S_T1: if (xfer) st <= S_TR;
        S_TR: if (xfer) begin st <= S_IDLE; last_wc <= wc + 24'd1; end
        default: st <= S_IDLE;
      endcase
      if (xfer && st != S_TR) wc <= wc + 24'd1;
    end
  end

  // A data word must not be dropped: in_ready is only asserted in the data phase
  a_no_loss: assert property (@(posedge clk) disable iff (rst)
    (st == S_DATA && in_valid && !out_ready) |-> !in_ready);
endmodule
