// dmb_check: checks on the 64-bit DMB data stream of one input path.
// Stage 1 registers the word together with its voted special nibble (bits
// 15..12 of the four 16-bit words, 2-of-4 vote) and the consistency flags
// from special_word_check. Stage 2 classifies the word by the voted nibble
// (9 = DMB header 1, A = header 2, F = trailer 1, E = trailer 2, anything
// else data), runs the DMB CRC-22 over every word up to and including
// trailer 1, and on trailer 2 compares it with the CRC carried there
// ({bits 26:16, bits 10:0}) and loads the CRC register with zero. On header 1
// the DMB L1A number {HDR3[11:0], HDR2[11:0]} (bits 43:32 and 27:16) is
// compared with the expected L1A. When the checks are disabled ('chk_dis')
// no error is reported. 'dmb_end' pulses two clocks after trailer 2 enters,
// with crc_err and l1a_err valid for that DMB; sp_err pulses for a word whose
// special bits disagree. The CRC, the zero load on trailer 2, the L1A field
// and the 2-of-4 vote are the DDU's; the word codes and the CRC position in
// trailer 2 are taken from the CMS DMB format and are this design's reading.
module dmb_check
  import ddu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        valid,
  input  logic [63:0] data,
  input  logic [23:0] exp_l1a,
  input  logic        chk_dis,
  output dmb_word_e   wclass,      // class of the stage-2 word
  output logic        dmb_start,   // header 1 seen
  output logic        dmb_end,
  output logic        crc_err,
  output logic        l1a_err,
  output logic        sp_err
);
  logic        v1;
  logic [63:0] d1;
  logic [3:0]  voted, sperr4;
  logic        sp_any;

  special_word_check u_sw (
    .clk(clk), .rst(rst), .en(valid), .din(data),
    .voted(voted), .sp_err(sperr4), .any_err(sp_any)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      v1 <= 1'b0; d1 <= '0;
    end else begin
      v1 <= valid;
      if (valid) d1 <= data;
    end
  end

  always_comb begin
    unique case (voted)
      NIB_HDR1: wclass = W_HDR1;
      NIB_HDR2: wclass = W_HDR2;
      NIB_TRL1: wclass = W_TRL1;
      NIB_TRL2: wclass = W_TRL2;
      default:  wclass = W_DATA;
    endcase
  end

  logic [21:0] dcrc, dcrc_next;
  logic        is_t2;
  assign is_t2 = v1 && wclass == W_TRL2;

  crc22_64 u_dcrc (
    .clk(clk), .rst(rst), .en(v1 && !is_t2), .load0(is_t2), .d(d1),
    .crc(dcrc), .crc_next(dcrc_next)
  );

  logic l1a_bad;
  assign dmb_start = v1 && wclass == W_HDR1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dmb_end <= 1'b0; crc_err <= 1'b0; l1a_err <= 1'b0; sp_err <= 1'b0; l1a_bad <= 1'b0;
    end else begin
      dmb_end <= is_t2;
      sp_err  <= v1 && sp_any && !chk_dis;
      if (dmb_start) l1a_bad <= ({d1[43:32], d1[27:16]} != exp_l1a);
      if (is_t2) begin
        crc_err <= !chk_dis && (dcrc != {d1[26:16], d1[10:0]});
        l1a_err <= !chk_dis && l1a_bad;
      end
    end
  end
endmodule
