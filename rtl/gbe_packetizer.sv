// gbe_packetizer: sends DDU event data as Ethernet frames on the GbE spy link.
// The transceiver takes two 8b/10b characters per 62.5 MHz clock (16 ns):
// txd[7:0] is sent first, txd[15:8] second, txk marks K characters.
// While 'rst' is high the link carries SYNC ordered sets (K28.5 D21.5,
// K28.5 D2.2); afterwards IDLE sets (K28.5 D16.2, 0x50BC in parallel).
// When the data FIFO is not empty a frame is started, but only after
// WAIT_CLKS (1280 x 16 ns = 20.48 us) since the previous frame unless the
// FIFO's programmable-almost-empty flag is inactive (fifo_pae_n high, i.e.
// the FIFO holds many words). A frame is: start/preamble (K27.7, six 0x55,
// 0xD5), four 0xFF destination bytes, the 64-bit FIFO words sent most
// significant byte first, zero fill up to 56 data bytes, a 16-bit packet
// number, the Ethernet CRC-32 of everything after the preamble, then /T/R/
// (K29.7, K23.7), followed by IDLE. A frame ends after a word flagged as
// end of event, when the FIFO runs empty at a word boundary, or after
// MAX_BYTES data bytes, so events and frames end together. The FIFO is
// first-word-fall-through: a word is popped when its first two bytes are
// sent, so 'fifo_empty' after the pop tells whether another word follows.
// The SYNC/IDLE patterns, 20.48 us wait, PAE exception, 4 destination bytes,
// 56-byte fill, packet number, CRC-32 and 8960-byte limit follow the DDU
// notes; the start/terminate characters, byte order and CRC bit order are
// the standard 1000BASE-X / IEEE 802.3 ones, chosen here.
module gbe_packetizer #(
  parameter int unsigned WAIT_CLKS = 1280,
  parameter int unsigned MAX_BYTES = 8960,
  parameter int unsigned MIN_BYTES = 56
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        fifo_empty,
  input  logic        fifo_pae_n,
  input  logic [63:0] fifo_data,
  input  logic        fifo_eoe,
  output logic        fifo_rd,
  output logic [15:0] txd,
  output logic [1:0]  txk,
  output logic        in_frame,
  output logic [15:0] pkt_num
);
  typedef enum logic [3:0] {S_SYNC, S_IDLE, S_PRE, S_DST, S_DATA, S_FILL,
                            S_PNUM, S_CRC, S_TRL} st_e;
  st_e         st;
  logic        sync_ph;
  logic [1:0]  sub;            // 16-bit slot within preamble / word / CRC
  logic [15:0] nbytes;
  logic [15:0] wait_cnt;
  logic [31:0] crc, crc_n;
  logic [15:0] pay;            // payload bytes this clock
  logic        pay_en;
  logic        last_word;

  // CRC-32 (IEEE 802.3, reflected 0xEDB88320), two bytes per clock, low byte first
  function automatic logic [31:0] crc_byte(input logic [31:0] c, input logic [7:0] b);
    logic [31:0] s;
    s = c ^ {24'h0, b};
    for (int i = 0; i < 8; i++) s = s[0] ? ((s >> 1) ^ 32'hEDB88320) : (s >> 1);
    return s;
  endfunction
  assign crc_n = crc_byte(crc_byte(crc, pay[7:0]), pay[15:8]);

  logic [63:0] wreg, w;
  logic        eoe_reg;
  assign w = (sub == 2'd0) ? fifo_data : wreg;
  always_comb begin
    pay = 16'h0000;
    unique case (st)
      S_DST:  pay = 16'hFFFF;
      S_DATA: unique case (sub)
                2'd0: pay = {w[55:48], w[63:56]};
                2'd1: pay = {w[39:32], w[47:40]};
                2'd2: pay = {w[23:16], w[31:24]};
                default: pay = {w[7:0], w[15:8]};
              endcase
      S_FILL: pay = 16'h0000;
      S_PNUM: pay = {pkt_num[7:0], pkt_num[15:8]};
      default: pay = 16'h0000;
    endcase
    pay_en = (st == S_DST) || (st == S_DATA) || (st == S_FILL) || (st == S_PNUM);
  end

  logic [31:0] fcs;
  assign fcs = ~crc;

  always_comb begin
    txk = 2'b00;
    txd = 16'h0000;
    unique case (st)
      S_SYNC: begin txk = 2'b01; txd = sync_ph ? 16'h42BC : 16'hB5BC; end
      S_IDLE: begin txk = 2'b01; txd = 16'h50BC; end
      S_PRE: begin
        txd = (sub == 2'd0) ? 16'h55FB : (sub == 2'd3) ? 16'hD555 : 16'h5555;
        txk = (sub == 2'd0) ? 2'b01 : 2'b00;
      end
      S_DST, S_DATA, S_FILL, S_PNUM: txd = pay;
      S_CRC: txd = (sub == 2'd0) ? fcs[15:0] : fcs[31:16];
      S_TRL: begin txk = 2'b11; txd = 16'hF7FD; end
      default: ;
    endcase
  end

  assign in_frame  = !(st == S_SYNC || st == S_IDLE);
  assign last_word = eoe_reg || (nbytes + 16'd2 >= 16'(MAX_BYTES)) || fifo_empty;
  assign fifo_rd   = (st == S_DATA) && (sub == 2'd0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st <= S_SYNC; sync_ph <= 1'b0; sub <= '0; nbytes <= '0; wreg <= '0; eoe_reg <= 1'b0;
      wait_cnt <= 16'(WAIT_CLKS); crc <= 32'hFFFFFFFF; pkt_num <= '0;
    end else begin
      if (pay_en) crc <= crc_n;
      if (wait_cnt != 0 && !in_frame) wait_cnt <= wait_cnt - 16'd1;
      unique case (st)
        S_SYNC: begin sync_ph <= ~sync_ph; st <= S_IDLE; end
        S_IDLE: if (!fifo_empty && (wait_cnt == 0 || fifo_pae_n)) begin
          st <= S_PRE; sub <= '0; nbytes <= '0; crc <= 32'hFFFFFFFF;
        end
        S_PRE: begin
          sub <= sub + 2'd1;
          if (sub == 2'd3) begin st <= S_DST; sub <= '0; end
        end
        S_DST: begin
          sub <= sub + 2'd1;
          if (sub == 2'd1) begin st <= S_DATA; sub <= '0; end
        end
        S_DATA: begin
          sub <= sub + 2'd1;
          nbytes <= nbytes + 16'd2;
          if (sub == 2'd0) begin
            wreg    <= fifo_data;
            eoe_reg <= fifo_eoe;
          end
          if (sub == 2'd3) begin
            sub <= '0;
            if (last_word)
              st <= (nbytes + 16'd2 < 16'(MIN_BYTES)) ? S_FILL : S_PNUM;
          end
        end
        S_FILL: begin
          nbytes <= nbytes + 16'd2;
          if (nbytes + 16'd2 >= 16'(MIN_BYTES)) st <= S_PNUM;
        end
        S_PNUM: begin st <= S_CRC; sub <= '0; end
        S_CRC: begin
          sub <= sub + 2'd1;
          if (sub == 2'd1) begin st <= S_TRL; sub <= '0; end
        end
        S_TRL: begin
          st <= S_IDLE; pkt_num <= pkt_num + 16'd1; wait_cnt <= 16'(WAIT_CLKS);
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_rd_not_empty: assert property (@(posedge clk) disable iff (rst) fifo_rd |-> !fifo_empty);
endmodule
