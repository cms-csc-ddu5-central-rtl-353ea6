// ddu_pkg: constants and types shared by the DDU control FPGA blocks.
// Holds the fixed words of the DDU event format (second header word and
// second-to-last trailer word), the CCB command codes as they appear on the
// un-inverted command bus, the FMM status bit positions and the JTAG user
// instruction opcodes. All values follow the DDU documentation; the packed
// struct layouts of the first header and last trailer word are this
// design's reading of the hex field maps (see event_builder).
package ddu_pkg;

  // Fixed event-format words
  localparam logic [3:0]  BOE_NIBBLE   = 4'h5;
  localparam logic [3:0]  EVT_TYPE     = 4'h1;
  localparam logic [3:0]  EOE_NIBBLE   = 4'hA;
  localparam logic [11:0] TF_SRC_ID    = 12'd760;          // source ID of the Track-Finder DDU
  localparam logic [47:0] H2_CONST     = 48'h8000_0001_8000;   // H2 upper 48 bits
  localparam logic [63:0] T2_CONST     = 64'h8000_FFFF_8000_8000; // T-2 word
  localparam int unsigned HDR_WORDS    = 3;
  localparam int unsigned TRL_WORDS    = 3;

  // CCB command codes (bus value after un-inversion)
  localparam logic [5:0] CMD_SOFT_RST  = 6'h1C;
  localparam logic [5:0] CMD_START     = 6'h06;
  localparam logic [5:0] CMD_STOP      = 6'h07;
  localparam logic [5:0] CMD_BC0       = 6'h01;
  localparam logic [5:0] CMD_SYNC_RST  = 6'h03;
  localparam logic [5:0] CMD_CAL2      = 6'h14;
  localparam logic [5:0] CMD_CAL1      = 6'h15;
  localparam logic [5:0] CMD_CAL0      = 6'h16;

  // FMM status bits
  localparam int unsigned FMM_BUSY = 0;
  localparam int unsigned FMM_WARN = 1;
  localparam int unsigned FMM_SYNC = 2;
  localparam int unsigned FMM_ERR  = 3;

  // DMB word classes (voted special nibble, bits 15:12 of each 16-bit word)
  typedef enum logic [2:0] {
    W_DATA  = 3'd0,
    W_HDR1  = 3'd1,
    W_HDR2  = 3'd2,
    W_TRL1  = 3'd3,
    W_TRL2  = 3'd4
  } dmb_word_e;

  localparam logic [3:0] NIB_HDR1 = 4'h9;
  localparam logic [3:0] NIB_HDR2 = 4'hA;
  localparam logic [3:0] NIB_TRL1 = 4'hF;
  localparam logic [3:0] NIB_TRL2 = 4'hE;

  // JTAG user instruction opcodes
  typedef enum logic [7:0] {
    OP_NOOP       = 8'd0,
    OP_RESET      = 8'd1,
    OP_L1A_NUM    = 8'd2,
    OP_STATUS32   = 8'd3,
    OP_STATUS_LO  = 8'd4,
    OP_STATUS_HI  = 8'd5,
    OP_OUT_STATUS = 8'd6,
    OP_FIFO_STAT  = 8'd7,
    OP_AFULL      = 8'd8,
    OP_FULL       = 8'd9,
    OP_CRC_ERR    = 8'd10,
    OP_TIMEOUTS   = 8'd11,
    OP_XMIT_ERR   = 8'd12,
    OP_KILL_RD    = 8'd13,
    OP_KILL_LD    = 8'd14,
    OP_DMB_ERR    = 8'd15,
    OP_TMB_ERR    = 8'd16,
    OP_ALCT_ERR   = 8'd17,
    OP_LOST_EVT   = 8'd18,
    OP_INRD_STAT  = 8'd19,
    OP_INRD_HIST  = 8'd20,
    OP_CRIT_TRAP  = 8'd21,
    OP_ERR_A      = 8'd22,
    OP_ERR_B      = 8'd23,
    OP_ERR_C      = 8'd24,
    OP_DMB_LIVE   = 8'd25,
    OP_PDMB_LIVE  = 8'd26,
    OP_WARN_MON   = 8'd27,
    OP_MAX_TO     = 8'd28,
    OP_BXORBIT_LD = 8'd29,
    OP_BXORBIT_RD = 8'd30,
    OP_CAL_TOGGLE = 8'd31,
    OP_BOARD_ID   = 8'd32,
    OP_VME_L1A    = 8'd33,
    OP_OCCUPANCY  = 8'd34
  } jtag_op_e;

  // First DDU header word (H1): {5, 1, L1A, BXN, source ID, FOV, K-status}
  typedef struct packed {
    logic [23:0] l1a;
    logic [11:0] bxn;
    logic [11:0] src_id;
    logic [3:0]  fov;
    logic [3:0]  kstat;
    logic [15:0] dmb_full;   // H2 low 16 bits
    logic [15:0] live;       // H3 fields
    logic [15:0] ostar;
    logic [15:0] dav;
    logic [11:0] boe_stat;
    logic [3:0]  ndmb;
  } ddu_hdr_t;

  // Fields of T-1 and TR sampled at the end of the event
  typedef struct packed {
    logic [31:0] ddu_status;
    logic [15:0] dmb_err;
    logic [15:0] dmb_warn;
    logic [7:0]  eof_stat;
    logic [3:0]  mstat;
    logic [3:0]  kstat;
  } ddu_trl_t;

endpackage
