// ccb_cmd_decode: decoder for the CCB (clock and control board) command bus.
// The 6-bit command bus and the L1A line are inverted on the backplane; they
// are un-inverted at the input buffers, and for the Track-Finder DDU (tf_mode)
// they arrive with the opposite polarity, so both are inverted again here.
// On a strobe the command is compared against the documented codes and one
// registered pulse is produced (one clock latency): soft reset 0x1C, start
// data taking 0x06, stop 0x07, BC0 0x01, sync reset 0x03 and CFEB_Cal[2:0]
// 0x14/0x15/0x16. In fake-L1A mode the TTC L1A, event-counter reset and BX
// reset are blocked. The strobe input and the separate EvCntRes/BCntRes
// lines are this design's framing; the codes are the documented ones.
module ccb_cmd_decode
  import ddu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] cmd_bus,
  input  logic       cmd_strobe,
  input  logic       l1a_bus,
  input  logic       evcntres_in,
  input  logic       bcntres_in,
  input  logic       tf_mode,     // Track-Finder DDU: command and L1A inverted
  input  logic       fake_mode,   // fake L1A mode: kill TTC L1A/BXR/ECR
  output logic       soft_rst,
  output logic       sync_rst,
  output logic       bc0,
  output logic       start_daq,
  output logic       stop_daq,
  output logic [2:0] cfeb_cal,
  output logic       l1a,
  output logic       evcntres,
  output logic       bcntres
);
  logic [5:0] cmd;
  logic       l1a_c;
  assign cmd   = tf_mode ? ~cmd_bus : cmd_bus;
  assign l1a_c = tf_mode ? ~l1a_bus : l1a_bus;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      soft_rst <= 1'b0; sync_rst <= 1'b0; bc0 <= 1'b0;
      start_daq <= 1'b0; stop_daq <= 1'b0; cfeb_cal <= '0;
      l1a <= 1'b0; evcntres <= 1'b0; bcntres <= 1'b0;
    end else begin
      soft_rst    <= cmd_strobe && cmd == CMD_SOFT_RST;
      sync_rst    <= cmd_strobe && cmd == CMD_SYNC_RST;
      bc0         <= cmd_strobe && cmd == CMD_BC0 && !fake_mode;
      start_daq   <= cmd_strobe && cmd == CMD_START;
      stop_daq    <= cmd_strobe && cmd == CMD_STOP;
      cfeb_cal[2] <= cmd_strobe && cmd == CMD_CAL2;
      cfeb_cal[1] <= cmd_strobe && cmd == CMD_CAL1;
      cfeb_cal[0] <= cmd_strobe && cmd == CMD_CAL0;
      l1a         <= l1a_c && !fake_mode;
      evcntres    <= evcntres_in && !fake_mode;
      bcntres     <= bcntres_in && !fake_mode;
    end
  end
endmodule
