// fmm_status: the DDU's 4-bit status towards the Fast Merging Module (TTS).
// Bit 0 BUSY (not ready), bit 1 Warning / near full, bit 2 Lost Sync (needs a
// sync reset), bit 3 Error (needs a hard reset), as defined in the DDU notes.
// Busy and warning follow their sources (the L1A FIFO levels already carry
// hysteresis) and busy is also held while reset or while the DAQ has not
// been started. Lost sync and error are sticky: they are cleared only by a
// sync reset or a hard reset respectively. Registered, one clock latency.
// Which conditions feed each bit is this design's choice.
module fmm_status
  import ddu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       running,    // data taking started
  input  logic       busy_in,
  input  logic       warn_in,
  input  logic       sync_err_in,
  input  logic       hard_err_in,
  input  logic       sync_rst,
  output logic [3:0] fmm
);
  logic sync_lat, err_lat;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sync_lat <= 1'b0;
      err_lat  <= 1'b0;
      fmm      <= 4'b0001;
    end else begin
      if (sync_rst)         sync_lat <= 1'b0;
      else if (sync_err_in) sync_lat <= 1'b1;
      if (hard_err_in)      err_lat  <= 1'b1;
      fmm[FMM_BUSY] <= busy_in || !running;
      fmm[FMM_WARN] <= warn_in;
      fmm[FMM_SYNC] <= (sync_lat && !sync_rst) || sync_err_in;
      fmm[FMM_ERR]  <= err_lat || hard_err_in;
    end
  end
endmodule
