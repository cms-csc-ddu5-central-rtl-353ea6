// event_timeout: start and end timeouts for reading one event.
// 'arm' starts a count when the DDU begins waiting for an event's data.
// If no data has started ('data_start') after START_TO clocks (128 = 3.2 us
// at 40 MHz), or CAL_START_TO clocks (288 = 7.2 us) for calibration events,
// 'start_to' is set. After the data has started, 'end_to' is set if 'done'
// has not come within DONE_TO clocks (38914 = about 972 us, the worst case
// for four CSCs). 'cal_mode' is sampled with 'arm'. Both flags hold until
// the next 'arm'. 'max_cnt' keeps the
// largest count seen at 'done' (16 bits, for the max-timeout JTAG register).
// The three limits are the DDU's; the single counter is this design's.
module event_timeout #(
  parameter int unsigned START_TO     = 128,
  parameter int unsigned CAL_START_TO = 288,
  parameter int unsigned DONE_TO      = 38914
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        arm,
  input  logic        cal_mode,
  input  logic        data_start,
  input  logic        done,
  output logic        start_to,
  output logic        end_to,
  output logic        active,
  output logic [15:0] max_cnt
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_START, S_WAIT_DONE} st_e;
  st_e         st;
  logic [15:0] cnt;
  logic [15:0] start_lim;
  logic        cal_q;       // cal_mode taken at 'arm'

  assign start_lim = cal_q ? 16'(CAL_START_TO) : 16'(START_TO);
  assign active    = (st != S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st <= S_IDLE; cnt <= '0; start_to <= 1'b0; end_to <= 1'b0; max_cnt <= '0;
      cal_q <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (arm) begin
          st <= S_WAIT_START; cnt <= '0; start_to <= 1'b0; end_to <= 1'b0;
          cal_q <= cal_mode;
        end
        S_WAIT_START: begin
          if (data_start) begin
            st <= S_WAIT_DONE; cnt <= '0;
          end else if (cnt >= start_lim - 16'd1) begin
            start_to <= 1'b1; st <= S_IDLE;
          end else cnt <= cnt + 16'd1;
        end
        S_WAIT_DONE: begin
          if (done) begin
            st <= S_IDLE;
            if (cnt > max_cnt) max_cnt <= cnt;
          end else if (cnt >= 16'(DONE_TO) - 16'd1) begin
            end_to <= 1'b1; st <= S_IDLE; max_cnt <= 16'(DONE_TO);
          end else cnt <= cnt + 16'd1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
