// l1a_fifo: queue of triggered events waiting to be read out.
// Each entry holds W bits (the DDU stores the 24-bit L1A number and the
// 13-bit stored BXN). It is a synchronous first-word-fall-through FIFO of
// DEPTH entries built from an array. Two status outputs with hysteresis feed
// the FMM logic: 'warn' (almost full) turns on at WARN_ON entries and off at
// WARN_OFF, 'busy' turns on at BUSY_ON and off at BUSY_OFF, so the status
// does not chatter around one level. A write to a full FIFO is dropped and
// sets the sticky 'ovfl'. The big L1A FIFO with hysteresis on its warn/busy
// states is from the DDU notes; depth and levels are this design's choice.
module l1a_fifo #(
  parameter int unsigned W        = 37,
  parameter int unsigned DEPTH    = 256,
  parameter int unsigned WARN_ON  = 192,
  parameter int unsigned WARN_OFF = 128,
  parameter int unsigned BUSY_ON  = 240,
  parameter int unsigned BUSY_OFF = 200
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH):0] count,
  output logic         warn,
  output logic         busy,
  output logic         ovfl
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
      warn <= 1'b0; busy <= 1'b0; ovfl <= 1'b0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
      if (wr && full) ovfl <= 1'b1;
      if (count >= (AW+1)'(WARN_ON))       warn <= 1'b1;
      else if (count <= (AW+1)'(WARN_OFF)) warn <= 1'b0;
      if (count >= (AW+1)'(BUSY_ON))       busy <= 1'b1;
      else if (count <= (AW+1)'(BUSY_OFF)) busy <= 1'b0;
    end
  end
endmodule
