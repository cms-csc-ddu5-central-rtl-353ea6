// occupancy_monitor: CSC board occupancy scalers.
// NFIB fibers x NBRD boards (15 x 4 = 60) 32-bit counters in one RAM array,
// addressed fiber*NBRD + board. A counter update needs two clocks: the
// previous value is read on an even cycle and the incremented value is
// written on the following odd cycle, as in the DDU tracker. Requests
// ('inc' with fiber and a board bit mask) are accepted when 'ready' is high;
// each set mask bit costs one read/write pair. After reset the RAM is
// cleared, one word per clock, and 'ready' stays low until that is done.
// 'rd_addr'/'rd_data' read a counter for the JTAG loop (one clock latency).
module occupancy_monitor #(
  parameter int unsigned NFIB = 15,
  parameter int unsigned NBRD = 4
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               inc,
  input  logic [$clog2(NFIB)-1:0]            fiber,
  input  logic [NBRD-1:0]                    boards,
  output logic                               ready,
  input  logic [$clog2(NFIB*NBRD)-1:0]       rd_addr,
  output logic [31:0]                        rd_data
);
  localparam int unsigned N  = NFIB * NBRD;
  localparam int unsigned AW = $clog2(N);

  logic [31:0]     mem [N];
  logic [AW-1:0]   clr_addr;
  logic            clearing;
  logic [NBRD-1:0] pend;
  logic [$clog2(NFIB)-1:0] pfib;
  logic            phase;          // 0 = read, 1 = write
  logic [31:0]     prev;
  logic [AW-1:0]   cur_addr;
  logic [$clog2(NBRD+1)-1:0] cur_brd;

  // lowest pending board
  always_comb begin
    cur_brd = '0;
    for (int b = NBRD-1; b >= 0; b--) if (pend[b]) cur_brd = ($clog2(NBRD+1))'(b);
  end
  assign cur_addr = AW'(pfib * NBRD + cur_brd);
  assign ready    = !clearing && (pend == '0);

  always_ff @(posedge clk) begin
    if (clearing)           mem[clr_addr] <= '0;
    else if (phase && pend != '0) mem[cur_addr] <= prev + 32'd1;
    if (!phase)             prev <= mem[cur_addr];
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      clearing <= 1'b1; clr_addr <= '0; pend <= '0; pfib <= '0; phase <= 1'b0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == AW'(N-1)) clearing <= 1'b0;
      phase <= 1'b0;
    end else begin
      if (pend == '0) begin
        phase <= 1'b0;
        if (inc && boards != '0) begin
          pend <= boards;
          pfib <= fiber;
        end
      end else begin
        phase <= ~phase;
        if (phase) pend[cur_brd[$clog2(NBRD)-1:0]] <= 1'b0;
      end
    end
  end
endmodule
