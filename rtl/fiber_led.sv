// fiber_led: front-panel LED drive for one fiber input.
// FOK LED: lit when the link is present and ready, blinking slowly when the
// link is present but not ready, off when no link is present. DAV LED: lit
// while data is being transmitted. The blink comes from a free-running
// counter; its top bit (bit DIV-1) toggles every 2^(DIV-1) clocks. The three
// LED states are the DDU's; the blink rate is this design's choice
// (2^22 clocks at 40 MHz, about 0.1 s per period). LEDs are active high.
module fiber_led #(
  parameter int unsigned DIV = 22
) (
  input  logic clk,
  input  logic rst,
  input  logic present,
  input  logic ready,
  input  logic dav,
  output logic fok_led,
  output logic dav_led
);
  logic [DIV-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      fok_led <= 1'b0;
      dav_led <= 1'b0;
    end else begin
      fok_led <= present && (ready || cnt[DIV-1]);
      dav_led <= dav;
    end
  end
endmodule
