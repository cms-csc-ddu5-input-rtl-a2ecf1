// LED control for one fiber input.
//
// A slow-clock enable is made by dividing the clock by SLOW_DIV (40 MHz / 16
// = 2.5 MHz), and a BCLK_EN pulse by a further 2^BCLK_BITS (about 38 Hz).
// A BLINK_BITS-bit counter on BCLK_EN gives the blink square wave (about
// 2.4 Hz at the defaults).
//   FOK LED: lit when the link is present and ready, blinking when present
//            but not ready, off when no link is present.
//   DAV LED: lit while data words arrive; it is held lit until the end of the
//            BCLK_EN period after the last word so that it stays visible.
// Outputs are registered. The LED meanings and the 2.5 MHz and 38 Hz rates
// follow the source design; the blink divider and DAV hold are this design's.
module fiber_led #(
  parameter int unsigned SLOW_DIV   = 16,
  parameter int unsigned BCLK_BITS  = 16,
  parameter int unsigned BLINK_BITS = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic present,
  input  logic ready,
  input  logic dav,
  output logic fok_led,
  output logic dav_led
);
  localparam int unsigned SW = $clog2(SLOW_DIV);
  logic [SW-1:0]         sdiv;
  logic [BCLK_BITS-1:0]  bdiv;
  logic [BLINK_BITS-1:0] blink;
  logic slow_en, bclk_en, dav_seen;

  assign slow_en = sdiv == SW'(SLOW_DIV - 1);
  assign bclk_en = slow_en && (bdiv == '1);

  always_ff @(posedge clk) begin
    if (rst) begin
      sdiv     <= '0;
      bdiv     <= '0;
      blink    <= '0;
      dav_seen <= 1'b0;
      fok_led  <= 1'b0;
      dav_led  <= 1'b0;
    end else begin
      sdiv <= slow_en ? '0 : sdiv + 1'b1;
      if (slow_en) bdiv  <= bdiv + 1'b1;
      if (bclk_en) blink <= blink + 1'b1;
      if (bclk_en)  dav_seen <= dav;
      else if (dav) dav_seen <= 1'b1;
      dav_led <= dav || dav_seen;
      fok_led <= present && (ready || blink[BLINK_BITS-1]);
    end
  end
endmodule
