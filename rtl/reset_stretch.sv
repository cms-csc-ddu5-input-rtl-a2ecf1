// Reset stretcher: the internal reset stays asserted while the raw reset
// request RRR is high and for HOLD further clocks after it goes away, so the
// fiber inputs and FIFO logic leave reset together and cleanly.
// RRR is sampled on the clock; RST is a registered output that rises one clock
// after RRR rises and falls HOLD+1 clocks after RRR falls.
module reset_stretch #(
  parameter int unsigned HOLD = 16
) (
  input  logic clk,
  input  logic rrr,
  output logic rst
);
  localparam int unsigned CW = $clog2(HOLD + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rrr) begin
      cnt <= CW'(HOLD);
      rst <= 1'b1;
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
      rst <= 1'b1;
    end else begin
      rst <= 1'b0;
    end
  end
endmodule
