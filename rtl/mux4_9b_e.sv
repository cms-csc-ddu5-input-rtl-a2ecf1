// 9-bit 4-to-1 bus multiplexer with enable.
//
// Each bit is one 4-to-1 mux slice: D0..D3 come from buses I0..I3, the select
// is CTRL[1:0] (CTRL0 = S0, CTRL1 = S1) and the slice output is forced low
// when EN is low. This is the write-data selector in front of each FIFO: the
// four input units of a half share it and the memory controller picks one.
// Purely combinational.
module mux4_9b_e #(
  parameter int unsigned W = 9
) (
  input  logic [W-1:0] i0bus,
  input  logic [W-1:0] i1bus,
  input  logic [W-1:0] i2bus,
  input  logic [W-1:0] i3bus,
  input  logic [1:0]   ctrl,
  input  logic         en,
  output logic [W-1:0] q
);
  always_comb begin
    unique case (ctrl)
      2'd0: q = i0bus;
      2'd1: q = i1bus;
      2'd2: q = i2bus;
      default: q = i3bus;
    endcase
    if (!en) q = '0;
  end
endmodule
