// 18-bit 2-to-1 multiplexer with enable, followed by an 18-bit register.
//
// Two 9-bit mux cells (bits 17:9 and 8:0) pick bus I0 when CTRL is low and I1
// when it is high; with EN low the mux output is zero. The result is clocked
// into a register whose clock enable is tied high and which has an
// asynchronous clear, so Q follows the selected bus one clock later.
module mux2_18b_reg #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] i0bus,
  input  logic [W-1:0] i1bus,
  input  logic         ctrl,
  input  logic         en,
  output logic [W-1:0] q
);
  logic [W-1:0] m;

  always_comb m = !en ? '0 : (ctrl ? i1bus : i0bus);

  always_ff @(posedge clk or posedge rst)
    if (rst) q <= '0;
    else     q <= m;
endmodule
