// Bunch-crossing number counter. Counts one per clock through the LHC/SPS
// orbit, 0 to BXN_MAX (923), and clears after BXN_MAX. A BC0 pulse or reset
// also clears it. Registered output, synchronous reset.
module bxn_counter #(
  parameter int unsigned BXN_MAX = 923
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bc0,
  output logic [11:0] bxn
);
  always_ff @(posedge clk)
    if (rst || bc0 || bxn == 12'(BXN_MAX)) bxn <= '0;
    else                                   bxn <= bxn + 1'b1;
endmodule
