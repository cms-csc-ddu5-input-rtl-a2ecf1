// One FIFO of a memory controller's pool, with its write control.
//
// Every slot has a fixed address FAD. When the memory controller strobes ASF
// with ASF_ADR equal to FAD, the slot records ASF_FIBER as its owner and
// becomes active. While active it writes its owner's words: the 18-bit data
// of the four input units pass through two 9-bit 4-to-1 bus muxes
// (mux4_9b_e) selected by the owner number, and the owner's FWEN is the
// FIFO write. When the owner moves on to its next FIFO (FNEXT of the owner)
// the slot stops taking writes; its data stay in the FIFO until the read
// controller has read them. ASF wins over FNEXT at the same edge.
// The read side is the FIFO's own first-word-fall-through port.
module fifo_slot #(
  parameter int unsigned FAD       = 0,
  parameter int unsigned DEPTH18   = 1024,
  parameter int unsigned AF_MARGIN = 120
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             asf,
  input  logic [4:0]       asf_adr,
  input  logic [1:0]       asf_fiber,
  input  logic [3:0]       fnext,
  input  logic [3:0]       fwen,
  input  logic [3:0][17:0] fdin,
  input  logic             ren,
  output logic [35:0]      dout,
  output logic             empty,
  output logic             af,
  output logic             full,
  output logic             active
);
  logic [1:0]  owner;
  logic [17:0] wdata;
  logic        wen;

  always_ff @(posedge clk) begin
    if (rst) begin
      owner  <= '0;
      active <= 1'b0;
    end else if (asf && asf_adr == 5'(FAD)) begin
      owner  <= asf_fiber;
      active <= 1'b1;
    end else if (fnext[owner]) begin
      active <= 1'b0;
    end
  end

  mux4_9b_e #(.W(9)) u_mux_hi (
    .i0bus(fdin[0][17:9]), .i1bus(fdin[1][17:9]), .i2bus(fdin[2][17:9]), .i3bus(fdin[3][17:9]),
    .ctrl(owner), .en(active), .q(wdata[17:9]));
  mux4_9b_e #(.W(9)) u_mux_lo (
    .i0bus(fdin[0][8:0]), .i1bus(fdin[1][8:0]), .i2bus(fdin[2][8:0]), .i3bus(fdin[3][8:0]),
    .ctrl(owner), .en(active), .q(wdata[8:0]));

  assign wen = active && fwen[owner];

  sfifo18_36 #(.DEPTH18(DEPTH18), .AF_MARGIN(AF_MARGIN)) u_fifo (
    .clk, .rst, .wen, .din(wdata), .ren, .dout, .empty, .af, .full, .count());
endmodule
