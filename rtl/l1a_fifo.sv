// FIFO of pending L1A (event) numbers in a read controller.
//
// Each trigger pushes its L1A number; the read controller builds one event per
// entry and pops it when the event has been read from all fibers. DEPTH (8192)
// events fit; AF rises at AF_LEVEL (7680, full minus 512) so the trigger
// system can be throttled before the FIFO fills. First-word-fall-through:
// DOUT is the oldest entry while EMPTY is low; REN pops at the clock edge.
// Push when FULL and pop when EMPTY are ignored. Synchronous reset.
module l1a_fifo #(
  parameter int unsigned DEPTH    = 8192,
  parameter int unsigned AF_LEVEL = 7680,
  parameter int unsigned W        = 24
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wen,
  input  logic [W-1:0] din,
  input  logic         ren,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         af,
  output logic         full
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   cnt;
  logic do_wr, do_rd;

  assign do_wr = wen && !full;
  assign do_rd = ren && !empty;

  always_ff @(posedge clk)
    if (do_wr) mem[wptr] <= din;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
      cnt  <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      if (do_wr && !do_rd)      cnt <= cnt + 1'b1;
      else if (do_rd && !do_wr) cnt <= cnt - 1'b1;
    end
  end

  assign dout  = mem[rptr];
  assign empty = cnt == '0;
  assign full  = cnt == (AW+1)'(DEPTH);
  assign af    = cnt >= (AW+1)'(AF_LEVEL);
endmodule
