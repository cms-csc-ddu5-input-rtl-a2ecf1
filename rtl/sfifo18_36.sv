// FIFO written 18 bits at a time and read 36 bits at a time.
//
// Each input unit writes 18-bit words {LAST, FILL, data[15:0]}; the read
// controller takes two of them per read. The first word written of a pair is
// bits 17:0 of the read word, the second bits 35:18. Storage is two arrays
// (lower and upper halves) of DEPTH18/2 entries, addressed by a write pointer
// in 18-bit units (bit 0 picks the half) and a read pointer in 36-bit units.
//
// Occupancy is counted in 18-bit words: a write alone adds 1, a read alone
// takes 2, a read and a write together take 1. EMPTY means fewer than 36 bits
// are available. AF is raised when AF_MARGIN or fewer writes remain before
// FULL (120 by default, leaving the input unit room to finish its current
// pair and switch to another FIFO). Output is first-word-fall-through: DOUT
// shows the oldest 36-bit word whenever EMPTY is low, and REN pops it at the
// clock edge. A write when FULL or a read when EMPTY is ignored.
// The count rule, the FWFT output, the 120-write margin and the size follow
// the source design; the synchronous reset is this design's choice.
module sfifo18_36 #(
  parameter int unsigned DEPTH18   = 1024,
  parameter int unsigned AF_MARGIN = 120
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         wen,
  input  logic [17:0]                  din,
  input  logic                         ren,
  output logic [35:0]                  dout,
  output logic                         empty,
  output logic                         af,
  output logic                         full,
  output logic [$clog2(DEPTH18+1)-1:0] count
);
  localparam int unsigned D36 = DEPTH18 / 2;
  localparam int unsigned AW  = $clog2(D36);
  localparam int unsigned CW  = $clog2(DEPTH18 + 1);

  logic [17:0] mem_lo [D36];
  logic [17:0] mem_hi [D36];
  logic [AW:0] wptr;   // 18-bit word address; bit 0 = upper half
  logic [AW-1:0] rptr; // 36-bit word address

  logic do_wr, do_rd;
  assign do_wr = wen && !full;
  assign do_rd = ren && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) begin
      if (wptr[0]) mem_hi[wptr[AW:1]] <= din;
      else         mem_lo[wptr[AW:1]] <= din;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      unique case ({do_wr, do_rd})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(2);
        2'b11:   count <= count - CW'(1);
        default: ;
      endcase
    end
  end

  assign dout  = {mem_hi[rptr], mem_lo[rptr]};
  assign empty = count < CW'(2);
  assign full  = count == CW'(DEPTH18);
  assign af    = count >= CW'(DEPTH18 - AF_MARGIN);

endmodule
