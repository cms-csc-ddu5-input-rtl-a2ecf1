// Read controller: builds the output stream of one half, event by event.
//
// Every L1A pushes the running 24-bit L1A number into the L1A FIFO. For each
// entry the controller visits fibers 0 to 3 in turn. A fiber whose FOK bit
// is low is skipped. Otherwise the controller waits for data in the oldest
// FIFO holding that fiber's words (HEAD from the memory controller); if none
// shows within START_TO clocks (CAL_TO in calibration mode) the fiber's
// start-timeout flag is set and it is skipped. Once data flow, 36-bit words
// are copied to the output (OWEN/ODATA, registered) until a word whose LAST
// flag (bit 17 or 35) is set. LAST marks the word holding the second E-code
// of the DMB trailer, so one more word (the rest of the trailer) is copied
// after it (FDONE); then that fiber is done and the next one is started.
// If DONE_TO clocks pass without LAST the fiber is abandoned with an
// end-wait timeout (its FIFO was empty at that moment) or an end-active
// timeout (data were still flowing). After fiber 3 the L1A entry is popped
// and EVT_DONE pulses.
//
// A fiber's head FIFO that is empty while the fiber already writes to a later
// FIFO (NCHAIN >= 2) is released back to the memory controller (REL) and
// reading continues in the next FIFO; no word is read in that clock. While
// EXT_PAF (external FIFO almost full) is high no word is read and the done
// timer holds. Timeout flags are sticky until reset.
// The fiber order, timeout values, LAST-word end and release on empty follow
// the source design; the single clock for both timers is this design's
// choice (the source runs them at 40 and 80 MHz).
module rd_ctrl #(
  parameter int unsigned NFIFO     = 22,
  parameter int unsigned START_TO  = 128,
  parameter int unsigned CAL_TO    = 256,
  parameter int unsigned DONE_TO   = 18945,
  parameter int unsigned L1A_DEPTH = 8192,
  parameter int unsigned L1A_AF    = 7680
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   l1a,
  input  logic                   cal_mode,
  input  logic [3:0]             fok,
  input  logic                   ext_paf,
  input  logic [3:0][4:0]        head,
  input  logic [3:0][4:0]        nchain,
  input  logic [NFIFO-1:0][35:0] fifo_dout,
  input  logic [NFIFO-1:0]       fifo_empty,
  output logic [NFIFO-1:0]       fifo_ren,
  output logic                   rel,
  output logic [1:0]             rel_fiber,
  output logic                   owen,
  output logic [35:0]            odata,
  output logic                   evt_done,
  output logic [23:0]            l1a_num,
  output logic [23:0]            l1a_cnt,
  output logic [3:0]             to_start,
  output logic [3:0]             to_endwait,
  output logic [3:0]             to_endact,
  output logic                   l1a_af,
  output logic                   l1a_full,
  output logic                   l1a_empty
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_READ} state_t;
  state_t      st;
  logic [1:0]  fib;
  logic [14:0] tmr;
  logic        fdone;   // LAST word seen, one word still to copy

  logic [4:0]  hid;
  // FIFO buses padded to the 32 entries a 5-bit address can name
  logic [31:0]        empty_pad, ren_pad;
  logic [31:0][35:0]  dout_pad;
  logic        hv, h_empty, rd, fiber_end, word_last;
  logic [35:0] hword;
  logic        pop;

  l1a_fifo #(.DEPTH(L1A_DEPTH), .AF_LEVEL(L1A_AF), .W(24)) u_l1a (
    .clk, .rst, .wen(l1a), .din(l1a_cnt + 24'd1), .ren(pop), .dout(l1a_num),
    .empty(l1a_empty), .af(l1a_af), .full(l1a_full));

  always_ff @(posedge clk)
    if (rst)      l1a_cnt <= '0;
    else if (l1a) l1a_cnt <= l1a_cnt + 24'd1;

  assign hid       = head[fib];
  assign hv        = nchain[fib] != '0;
  assign empty_pad = 32'(fifo_empty);
  assign dout_pad  = (32*36)'(fifo_dout);
  assign h_empty   = empty_pad[hid];
  assign hword     = dout_pad[hid];
  assign word_last = hword[17] || hword[35];

  always_comb begin
    rel       = (st != S_IDLE) && fok[fib] && (nchain[fib] >= 5'd2) && h_empty;
    rel_fiber = fib;
    rd        = (st == S_READ) && hv && !h_empty && !ext_paf && !rel;
    ren_pad   = '0;
    if (rd) ren_pad[hid] = 1'b1;
  end
  assign fifo_ren = ren_pad[NFIFO-1:0];

  // end of the current fiber this clock, for any reason
  logic start_to_hit, done_to_hit;
  always_comb begin
    start_to_hit = (st == S_START) && fok[fib] && !(hv && !h_empty) &&
                   (tmr == 15'((cal_mode ? CAL_TO : START_TO) - 1));
    done_to_hit  = (st == S_READ) && !ext_paf && !(rd && fdone) &&
                   (tmr == 15'(DONE_TO - 1));
    fiber_end    = ((st == S_START) && !fok[fib]) || start_to_hit ||
                   (rd && fdone) || done_to_hit;
    pop          = fiber_end && (fib == 2'd3);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_IDLE;
      fib        <= '0;
      tmr        <= '0;
      fdone      <= 1'b0;
      owen       <= 1'b0;
      odata      <= '0;
      evt_done   <= 1'b0;
      to_start   <= '0;
      to_endwait <= '0;
      to_endact  <= '0;
    end else begin
      owen     <= rd;
      if (rd) odata <= hword;
      evt_done <= pop;
      if (fiber_end)             fdone <= 1'b0;
      else if (rd && word_last)  fdone <= 1'b1;
      if (start_to_hit) to_start[fib] <= 1'b1;
      if (done_to_hit) begin
        if (h_empty) to_endwait[fib] <= 1'b1;
        else         to_endact[fib]  <= 1'b1;
      end
      unique case (st)
        S_IDLE: if (!l1a_empty) begin
          st  <= S_START;
          fib <= '0;
          tmr <= '0;
        end
        S_START: if (fiber_end) begin
          tmr <= '0;
          fib <= fib + 2'd1;
          if (fib == 2'd3) st <= S_IDLE;
        end else if (hv && !h_empty) begin
          st  <= S_READ;
          tmr <= '0;
        end else begin
          tmr <= tmr + 15'd1;
        end
        S_READ: if (fiber_end) begin
          tmr <= '0;
          fib <= fib + 2'd1;
          st  <= (fib == 2'd3) ? S_IDLE : S_START;
        end else if (!ext_paf) begin
          tmr <= tmr + 15'd1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
