// Fiber input unit: turns the 16-bit word stream of one DMB fiber into FIFO
// words.
//
// A word is taken when RXDV is high, RXERR is low and neither byte is a K
// character; idle words (K28.5 D16.2) and words flagged with a receive error
// are dropped, the latter setting the sticky RXERR_SEEN flag. Accepted words
// are paired: the first of a pair becomes the lower 18-bit half of a 36-bit
// FIFO word, the second the upper half. When a lower half is waiting and a
// cycle brings no data word, the pair is completed with a FILL word (0xC000,
// FILL flag set) so that no 36-bit word is left half written; a data word in
// that cycle always wins over the fill.
//
// End of event: a DMB event ends with four E-code words (top nibble E). The
// LAST flag is set on the upper half of the 36-bit word that holds the second
// E-code. Each completed pair is held back until the next pair is known, and
// LAST is set on its upper half when at least three of the four halves of the
// two pairs are E-codes and the previous pair did not already get LAST. This
// tolerates one lost or corrupted E-word, as the source design's tables
// require; a pair is also released, without LAST, on an idle cycle when no
// lower half is waiting, so the end of an event is not held up.
//
// Output: each released pair is written as two 18-bit words on consecutive
// clocks (FWEN, FDIN = {LAST, FILL, data}), lower half first, through a
// registered 2-to-1 half selector (mux2_18b_reg), so FWEN/FDIN are
// registered and appear one clock after the pair is released. BND_OK is low
// only in the clock that writes a lower half: the memory controller may move
// this fiber to another FIFO at any other edge without splitting a pair.
// Pairs are at least two clocks apart, so one pair of output buffer suffices.
// The E-code/LAST rule is this design's reading of the source tables; the
// word filtering and the FILL code follow the source design.
module in_unit
  import ddu_in_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] rxdata,
  input  logic [1:0]  rxcharisk,
  input  logic        rxdv,
  input  logic        rxerr,
  output logic        fwen,
  output logic [17:0] fdin,
  output logic        bnd_ok,
  output logic        rxerr_seen,
  output logic        filled,
  output logic        dav
);
  half_t       lo;        // lower half waiting for its partner
  logic        lo_v;
  half_t [1:0] p;         // completed pair waiting for the next pair
  logic        p_v;
  logic        prev_last; // the last released pair got LAST
  half_t [1:0] obuf;      // pair being written
  logic [1:0]  ostate;    // 2: write lower half, 1: write upper half, 0: idle

  logic        word_ok;
  half_t       w;
  logic        pair_done;
  half_t [1:0] newp;
  logic        flush;
  logic        last_dec;

  assign word_ok = rxdv && !rxerr && (rxcharisk == 2'b00);
  assign w       = '{last: 1'b0, fill: 1'b0, data: rxdata};
  assign dav     = word_ok;

  function automatic logic last_rule(half_t [1:0] a, half_t [1:0] b);
    logic [2:0] n;
    n = 3'(is_ecode(a[0].fill, a[0].data[15:12])) + 3'(is_ecode(a[1].fill, a[1].data[15:12])) +
        3'(is_ecode(b[0].fill, b[0].data[15:12])) + 3'(is_ecode(b[1].fill, b[1].data[15:12]));
    return n >= 3'd3;
  endfunction

  always_comb begin
    pair_done = 1'b0;
    newp      = '0;
    if (lo_v) begin
      pair_done = 1'b1;
      newp[0]   = lo;
      newp[1]   = word_ok ? w : '{last: 1'b0, fill: 1'b1, data: FILL_CODE};
    end
    flush    = !word_ok && !lo_v && p_v && (ostate == 2'd0);
    last_dec = pair_done && p_v && !prev_last && last_rule(p, newp);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lo_v       <= 1'b0;
      lo         <= '0;
      p_v        <= 1'b0;
      p          <= '0;
      prev_last  <= 1'b0;
      obuf       <= '0;
      ostate     <= 2'd0;
      rxerr_seen <= 1'b0;
      filled     <= 1'b0;
    end else begin
      if (rxdv && rxerr) rxerr_seen <= 1'b1;
      if (lo_v && !word_ok) filled <= 1'b1;

      // pairing
      if (lo_v)         lo_v <= 1'b0;
      else if (word_ok) begin
        lo   <= w;
        lo_v <= 1'b1;
      end

      // release held pair
      if (ostate != 2'd0) ostate <= ostate - 2'd1;
      if (pair_done) begin
        if (p_v) begin
          obuf         <= p;
          obuf[1].last <= last_dec;
          prev_last    <= last_dec;
          ostate       <= 2'd2;
        end
        p   <= newp;
        p_v <= 1'b1;
      end else if (flush) begin
        obuf      <= p;
        prev_last <= 1'b0;
        ostate    <= 2'd2;
        p_v       <= 1'b0;
      end
    end
  end

  // Output register: a registered 2-to-1 half selector, lower half while
  // ostate is 2, upper half while it is 1, zero when idle.
  logic wr_q, wr_lo_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_q    <= 1'b0;
      wr_lo_q <= 1'b0;
    end else begin
      wr_q    <= ostate != 2'd0;
      wr_lo_q <= ostate == 2'd2;
    end
  end

  mux2_18b_reg #(.W(18)) u_omux (
    .clk, .rst, .i0bus(obuf[0]), .i1bus(obuf[1]), .ctrl(ostate == 2'd1),
    .en(ostate != 2'd0), .q(fdin));

  assign fwen   = wr_q;
  assign bnd_ok = !(wr_q && wr_lo_q);

  // A pair is never released while the lower half of the previous one is
  // still to be written.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    (pair_done && p_v) |-> (ostate != 2'd2));

endmodule
