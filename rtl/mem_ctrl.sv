// Memory controller: shares a pool of NFIFO FIFOs among four fibers.
//
// The pool is split into two corners of NFIFO/2 FIFOs. A fiber needs a FIFO
// when it has none, or when its current FIFO is almost full and its input
// unit is at a pair boundary (BND_OK). Fibers 0 and 1 prefer corner 0,
// fibers 2 and 3 corner 1; the first fiber of a corner (0 or 2) searches its
// corner upward from the lowest address, the other fiber downward from the
// highest, so the two rarely compete for the same FIFO. If the preferred
// corner has no free FIFO the other corner is searched the same way.
// One FIFO is assigned per clock, lowest fiber number first: ASF is strobed
// with ASF_ADR (the FIFO address) and ASF_FIBER, and FNEXT of that fiber tells
// its old FIFO to stop taking writes, all at the same edge.
//
// For each fiber the addresses of the FIFOs holding its data are kept in
// order of assignment (a circular list of up to NFIFO entries). HEAD is the
// oldest, which the read controller reads; NCHAIN counts the entries. The
// read controller releases the head with REL once it is empty and the fiber
// has moved on (NCHAIN >= 2); the FIFO is then free again. NFREE counts free
// FIFOs and MINFREE keeps the lowest value since reset.
// The up/down corner search, the pool size and the free count follow the
// source design; the priority order, the corner pairing of fibers and the
// list bookkeeping are this design's choices.
module mem_ctrl #(
  parameter int unsigned NFIFO = 22
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [3:0]           bnd_ok,
  input  logic [NFIFO-1:0]     fifo_af,
  input  logic                 rel,
  input  logic [1:0]           rel_fiber,
  output logic                 asf,
  output logic [4:0]           asf_adr,
  output logic [1:0]           asf_fiber,
  output logic [3:0]           fnext,
  output logic [3:0]           cur_v,
  output logic [3:0][4:0]      cur,
  output logic [3:0][4:0]      head,
  output logic [3:0][4:0]      nchain,
  output logic [4:0]           nfree,
  output logic [4:0]           minfree
);
  localparam int unsigned HALF = NFIFO / 2;

  logic [NFIFO-1:0]   busy;
  logic [4:0]         chain [4][NFIFO];
  logic [3:0][4:0]    hd;
  logic [3:0]         need;
  logic               found;
  logic [4:0]         found_id;
  logic [1:0]         found_f;

  // Search one corner [lo, lo+n) for a free FIFO, upward or downward.
  function automatic logic [5:0] search(logic [NFIFO-1:0] b, int unsigned lo, int unsigned n, logic up);
    logic [5:0] r;
    r = '0;
    for (int i = 0; i < int'(n); i++) begin
      logic [4:0] k;
      k = up ? 5'(lo + i) : 5'(lo + n - 1 - i);
      if (!r[5] && !b[k]) r = {1'b1, k};
    end
    return r;
  endfunction

  function automatic logic [4:0] wrap_inc(logic [4:0] x);
    return (x == 5'(NFIFO - 1)) ? '0 : x + 1'b1;
  endfunction

  always_comb begin
    for (int f = 0; f < 4; f++)
      need[f] = !cur_v[f] || (fifo_af[cur[f]] && bnd_ok[f]);
    found    = 1'b0;
    found_id = '0;
    found_f  = '0;
    for (int f = 0; f < 4; f++) begin
      logic [5:0] a, b;
      logic       up;
      int unsigned pc;
      pc = (f >= 2) ? 1 : 0;
      up = (f % 2) == 0;
      a  = search(busy, pc * HALF, HALF, up);
      b  = search(busy, (1 - pc) * HALF, NFIFO - HALF, up);
      if (!found && need[f] && (a[5] || b[5])) begin
        found    = 1'b1;
        found_id = a[5] ? a[4:0] : b[4:0];
        found_f  = 2'(f);
      end
    end
  end

  assign asf       = found;
  assign asf_adr   = found_id;
  assign asf_fiber = found_f;
  always_comb begin
    fnext = '0;
    if (found && cur_v[found_f]) fnext[found_f] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= '0;
      cur_v  <= '0;
      cur    <= '0;
      hd     <= '0;
      nchain <= '0;
    end else begin
      if (found) begin
        busy[found_id]  <= 1'b1;
        cur[found_f]    <= found_id;
        cur_v[found_f]  <= 1'b1;
      end
      if (rel) begin
        busy[head[rel_fiber]] <= 1'b0;
        hd[rel_fiber]         <= wrap_inc(hd[rel_fiber]);
      end
      for (int f = 0; f < 4; f++) begin
        logic add, sub;
        add = found && found_f == 2'(f);
        sub = rel && rel_fiber == 2'(f);
        if (add && !sub)      nchain[f] <= nchain[f] + 1'b1;
        else if (sub && !add) nchain[f] <= nchain[f] - 1'b1;
      end
    end
  end

  // Append the new FIFO at the tail of its fiber's list (tail = head + count).
  always_ff @(posedge clk) begin
    if (!rst && found) begin
      logic [5:0] t;
      t = 6'(hd[found_f]) + 6'(nchain[found_f]);
      if (t >= 6'(NFIFO)) t = t - 6'(NFIFO);
      chain[found_f][t[4:0]] <= found_id;
    end
  end

  always_comb
    for (int f = 0; f < 4; f++) head[f] = chain[f][hd[f]];

  always_comb begin
    nfree = '0;
    for (int i = 0; i < NFIFO; i++) nfree = nfree + 5'(!busy[i]);
  end

  always_ff @(posedge clk)
    if (rst)                  minfree <= 5'(NFIFO);
    else if (nfree < minfree) minfree <= nfree;

  a_rel_ok: assert property (@(posedge clk) disable iff (rst)
    rel |-> nchain[rel_fiber] >= 5'd2);

endmodule
