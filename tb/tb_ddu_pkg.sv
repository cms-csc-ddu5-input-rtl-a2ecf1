// Testbench helpers: DMB event generation and the expected FIFO output.
//
// An event from one fiber is a list of tokens, one per clock: a data word or
// an RX-error cycle that takes the place of a lost data word. Data words have a top nibble of 1..5, then four F-code
// and four E-code trailer words follow; one E-word may be dropped or
// corrupted. The expected 36-bit output is worked out independently of the
// RTL: words are paired in arrival order, an RX-error cycle or the end of
// the event completes a waiting lower half with a FILL word (0xC000, FILL
// bit), the pair holding the second E-code slot carries LAST on its upper
// half (at least three E-codes among it and the next pair), and the output
// for the fiber ends one pair after the LAST pair.
package tb_ddu_pkg;

  typedef struct {
    logic [15:0] w;
    logic        err;
    logic        idle;
  } tok_t;

  typedef logic [35:0] w36_t;

  // lose_e / bad_e: 0 = none, 1..4 = which E-word is lost / corrupted.
  // err_at: data word received with an RX error, so lost (-1 none). ndata even.
  function automatic void make_event(input int fiber, input int evt, input int ndata,
                                     input int lose_e, input int bad_e, input int err_at,
                                     ref tok_t toks[$], ref w36_t exp36[$]);
    logic [15:0] words[$];
    logic [17:0] halves[$];
    logic        pend;
    logic [17:0] lo;
    int          npairs, last_pair;
    tok_t        t;
    t.idle = 1'b0;
    toks.delete();
    for (int i = 0; i < ndata; i++) begin
      if (i == err_at) begin t.w = 16'h0BAD; t.err = 1'b1; toks.push_back(t); continue; end
      t.w = {4'(1 + (i % 5)), 4'(fiber), 8'(i + evt * 16)}; t.err = 1'b0; toks.push_back(t);
    end
    for (int i = 0; i < 4; i++) begin t.w = {4'hF, 4'(fiber), 4'(evt), 4'(i)}; t.err = 1'b0; toks.push_back(t); end
    for (int i = 1; i <= 4; i++) begin
      if (i == lose_e) continue;
      t.w = (i == bad_e) ? {4'h7, 4'(fiber), 4'(evt), 4'(i)} : {4'hE, 4'(fiber), 4'(evt), 4'(i)};
      t.err = 1'b0;
      toks.push_back(t);
    end
    // pairing with FILL on gaps and at the end
    pend = 1'b0;
    halves.delete();
    foreach (toks[k]) begin
      if (toks[k].err) begin
        if (pend) begin halves.push_back(lo); halves.push_back({2'b01, 16'hC000}); pend = 1'b0; end
      end else if (pend) begin
        halves.push_back(lo); halves.push_back({2'b00, toks[k].w}); pend = 1'b0;
      end else begin
        lo = {2'b00, toks[k].w}; pend = 1'b1;
      end
    end
    if (pend) begin halves.push_back(lo); halves.push_back({2'b01, 16'hC000}); end
    // LAST rule over consecutive pairs
    npairs = halves.size() / 2;
    last_pair = -1;
    for (int p = 0; p + 1 < npairs && last_pair < 0; p++) begin
      int n;
      n = 0;
      for (int k = 0; k < 4; k++)
        if (!halves[2*p+k][16] && halves[2*p+k][15:12] == 4'hE) n++;
      if (n >= 3) last_pair = p;
    end
    exp36.delete();
    for (int p = 0; p < npairs; p++) begin
      logic [17:0] hi;
      hi = halves[2*p+1];
      if (p == last_pair) hi[17] = 1'b1;
      exp36.push_back({hi, halves[2*p]});
      if (last_pair >= 0 && p == last_pair + 1) break;
    end
  endfunction

endpackage
