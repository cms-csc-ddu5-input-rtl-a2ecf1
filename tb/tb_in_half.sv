// Testbench for in_half at reduced FIFO size (64 words) and short timeouts:
// four fibers send several events each (long enough to move every fiber
// through several FIFOs), with lost and corrupted E-words and an RX error; the
// 36-bit output must equal the expected words in event order and fiber order,
// FIFOs must be switched and released, and a masked fiber must be skipped.
module tb_in_half;
  import tb_ddu_pkg::*;
  logic clk = 0, rst, l1a, cal_mode, ext_paf, owen, evt_done, l1a_empty, l1a_af, l1a_full;
  logic [3:0][15:0] rxdata;
  logic [3:0][1:0] rxcharisk;
  logic [3:0] rxdv, rxerr, fok, rxerr_seen, filled, dav, to_start, to_endwait, to_endact, fib_empty, fib_full;
  logic [35:0] odata;
  logic [23:0] l1a_num, l1a_cnt;
  logic [4:0] nfree, minfree;
  logic [3:0][4:0] nchain;
  tok_t tq[4][$];
  w36_t expq[$];
  int checks = 0, failures = 0, n_done = 0, n_l1a = 0, m_switch = 0, m_rel = 0;

  in_half #(.DEPTH18(64), .AF_MARGIN(8), .START_TO(64), .CAL_TO(96), .DONE_TO(400),
            .L1A_DEPTH(16), .L1A_AF(12)) dut (
    .clk, .rst, .rxdata, .rxcharisk, .rxdv, .rxerr, .fok, .l1a, .cal_mode, .ext_paf, .owen, .odata,
    .evt_done, .l1a_num, .l1a_cnt, .rxerr_seen, .filled, .dav, .to_start, .to_endwait, .to_endact,
    .fib_empty, .fib_full, .l1a_empty, .l1a_af, .l1a_full, .nfree, .minfree, .nchain);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  always @(negedge clk)
    for (int f = 0; f < 4; f++) begin
      if (tq[f].size() > 0 && !tq[f][0].idle) begin
        tok_t t;
        t = tq[f].pop_front();
        rxdata[f] = t.w; rxcharisk[f] = 2'b00; rxdv[f] = 1'b1; rxerr[f] = t.err;
      end else begin
        if (tq[f].size() > 0) void'(tq[f].pop_front());
        rxdata[f] = 16'hBC50; rxcharisk[f] = 2'b10; rxdv[f] = 1'b1; rxerr[f] = 1'b0;
      end
    end

  always @(posedge clk) if (!rst) begin
    if (owen) begin
      chk(expq.size() > 0, $sformatf("unexpected word %h", odata));
      if (expq.size() > 0) begin
        w36_t e;
        e = expq.pop_front();
        chk(odata == e, $sformatf("word %h exp %h", odata, e));
      end
    end
    if (evt_done) n_done++;
    if (dut.fnext != 0) m_switch++;
    if (dut.rel) m_rel++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tok_t toks[$], idl;
    w36_t e36[$];
    idl.w = 16'hBC50; idl.err = 0; idl.idle = 1;
    rst = 1; l1a = 0; cal_mode = 0; ext_paf = 0; fok = 4'b1111;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int e = 1; e <= 8; e++) begin
      if (e == 8) begin
        while (n_done < n_l1a) @(negedge clk);     // change the mask between events only
        fok = 4'b1101;
      end
      for (int f = 0; f < 4; f++) begin
        if (e == 8 && f == 1) continue;
        make_event(f, e, 2 * (10 + (e * 13 + f * 7) % 60), (e + f) % 5 == 0 ? 1 + f : 0,
                   (e + f) % 7 == 0 ? 2 : 0, (e == 3 && f == 2) ? 5 : -1, toks, e36);
        foreach (toks[k]) tq[f].push_back(toks[k]);
        repeat (5) tq[f].push_back(idl);
        foreach (e36[k]) expq.push_back(e36[k]);
      end
      @(negedge clk); l1a = 1; @(negedge clk); l1a = 0; n_l1a++;
      while (n_done < n_l1a - 1) @(negedge clk);   // at most two events in flight
    end
    while (n_done < n_l1a) @(negedge clk);
    repeat (5) @(negedge clk);
    chk(expq.size() == 0, $sformatf("%0d words not output", expq.size()));
    chk(m_switch > 0 && m_rel > 0, "no FIFO switch or release");
    chk(to_start == 0 && to_endwait == 0 && to_endact == 0, "timeout flagged");
    chk(rxerr_seen[2] && filled[2], "RX error / fill flags");
    chk(l1a_cnt == 24'd8, "L1A count");
    $display("switch=%0d release=%0d minfree=%0d", m_switch, m_rel, minfree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
