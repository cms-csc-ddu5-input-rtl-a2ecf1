// Full-size testbench for in5ctrl: every parameter at its default (1024-word
// FIFOs, 22 per half, 8192-entry L1A FIFOs, 128/18945-clock timeouts).
// One L1A; each of the eight fibers sends a DMB event of 900 to 1000 words.
// The first fiber of each half is read while it arrives, so its FIFO never
// fills; the other six fill their first FIFO past the almost-full mark (904
// words) before their turn and move to a second one. Both output streams
// must match the expected words, those six first FIFOs must be released, and
// the event must complete on both halves without a timeout.
module tb_in5ctrl_full;
  import tb_ddu_pkg::*;
  logic [4:0] jtag_op = 5'd3;
  logic clk = 0, rrr, l1a, cal_mode, bc0, dllerr, dvcenb, sel2, lshft, tdi, tdo;
  logic [7:0][15:0] rxdata;
  logic [7:0][1:0]  rxcharisk;
  logic [7:0] rxdv, rxerr, present, fok, to_start, to_endwait, to_endact, rxerr_seen, fok_led, dav_led;
  logic [1:0] ext_paf, ext_ff, owen, evt_done;
  logic [35:0] out0, out1;
  logic [23:0] l1a_num0, l1a_num1;
  logic [31:0] status;
  logic [9:0] nrdy, nfree, minfree;
  logic [5:0] faf;
  logic [11:0] ff, bxn;

  in5ctrl dut (
    .clk, .rrr, .rxdata, .rxcharisk, .rxdv, .rxerr, .present, .fok, .l1a, .cal_mode, .bc0, .dllerr,
    .ext_paf, .ext_ff, .owen, .out0, .out1, .evt_done, .l1a_num0, .l1a_num1, .status, .nrdy, .faf,
    .ff, .to_start, .to_endwait, .to_endact, .rxerr_seen, .nfree, .minfree, .bxn, .fok_led,
    .dav_led, .dvcenb, .sel2, .lshft, .jtag_op, .tdi, .tdo);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_done[2] = '{0, 0}, m_switch = 0, m_rel = 0;
  tok_t tq[8][$];
  w36_t expq[2][$];

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  always @(negedge clk)
    for (int f = 0; f < 8; f++) begin
      if (tq[f].size() > 0) begin
        tok_t t;
        t = tq[f].pop_front();
        rxdata[f] = t.w; rxcharisk[f] = 2'b00; rxdv[f] = 1'b1; rxerr[f] = t.err;
      end else begin
        rxdata[f] = 16'hBC50; rxcharisk[f] = 2'b10; rxdv[f] = 1'b1; rxerr[f] = 1'b0;
      end
    end

  // checking starts once the reset has been applied and released
  logic armed = 1'b0;

  always @(posedge clk) if (armed && !dut.rst) begin
    logic [1:0][35:0] o;
    o = {out1, out0};
    for (int h = 0; h < 2; h++) begin
      if (owen[h]) begin
        chk(expq[h].size() > 0, "unexpected word");
        if (expq[h].size() > 0) begin
          w36_t e;
          e = expq[h].pop_front();
          chk(o[h] == e, $sformatf("half %0d: word %h exp %h", h, o[h], e));
        end
      end
      if (evt_done[h]) n_done[h]++;
    end
    if (dut.g_half[0].u_half.u_mem.fnext != 0) m_switch++;
    if (dut.g_half[1].u_half.u_mem.fnext != 0) m_switch++;
    if (dut.g_half[0].u_half.u_rd.rel) m_rel++;
    if (dut.g_half[1].u_half.u_rd.rel) m_rel++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tok_t toks[$];
    w36_t e36[$];
    int c;
    rrr = 1; l1a = 0; cal_mode = 0; bc0 = 0; dllerr = 0; dvcenb = 0; sel2 = 0; lshft = 0; tdi = 0;
    ext_paf = 0; ext_ff = 0; present = '1; fok = '1;
    repeat (5) @(negedge clk);
    rrr = 0;
    while (dut.rst) @(negedge clk);
    armed = 1'b1;
    repeat (10) @(negedge clk);
    for (int f = 0; f < 8; f++) begin
      make_event(f, 1, 900 + 12 * f, 0, 0, -1, toks, e36);
      foreach (toks[k]) tq[f].push_back(toks[k]);
      foreach (e36[k]) expq[f / 4].push_back(e36[k]);
    end
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    c = 0;
    while ((n_done[0] < 1 || n_done[1] < 1) && c < 50000) begin @(negedge clk); c++; end
    repeat (5) @(negedge clk);
    chk(n_done[0] == 1 && n_done[1] == 1, "event not completed");
    chk(expq[0].size() == 0 && expq[1].size() == 0, "words missing");
    chk(m_switch == 6 && m_rel == 6, $sformatf("switches %0d releases %0d", m_switch, m_rel));
    chk(to_start == 0 && to_endwait == 0 && to_endact == 0, "timeout flagged");
    chk(l1a_num0 == 24'd1 || nrdy[8], "L1A number");
    $display("event took %0d clocks, switches=%0d releases=%0d", c, m_switch, m_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
