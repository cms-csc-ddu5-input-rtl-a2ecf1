// End-to-end testbench for in5ctrl at reduced sizes (64-word FIFOs, short
// timeouts, 16-entry L1A FIFOs, fast LED dividers).
//
// Eight fibers send DMB events built by tb_ddu_pkg while L1As are issued; the
// two 36-bit output streams are compared word by word with the expected data
// in event order, fiber order within each half. The run makes each mechanism
// happen and counts it, failing if one never does: FIFO switching at almost
// full and release of emptied FIFOs, FILL after a lost RX-error word, every
// E-trailer case (normal, lost and corrupted E-words), masked fibers, start
// timeout, calibration-mode start timeout, end-wait timeout, external-FIFO
// almost-full stalls, L1A FIFO almost full, the reset stretch, the fiber-OK
// change flag, the JTAG status readout and JTAG reset, the BXN wrap and the
// fiber LEDs.
module tb_in5ctrl;
  import tb_ddu_pkg::*;
  localparam int D18 = 64, STO = 64, CTO = 96, DTO = 400, L1D = 16, L1AF = 12;

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

  in5ctrl #(.DEPTH18(D18), .AF_MARGIN(8), .START_TO(STO), .CAL_TO(CTO), .DONE_TO(DTO),
            .L1A_DEPTH(L1D), .L1A_AF(L1AF), .LED_SLOW_DIV(2), .LED_BCLK_BITS(2), .LED_BLINK_BITS(2)) dut (
    .clk, .rrr, .rxdata, .rxcharisk, .rxdv, .rxerr, .present, .fok, .l1a, .cal_mode, .bc0, .dllerr,
    .ext_paf, .ext_ff, .owen, .out0, .out1, .evt_done, .l1a_num0, .l1a_num1, .status, .nrdy, .faf,
    .ff, .to_start, .to_endwait, .to_endact, .rxerr_seen, .nfree, .minfree, .bxn, .fok_led,
    .dav_led, .dvcenb, .sel2, .lshft, .jtag_op, .tdi, .tdo);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  tok_t tq[8][$];
  w36_t expq[2][$];
  int n_done[2] = '{0, 0}, n_l1a = 0;
  logic paf_en = 0, check_out = 1;
  // mechanism counters
  int m_switch = 0, m_release = 0, m_fill = 0, m_paf_stall = 0, m_l1a_af = 0, m_bxn_wrap = 0,
      m_masked = 0, m_lose = 0, m_bad = 0, m_words = 0;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  // fiber drivers
  always @(negedge clk) begin
    for (int f = 0; f < 8; f++) begin
      tok_t t;
      if (tq[f].size() > 0 && !tq[f][0].idle) begin
        t = tq[f].pop_front();
        rxdata[f] = t.w; rxcharisk[f] = 2'b00; rxdv[f] = 1'b1; rxerr[f] = t.err;
      end else begin
        if (tq[f].size() > 0) void'(tq[f].pop_front());
        rxdata[f] = 16'hBC50; rxcharisk[f] = 2'b10; rxdv[f] = 1'b1; rxerr[f] = 1'b0;
      end
    end
    ext_paf = paf_en ? 2'($urandom % 8 == 0 ? 3 : 0) : 2'b00;
  end

  // output checkers and mechanism counters
  always @(posedge clk) begin
    logic [1:0][35:0] o;
    o = {out1, out0};
    for (int h = 0; h < 2; h++) begin
      if (owen[h] && check_out && !dut.rst) begin
        m_words++;
        if (o[h][16] || o[h][34]) m_fill++;
        chk(expq[h].size() > 0, $sformatf("half %0d: unexpected word %h", h, o[h]));
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
    if (dut.g_half[0].u_half.u_rd.rel) m_release++;
    if (dut.g_half[1].u_half.u_rd.rel) m_release++;
    if (ext_paf != 0 && dut.g_half[0].u_half.u_rd.st == 2'd2) m_paf_stall++;
    if (faf[2] || faf[3]) m_l1a_af++;
    if (bxn == 12'd923) m_bxn_wrap++;
  end

  task automatic add_event(input int evt, input logic [7:0] send, input int ndata[8],
                           input int lose[8], input int bad[8], input int err_at[8]);
    tok_t toks[$];
    w36_t e36[$];
    tok_t idl;
    idl.w = 16'hBC50; idl.err = 1'b0; idl.idle = 1'b1;
    for (int f = 0; f < 8; f++) begin
      if (!send[f]) continue;
      make_event(f, evt, ndata[f], lose[f], bad[f], err_at[f], toks, e36);
      foreach (toks[k]) tq[f].push_back(toks[k]);
      repeat (6) tq[f].push_back(idl);
      if (fok[f]) foreach (e36[k]) expq[f / 4].push_back(e36[k]);
      if (lose[f] != 0) m_lose++;
      if (bad[f] != 0) m_bad++;
    end
  endtask

  task automatic jtag_read(input logic [4:0] op, input int w, output logic [31:0] v);
    jtag_op = op;
    @(negedge clk); dvcenb = 1; sel2 = 1; lshft = 0;
    @(negedge clk); lshft = 1;
    v = '0;
    for (int b = 0; b < w; b++) begin
      v[b] = tdo;
      @(negedge clk);
    end
    dvcenb = 0; sel2 = 0; lshft = 0;
  endtask

  task automatic trigger();
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
    n_l1a++;
  endtask

  task automatic wait_done();
    int c;
    c = 0;
    while ((n_done[0] < n_l1a || n_done[1] < n_l1a) && c < 200000) begin @(negedge clk); c++; end
    chk(c < 200000, "events never finished");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nd[8], lo[8], bd[8], ea[8];
    int n, rst_len;
    logic [31:0] sh;
    rrr = 1; l1a = 0; cal_mode = 0; bc0 = 0; dllerr = 0; dvcenb = 0; sel2 = 0; lshft = 0; tdi = 0;
    ext_ff = 0; present = '1; fok = '1;
    repeat (5) @(negedge clk);
    rrr = 0;
    // reset stretch: 16 clocks after RRR plus the register
    rst_len = 0;
    while (dut.rst) begin @(negedge clk); rst_len++; end
    chk(rst_len == 17, $sformatf("reset held %0d clocks", rst_len));
    repeat (8) @(negedge clk);
    chk(minfree == {5'd18, 5'd18}, "first assignment: 4 FIFOs per half");

    // ---- events 1..6: all fibers, long events (FIFO switching), E-trailer cases, RX errors
    paf_en = 1;
    for (int e = 1; e <= 6; e++) begin
      for (int f = 0; f < 8; f++) begin
        nd[f] = 2 * (4 + ($urandom % 70));
        lo[f] = 0; bd[f] = 0; ea[f] = -1;
      end
      lo[e % 8] = 1 + (e % 4);              // one fiber loses an E-word
      bd[(e + 3) % 8] = 1 + ((e + 1) % 4);  // another has a corrupted E-code
      ea[(e + 5) % 8] = 3;                  // another loses data word 3 to an RX error
      add_event(e, 8'hFF, nd, lo, bd, ea);
      trigger();
    end
    wait_done();
    paf_en = 0;
    chk(expq[0].size() == 0 && expq[1].size() == 0, "events 1-6: words missing");
    chk(rxerr_seen != 0 && status[11], "RX error not reported");
    chk(status[30], "FILL not reported");
    chk(l1a_num0 == 24'd6 || nrdy[8], "L1A number");

    chk(!status[8], "fiber-OK change flagged without a change");

    // ---- event 7: fibers 2 and 5 masked and silent
    fok = 8'b1101_1011;
    @(negedge clk); @(negedge clk);
    chk(status[8], "fiber-OK change not flagged");
    for (int f = 0; f < 8; f++) begin nd[f] = 20; lo[f] = 0; bd[f] = 0; ea[f] = -1; end
    add_event(7, 8'b1101_1011, nd, lo, bd, ea);
    m_masked += 2;
    trigger();
    wait_done();
    chk(to_start == 0, "masked fiber timed out");

    // ---- event 8: fiber 2 enabled but silent -> start timeout
    fok = 8'hFF;
    add_event(8, 8'b1111_1011, nd, lo, bd, ea);
    trigger();
    wait_done();
    chk(to_start == 8'b0000_0100, $sformatf("start timeout flags %b", to_start));

    // ---- event 9: calibration mode, fiber 6 silent -> start timeout
    cal_mode = 1;
    add_event(9, 8'b1011_1111, nd, lo, bd, ea);
    trigger();
    wait_done();
    cal_mode = 0;
    chk(to_start == 8'b0100_0100, $sformatf("calibration start timeout flags %b", to_start));
    chk(expq[0].size() == 0 && expq[1].size() == 0, "events 7-9: words missing");

    // ---- L1A FIFO almost full: 14 L1As with silent fibers
    fok = 8'b0001_0001;
    for (int k = 0; k < 14; k++) trigger();
    wait_done();

    // ---- end-wait timeout: fiber 0 sends data with no trailer
    check_out = 0;
    fok = 8'b0000_0001;
    for (n = 0; n < 10; n++) begin
      tok_t t;
      t.w = 16'(16'h1100 + n); t.err = 0; t.idle = 0;
      tq[0].push_back(t);
    end
    trigger();
    wait_done();
    chk(to_endwait[0], "end-wait timeout not flagged");

    // ---- JTAG status readout: status word, start timeouts, L1A number
    jtag_read(5'd3, 32, sh);
    chk(sh == status, "JTAG status word");
    jtag_read(5'd13, 8, sh);
    chk(sh[7:0] == to_start && to_start != 0, "JTAG start timeouts");
    jtag_read(5'd2, 24, sh);
    chk(sh[23:0] == l1a_num0, "JTAG L1A number");
    chk(status[0] && status[1], "status timeout bits");

    // ---- LEDs: fiber 0 link ready, fiber 1 present not ready, fiber 7 absent
    fok = 8'b0000_0001; present = 8'b0111_1111;
    begin
      int on1, off1, on0, on7;
      on1 = 0; off1 = 0; on0 = 0; on7 = 0;
      for (int k = 0; k < 200; k++) begin
        @(negedge clk);
        if (fok_led[0]) on0++;
        if (fok_led[1]) on1++; else off1++;
        if (fok_led[7]) on7++;
      end
      chk(on0 >= 198 && on7 == 0 && on1 > 0 && off1 > 0, "fiber LEDs");
    end

    // ---- JTAG opcode 1: FPGA reset clears the sticky flags
    @(negedge clk); jtag_op = 5'd1; dvcenb = 1; sel2 = 1;
    @(negedge clk); dvcenb = 0; sel2 = 0; jtag_op = 5'd3;
    @(negedge clk);
    chk(dut.rst, "JTAG reset not applied");
    while (dut.rst) @(negedge clk);
    @(negedge clk);
    chk(to_start == 0 && to_endwait == 0 && rxerr_seen == 0 && !status[8], "flags not cleared by JTAG reset");

    // mechanisms
    $display("switch=%0d release=%0d fill=%0d paf_stall=%0d l1a_af=%0d bxn_wrap=%0d masked=%0d lose=%0d bad=%0d words=%0d minfree=%0d/%0d",
             m_switch, m_release, m_fill, m_paf_stall, m_l1a_af, m_bxn_wrap, m_masked, m_lose, m_bad,
             m_words, minfree[4:0], minfree[9:5]);
    chk(m_switch > 0, "no FIFO switch");
    chk(m_release > 0, "no FIFO release");
    chk(m_fill > 0, "no FILL word");
    chk(m_paf_stall > 0, "no EXT_PAF stall");
    chk(m_l1a_af > 0, "L1A FIFO never almost full");
    chk(m_bxn_wrap > 0, "BXN never wrapped");
    chk(m_lose > 0 && m_bad > 0 && m_masked > 0, "trailer or mask cases missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
