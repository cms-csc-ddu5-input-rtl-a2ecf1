// Capacity testbench for in5ctrl at its default sizes: DDU event
// configurations given as DDU word counts, run one after another.
//
// A DMB with c CFEBs at 8 time samples sends 25*8*c + 4 64-bit words, that is
// 800*c + 16 16-bit fiber words (event body plus 8 trailer words). Each event
// is buffered completely before it is read: the external FIFO reports almost
// full (EXT_PAF) from the L1A until every fiber has finished sending, so the
// FIFO pool must hold the whole event. Fibers without data in an event are
// masked with FOK. Configurations:
//   1 DMB, 1 CFEB          fiber 0                  816 words
//   1 DMB, 2 CFEB          fiber 1                  1616 words
//   2 DMB, 2 CFEB          fibers 0 and 4           1616 words each
//   8 DMB, 1 CFEB          all fibers               816 words each
//   8 DMB, 5 CFEB          all fibers               4016 words each
// For each the output must match word for word, the number of FIFO switches
// must be the expected one (a fiber moves on after 904 words, the almost-full
// mark, so it needs ceil(words/904) FIFOs), and the last configuration must
// take 5 FIFOs per fiber, 20 of the 22 of each half, leaving a minimum of 2
// free in both halves.
module tb_in5ctrl_workloads;
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

  int checks = 0, failures = 0, n_done[2] = '{0, 0}, m_switch = 0;
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
        chk(expq[h].size() > 0, $sformatf("unexpected word %h on half %0d at %0t", o[h], h, $time));
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
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One configuration: ncfeb CFEBs on every fiber set in 'send'.
  task automatic run_config(input string name, input int evt, input logic [7:0] send,
                            input int ncfeb);
    tok_t toks[$];
    w36_t e36[$];
    int words, exp_sw, sw0, d0, d1, c;
    words  = 800 * ncfeb + 16;
    exp_sw = 0;
    fok = send;
    for (int f = 0; f < 8; f++)
      if (send[f]) begin
        make_event(f, evt, words - 8, 0, 0, -1, toks, e36);
        foreach (toks[k]) tq[f].push_back(toks[k]);
        foreach (e36[k]) expq[f / 4].push_back(e36[k]);
        exp_sw += (words + 903) / 904 - 1;
      end
    sw0 = m_switch; d0 = n_done[0]; d1 = n_done[1];
    repeat (4) @(negedge clk);
    ext_paf = 2'b11;
    l1a = 1; @(negedge clk); l1a = 0;
    c = 0;
    while (c < 10 || tq[0].size() + tq[1].size() + tq[2].size() + tq[3].size() +
           tq[4].size() + tq[5].size() + tq[6].size() + tq[7].size() > 0) begin
      @(negedge clk); c++;
    end
    repeat (8) @(negedge clk);
    ext_paf = 2'b00;
    c = 0;
    while ((n_done[0] == d0 || n_done[1] == d1) && c < 60000) begin @(negedge clk); c++; end
    repeat (5) @(negedge clk);
    chk(n_done[0] == d0 + 1 && n_done[1] == d1 + 1, {name, ": event not completed"});
    chk(expq[0].size() == 0 && expq[1].size() == 0, {name, ": words missing"});
    chk(m_switch - sw0 == exp_sw,
        $sformatf("%s: %0d FIFO switches, expected %0d", name, m_switch - sw0, exp_sw));
    chk(to_start == 0 && to_endwait == 0 && to_endact == 0, {name, ": timeout flagged"});
    $display("%s: %0d words per fiber, %0d switches, read out in %0d clocks, min free %0d/%0d",
             name, words, m_switch - sw0, c, minfree[9:5], minfree[4:0]);
  endtask

  initial begin
    rrr = 1; l1a = 0; cal_mode = 0; bc0 = 0; dllerr = 0; dvcenb = 0; sel2 = 0; lshft = 0; tdi = 0;
    ext_paf = 0; ext_ff = 0; present = '1; fok = '1;
    repeat (5) @(negedge clk);
    rrr = 0;
    while (dut.rst) @(negedge clk);
    armed = 1'b1;
    repeat (10) @(negedge clk);
    // every fiber holds one FIFO from the start
    chk(nfree == {5'd18, 5'd18}, $sformatf("free FIFOs after reset %h", nfree));

    run_config("1 DMB 1 CFEB (DDU WC 210)", 1, 8'b0000_0001, 1);
    run_config("1 DMB 2 CFEB (DDU WC 410)", 2, 8'b0000_0010, 2);
    run_config("2 DMB 2 CFEB (DDU WC 814)", 3, 8'b0001_0001, 2);
    run_config("8 DMB 1 CFEB (DDU WC 1638)", 4, 8'b1111_1111, 1);
    chk(minfree == {5'd17, 5'd17}, $sformatf("min free before 5-CFEB run %h", minfree));
    run_config("8 DMB 5 CFEB", 5, 8'b1111_1111, 5);
    chk(minfree == {5'd2, 5'd2}, $sformatf("min free after 5-CFEB run %h", minfree));
    chk(nfree == {5'd18, 5'd18}, $sformatf("FIFOs not all returned: free %h", nfree));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
