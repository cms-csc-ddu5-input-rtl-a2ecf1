// Testbench for rd_ctrl with small timeouts and four FIFOs modelled as
// queues in the testbench (the memory controller's HEAD/NCHAIN lists are
// kept here too). Cases:
//  1. event spread over fibers 0, 1, 3 (fiber 2 masked), fiber 0's data in
//     two FIFOs: output must be the words in fiber order up to each LAST and
//     one word after it, the
//     emptied FIFO must be released, EXT_PAF must stop reading;
//  2. fiber with no data: start timeout after START_TO clocks, and after
//     CAL_TO clocks in calibration mode (the difference is checked);
//  3. data that stop without LAST: end-wait timeout after DONE_TO clocks;
//  4. data that keep coming without LAST: end-active timeout;
//  and the L1A numbers 1, 2, ... in order.
module tb_rd_ctrl;
  localparam int N = 4, STO = 20, CTO = 45, DTO = 60;
  logic clk = 0, rst, l1a, cal_mode, ext_paf, rel, owen, evt_done, l1a_af, l1a_full, l1a_empty;
  logic [3:0] fok, to_start, to_endwait, to_endact;
  logic [3:0][4:0] head, nchain;
  logic [N-1:0][35:0] fifo_dout;
  logic [N-1:0] fifo_empty, fifo_ren;
  logic [1:0] rel_fiber;
  logic [35:0] odata;
  logic [23:0] l1a_num, l1a_cnt;
  logic [35:0] fq[N][$];
  int chain[4][$];
  logic [35:0] expq[$];
  int checks = 0, failures = 0, n_rel = 0, n_evt = 0, n_paf_stall = 0, cyc = 0;
  logic paf_q;

  rd_ctrl #(.NFIFO(N), .START_TO(STO), .CAL_TO(CTO), .DONE_TO(DTO), .L1A_DEPTH(16), .L1A_AF(12)) dut (
    .clk, .rst, .l1a, .cal_mode, .fok, .ext_paf, .head, .nchain, .fifo_dout, .fifo_empty,
    .fifo_ren, .rel, .rel_fiber, .owen, .odata, .evt_done, .l1a_num, .l1a_cnt, .to_start,
    .to_endwait, .to_endact, .l1a_af, .l1a_full, .l1a_empty);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  always_comb begin
    for (int i = 0; i < N; i++) begin
      fifo_empty[i] = fq[i].size() == 0;
      fifo_dout[i]  = fq[i].size() > 0 ? fq[i][0] : 36'h0;
    end
    for (int f = 0; f < 4; f++) begin
      nchain[f] = 5'(chain[f].size());
      head[f]   = chain[f].size() > 0 ? 5'(chain[f][0]) : 5'd0;
    end
  end

  logic check_out = 1'b1;
  always @(posedge clk) if (!rst) begin
    cyc++;
    for (int i = 0; i < N; i++) if (fifo_ren[i]) begin
      chk(fq[i].size() > 0, "read from empty FIFO");
      void'(fq[i].pop_front());
    end
    if (rel) begin
      chk(chain[rel_fiber].size() >= 2 && fq[chain[rel_fiber][0]].size() == 0, "bad release");
      void'(chain[rel_fiber].pop_front());
      n_rel++;
    end
    if (owen && check_out) begin
      chk(expq.size() > 0, $sformatf("unexpected output %h", odata));
      if (expq.size() > 0) begin
        logic [35:0] e;
        e = expq.pop_front();
        chk(odata == e, $sformatf("output %h exp %h", odata, e));
      end
    end
    if (paf_q && owen) chk(1'b0, "read while EXT_PAF");
    if (paf_q) n_paf_stall++;
    paf_q <= ext_paf;
    if (evt_done) n_evt++;
  end

  function automatic logic [35:0] wd(input int f, input int i, input logic last = 0);
    return {last, 1'b0, 16'(16'h1000 * f + i), 2'b00, 16'(16'h1000 * f + i + 8'h80)};
  endfunction

  task automatic put(input int fifo, input logic [35:0] w, input logic exp_it = 1);
    fq[fifo].push_back(w);
    if (exp_it) expq.push_back(w);
  endtask

  task automatic trigger();
    @(negedge clk); l1a = 1; @(negedge clk); l1a = 0;
  endtask

  task automatic wait_evt(output int t);
    int n0, c0;
    n0 = n_evt; c0 = cyc;
    while (n_evt == n0 && cyc - c0 < 100000) @(negedge clk);
    t = cyc - c0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, t1, t2;
    rst = 1; l1a = 0; cal_mode = 0; ext_paf = 0; fok = 4'b1011; paf_q = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // ---- case 1
    chain[0].push_back(0); chain[0].push_back(1);
    chain[1].push_back(2);
    chain[3].push_back(3);
    for (int i = 0; i < 3; i++) put(0, wd(0, i));
    put(1, wd(0, 3)); put(1, wd(0, 4, 1)); put(1, wd(0, 5));
    put(2, wd(1, 0)); put(2, wd(1, 1, 1)); put(2, wd(1, 2));
    put(3, wd(3, 0, 1)); put(3, wd(3, 1));
    put(3, wd(3, 9), 1'b0);                       // next event's word stays
    trigger();
    repeat (3) @(negedge clk);
    ext_paf = 1; repeat (8) @(negedge clk); ext_paf = 0;
    wait_evt(t);
    chk(expq.size() == 0, $sformatf("case 1: %0d words not output", expq.size()));
    chk(n_rel == 1, "case 1: FIFO 0 not released");
    chk(fq[3].size() == 1, "case 1: read past LAST");
    chk(to_start == 0 && to_endwait == 0 && to_endact == 0, "case 1: timeout flag");
    chk(n_paf_stall > 0, "case 1: no EXT_PAF stall");
    chk(l1a_num == 24'd1 || l1a_empty, "l1a number");
    // ---- case 2: start timeouts
    fok = 4'b0100;
    trigger();
    wait_evt(t1);
    chk(to_start == 4'b0100, "case 2: start timeout flag");
    cal_mode = 1;
    trigger();
    wait_evt(t2);
    cal_mode = 0;
    chk(t2 - t1 == CTO - STO, $sformatf("case 2: calibration timeout %0d vs %0d clocks", t2, t1));
    chk(t1 >= STO && t1 <= STO + 6, $sformatf("case 2: start timeout took %0d clocks", t1));
    // ---- case 3: end-wait timeout on fiber 0 (new FIFO list: FIFO 1)
    fok = 4'b0001;
    put(1, wd(0, 20)); put(1, wd(0, 21));
    trigger();
    wait_evt(t);
    chk(to_endwait == 4'b0001 && to_endact == 0, "case 3: end-wait timeout");
    chk(t >= DTO && t <= DTO + 8, $sformatf("case 3: done timeout took %0d clocks", t));
    chk(expq.size() == 0, "case 3: words not output");
    // ---- case 4: end-active timeout on fiber 1 (FIFO 2): feed every clock
    fok = 4'b0010;
    check_out = 1'b0;
    expq.delete();
    trigger();
    fork
      begin
        for (int i = 0; i < DTO + 40; i++) begin @(negedge clk); fq[2].push_back(wd(1, i)); end
      end
      wait_evt(t);
    join
    chk(to_endact == 4'b0010, "case 4: end-active timeout");
    chk(l1a_cnt == 24'd5 && l1a_empty, "l1a count / fifo");
    $display("events=%0d releases=%0d paf_stall=%0d", n_evt, n_rel, n_paf_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
