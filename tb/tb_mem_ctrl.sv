// Testbench for mem_ctrl with the full pool of 22 FIFOs (two corners of 11).
// Checks: first assignments follow the corner search (fiber 0 -> 0, fiber 1
// -> 10, fiber 2 -> 11, fiber 3 -> 21), one ASF per clock with FNEXT only for
// fibers that already had a FIFO; an almost-full FIFO moves its fiber on only
// when BND_OK is high; each fiber's list keeps assignment order; REL frees the
// head; spill to the other corner when a corner is used up; NFREE/MINFREE.
module tb_mem_ctrl;
  localparam int N = 22;
  logic clk = 0, rst, rel, asf;
  logic [3:0] bnd_ok, fnext, cur_v;
  logic [N-1:0] fifo_af;
  logic [1:0] rel_fiber, asf_fiber;
  logic [4:0] asf_adr, nfree, minfree;
  logic [3:0][4:0] cur, head, nchain;
  int lists[4][$];
  int checks = 0, failures = 0, n_spill = 0;
  logic [N-1:0] busy_m;

  mem_ctrl #(.NFIFO(N)) dut (.clk, .rst, .bnd_ok, .fifo_af, .rel, .rel_fiber, .asf, .asf_adr,
    .asf_fiber, .fnext, .cur_v, .cur, .head, .nchain, .nfree, .minfree);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  // model: record assignments, compare lists
  int minf_m = N;
  always @(posedge clk) if (!rst) begin
    if (int'(nfree) < minf_m) minf_m = int'(nfree);   // MINFREE is registered
    if (asf) begin
      chk(!busy_m[asf_adr], "assigned a busy FIFO");
      chk(fnext == (cur_v[asf_fiber] ? (4'b1 << asf_fiber) : 4'b0), "fnext");
      if ((asf_fiber < 2) != (asf_adr < 11)) n_spill++;
      busy_m[asf_adr] = 1'b1;
      lists[asf_fiber].push_back(int'(asf_adr));
    end else chk(fnext == 0, "fnext without asf");
    if (rel) begin
      busy_m[head[rel_fiber]] = 1'b0;
      void'(lists[rel_fiber].pop_front());
    end
  end

  task automatic check_lists();
    int nf;
    nf = 0;
    for (int i = 0; i < N; i++) nf += busy_m[i] ? 0 : 1;
    chk(int'(nfree) == nf, $sformatf("nfree %0d exp %0d", nfree, nf));
    for (int f = 0; f < 4; f++) begin
      chk(int'(nchain[f]) == lists[f].size(), $sformatf("nchain[%0d]", f));
      if (lists[f].size() > 0) chk(int'(head[f]) == lists[f][0], $sformatf("head[%0d]=%0d exp %0d", f, head[f], lists[f][0]));
      if (lists[f].size() > 0) chk(int'(cur[f]) == lists[f][$], $sformatf("cur[%0d]", f));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; bnd_ok = '1; fifo_af = '0; rel = 0; rel_fiber = 0; busy_m = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // initial assignment: one per clock, fiber 0 first
    for (int f = 0; f < 4; f++) begin
      chk(asf && asf_fiber == 2'(f), $sformatf("clock %0d: asf=%b fiber=%0d", f, asf, asf_fiber));
      @(negedge clk);
    end
    chk(!asf, "extra asf");
    chk(lists[0][0] == 0 && lists[1][0] == 10 && lists[2][0] == 11 && lists[3][0] == 21, "corner search order");
    check_lists();
    // many rounds: random fiber's FIFO goes almost full; sometimes not at a boundary
    for (int r = 0; r < 400; r++) begin
      int f;
      f = $urandom % 4;
      @(negedge clk);
      fifo_af = '0;
      fifo_af[cur[f]] = 1'b1;
      bnd_ok = 4'b1111;
      bnd_ok[f] = ($urandom % 3) != 0;
      #1;
      chk(asf == (bnd_ok[f] && nfree != 0), "asf on af");
      @(negedge clk);
      fifo_af = '0;
      bnd_ok = '1;
      // release a random fiber's head if it has moved on
      f = $urandom % 4;
      if (nchain[f] >= 2 && ($urandom % 2 == 0 || nfree < 3)) begin
        rel = 1; rel_fiber = 2'(f);
        @(negedge clk);
        rel = 0;
      end
      check_lists();
      chk(int'(minfree) == minf_m, $sformatf("minfree %0d exp %0d", minfree, minf_m));
    end
    chk(n_spill > 0, "never spilled to the other corner");
    $display("spill=%0d minfree=%0d", n_spill, minfree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
