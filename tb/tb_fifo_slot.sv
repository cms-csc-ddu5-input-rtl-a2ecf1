// Testbench for fifo_slot (FAD = 5). All four fibers write different data
// every clock. The slot must ignore them until ASF names address 5, then
// store only its owner's words (in order, two per 36-bit read), ignore FNEXT
// of other fibers, stop on its owner's FNEXT, and keep its data readable.
module tb_fifo_slot;
  logic clk = 0, rst, asf, ren, empty, af, full, active;
  logic [4:0] asf_adr;
  logic [1:0] asf_fiber;
  logic [3:0] fnext, fwen;
  logic [3:0][17:0] fdin;
  logic [35:0] dout;
  logic [17:0] q[$];
  int checks = 0, failures = 0;

  fifo_slot #(.FAD(5)) dut (.clk, .rst, .asf, .asf_adr, .asf_fiber, .fnext, .fwen, .fdin,
                            .ren, .dout, .empty, .af, .full, .active);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  // n clocks of writes from all fibers; owner's words expected if 'expect_own'
  task automatic writes(input int n, input int own, input logic expect_own);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      fwen = 4'b1111;
      for (int f = 0; f < 4; f++) fdin[f] = {2'(f), 16'($urandom)};
      if (expect_own) q.push_back(fdin[own]);
    end
    @(negedge clk); fwen = '0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; asf = 0; asf_adr = 0; asf_fiber = 0; fnext = 0; fwen = 0; fdin = '0; ren = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    writes(6, 0, 1'b0);
    chk(empty && !active, "wrote while unassigned");
    @(negedge clk); asf = 1; asf_adr = 3; asf_fiber = 1;
    @(negedge clk); asf = 0;
    writes(4, 0, 1'b0);
    chk(empty && !active, "took another slot's assignment");
    @(negedge clk); asf = 1; asf_adr = 5; asf_fiber = 2;
    @(negedge clk); asf = 0;
    chk(active, "not active after ASF");
    writes(10, 2, 1'b1);
    @(negedge clk); fnext = 4'b1011;          // other fibers move on
    @(negedge clk); fnext = 0;
    chk(active, "dropped by another fiber's FNEXT");
    writes(6, 2, 1'b1);
    @(negedge clk); fnext = 4'b0100;
    @(negedge clk); fnext = 0;
    chk(!active, "still active after owner's FNEXT");
    writes(6, 2, 1'b0);
    // read back
    while (!empty) begin
      @(negedge clk);
      chk(q.size() >= 2, "more data than written");
      if (q.size() >= 2) begin
        chk(dout == {q[1], q[0]}, $sformatf("dout %h exp %h%h", dout, q[1], q[0]));
        void'(q.pop_front()); void'(q.pop_front());
      end
      ren = 1;
      @(posedge clk); #1 ren = 0;
    end
    chk(q.size() == 0, $sformatf("%0d words missing", q.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
