// Testbench for sfifo18_36 at its full size: random 18-bit writes and 36-bit
// reads against a queue model; checks the FWFT word (older write in the low
// half), the 18-bit-word count (+1 write, -2 read, -1 both), EMPTY below two
// words, AF with 120 writes left, FULL, and that overflowing writes are
// dropped.
module tb_sfifo18_36;
  localparam int D = 1024, M = 120;
  logic clk = 0, rst, wen, ren, empty, af, full;
  logic [17:0] din;
  logic [35:0] dout;
  logic [10:0] count;
  logic [17:0] q[$];
  int checks = 0, failures = 0, n_af = 0, n_full = 0, n_both = 0;

  sfifo18_36 dut (.clk, .rst, .wen, .din, .ren, .dout, .empty, .af, .full, .count);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic step(input logic w, input logic r);
    logic dw, dr;
    @(negedge clk);
    wen = w; ren = r; din = 18'($urandom);
    // flags and data before the edge
    chk(count == 11'(q.size()), $sformatf("count %0d exp %0d", count, q.size()));
    chk(empty == (q.size() < 2), "empty");
    chk(full == (q.size() == D), "full");
    chk(af == (q.size() >= D - M), "af");
    if (q.size() >= 2) chk(dout == {q[1], q[0]}, "dout");
    if (af) n_af++;
    if (full) n_full++;
    dw = w && q.size() < D;
    dr = r && q.size() >= 2;
    if (dw && dr) n_both++;
    @(posedge clk);
    if (dr) begin void'(q.pop_front()); void'(q.pop_front()); end
    if (dw) q.push_back(din);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wen = 0; ren = 0; din = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) step(($urandom % 4) != 0, ($urandom % 4) == 0);   // fill up
    for (int n = 0; n < 400; n++)  step(1'b1, 1'b0);                                  // overflow
    for (int n = 0; n < 3000; n++) step(($urandom % 3) == 0, ($urandom % 2) == 0);   // drain
    for (int n = 0; n < 600; n++)  step(1'b0, 1'b1);
    chk(n_af > 0 && n_full > 0 && n_both > 0, "AF, FULL or read-with-write never seen");
    $display("af=%0d full=%0d both=%0d", n_af, n_full, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
