// Testbench for l1a_fifo at its full size (8192 entries, AF at 7680): fills it
// past full, checks AF and FULL thresholds and that overflow is dropped, then
// drains it in order against a queue model.
module tb_l1a_fifo;
  localparam int D = 8192, AFL = 7680;
  logic clk = 0, rst, wen, ren, empty, af, full;
  logic [23:0] din, dout;
  logic [23:0] q[$];
  int checks = 0, failures = 0;

  l1a_fifo dut (.clk, .rst, .wen, .din, .ren, .dout, .empty, .af, .full);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic step(input logic w, input logic r);
    logic dw, dr;
    @(negedge clk);
    wen = w; ren = r; din = 24'($urandom);
    chk(empty == (q.size() == 0), "empty");
    chk(full == (q.size() == D), "full");
    chk(af == (q.size() >= AFL), $sformatf("af at %0d", q.size()));
    if (q.size() > 0) chk(dout == q[0], "dout");
    dw = w && q.size() < D;
    dr = r && q.size() > 0;
    @(posedge clk);
    if (dr) void'(q.pop_front());
    if (dw) q.push_back(din);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wen = 0; ren = 0; din = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 50; n++) step(1'b1, ($urandom % 2) == 0);
    for (int n = 0; n < D + 20; n++) step(1'b1, 1'b0);
    for (int n = 0; n < D + 100; n++) step(($urandom % 8) == 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
