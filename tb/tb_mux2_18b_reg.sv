// Testbench for mux2_18b_reg: checks that Q holds, one clock after each
// edge, the bus chosen by CTRL (zero with EN low), and that RST clears it.
module tb_mux2_18b_reg;
  logic clk = 0, rst;
  logic [17:0] i0, i1, q, exp_q;
  logic ctrl, en;
  int checks = 0, failures = 0;

  mux2_18b_reg dut (.clk, .rst, .i0bus(i0), .i1bus(i1), .ctrl, .en, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; i0 = '1; i1 = '1; ctrl = 0; en = 1;
    #12;
    checks++;
    if (q !== 18'd0) begin failures++; $display("not cleared"); end
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      i0 = 18'($urandom); i1 = 18'($urandom); ctrl = 1'($urandom); en = (n % 7) != 0;
      exp_q = !en ? 18'd0 : (ctrl ? i1 : i0);
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("q=%h exp=%h", q, exp_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
