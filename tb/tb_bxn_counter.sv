// Testbench for bxn_counter: the count must step by one, wrap from 923 to 0
// and clear on BC0.
module tb_bxn_counter;
  logic clk = 0, rst, bc0;
  logic [11:0] bxn;
  int checks = 0, failures = 0, exp_b, wraps = 0;

  bxn_counter dut (.clk, .rst, .bc0, .bxn);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; bc0 = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    exp_b = 0;
    for (int n = 0; n < 3000; n++) begin
      checks++;
      if (int'(bxn) != exp_b) begin failures++; $display("bxn=%0d exp=%0d", bxn, exp_b); end
      bc0 = (n == 1500);
      @(negedge clk);
      if (bc0) exp_b = 0;
      else if (exp_b == 923) begin exp_b = 0; wraps++; end
      else exp_b++;
    end
    checks++;
    if (wraps < 2) begin failures++; $display("too few wraps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
