// Testbench for reset_stretch: after RRR falls, RST must stay high for
// exactly HOLD+1 more clocks (registered output plus HOLD), for several
// lengths of RRR.
module tb_reset_stretch;
  localparam int HOLD = 16;
  logic clk = 0, rrr, rst;
  int checks = 0, failures = 0;

  reset_stretch #(.HOLD(HOLD)) dut (.clk, .rrr, .rst);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rrr = 1;
    for (int t = 0; t < 4; t++) begin
      @(negedge clk); rrr = 1;
      repeat (1 + t * 3) @(negedge clk);
      checks++;
      if (!rst) begin failures++; $display("rst low while rrr high"); end
      rrr = 0;
      n = 0;
      while (rst && n < 100) begin @(negedge clk); n++; end
      checks++;
      if (n != HOLD + 1) begin failures++; $display("held %0d clocks, expected %0d", n, HOLD + 1); end
      repeat (5) @(negedge clk);
      checks++;
      if (rst) begin failures++; $display("rst came back"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
