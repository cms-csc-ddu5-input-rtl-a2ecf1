// Testbench for fiber_led, with small dividers: FOK LED lit when ready, off
// when not present, blinking (both levels seen, with the expected half period)
// when present but not ready; DAV LED lit on data and dark after a quiet
// BCLK_EN period.
module tb_fiber_led;
  localparam int SD = 4, BB = 3, BL = 2;
  localparam int BCLK = SD * (1 << BB);            // clocks per BCLK_EN
  logic clk = 0, rst, present, ready, dav, fok_led, dav_led;
  int checks = 0, failures = 0, ones, zeros, run, maxrun;

  fiber_led #(.SLOW_DIV(SD), .BCLK_BITS(BB), .BLINK_BITS(BL)) dut (
    .clk, .rst, .present, .ready, .dav, .fok_led, .dav_led);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; present = 0; ready = 0; dav = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (200) begin @(negedge clk); chk(!fok_led, "lit with no link"); end
    present = 1; ready = 1;
    @(negedge clk); @(negedge clk);
    repeat (200) begin @(negedge clk); chk(fok_led, "dark with good link"); end
    ready = 0;
    ones = 0; zeros = 0; run = 0; maxrun = 0;
    @(negedge clk); @(negedge clk);
    for (int n = 0; n < 8 * BCLK * (1 << BL); n++) begin
      @(negedge clk);
      if (fok_led) ones++; else zeros++;
      if (fok_led) run++; else run = 0;
      if (run > maxrun) maxrun = run;
    end
    chk(ones > 0 && zeros > 0, "no blink");
    chk(maxrun == BCLK * (1 << (BL - 1)), $sformatf("blink half period %0d", maxrun));
    // DAV
    chk(!dav_led, "dav lit with no data");
    dav = 1; @(negedge clk); dav = 0; @(negedge clk);
    chk(dav_led, "dav not lit after data");
    repeat (2 * BCLK + 2) @(negedge clk);
    chk(!dav_led, "dav still lit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
