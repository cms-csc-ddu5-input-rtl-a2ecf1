// Testbench for jtag_status_sr: capture a status word with LSHFT low, shift
// it out with LSHFT high (bit 0 first on TDO, TDI filling the top), and check
// that nothing moves unless both DVCENB and SEL2 are high.
module tb_jtag_status_sr;
  localparam int W = 16;
  logic clk = 0, rst, dvcenb, sel2, lshft, tdi, tdo;
  logic [W-1:0] status, tdi_bits;
  int checks = 0, failures = 0;

  jtag_status_sr #(.WIDTH(W)) dut (.drclk(clk), .rst, .dvcenb, .sel2, .lshft, .tdi, .status, .tdo);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; dvcenb = 0; sel2 = 0; lshft = 0; tdi = 0; status = '0;
    #12 rst = 0;
    for (int t = 0; t < 10; t++) begin
      status = W'($urandom);
      tdi_bits = W'($urandom);
      @(negedge clk); dvcenb = 1; sel2 = 1; lshft = 0;      // capture
      @(negedge clk); lshft = 1;
      // gated clocks: no shift
      dvcenb = t[0]; sel2 = !t[0];
      @(negedge clk);
      checks++;
      if (tdo !== status[0]) begin failures++; $display("moved without enable"); end
      dvcenb = 1; sel2 = 1;
      for (int b = 0; b < W; b++) begin
        checks++;
        if (tdo !== status[b]) begin failures++; $display("bit %0d: tdo=%b exp=%b", b, tdo, status[b]); end
        tdi = tdi_bits[b];
        @(negedge clk);
      end
      // the TDI bits are now in the register
      for (int b = 0; b < W; b++) begin
        checks++;
        if (tdo !== tdi_bits[b]) begin failures++; $display("tdi bit %0d lost", b); end
        @(negedge clk);
      end
      dvcenb = 0; sel2 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
