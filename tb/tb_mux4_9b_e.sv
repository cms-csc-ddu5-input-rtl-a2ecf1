// Testbench for mux4_9b_e: random buses, every select value, enable on and
// off; the expected output is computed from the select directly.
module tb_mux4_9b_e;
  logic [8:0] i0, i1, i2, i3, q, exp_q;
  logic [1:0] ctrl;
  logic en;
  int checks = 0, failures = 0;

  mux4_9b_e dut (.i0bus(i0), .i1bus(i1), .i2bus(i2), .i3bus(i3), .ctrl, .en, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      i0 = 9'($urandom); i1 = 9'($urandom); i2 = 9'($urandom); i3 = 9'($urandom);
      ctrl = 2'(n % 4);
      en = (n % 5) != 0;
      #1;
      exp_q = !en ? 9'd0 : (ctrl == 0 ? i0 : ctrl == 1 ? i1 : ctrl == 2 ? i2 : i3);
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("mismatch ctrl=%0d en=%0b q=%h exp=%h", ctrl, en, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
