// Testbench for jtag_instr_decode: random status inputs; every opcode 0..31
// is checked against the opcode table (value and width), unused opcodes must
// read zero, and RST_REQ must follow opcode 1 only while DVCENB and SEL2.
module tb_jtag_instr_decode;
  logic [4:0] op;
  logic dvcenb, sel2, rst_req;
  logic [23:0] n0, n1;
  logic [31:0] status, data, e;
  logic [7:0] fok, rxe, ts, tw, ta;
  logic [9:0] minfree, nrdy;
  logic [5:0] faf, width;
  logic [11:0] ff;
  logic [2:0][4:0] nmem;
  int ew;
  int checks = 0, failures = 0;

  jtag_instr_decode dut (.op, .dvcenb, .sel2, .l1a_num0(n0), .l1a_num1(n1), .status, .fok,
    .rxerr_seen(rxe), .to_start(ts), .to_endwait(tw), .to_endact(ta), .minfree, .faf, .ff, .nrdy, .nmem,
    .data, .width, .rst_req);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      n0 = 24'($urandom); n1 = 24'($urandom); status = $urandom; fok = 8'($urandom);
      rxe = 8'($urandom); ts = 8'($urandom); tw = 8'($urandom); ta = 8'($urandom);
      minfree = 10'($urandom); nrdy = 10'($urandom); faf = 6'($urandom); ff = 12'($urandom);
      nmem = 15'($urandom);
      for (int o = 0; o < 32; o++) begin
        op = 5'(o); dvcenb = 1'($urandom); sel2 = 1'($urandom);
        #1;
        case (o)
          2:  begin e = {8'd0, n0}; ew = 24; end
          3:  begin e = status; ew = 32; end
          4:  begin e = {16'd0, status[15:0]}; ew = 16; end
          5:  begin e = {16'd0, status[31:16]}; ew = 16; end
          6:  begin e = {24'd0, rxe | ts | tw | ta}; ew = 8; end
          7:  begin e = {24'd0, fok}; ew = 8; end
          13: begin e = {24'd0, ts}; ew = 8; end
          14: begin e = {24'd0, tw}; ew = 8; end
          15: begin e = {24'd0, ta}; ew = 8; end
          17: begin e = {24'd0, rxe}; ew = 8; end
          18: begin e = {22'd0, minfree}; ew = 10; end
          20: begin e = {26'd0, faf}; ew = 6; end
          21: begin e = {20'd0, ff}; ew = 12; end
          25: begin e = {22'd0, nrdy}; ew = 10; end
          26: begin e = {8'd0, n1}; ew = 24; end
          28: begin e = {17'd0, nmem}; ew = 16; end
          default: begin e = 0; ew = 0; end
        endcase
        checks++;
        if (data !== e || int'(width) != ew) begin
          failures++;
          $display("op %0d: data %h width %0d, expected %h %0d", o, data, width, e, ew);
        end
        checks++;
        if (rst_req !== (o == 1 && dvcenb && sel2)) begin failures++; $display("rst_req op %0d", o); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
