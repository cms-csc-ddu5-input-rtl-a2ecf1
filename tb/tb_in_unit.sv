// Testbench for in_unit. Sends DMB-like events (data words, four F-code and
// four E-code trailer words) separated by idle K words, and compares every
// 18-bit FIFO write with an expected list built by hand for each case:
//   normal trailer, first E-word lost, second E-word lost, first E-code
//   corrupted, second E-code corrupted, RX-error words, idle gaps.
// LAST must sit on the upper half of the pair holding the 2nd E-code slot,
// FILL words (0xC000, bit 16) must complete odd pairs, and BND_OK must be low
// exactly on lower-half writes.
module tb_in_unit;
  logic clk = 0, rst;
  logic [15:0] rxdata;
  logic [1:0]  rxcharisk;
  logic rxdv, rxerr, fwen, bnd_ok, rxerr_seen, filled, dav;
  logic [17:0] fdin;
  logic [17:0] expq[$];
  int checks = 0, failures = 0, nwr = 0, n_last = 0, n_fill = 0;

  in_unit dut (.clk, .rst, .rxdata, .rxcharisk, .rxdv, .rxerr, .fwen, .fdin, .bnd_ok,
               .rxerr_seen, .filled, .dav);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("FAIL: %s", msg); end
  endtask

  // monitor FIFO writes
  always @(posedge clk) if (!rst && fwen) begin
    chk(expq.size() > 0, $sformatf("unexpected write %h", fdin));
    if (expq.size() > 0) begin
      logic [17:0] e;
      e = expq.pop_front();
      chk(fdin == e, $sformatf("write %0d: got %h exp %h", nwr, fdin, e));
    end
    chk(bnd_ok == (nwr % 2 == 1), "bnd_ok");
    if (fdin[17]) n_last++;
    if (fdin[16]) n_fill++;
    nwr++;
  end

  task automatic send(input logic [15:0] w);
    @(negedge clk); rxdata = w; rxcharisk = 2'b00; rxdv = 1; rxerr = 0;
  endtask
  task automatic send_err();
    @(negedge clk); rxdata = 16'h1234; rxcharisk = 2'b00; rxdv = 1; rxerr = 1;
  endtask
  task automatic idle(input int n);
    repeat (n) begin @(negedge clk); rxdata = 16'hBC50; rxcharisk = 2'b10; rxdv = 1; rxerr = 0; end
  endtask
  function automatic logic [17:0] h(input logic [15:0] w, input logic last = 0);
    return {last, 1'b0, w};
  endfunction
  localparam logic [17:0] FILLW = {2'b01, 16'hC000};

  // event body: 6 data words + 4 F-codes, all sent and expected
  task automatic body(input logic [15:0] base);
    for (int i = 0; i < 6; i++) begin send(16'h1000 + base + 16'(i)); expq.push_back(h(16'h1000 + base + 16'(i))); end
    for (int i = 0; i < 4; i++) begin send(16'hF000 + base + 16'(i)); expq.push_back(h(16'hF000 + base + 16'(i))); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; rxdata = 0; rxcharisk = 0; rxdv = 0; rxerr = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    idle(3);
    // A: normal
    body(16'h10);
    send(16'hE001); send(16'hE002); send(16'hE003); send(16'hE004);
    expq.push_back(h(16'hE001)); expq.push_back(h(16'hE002, 1));
    expq.push_back(h(16'hE003)); expq.push_back(h(16'hE004));
    idle(6);
    // B: first E-word lost
    body(16'h20);
    send(16'hE002); send(16'hE003); send(16'hE004);
    expq.push_back(h(16'hE002)); expq.push_back(h(16'hE003, 1));
    expq.push_back(h(16'hE004)); expq.push_back(FILLW);
    idle(6);
    // C: second E-word lost
    body(16'h30);
    send(16'hE001); send(16'hE003); send(16'hE004);
    expq.push_back(h(16'hE001)); expq.push_back(h(16'hE003, 1));
    expq.push_back(h(16'hE004)); expq.push_back(FILLW);
    idle(6);
    // D: first E-code corrupted
    body(16'h40);
    send(16'h6001); send(16'hE002); send(16'hE003); send(16'hE004);
    expq.push_back(h(16'h6001)); expq.push_back(h(16'hE002, 1));
    expq.push_back(h(16'hE003)); expq.push_back(h(16'hE004));
    idle(6);
    // E: second E-code corrupted
    body(16'h50);
    send(16'hE001); send(16'hA002); send(16'hE003); send(16'hE004);
    expq.push_back(h(16'hE001)); expq.push_back(h(16'hA002, 1));
    expq.push_back(h(16'hE003)); expq.push_back(h(16'hE004));
    idle(6);
    // F: RX errors (one between pairs, one splitting a pair -> FILL) and an idle gap
    expq.push_back(h(16'h2001)); expq.push_back(h(16'h2002));
    expq.push_back(h(16'h2003)); expq.push_back(FILLW);
    expq.push_back(h(16'h2004)); expq.push_back(FILLW);
    send(16'h2001); send(16'h2002); send_err(); send(16'h2003); send_err(); send(16'h2004);
    idle(1);
    send(16'hE001); send(16'hE002); send(16'hE003); send(16'hE004);
    expq.push_back(h(16'hE001)); expq.push_back(h(16'hE002, 1));
    expq.push_back(h(16'hE003)); expq.push_back(h(16'hE004));
    idle(8);
    chk(expq.size() == 0, $sformatf("%0d expected writes missing", expq.size()));
    chk(rxerr_seen, "rxerr_seen not set");
    chk(filled, "filled not set");
    chk(n_last == 6, $sformatf("LAST count %0d", n_last));
    $display("writes=%0d last=%0d fill=%0d", nwr, n_last, n_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
