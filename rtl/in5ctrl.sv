// DDU input controller top: eight DMB fiber inputs, buffered and merged into
// two output streams for the DDU's external FIFOs.
//
// Fibers 0-3 feed half 0 and fibers 4-7 half 1 (in_half). In each half the
// input units clean and pair the received words and mark event ends, the
// memory controller lends FIFOs from a pool of 22 to the fibers, and the read
// controller copies, for every L1A, each fiber's event in fiber order to
// OUT0/OUT1 (36-bit words, OWEN strobes), stopping while the external FIFO
// signals almost full (EXT_PAF).
//
// Around the halves: the raw reset request RRR is stretched by 16 clocks
// (reset_stretch); a bunch-crossing counter runs 0..923 (bxn_counter); each
// fiber drives a link LED and a data LED (fiber_led); the JTAG user
// instruction JTAG_OP selects a status value (jtag_instr_decode) that the
// JTAG user register captures and shifts out on TDO (jtag_status_sr); opcode
// 1 resets the FPGA through the reset stretcher, like RRR. Status bits:
//   0 any start timeout      1 any end-wait timeout   2 any end-active timeout
//   3 an L1A FIFO almost full 4 an L1A FIFO full       5 a FIFO pool exhausted
//   6 a present fiber not OK  7 an external FIFO almost full
//   8 a fiber-OK bit changed since reset
//  11 an RX error word was dropped   30 a FILL word was added   31 DLL error
// Bits 11, 30 and 31 are placed as in the source design; the others are
// this design's. The ready lists follow the source design's bit lists:
//   NRDY[7:0] fiber has nothing to read, NRDY[8]/[9] L1A FIFO 0/1 empty;
//   FAF[0]/[1] pool 0/1 has at most one free FIFO, FAF[2]/[3] L1A FIFO 0/1
//   almost full, FAF[4]/[5] external FIFO 0/1 almost full;
//   FF[7:0] fiber's current FIFO full, FF[8]/[9] L1A FIFO 0/1 full,
//   FF[10]/[11] external FIFO 0/1 full.
// One clock domain; all outputs registered or derived from registers.
module in5ctrl #(
  parameter int unsigned NFIFO     = 22,
  parameter int unsigned DEPTH18   = 1024,
  parameter int unsigned AF_MARGIN = 120,
  parameter int unsigned START_TO  = 128,
  parameter int unsigned CAL_TO    = 256,
  parameter int unsigned DONE_TO   = 18945,
  parameter int unsigned L1A_DEPTH = 8192,
  parameter int unsigned L1A_AF    = 7680,
  parameter int unsigned RST_HOLD  = 16,
  parameter int unsigned BXN_MAX   = 923,
  parameter int unsigned LED_SLOW_DIV   = 16,
  parameter int unsigned LED_BCLK_BITS  = 16,
  parameter int unsigned LED_BLINK_BITS = 4
) (
  input  logic             clk,
  input  logic             rrr,
  // fiber receivers
  input  logic [7:0][15:0] rxdata,
  input  logic [7:0][1:0]  rxcharisk,
  input  logic [7:0]       rxdv,
  input  logic [7:0]       rxerr,
  input  logic [7:0]       present,
  input  logic [7:0]       fok,
  // trigger and control
  input  logic             l1a,
  input  logic             cal_mode,
  input  logic             bc0,
  input  logic             dllerr,
  // external FIFOs
  input  logic [1:0]       ext_paf,
  input  logic [1:0]       ext_ff,
  output logic [1:0]       owen,
  output logic [35:0]      out0,
  output logic [35:0]      out1,
  output logic [1:0]       evt_done,
  output logic [23:0]      l1a_num0,
  output logic [23:0]      l1a_num1,
  // status
  output logic [31:0]      status,
  output logic [9:0]       nrdy,
  output logic [5:0]       faf,
  output logic [11:0]      ff,
  output logic [7:0]       to_start,
  output logic [7:0]       to_endwait,
  output logic [7:0]       to_endact,
  output logic [7:0]       rxerr_seen,
  output logic [9:0]       nfree,
  output logic [9:0]       minfree,
  output logic [11:0]      bxn,
  output logic [7:0]       fok_led,
  output logic [7:0]       dav_led,
  // JTAG user register
  input  logic             dvcenb,
  input  logic             sel2,
  input  logic             lshft,
  input  logic [4:0]       jtag_op,
  input  logic             tdi,
  output logic             tdo
);
  logic rst;
  logic [7:0] filled, dav, fib_empty, fib_full;
  logic [1:0] l1a_empty, l1a_af, l1a_full;
  logic [1:0][23:0] l1a_cnt;
  logic [1:0][35:0] odata;
  logic [1:0][23:0] l1a_num;
  logic [1:0][4:0] nfree_h, minfree_h;
  logic [1:0][3:0][4:0] nchain_h;  // JTAG reads fibers 2-0 of half 0 only

  logic jtag_rst_req;
  logic [31:0] jtag_data;

  reset_stretch #(.HOLD(RST_HOLD)) u_rst (.clk, .rrr(rrr | jtag_rst_req), .rst);

  for (genvar h = 0; h < 2; h++) begin : g_half
    in_half #(.NFIFO(NFIFO), .DEPTH18(DEPTH18), .AF_MARGIN(AF_MARGIN), .START_TO(START_TO),
              .CAL_TO(CAL_TO), .DONE_TO(DONE_TO), .L1A_DEPTH(L1A_DEPTH), .L1A_AF(L1A_AF)) u_half (
      .clk, .rst,
      .rxdata(rxdata[h*4 +: 4]), .rxcharisk(rxcharisk[h*4 +: 4]), .rxdv(rxdv[h*4 +: 4]),
      .rxerr(rxerr[h*4 +: 4]), .fok(fok[h*4 +: 4]), .l1a, .cal_mode, .ext_paf(ext_paf[h]),
      .owen(owen[h]), .odata(odata[h]), .evt_done(evt_done[h]), .l1a_num(l1a_num[h]),
      .l1a_cnt(l1a_cnt[h]),
      .rxerr_seen(rxerr_seen[h*4 +: 4]), .filled(filled[h*4 +: 4]), .dav(dav[h*4 +: 4]),
      .to_start(to_start[h*4 +: 4]), .to_endwait(to_endwait[h*4 +: 4]),
      .to_endact(to_endact[h*4 +: 4]), .fib_empty(fib_empty[h*4 +: 4]),
      .fib_full(fib_full[h*4 +: 4]), .l1a_empty(l1a_empty[h]), .l1a_af(l1a_af[h]),
      .l1a_full(l1a_full[h]), .nfree(nfree_h[h]), .minfree(minfree_h[h]), .nchain(nchain_h[h]));
  end

  assign out0     = odata[0];
  assign out1     = odata[1];
  assign l1a_num0 = l1a_num[0];
  assign l1a_num1 = l1a_num[1];
  assign nfree    = {nfree_h[1], nfree_h[0]};
  assign minfree  = {minfree_h[1], minfree_h[0]};

  bxn_counter #(.BXN_MAX(BXN_MAX)) u_bxn (.clk, .rst, .bc0, .bxn);

  for (genvar f = 0; f < 8; f++) begin : g_led
    fiber_led #(.SLOW_DIV(LED_SLOW_DIV), .BCLK_BITS(LED_BCLK_BITS), .BLINK_BITS(LED_BLINK_BITS)) u_led (
      .clk, .rst, .present(present[f]), .ready(fok[f]), .dav(dav[f]),
      .fok_led(fok_led[f]), .dav_led(dav_led[f]));
  end

  // A change of any fiber-OK bit after reset is an error that stays until
  // the next reset.
  logic [7:0] fok_q;
  logic       fok_chg;
  always_ff @(posedge clk) begin
    fok_q <= fok;
    if (rst)                fok_chg <= 1'b0;
    else if (fok != fok_q)  fok_chg <= 1'b1;
  end

  always_comb begin
    status     = '0;
    status[0]  = |to_start;
    status[1]  = |to_endwait;
    status[2]  = |to_endact;
    status[3]  = |l1a_af;
    status[4]  = |l1a_full;
    status[5]  = (nfree_h[0] == '0) || (nfree_h[1] == '0);
    status[6]  = |(present & ~fok);
    status[7]  = |ext_paf;
    status[8]  = fok_chg;
    status[11] = |rxerr_seen;
    status[30] = |filled;
    status[31] = dllerr;
  end

  assign nrdy = {l1a_empty, fib_empty};
  assign faf  = {ext_paf, l1a_af, nfree_h[1] <= 5'd1, nfree_h[0] <= 5'd1};
  assign ff   = {ext_ff, l1a_full, fib_full};

  jtag_instr_decode u_jdec (
    .op(jtag_op), .dvcenb, .sel2, .l1a_num0, .l1a_num1, .status, .fok, .rxerr_seen, .to_start,
    .to_endwait, .to_endact, .minfree, .faf, .ff, .nrdy, .nmem(nchain_h[0][2:0]), .data(jtag_data), .width(),
    .rst_req(jtag_rst_req));

  jtag_status_sr #(.WIDTH(32)) u_jtag (
    .drclk(clk), .rst, .dvcenb, .sel2, .lshft, .tdi, .status(jtag_data), .tdo);

endmodule
