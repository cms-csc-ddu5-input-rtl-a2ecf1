// One half of the input controller: four fibers, their FIFO pool and the
// read controller that merges them.
//
//   4 x in_unit ----> NFIFO x fifo_slot (write muxes + 18/36 FIFOs) ----> rd_ctrl --> ODATA
//                  ^ mem_ctrl assigns FIFOs to fibers (ASF/ASF_ADR, FNEXT)   |
//                  +------------------ REL (emptied FIFO) -------------------+
//
// Each input unit writes 18-bit words to whichever FIFO the memory controller
// has assigned to its fiber; when that FIFO is almost full the fiber is moved
// to a fresh one at a pair boundary, so one fiber's data may span several
// FIFOs. The read controller follows each fiber's FIFO list in order and
// releases FIFOs it has emptied. Per-fiber status: RX error seen, FILL added,
// start/end timeouts, head FIFO empty and current FIFO full.
// Latency from a word on the fiber to the output is a few clocks plus the
// wait for the event's turn; see in_unit and rd_ctrl.
module in_half #(
  parameter int unsigned NFIFO     = 22,
  parameter int unsigned DEPTH18   = 1024,
  parameter int unsigned AF_MARGIN = 120,
  parameter int unsigned START_TO  = 128,
  parameter int unsigned CAL_TO    = 256,
  parameter int unsigned DONE_TO   = 18945,
  parameter int unsigned L1A_DEPTH = 8192,
  parameter int unsigned L1A_AF    = 7680
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0][15:0] rxdata,
  input  logic [3:0][1:0]  rxcharisk,
  input  logic [3:0]       rxdv,
  input  logic [3:0]       rxerr,
  input  logic [3:0]       fok,
  input  logic             l1a,
  input  logic             cal_mode,
  input  logic             ext_paf,
  output logic             owen,
  output logic [35:0]      odata,
  output logic             evt_done,
  output logic [23:0]      l1a_num,
  output logic [23:0]      l1a_cnt,
  output logic [3:0]       rxerr_seen,
  output logic [3:0]       filled,
  output logic [3:0]       dav,
  output logic [3:0]       to_start,
  output logic [3:0]       to_endwait,
  output logic [3:0]       to_endact,
  output logic [3:0]       fib_empty,
  output logic [3:0]       fib_full,
  output logic             l1a_empty,
  output logic             l1a_af,
  output logic             l1a_full,
  output logic [4:0]       nfree,
  output logic [4:0]       minfree,
  output logic [3:0][4:0]  nchain
);
  logic [3:0]             fwen, bnd_ok, fnext, cur_v;
  logic [3:0][17:0]       fdin;
  logic [3:0][4:0]        head, cur;
  logic                   asf, rel;
  logic [4:0]             asf_adr;
  logic [1:0]             asf_fiber, rel_fiber;
  logic [NFIFO-1:0]       f_empty, f_af, f_full, f_ren, f_active;
  logic [NFIFO-1:0][35:0] f_dout;

  for (genvar f = 0; f < 4; f++) begin : g_in
    in_unit u_in (
      .clk, .rst, .rxdata(rxdata[f]), .rxcharisk(rxcharisk[f]), .rxdv(rxdv[f]), .rxerr(rxerr[f]),
      .fwen(fwen[f]), .fdin(fdin[f]), .bnd_ok(bnd_ok[f]), .rxerr_seen(rxerr_seen[f]),
      .filled(filled[f]), .dav(dav[f]));
  end

  mem_ctrl #(.NFIFO(NFIFO)) u_mem (
    .clk, .rst, .bnd_ok, .fifo_af(f_af), .rel, .rel_fiber, .asf, .asf_adr, .asf_fiber,
    .fnext, .cur_v, .cur, .head, .nchain, .nfree, .minfree);

  for (genvar i = 0; i < NFIFO; i++) begin : g_fifo
    fifo_slot #(.FAD(i), .DEPTH18(DEPTH18), .AF_MARGIN(AF_MARGIN)) u_slot (
      .clk, .rst, .asf, .asf_adr, .asf_fiber, .fnext, .fwen, .fdin, .ren(f_ren[i]),
      .dout(f_dout[i]), .empty(f_empty[i]), .af(f_af[i]), .full(f_full[i]), .active(f_active[i]));
  end

  rd_ctrl #(.NFIFO(NFIFO), .START_TO(START_TO), .CAL_TO(CAL_TO), .DONE_TO(DONE_TO),
            .L1A_DEPTH(L1A_DEPTH), .L1A_AF(L1A_AF)) u_rd (
    .clk, .rst, .l1a, .cal_mode, .fok, .ext_paf, .head, .nchain, .fifo_dout(f_dout),
    .fifo_empty(f_empty), .fifo_ren(f_ren), .rel, .rel_fiber, .owen, .odata, .evt_done,
    .l1a_num, .l1a_cnt, .to_start, .to_endwait, .to_endact, .l1a_af, .l1a_full, .l1a_empty);

  always_comb
    for (int f = 0; f < 4; f++) begin
      fib_empty[f] = (nchain[f] == '0) || f_empty[head[f]];
      fib_full[f]  = cur_v[f] && f_full[cur[f]];
    end

  // Words are only ever written into an active FIFO owned by one fiber.
  a_one_owner: assert property (@(posedge clk) disable iff (rst)
    asf |-> !f_active[asf_adr]);

endmodule
