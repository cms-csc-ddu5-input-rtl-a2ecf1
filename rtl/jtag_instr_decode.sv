// JTAG user-instruction decode for the status readout.
//
// The 5-bit opcode held in the JTAG user instruction selects which status
// value the JTAG readout register captures (DATA, zero-extended to 32 bits)
// and how many bits of it are meaningful (WIDTH). Opcode 1 asks for an FPGA
// reset (RST_REQ, while the device is addressed with DVCENB and SEL2).
//   0  no operation                       13 start timeouts [8]
//   1  FPGA reset                         14 end-wait timeouts [8]
//   2  read controller 0 L1A number [24]  15 end-active timeouts [8]
//   3  status word [32]                   17 RX errors [8]
//   4  status bits 15:0 [16]              18 minimum free FIFOs, pool 1 & 0 [10]
//   5  status bits 31:16 [16]             20 almost-full list [6]
//   6  fiber error summary [8]            21 full list [12]
//   7  fiber OK [8]                       25 not-ready (empty) list [10]
//                                         26 read controller 1 L1A number [24]
//                                         28 FIFOs held by fibers 2-0 [16]
// Other opcodes read zero with WIDTH 0. The opcode numbers and widths follow
// the source design's instruction list; where that list gives one number two
// meanings, the meaning this design can supply is used. The fiber error
// summary (any RX error or timeout per fiber) is this design's definition.
// Purely combinational.
module jtag_instr_decode (
  input  logic [4:0]  op,
  input  logic        dvcenb,
  input  logic        sel2,
  input  logic [23:0] l1a_num0,
  input  logic [23:0] l1a_num1,
  input  logic [31:0] status,
  input  logic [7:0]  fok,
  input  logic [7:0]  rxerr_seen,
  input  logic [7:0]  to_start,
  input  logic [7:0]  to_endwait,
  input  logic [7:0]  to_endact,
  input  logic [9:0]  minfree,
  input  logic [5:0]  faf,
  input  logic [11:0] ff,
  input  logic [9:0]  nrdy,
  input  logic [2:0][4:0] nmem,
  output logic [31:0] data,
  output logic [5:0]  width,
  output logic        rst_req
);
  always_comb begin
    data  = '0;
    width = '0;
    unique case (op)
      5'd2:  begin data = 32'(l1a_num0);   width = 6'd24; end
      5'd3:  begin data = status;          width = 6'd32; end
      5'd4:  begin data = 32'(status[15:0]);  width = 6'd16; end
      5'd5:  begin data = 32'(status[31:16]); width = 6'd16; end
      5'd6:  begin data = 32'(8'(rxerr_seen | to_start | to_endwait | to_endact)); width = 6'd8; end
      5'd7:  begin data = 32'(fok);        width = 6'd8; end
      5'd13: begin data = 32'(to_start);   width = 6'd8; end
      5'd14: begin data = 32'(to_endwait); width = 6'd8; end
      5'd15: begin data = 32'(to_endact);  width = 6'd8; end
      5'd17: begin data = 32'(rxerr_seen); width = 6'd8; end
      5'd18: begin data = 32'(minfree);    width = 6'd10; end
      5'd20: begin data = 32'(faf);        width = 6'd6; end
      5'd21: begin data = 32'(ff);         width = 6'd12; end
      5'd25: begin data = 32'(nrdy);       width = 6'd10; end
      5'd26: begin data = 32'(l1a_num1);   width = 6'd24; end
      5'd28: begin data = 32'(nmem);       width = 6'd16; end
      default: ;
    endcase
  end

  assign rst_req = (op == 5'd1) && dvcenb && sel2;
endmodule
