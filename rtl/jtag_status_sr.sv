// JTAG status readout register.
//
// A WIDTH-bit register clocked by the JTAG data-register clock DRCLK and
// enabled by CLKENA = DVCENB AND SEL2 (the user instruction is selected and
// the device is addressed). With LSHFT low the register captures STATUS in
// parallel; with LSHFT high it shifts one place toward bit 0 per enabled
// clock, TDI entering at the top. TDO is bit 0, so STATUS bit 0 comes out
// first. RST clears the register asynchronously.
// The enable gating and the capture/shift select follow the source design;
// the shift direction is this design's choice.
module jtag_status_sr #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             drclk,
  input  logic             rst,
  input  logic             dvcenb,
  input  logic             sel2,
  input  logic             lshft,
  input  logic             tdi,
  input  logic [WIDTH-1:0] status,
  output logic             tdo
);
  logic [WIDTH-1:0] sr;
  logic clkena, nshft;

  assign clkena = dvcenb & sel2;
  assign nshft  = ~lshft;

  always_ff @(posedge drclk or posedge rst) begin
    if (rst)         sr <= '0;
    else if (clkena) sr <= nshft ? status : {tdi, sr[WIDTH-1:1]};
  end

  assign tdo = sr[0];
endmodule
