// reg_file: 32 x 32-bit general-purpose register file of the DSP core.
//
// Two combinational read ports (rs and rt fields) and one synchronous write
// port (rd or rt, chosen by RegDst) written on the rising edge when regwrite
// is high. All 32 registers are ordinary storage: register 0 is not tied to
// zero, since programs keep operands in it. Synchronous reset clears every
// register. The full register contents are also brought out so that a host
// (or a board's LEDs) can observe results. Reset behaviour and the
// observation port are this design's choices.
module reg_file
  import dsp_pkg::*;
#(
  parameter int unsigned N = NREGS,
  parameter int unsigned W = XLEN
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [$clog2(N)-1:0] ra1,
  input  logic [$clog2(N)-1:0] ra2,
  output logic [W-1:0]         rd1,
  output logic [W-1:0]         rd2,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wa,
  input  logic [W-1:0]         wd,
  output logic [N-1:0][W-1:0]  regs     // observation of every register
);
  logic [N-1:0][W-1:0] r;

  always_ff @(posedge clk) begin
    if (rst)     r <= '0;
    else if (we) r[wa] <= wd;
  end

  assign rd1  = r[ra1];
  assign rd2  = r[ra2];
  assign regs = r;
endmodule
