// mac_unit: multiplier-accumulator of the DSP core.
//
// Multiplies its two 32-bit operands with the carry-lookahead multiplier
// and, for MACC, adds the product to a 32-bit accumulator register with a
// carry-lookahead adder. The result is available combinationally in the same
// cycle, so MUL, MULI and MACC each take one instruction cycle:
//   en=1, accumulate=0 : y = a*b,        acc <= a*b
//   en=1, accumulate=1 : y = acc + a*b,  acc <= acc + a*b
//   en=0               : y = a*b,        acc unchanged
// The accumulator is written on the rising edge and cleared by synchronous
// reset. Loading the accumulator on a plain MUL (so that a MACC chain starts
// with a MUL) and the 32-bit accumulator width are this design's choices.
module mac_unit #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         en,
  input  logic         accumulate,
  output logic [W-1:0] y,
  output logic [W-1:0] acc
);
  logic [W-1:0] prod, sum;
  logic         unused_cout;

  cla_multiplier #(.W(W)) u_mul (.a(a), .b(b), .p(prod));
  cla_adder      #(.W(W)) u_acc (.a(acc), .b(prod), .cin(1'b0), .s(sum), .cout(unused_cout));

  assign y = accumulate ? sum : prod;

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= y;
  end
endmodule
