// sign_extend: widens a two's-complement field by copying its top bit.
//
// Used for the 16-bit immediate of I-type instructions, which becomes a
// 32-bit ALU operand and, shifted left by two, a branch displacement.
// Purely combinational.
module sign_extend #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);
  assign out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};
endmodule
