// cla_multiplier: W x W -> W-bit array multiplier whose rows are summed by
// carry-lookahead adders.
//
// Partial product i is the multiplicand shifted left by i and gated by bit i
// of the multiplier. The partial products are added one row at a time, each
// row by a W-bit cla_adder, so the array has W-1 adder rows. Only the low W
// bits of the product are kept, which is the same for signed and unsigned
// operands, matching the 32-bit registers the result is written to.
// The document names a carry-lookahead multiplier; the row-by-row array
// organisation and the truncation to W bits are this design's choices.
// Purely combinational.
module cla_multiplier #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p
);
  logic [W-1:0] acc [W];   // running sum after row i

  assign acc[0] = b[0] ? a : '0;

  for (genvar i = 1; i < W; i++) begin : g_row
    logic [W-1:0] pp;
    logic         unused_cout;
    assign pp = b[i] ? (a << i) : '0;
    cla_adder #(.W(W)) u_add (
      .a(acc[i-1]), .b(pp), .cin(1'b0), .s(acc[i]), .cout(unused_cout)
    );
  end

  assign p = acc[W-1];
endmodule
