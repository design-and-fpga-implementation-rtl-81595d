// cla_adder: W-bit carry-lookahead adder built from 4-bit lookahead groups.
//
// Each bit forms generate g = a&b and propagate p = a^b. Inside a 4-bit group
// every carry is computed directly from the group's g/p and its carry-in
// (two-level lookahead equations, no ripple); the groups pass a carry to the
// next group through the group generate/propagate terms
// G = g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0, P = p3 p2 p1 p0, cout = G | P cin.
// The sum bit is p ^ carry. W must be a multiple of 4.
// The MAC unit's multiplier and accumulator use this adder; the group size
// is this design's choice. Purely combinational.
module cla_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NG = W / 4;

  logic [W-1:0] g, p, c;
  logic [NG:0]  gc;   // carry into each group

  assign g = a & b;
  assign p = a ^ b;
  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    logic [3:0] gg, pp;
    logic       ci;
    assign gg = g[4*k +: 4];
    assign pp = p[4*k +: 4];
    assign ci = gc[k];
    // carries into bits 0..3 of the group
    assign c[4*k+0] = ci;
    assign c[4*k+1] = gg[0] | (pp[0] & ci);
    assign c[4*k+2] = gg[1] | (pp[1] & gg[0]) | (pp[1] & pp[0] & ci);
    assign c[4*k+3] = gg[2] | (pp[2] & gg[1]) | (pp[2] & pp[1] & gg[0])
                    | (pp[2] & pp[1] & pp[0] & ci);
    // group generate / propagate and carry out
    assign gc[k+1] = gg[3] | (pp[3] & gg[2]) | (pp[3] & pp[2] & gg[1])
                   | (pp[3] & pp[2] & pp[1] & gg[0])
                   | (pp[3] & pp[2] & pp[1] & pp[0] & ci);
  end

  assign s    = p ^ c;
  assign cout = gc[NG];

  initial begin
    assert (W % 4 == 0) else $error("cla_adder: W must be a multiple of 4");
  end
endmodule
