// mux2: 2:1 multiplexer of width W.
//
// The datapath uses one for each selection made by the controller: write
// register (RegDst), ALU B operand (ALUSrc), register write data (MemtoReg),
// branch address and jump address. sel = 0 passes d0, sel = 1 passes d1.
// Purely combinational.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);
  assign y = sel ? d1 : d0;
endmodule
