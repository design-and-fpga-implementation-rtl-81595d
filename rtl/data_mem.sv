// data_mem: 32-bit wide data memory of the DSP core (LOAD / STORE).
//
// Addressed by the byte address computed by the ALU (rs + offset); the two
// low bits are ignored, so accesses are whole aligned words, and the next
// $clog2(WORDS) bits select the word. A STORE writes on the rising clock edge
// when memwrite is high; a LOAD reads combinationally, in the same cycle, when
// memread is high (the output is 0 otherwise). The memory is not reset.
// The word organisation, the depth and the read gating are this design's
// choices; the 32-bit width follows the document.
module data_mem #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic        memwrite,
  input  logic        memread,
  output logic [31:0] rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (memwrite) mem[idx] <= wdata;
  end

  assign rdata = memread ? mem[idx] : '0;
endmodule
