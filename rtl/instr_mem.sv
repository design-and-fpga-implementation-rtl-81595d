// instr_mem: byte-wide program memory with a 32-bit instruction read port.
//
// The program store is organised as 8-bit locations. A fetch at byte address
// A returns the four bytes A..A+3 assembled big-endian, so the opcode sits in
// the byte at A. Only the low $clog2(BYTES) address bits are used, which with
// the default 256 bytes gives the 8-bit program address space. The read is
// combinational, as required by the single-cycle core.
// A byte-wide synchronous write port loads the program before the core is
// released from reset. The byte ordering and the load port are this
// design's choices.
module instr_mem #(
  parameter int unsigned BYTES = 256
) (
  input  logic                     clk,
  // program load port
  input  logic                     we,
  input  logic [$clog2(BYTES)-1:0] waddr,
  input  logic [7:0]               wdata,
  // fetch port
  input  logic [31:0]              addr,   // byte address (the PC)
  output logic [31:0]              instr
);
  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  logic [AW-1:0] a0, a1, a2, a3;
  always_comb begin
    a0 = addr[AW-1:0];
    a1 = a0 + AW'(1);
    a2 = a0 + AW'(2);
    a3 = a0 + AW'(3);
    instr = {mem[a0], mem[a1], mem[a2], mem[a3]};
  end
endmodule
