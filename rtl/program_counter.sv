// program_counter: the 32-bit program counter register of the DSP core.
//
// The core is single-cycle, so the PC simply takes the next-address value
// chosen by the datapath (PC+4, branch target or jump target) on every rising
// clock edge. Synchronous active-high reset returns it to address 0, where
// the program starts. Instructions are 4 bytes long, so the PC advances by 4.
// The register width follows the 32-bit address bus; reset value and reset
// style are this design's choice.
module program_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,      // synchronous, active high
  input  logic [W-1:0] pc_next,  // next address from the next-PC mux
  output logic [W-1:0] pc
);
  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end
endmodule
