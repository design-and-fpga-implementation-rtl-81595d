// alu_control: second-level decoder that selects the ALU / MAC operation.
//
// The main controller gives a two-bit ALUOp:
//   00  add           (LOAD, STORE address)
//   01  subtract      (JMPE compare)
//   10  R-type        (operation from the funct field)
//   11  immediate     (operation from the opcode: ADDI, SUBI, MULI, MOVI)
// together with Multen, which forces a multiply for MULI. The outputs are the
// operation, whether the MAC result (rather than the ALU result) is written
// back, whether the MAC accumulator is updated and whether it accumulates,
// and whether the carry flag
// register is updated (only ADD/ADDI/SUB/SUBI change it).
// The two-level decode with a 2-bit ALUOp follows the datapath; the meaning
// of code 11 and of the function codes are this design's choices.
// Purely combinational.
module alu_control
  import dsp_pkg::*;
(
  input  aluop_e     aluop,
  input  logic [5:0] funct,
  input  logic [5:0] opcode,
  input  logic       multen,
  output alu_op_e    op,
  output logic       mac_sel,   // write back the MAC result
  output logic       mac_en,    // MAC accumulator loads this cycle
  output logic       mac_acc,   // MAC adds the product to the accumulator
  output logic       flag_we    // carry flag loads this cycle
);
  always_comb begin
    op = ALU_ADD;
    unique case (aluop)
      ALUOP_ADD: op = ALU_ADD;
      ALUOP_SUB: op = ALU_SUB;
      ALUOP_FUNCT: begin
        unique case (funct)
          FN_ADD:  op = ALU_ADD;
          FN_SUB:  op = ALU_SUB;
          FN_MOV:  op = ALU_PASS_A;
          FN_MUL:  op = ALU_MUL;
          FN_DIV:  op = ALU_DIV;
          FN_MACC: op = ALU_MACC;
          default: op = ALU_ADD;
        endcase
      end
      ALUOP_IMM: begin
        unique case (opcode)
          OP_ADDI: op = ALU_ADD;
          OP_SUBI: op = ALU_SUB;
          OP_MULI: op = ALU_MUL;
          OP_MOVI: op = ALU_PASS_B;
          default: op = ALU_ADD;
        endcase
      end
      default: op = ALU_ADD;
    endcase
    if (multen) op = ALU_MUL;

    mac_sel = (op == ALU_MUL) || (op == ALU_MACC);
    mac_en  = mac_sel;
    mac_acc = (op == ALU_MACC);
    // address arithmetic (00) and the JMPE compare (01) leave the flag alone
    flag_we = ((aluop == ALUOP_FUNCT) || (aluop == ALUOP_IMM)) &&
              ((op == ALU_ADD) || (op == ALU_SUB));
  end
endmodule
