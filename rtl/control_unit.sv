// control_unit: main controller of the single-cycle DSP core.
//
// A purely combinational decoder from the 6-bit opcode (instruction bits
// 31..26) to the datapath control word:
//   op      regdst alusrc memtoreg regwrite memread memwrite branch branch_c jump multen aluop
//   RTYPE     1      0      0        1        0       0        0      0       0     0     10
//   ADDI      0      1      0        1        0       0        0      0       0     0     11
//   SUBI      0      1      0        1        0       0        0      0       0     0     11
//   MULI      0      1      0        1        0       0        0      0       0     1     11
//   MOVI      0      1      0        1        0       0        0      0       0     0     11
//   LOAD      0      1      1        1        1       0        0      0       0     0     00
//   STORE     0      1      0        0        0       1        0      0       0     0     00
//   JMPE      0      0      0        0        0       0        1      0       0     0     01
//   JMPC      0      0      0        0        0       0        0      1       0     0     00
//   JMP       0      0      0        0        0       0        0      0       1     0     00
// An unknown opcode writes nothing and does not branch (a no-operation).
// Each instruction completes in one clock cycle. The set of signals follows
// the document; the opcode values and the no-operation default are this
// design's choices.
module control_unit
  import dsp_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{default: '0, aluop: ALUOP_ADD};
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.regdst = 1'b1; ctrl.regwrite = 1'b1; ctrl.aluop = ALUOP_FUNCT;
      end
      OP_ADDI, OP_SUBI, OP_MOVI: begin
        ctrl.alusrc = 1'b1; ctrl.regwrite = 1'b1; ctrl.aluop = ALUOP_IMM;
      end
      OP_MULI: begin
        ctrl.alusrc = 1'b1; ctrl.regwrite = 1'b1; ctrl.multen = 1'b1;
        ctrl.aluop  = ALUOP_IMM;
      end
      OP_LOAD: begin
        ctrl.alusrc = 1'b1; ctrl.memtoreg = 1'b1; ctrl.regwrite = 1'b1;
        ctrl.memread = 1'b1; ctrl.aluop = ALUOP_ADD;
      end
      OP_STORE: begin
        ctrl.alusrc = 1'b1; ctrl.memwrite = 1'b1; ctrl.aluop = ALUOP_ADD;
      end
      OP_JMPE: begin
        ctrl.branch = 1'b1; ctrl.aluop = ALUOP_SUB;
      end
      OP_JMPC: ctrl.branch_c = 1'b1;
      OP_JMP:  ctrl.jump = 1'b1;
      default: ;
    endcase
  end
endmodule
