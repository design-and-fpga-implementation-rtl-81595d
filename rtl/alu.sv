// alu: arithmetic and logic unit of the DSP core.
//
// Performs the non-multiply operations of the instruction set on two 32-bit
// operands: addition (ADD, ADDI, LOAD/STORE address), subtraction (SUB, SUBI,
// the JMPE equality test), signed division (DIV), and pass-through of A (MOV)
// or B (MOVI). Multiplications are done by the separate MAC unit; for those
// operation codes the ALU output is zero.
//   zero  : result is all zeros (for the JMPE compare: rs == rt).
//   carry : carry out of the addition, or borrow of the subtraction
//           (a < b unsigned); 0 for the other operations. The core keeps it
//           in a flag register that JMPC tests.
// Division truncates toward zero; division by zero gives all ones and the
// overflow case -2^31 / -1 gives -2^31. The carry/borrow definition and the
// division corner cases are this design's choices. Purely combinational.
module alu
  import dsp_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  output word_t   y,
  output logic    zero,
  output logic    carry
);
  logic [XLEN:0] sum, diff;

  always_comb begin
    sum   = {1'b0, a} + {1'b0, b};
    diff  = {1'b0, a} - {1'b0, b};
    y     = '0;
    carry = 1'b0;
    unique case (op)
      ALU_ADD:    begin y = sum[XLEN-1:0];  carry = sum[XLEN];  end
      ALU_SUB:    begin y = diff[XLEN-1:0]; carry = diff[XLEN]; end
      ALU_PASS_A: y = a;
      ALU_PASS_B: y = b;
      ALU_DIV: begin
        if (b == '0)
          y = '1;
        else if (a == {1'b1, {(XLEN-1){1'b0}}} && b == '1)
          y = a;
        else
          y = word_t'($signed(a) / $signed(b));
      end
      default:    y = '0;   // ALU_MUL / ALU_MACC are handled by the MAC
    endcase
    zero = (y == '0);
  end
endmodule
