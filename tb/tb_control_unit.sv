// tb_control_unit: checks the control word for every opcode of the
// instruction set against the decode table, and that all other opcodes
// decode to a no-operation (no register or memory write, no branch).
module tb_control_unit;
  import dsp_pkg::*;
  logic [5:0] opcode;
  ctrl_t ctrl;
  logic clk = 0;
  int checks = 0, failures = 0;

  control_unit dut (.opcode, .ctrl);

  always #5 clk = ~clk;

  // expected fields in order: regdst alusrc memtoreg regwrite memread
  // memwrite branch branch_c jump multen, then aluop
  function automatic ctrl_t mk(input logic [9:0] f, input aluop_e ao);
    ctrl_t c;
    c.regdst = f[9]; c.alusrc = f[8]; c.memtoreg = f[7]; c.regwrite = f[6];
    c.memread = f[5]; c.memwrite = f[4]; c.branch = f[3]; c.branch_c = f[2];
    c.jump = f[1]; c.multen = f[0]; c.aluop = ao;
    return c;
  endfunction

  task automatic expect_ctrl(input logic [5:0] oc, input ctrl_t e, input string what);
    opcode = oc;
    #1 checks++;
    if (ctrl !== e) begin
      failures++;
      $display("FAIL %s: ctrl=%b expected %b", what, ctrl, e);
    end
  endtask

  initial begin
    ctrl_t nop;
    nop = mk(10'b0000000000, ALUOP_ADD);
    for (int i = 0; i < 64; i++) begin
      case (6'(i))
        OP_RTYPE: expect_ctrl(6'(i), mk(10'b1001000000, ALUOP_FUNCT), "RTYPE");
        OP_ADDI:  expect_ctrl(6'(i), mk(10'b0101000000, ALUOP_IMM),   "ADDI");
        OP_SUBI:  expect_ctrl(6'(i), mk(10'b0101000000, ALUOP_IMM),   "SUBI");
        OP_MOVI:  expect_ctrl(6'(i), mk(10'b0101000000, ALUOP_IMM),   "MOVI");
        OP_MULI:  expect_ctrl(6'(i), mk(10'b0101000001, ALUOP_IMM),   "MULI");
        OP_LOAD:  expect_ctrl(6'(i), mk(10'b0111100000, ALUOP_ADD),   "LOAD");
        OP_STORE: expect_ctrl(6'(i), mk(10'b0100010000, ALUOP_ADD),   "STORE");
        OP_JMPE:  expect_ctrl(6'(i), mk(10'b0000001000, ALUOP_SUB),   "JMPE");
        OP_JMPC:  expect_ctrl(6'(i), mk(10'b0000000100, ALUOP_ADD),   "JMPC");
        OP_JMP:   expect_ctrl(6'(i), mk(10'b0000000010, ALUOP_ADD),   "JMP");
        default:  expect_ctrl(6'(i), nop, "unused opcode");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
