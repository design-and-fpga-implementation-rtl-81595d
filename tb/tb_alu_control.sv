// tb_alu_control: checks the ALU/MAC operation, MAC select, MAC accumulate
// and carry-flag write for every ALUOp against a table of the instruction
// set, and that unknown function codes and opcodes fall back to addition.
module tb_alu_control;
  import dsp_pkg::*;
  aluop_e aluop;
  logic [5:0] funct, opcode;
  logic multen;
  alu_op_e op;
  logic mac_sel, mac_en, mac_acc, flag_we;
  logic clk = 0;
  int checks = 0, failures = 0;

  alu_control dut (.aluop, .funct, .opcode, .multen, .op, .mac_sel, .mac_en, .mac_acc, .flag_we);

  always #5 clk = ~clk;

  task automatic expect_op(input aluop_e ao, input logic [5:0] fn, input logic [5:0] oc,
                           input logic me, input alu_op_e eop, input logic ems,
                           input logic ema, input logic efw, input string what);
    aluop = ao; funct = fn; opcode = oc; multen = me;
    #1 checks++;
    if (op !== eop || mac_sel !== ems || mac_en !== ems || mac_acc !== ema || flag_we !== efw) begin
      failures++;
      $display("FAIL %s: op=%0d sel=%b en=%b acc=%b fw=%b expected op=%0d sel=%b acc=%b fw=%b",
               what, op, mac_sel, mac_en, mac_acc, flag_we, eop, ems, ema, efw);
    end
  endtask

  initial begin
    //          aluop        funct    opcode   multen  op          sel acc fw
    expect_op(ALUOP_ADD,   6'h3F,   OP_LOAD,  0, ALU_ADD,    0, 0, 0, "LOAD");
    expect_op(ALUOP_ADD,   6'h15,   OP_STORE, 0, ALU_ADD,    0, 0, 0, "STORE");
    expect_op(ALUOP_SUB,   6'h04,   OP_JMPE,  0, ALU_SUB,    0, 0, 0, "JMPE");
    expect_op(ALUOP_FUNCT, FN_ADD,  OP_RTYPE, 0, ALU_ADD,    0, 0, 1, "ADD");
    expect_op(ALUOP_FUNCT, FN_SUB,  OP_RTYPE, 0, ALU_SUB,    0, 0, 1, "SUB");
    expect_op(ALUOP_FUNCT, FN_MOV,  OP_RTYPE, 0, ALU_PASS_A, 0, 0, 0, "MOV");
    expect_op(ALUOP_FUNCT, FN_MUL,  OP_RTYPE, 0, ALU_MUL,    1, 0, 0, "MUL");
    expect_op(ALUOP_FUNCT, FN_DIV,  OP_RTYPE, 0, ALU_DIV,    0, 0, 0, "DIV");
    expect_op(ALUOP_FUNCT, FN_MACC, OP_RTYPE, 0, ALU_MACC,   1, 1, 0, "MACC");
    expect_op(ALUOP_FUNCT, 6'h3F,   OP_RTYPE, 0, ALU_ADD,    0, 0, 1, "unknown funct");
    expect_op(ALUOP_IMM,   6'h00,   OP_ADDI,  0, ALU_ADD,    0, 0, 1, "ADDI");
    expect_op(ALUOP_IMM,   6'h01,   OP_SUBI,  0, ALU_SUB,    0, 0, 1, "SUBI");
    expect_op(ALUOP_IMM,   6'h04,   OP_MULI,  1, ALU_MUL,    1, 0, 0, "MULI");
    expect_op(ALUOP_IMM,   6'h06,   OP_MOVI,  0, ALU_PASS_B, 0, 0, 0, "MOVI");
    // the immediate field's low bits must not be taken as a function code
    for (int i = 0; i < 64; i++) begin
      expect_op(ALUOP_IMM, 6'(i), OP_ADDI, 0, ALU_ADD,    0, 0, 1, "ADDI any low bits");
      expect_op(ALUOP_IMM, 6'(i), OP_MOVI, 0, ALU_PASS_B, 0, 0, 0, "MOVI any low bits");
      expect_op(ALUOP_ADD, 6'(i), OP_LOAD, 0, ALU_ADD,    0, 0, 0, "LOAD any low bits");
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
