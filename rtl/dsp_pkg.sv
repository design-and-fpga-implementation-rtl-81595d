// dsp_pkg: types and constants shared by the 32-bit DSP core.
//
// The instruction word is 32 bits with the opcode in bits 31..26 and three
// formats: R-type {op, rs, rt, rd, shamt, funct}, I-type {op, rs, rt, imm16}
// and J-type {op, target26}. Opcode 0 with function code 0 (ADD) and 4 (MUL)
// follow the encodings used by the reference convolution program; every
// other opcode and function code is this design's own assignment, chosen to
// match the classic MIPS numbers where an equivalent instruction exists
// (LOAD = lw, STORE = sw, JMPE = beq, JMP = j, ADDI = addi).
package dsp_pkg;

  localparam int unsigned XLEN   = 32;  // data path, register and bus width
  localparam int unsigned NREGS  = 32;  // register file entries
  localparam int unsigned RADDR_W = $clog2(NREGS);

  typedef logic [XLEN-1:0] word_t;

  // Primary opcodes (instruction bits 31..26)
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,  // MOV, ADD, SUB, MUL, DIV, MACC (selected by funct)
    OP_JMP   = 6'h02,  // unconditional jump
    OP_JMPE  = 6'h04,  // branch if rs == rt
    OP_JMPC  = 6'h05,  // branch if carry flag set
    OP_ADDI  = 6'h08,  // rt = rs + imm
    OP_SUBI  = 6'h09,  // rt = rs - imm
    OP_MULI  = 6'h0C,  // rt = rs * imm (MAC multiplier)
    OP_MOVI  = 6'h0F,  // rt = imm
    OP_LOAD  = 6'h23,  // rt = mem[rs + imm]
    OP_STORE = 6'h2B   // mem[rs + imm] = rt
  } opcode_e;

  // R-type function codes (instruction bits 5..0)
  typedef enum logic [5:0] {
    FN_ADD  = 6'h00,
    FN_SUB  = 6'h01,
    FN_MOV  = 6'h02,   // rd = rs
    FN_MUL  = 6'h04,
    FN_DIV  = 6'h05,
    FN_MACC = 6'h06    // acc = acc + rs*rt, rd = acc
  } funct_e;

  // Two-bit ALUOp from the main controller to the ALU controller
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,  // address calculation, ADDI
    ALUOP_SUB   = 2'b01,  // equality compare for JMPE
    ALUOP_FUNCT = 2'b10,  // R-type: look at funct
    ALUOP_IMM   = 2'b11   // other immediates: look at opcode
  } aluop_e;

  // Operation performed by the ALU / MAC pair
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,
    ALU_SUB  = 3'd1,
    ALU_PASS_A = 3'd2,   // MOV
    ALU_PASS_B = 3'd3,   // MOVI (B is the immediate)
    ALU_DIV  = 3'd4,
    ALU_MUL  = 3'd5,     // MAC: product, accumulator loaded with it
    ALU_MACC = 3'd6      // MAC: accumulator plus product
  } alu_op_e;

  // Control word produced by the main controller from the opcode
  typedef struct packed {
    logic   regdst;    // 1: write rd (R-type), 0: write rt
    logic   alusrc;    // 1: ALU B input is the sign-extended immediate
    logic   memtoreg;  // 1: register write data comes from data memory
    logic   regwrite;
    logic   memread;
    logic   memwrite;
    logic   branch;    // JMPE: taken when zero
    logic   branch_c;  // JMPC: taken when carry flag set
    logic   jump;      // JMP
    logic   multen;    // immediate multiply through the MAC
    aluop_e aluop;
  } ctrl_t;

endpackage
