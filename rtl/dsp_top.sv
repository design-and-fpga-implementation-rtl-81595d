// dsp_top: single-cycle 32-bit digital signal processor core.
//
// A Harvard-style, MIPS-like core: separate instruction and data memories,
// a 32 x 32-bit register file, an ALU, and a dedicated multiplier-accumulator
// (MAC) built from carry-lookahead adders. Every instruction is fetched,
// decoded, executed and written back in one clock cycle:
//   fetch   : instr = imem[pc], pc+4 computed
//   decode  : control_unit decodes the opcode; rs/rt read; imm16 extended;
//             RegDst picks rd (R-type) or rt (I-type) as write register
//   execute : ALU (add/sub/div/mov) and MAC (mul/macc) work on rs and
//             rt-or-immediate (ALUSrc); alu_control picks the operation
//   memory  : LOAD/STORE access data memory at the ALU address
//   write   : MemtoReg picks memory data or the ALU/MAC result for rd/rt
//   next pc : pc+4, pc+4 + (imm << 2) when (Branch & zero) or
//             (JMPC & carry flag), or {pc+4[31:28], target26, 2'b00} on JMP
// The carry flag is a one-bit register written by ADD/ADDI/SUB/SUBI.
// There is no halt instruction: a program ends in a jump to itself.
//
// Interface: clk, synchronous active-high rst (PC, registers, accumulator and
// flag cleared). The program is written into the instruction memory through
// the byte-wide imem_* port, normally while rst is held. The outputs mirror
// the signals the document's simulation traces: pc, instr, aluout, memdata,
// writedata, the control signals, zero, and every register.
// The datapath, the control signal set and the instruction formats follow
// the document; the opcode numbers, memory depths, the program-load port,
// the carry-flag register and the MAC accumulator behaviour are this
// design's choices (see the README).
module dsp_top
  import dsp_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic                          clk,
  input  logic                          rst,
  // program load port
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_BYTES)-1:0] imem_waddr,
  input  logic [7:0]                    imem_wdata,
  // observation
  output logic [31:0]                   pc,
  output logic [31:0]                   instr,
  output logic [31:0]                   aluout,
  output logic [31:0]                   memdata,
  output logic [31:0]                   writedata,
  output logic [1:0]                    aluop,
  output logic                          regdst,
  output logic                          alusrc,
  output logic                          memtoreg,
  output logic                          regwrite,
  output logic                          memread,
  output logic                          memwrite,
  output logic                          branch,
  output logic                          jump,
  output logic                          multen,
  output logic                          zero,
  output logic                          carry_flag,
  output logic [31:0]                   acc,
  output logic [NREGS-1:0][XLEN-1:0]    regs
);
  ctrl_t   ctrl;
  word_t   pc_next, pc_plus4, br_target, pc_br, j_target;
  word_t   rd1, rd2, imm_ext, alu_b, alu_y, mac_y, ex_y;
  logic [RADDR_W-1:0] wreg;
  alu_op_e op;
  logic    mac_sel, mac_en, mac_acc, flag_we, alu_carry, pcsrc;

  // ---------------- fetch ----------------
  program_counter #(.W(XLEN)) u_pc (.clk, .rst, .pc_next, .pc);

  instr_mem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .addr(pc), .instr
  );

  assign pc_plus4 = pc + 32'd4;

  // ---------------- decode ----------------
  control_unit u_ctrl (.opcode(instr[31:26]), .ctrl);

  mux2 #(.W(RADDR_W)) u_regdst_mux (
    .d0(instr[20:16]), .d1(instr[15:11]), .sel(ctrl.regdst), .y(wreg)
  );

  reg_file u_rf (
    .clk, .rst,
    .ra1(instr[25:21]), .ra2(instr[20:16]), .rd1, .rd2,
    .we(ctrl.regwrite), .wa(wreg), .wd(writedata), .regs
  );

  sign_extend #(.IN_W(16), .OUT_W(32)) u_sext (.in(instr[15:0]), .out(imm_ext));

  // ---------------- execute ----------------
  mux2 #(.W(XLEN)) u_alusrc_mux (.d0(rd2), .d1(imm_ext), .sel(ctrl.alusrc), .y(alu_b));

  alu_control u_aluctl (
    .aluop(ctrl.aluop), .funct(instr[5:0]), .opcode(instr[31:26]),
    .multen(ctrl.multen), .op, .mac_sel, .mac_en, .mac_acc, .flag_we
  );

  alu u_alu (.a(rd1), .b(alu_b), .op, .y(alu_y), .zero, .carry(alu_carry));

  mac_unit #(.W(XLEN)) u_mac (
    .clk, .rst, .a(rd1), .b(alu_b), .en(mac_en), .accumulate(mac_acc),
    .y(mac_y), .acc
  );

  mux2 #(.W(XLEN)) u_exres_mux (.d0(alu_y), .d1(mac_y), .sel(mac_sel), .y(ex_y));

  always_ff @(posedge clk) begin
    if (rst)          carry_flag <= 1'b0;
    else if (flag_we) carry_flag <= alu_carry;
  end

  // ---------------- memory ----------------
  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(alu_y), .wdata(rd2), .memwrite(ctrl.memwrite),
    .memread(ctrl.memread), .rdata(memdata)
  );

  // ---------------- write back ----------------
  mux2 #(.W(XLEN)) u_memtoreg_mux (.d0(ex_y), .d1(memdata), .sel(ctrl.memtoreg), .y(writedata));

  // ---------------- next pc ----------------
  assign br_target = pc_plus4 + {imm_ext[29:0], 2'b00};
  assign pcsrc     = (ctrl.branch & zero) | (ctrl.branch_c & carry_flag);
  // The 26-bit target, shifted left by two, fills bits 27..0 entirely, so
  // extending it first would change nothing: the upper four bits always
  // come from pc+4.
  assign j_target  = {pc_plus4[31:28], instr[25:0], 2'b00};

  mux2 #(.W(XLEN)) u_br_mux (.d0(pc_plus4), .d1(br_target), .sel(pcsrc), .y(pc_br));
  mux2 #(.W(XLEN)) u_j_mux  (.d0(pc_br), .d1(j_target), .sel(ctrl.jump), .y(pc_next));

  // ---------------- observation ----------------
  assign aluout   = ex_y;
  assign aluop    = ctrl.aluop;
  assign regdst   = ctrl.regdst;
  assign alusrc   = ctrl.alusrc;
  assign memtoreg = ctrl.memtoreg;
  assign regwrite = ctrl.regwrite;
  assign memread  = ctrl.memread;
  assign memwrite = ctrl.memwrite;
  assign branch   = ctrl.branch;
  assign jump     = ctrl.jump;
  assign multen   = ctrl.multen;

  // A decoded instruction never reads and writes data memory together, and
  // a STORE never writes the register file.
  a_mem_excl : assert property (@(posedge clk) disable iff (rst)
    !(ctrl.memread && ctrl.memwrite));
  a_store_nowb : assert property (@(posedge clk) disable iff (rst)
    !(ctrl.memwrite && ctrl.regwrite));
endmodule
