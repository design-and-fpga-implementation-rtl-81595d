// tb_dsp_top: end-to-end test of the single-cycle DSP core at its default
// sizes (256-byte program memory, 256-word data memory).
//
// Programs are assembled in the testbench, written through the program-load
// port while reset is held, and run until the core reaches a jump to itself.
// An instruction-set model in the testbench executes the same program; every
// cycle the core's PC and instruction are compared with the model before the
// clock edge, and every register, the MAC accumulator and the carry flag
// after it, so each instruction must complete in exactly one cycle.
//   1. the reference convolution {1,2,3} * {4,5,6} = {4,13,28,27,18} with the
//      results in registers 6, 9, 12, 15, 16, including a check of the
//      printed instruction words of its multiply/add sequence
//   2. convolutions produced by a generic MUL/MACC generator: 3x3 values,
//      and the two 2x2 one-bit cases {1,0}*{1,0} and {1,0}*{0,1}
//   3. an FIR dot-product loop over data memory (LOAD, MACC, ADDI, JMPE,
//      JMP, STORE) followed by carry, division and move tests
//   4. random programs of all instructions with forward branches
// It counts how often each mechanism of the core occurred (MAC accumulate,
// taken and untaken JMPE/JMPC, JMP, LOAD, STORE, DIV, division by zero,
// carry set) and counts a failure for any that never did.
module tb_dsp_top;
  import dsp_pkg::*;

  logic clk = 0, rst = 1;
  logic imem_we = 0;
  logic [7:0] imem_waddr = 0, imem_wdata = 0;
  logic [31:0] pc, instr, aluout, memdata, writedata, acc;
  logic [1:0] aluop;
  logic regdst, alusrc, memtoreg, regwrite, memread, memwrite, branch, jump, multen, zero, carry_flag;
  logic [31:0][31:0] regs;

  dsp_top dut (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata,
    .pc, .instr, .aluout, .memdata, .writedata, .aluop, .regdst, .alusrc,
    .memtoreg, .regwrite, .memread, .memwrite, .branch, .jump, .multen,
    .zero, .carry_flag, .acc, .regs
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int total_cycles = 0;

  // mechanism counters
  int n_macc, n_beq_t, n_beq_n, n_bc_t, n_bc_n, n_jmp, n_load, n_store, n_div, n_div0, n_carry;

  // ---------------- assembler ----------------
  function automatic logic [31:0] asm_r(input int rs, input int rt, input int rd, input funct_e fn);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] asm_i(input opcode_e op, input int rs, input int rt, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] asm_j(input int target_byte);
    return {OP_JMP, 26'(target_byte >> 2)};
  endfunction

  // ---------------- instruction-set model ----------------
  logic [31:0] m_regs [32];
  logic [31:0] m_mem  [256];
  logic [7:0]  m_imem [256];
  logic [31:0] m_pc, m_acc;
  logic        m_carry;

  function automatic logic [31:0] m_fetch(input logic [31:0] a);
    return {m_imem[a[7:0]], m_imem[8'(a[7:0] + 1)], m_imem[8'(a[7:0] + 2)], m_imem[8'(a[7:0] + 3)]};
  endfunction

  function automatic logic [31:0] m_div(input logic [31:0] a, input logic [31:0] b);
    longint q;
    if (b == 0) return 32'hFFFF_FFFF;
    q = longint'($signed(a)) / longint'($signed(b));
    return q[31:0];
  endfunction

  task automatic m_step();
    logic [31:0] ins, a, b, imm, npc, r;
    logic [32:0] s;
    int rs, rt, rd;
    logic wr;
    int wa;
    ins = m_fetch(m_pc);
    rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
    a = m_regs[rs]; b = m_regs[rt];
    imm = {{16{ins[15]}}, ins[15:0]};
    npc = m_pc + 4;
    wr = 0; wa = rt; r = 0;
    case (ins[31:26])
      6'h00: begin
        wr = 1; wa = rd;
        case (ins[5:0])
          6'h01: begin r = a - b; m_carry = (a < b); end
          6'h02: r = a;
          6'h04: begin r = a * b; m_acc = r; end
          6'h05: r = m_div(a, b);
          6'h06: begin m_acc = m_acc + a * b; r = m_acc; end
          default: begin s = {1'b0, a} + {1'b0, b}; r = s[31:0]; m_carry = s[32]; end
        endcase
      end
      6'h08: begin wr = 1; s = {1'b0, a} + {1'b0, imm}; r = s[31:0]; m_carry = s[32]; end
      6'h09: begin wr = 1; r = a - imm; m_carry = (a < imm); end
      6'h0C: begin wr = 1; r = a * imm; m_acc = r; end
      6'h0F: begin wr = 1; r = imm; end
      6'h23: begin wr = 1; r = m_mem[8'((a + imm) >> 2)]; end
      6'h2B: m_mem[8'((a + imm) >> 2)] = b;
      6'h04: if (a == b) npc = npc + (imm << 2);
      6'h05: if (m_carry) npc = npc + (imm << 2);
      6'h02: npc = {npc[31:28], ins[25:0], 2'b00};
      default: ;
    endcase
    if (wr) m_regs[wa] = r;
    m_pc = npc;
  endtask

  // ---------------- helpers ----------------
  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic load_program(input logic [31:0] prog [$], input bit init_mem);
    rst = 1;
    foreach (m_imem[i]) m_imem[i] = 8'h00;
    foreach (prog[i]) for (int k = 0; k < 4; k++) m_imem[4*i + k] = prog[i][31-8*k -: 8];
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = 8'(i); imem_wdata = m_imem[i];
    end
    @(negedge clk); imem_we = 0;
    foreach (m_regs[i]) m_regs[i] = 0;
    m_pc = 0; m_acc = 0; m_carry = 0;
    if (init_mem)
      for (int i = 0; i < 256; i++) begin
        m_mem[i] = $urandom;
        dut.u_dmem.mem[i] = m_mem[i];
      end
    @(negedge clk);
  endtask

  // count what the instruction about to execute does (model state = before)
  task automatic count_mechanisms(input logic [31:0] ins);
    logic [31:0] a, b;
    a = m_regs[ins[25:21]]; b = m_regs[ins[20:16]];
    case (ins[31:26])
      6'h00: begin
        if (ins[5:0] == 6'h06) n_macc++;
        if (ins[5:0] == 6'h05) begin n_div++; if (b == 0) n_div0++; end
      end
      6'h04: if (zero) n_beq_t++; else n_beq_n++;
      6'h05: if (carry_flag) n_bc_t++; else n_bc_n++;
      6'h02: if (jump) n_jmp++;
      6'h23: if (memread) n_load++;
      6'h2B: if (memwrite) n_store++;
      default: ;
    endcase
  endtask

  // run in lockstep with the model until a jump-to-self; returns cycles used
  task automatic run_lockstep(input int max_cycles, output int cycles);
    logic [31:0] ins;
    cycles = 0;
    rst = 0;
    forever begin
      ins = m_fetch(m_pc);
      checks++;
      if (pc !== m_pc || instr !== ins) begin
        fail($sformatf("fetch: pc=%h instr=%h, model pc=%h instr=%h", pc, instr, m_pc, ins));
        break;
      end
      if (ins == {OP_JMP, 26'(m_pc >> 2)} && m_pc[31:28] == 4'h0) break;  // halt loop
      count_mechanisms(ins);
      m_step();
      @(posedge clk);
      @(negedge clk);
      cycles++;
      total_cycles++;
      if (m_carry) n_carry++;
      checks++;
      if (acc !== m_acc || carry_flag !== m_carry) begin
        fail($sformatf("after pc=%h: acc=%h carry=%b, model acc=%h carry=%b",
                       pc, acc, carry_flag, m_acc, m_carry));
      end
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (regs[i] !== m_regs[i])
          fail($sformatf("after instr %h: r%0d=%h model %h", ins, i, regs[i], m_regs[i]));
      end
      if (cycles >= max_cycles) begin
        fail("program did not reach its halt loop");
        break;
      end
    end
    // data memory must match the model too
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== m_mem[i])
        fail($sformatf("dmem[%0d]=%h model %h", i, dut.u_dmem.mem[i], m_mem[i]));
    end
  endtask

  task automatic expect_reg(input int r, input logic [31:0] v, input string what);
    checks++;
    if (regs[r] !== v) fail($sformatf("%s: r%0d=%0d expected %0d", what, r, regs[r], v));
  endtask

  // generic convolution program: x in r0.., h in r8.., y in r16..
  task automatic run_conv(input int x [$], input int h [$], input string what);
    logic [31:0] prog [$];
    int ny, cyc, exp_instr;
    ny = x.size() + h.size() - 1;
    foreach (x[i]) prog.push_back(asm_i(OP_MOVI, 0, i, x[i]));
    foreach (h[i]) prog.push_back(asm_i(OP_MOVI, 0, 8 + i, h[i]));
    for (int k = 0; k < ny; k++) begin
      bit first = 1;
      for (int i = 0; i < x.size(); i++) begin
        int j = k - i;
        if (j < 0 || j >= h.size()) continue;
        prog.push_back(asm_r(i, 8 + j, 16 + k, first ? FN_MUL : FN_MACC));
        first = 0;
      end
    end
    exp_instr = prog.size();
    prog.push_back(asm_j(4 * prog.size()));
    load_program(prog, 1);
    run_lockstep(200, cyc);
    checks++;
    if (cyc != exp_instr) fail($sformatf("%s: %0d cycles for %0d instructions", what, cyc, exp_instr));
    for (int k = 0; k < ny; k++) begin
      int y = 0;
      for (int i = 0; i < x.size(); i++)
        if (k - i >= 0 && k - i < h.size()) y += x[i] * h[k - i];
      expect_reg(16 + k, 32'(y), what);
    end
    $display("%s: %0d outputs in %0d cycles", what, ny, cyc);
  endtask

  initial begin
    logic [31:0] prog [$];
    int cyc;
    n_macc = 0; n_beq_t = 0; n_beq_n = 0; n_bc_t = 0; n_bc_n = 0; n_jmp = 0;
    n_load = 0; n_store = 0; n_div = 0; n_div0 = 0; n_carry = 0;

    // ---- 1. reference convolution ----
    prog = {};
    for (int i = 0; i < 6; i++) prog.push_back(asm_i(OP_MOVI, 0, i, i + 1));  // r0..r5 = 1..6
    prog.push_back(asm_r(0, 3, 6, FN_MUL));    // r6  = x0*h0          = 4
    prog.push_back(asm_r(0, 4, 7, FN_MUL));    // r7  = x0*h1
    prog.push_back(asm_r(1, 3, 8, FN_MUL));    // r8  = x1*h0
    prog.push_back(asm_r(7, 8, 9, FN_ADD));    // r9  = r7 + r8        = 13
    prog.push_back(asm_r(0, 5, 10, FN_MUL));   // r10 = x0*h2
    prog.push_back(asm_r(1, 4, 11, FN_MUL));   // r11 = x1*h1
    prog.push_back(asm_r(2, 3, 12, FN_MUL));   // r12 = x2*h0
    prog.push_back(asm_r(10, 11, 13, FN_ADD)); // r13 = r10 + r11
    prog.push_back(asm_r(13, 12, 12, FN_ADD)); // r12 = r13 + r12      = 28
    prog.push_back(asm_r(1, 5, 14, FN_MUL));   // acc = x1*h2
    prog.push_back(asm_r(2, 4, 15, FN_MACC));  // r15 = acc + x2*h1    = 27
    prog.push_back(asm_r(2, 5, 16, FN_MUL));   // r16 = x2*h2          = 18
    prog.push_back(asm_j(4 * prog.size()));
    begin
      automatic logic [31:0] printed [7] = '{32'h00033004, 32'h00043804, 32'h00234004, 32'h00E84800,
                                   32'h00055004, 32'h00245804, 32'h00436004};
      foreach (printed[i]) begin
        checks++;
        if (prog[6 + i] !== printed[i])
          fail($sformatf("encoding %0d: %h expected %h", i, prog[6 + i], printed[i]));
      end
    end
    load_program(prog, 1);
    run_lockstep(100, cyc);
    expect_reg(6, 4, "conv"); expect_reg(9, 13, "conv"); expect_reg(12, 28, "conv");
    expect_reg(15, 27, "conv"); expect_reg(16, 18, "conv");
    checks++;
    if (cyc != 18) fail($sformatf("conv took %0d cycles, expected 18 (one per instruction)", cyc));
    $display("reference convolution: r6=%0d r9=%0d r12=%0d r15=%0d r16=%0d in %0d cycles",
             regs[6], regs[9], regs[12], regs[15], regs[16], cyc);

    // ---- 2. generated convolutions ----
    run_conv('{1, 2, 3}, '{4, 5, 6}, "conv 3x3");
    run_conv('{1, 0}, '{1, 0}, "conv 2x2 {1,0}*{1,0}");
    run_conv('{1, 0}, '{0, 1}, "conv 2x2 {1,0}*{0,1}");
    run_conv('{3, -2, 7, 1}, '{-5, 4, 2}, "conv 4x3 signed");

    // ---- 3. FIR loop over data memory, then flags, division, moves ----
    // x[] at word 0.., a[] at word 32.., y stored at word 64
    prog = {};
    prog.push_back(asm_i(OP_MOVI, 0, 1, 0));        // 0  r1 = i*4 = 0
    prog.push_back(asm_i(OP_MOVI, 0, 2, 8 * 4));    // 1  r2 = taps*4 = 32
    prog.push_back(asm_i(OP_MOVI, 0, 5, 0));        // 2  r5 = acc start
    prog.push_back(asm_r(5, 5, 6, FN_MUL));         // 3  acc = 0
    prog.push_back(asm_i(OP_JMPE, 1, 2, 6));        // 4  if i == taps goto 11
    prog.push_back(asm_i(OP_LOAD, 1, 3, 0));        // 5  r3 = x[i]
    prog.push_back(asm_i(OP_LOAD, 1, 4, 128));      // 6  r4 = a[i]
    prog.push_back(asm_r(3, 4, 7, FN_MACC));        // 7  r7 = acc += x*a
    prog.push_back(asm_i(OP_ADDI, 1, 1, 4));        // 8  i++
    prog.push_back(asm_j(4 * 4));                   // 9  loop
    prog.push_back(asm_i(OP_MOVI, 0, 31, 99));      // 10 (skipped)
    prog.push_back(asm_i(OP_STORE, 0, 7, 256));     // 11 y -> word 64
    prog.push_back(asm_i(OP_LOAD, 0, 8, 256));      // 12 r8 = y
    prog.push_back(asm_i(OP_MOVI, 0, 9, -1));       // 13 r9 = 0xFFFFFFFF
    prog.push_back(asm_i(OP_ADDI, 9, 10, 1));       // 14 r10 = 0, carry = 1
    prog.push_back(asm_i(OP_JMPC, 0, 0, 1));        // 15 taken -> 17
    prog.push_back(asm_i(OP_MOVI, 0, 31, 77));      // 16 (skipped)
    prog.push_back(asm_i(OP_ADDI, 10, 11, 5));      // 17 r11 = 5, carry = 0
    prog.push_back(asm_i(OP_JMPC, 0, 0, 1));        // 18 not taken
    prog.push_back(asm_i(OP_SUBI, 11, 12, 7));      // 19 r12 = -2, borrow -> carry = 1
    prog.push_back(asm_i(OP_MOVI, 0, 13, 100));     // 20
    prog.push_back(asm_i(OP_MOVI, 0, 14, -7));      // 21
    prog.push_back(asm_r(13, 14, 15, FN_DIV));      // 22 r15 = -14
    prog.push_back(asm_r(13, 10, 16, FN_DIV));      // 23 r16 = 100/0 = -1
    prog.push_back(asm_r(13, 16, 17, FN_SUB));      // 24 r17 = 101
    prog.push_back(asm_r(17, 0, 18, FN_MOV));       // 25 r18 = r17
    prog.push_back(asm_i(OP_MULI, 14, 19, -3));     // 26 r19 = 21
    prog.push_back(asm_i(OP_JMPE, 13, 14, 2));      // 27 not taken
    prog.push_back(asm_j(4 * 28));                  // 28 halt
    load_program(prog, 1);
    run_lockstep(200, cyc);
    begin
      automatic logic [31:0] y = 0;
      for (int k = 0; k < 8; k++) y += dut.u_dmem.mem[k] * dut.u_dmem.mem[32 + k];
      expect_reg(7, y, "FIR result");
      checks++;
      if (dut.u_dmem.mem[64] !== y) fail("FIR result not stored");
    end
    expect_reg(15, -14, "DIV"); expect_reg(16, 32'hFFFF_FFFF, "DIV by 0");
    expect_reg(19, 21, "MULI"); expect_reg(31, 0, "skipped instructions");
    // 4 set-up + 8 x 6 loop + 1 exit branch + 16 tail instructions
    checks++;
    if (cyc != 4 + 8 * 6 + 1 + 16) fail($sformatf("FIR program took %0d cycles", cyc));
    $display("FIR + tests: %0d cycles", cyc);

    // ---- 4. random programs ----
    for (int p = 0; p < 40; p++) begin
      int n;
      prog = {};
      n = 40 + $urandom % 20;
      for (int i = 0; i < n; i++) begin
        int kind, rs, rt, rd, imm, fwd;
        kind = $urandom % 16;
        rs = $urandom % 32; rt = $urandom % 32; rd = $urandom % 32;
        imm = (($urandom % 2) != 0) ? int'($urandom % 65536) : int'($urandom % 16);
        fwd = $urandom % 4;
        if (fwd > n - 1 - i) fwd = n - 1 - i;
        case (kind)
          0, 1: prog.push_back(asm_i(OP_MOVI, 0, rt, imm));
          2:  prog.push_back(asm_r(rs, rt, rd, FN_ADD));
          3:  prog.push_back(asm_r(rs, rt, rd, FN_SUB));
          4:  prog.push_back(asm_r(rs, rt, rd, FN_MUL));
          5:  prog.push_back(asm_r(rs, rt, rd, FN_MACC));
          6:  prog.push_back(asm_r(rs, ($urandom % 3 == 0) ? 0 : rt, rd, FN_DIV));
          7:  prog.push_back(asm_r(rs, rt, rd, FN_MOV));
          8:  prog.push_back(asm_i(OP_ADDI, rs, rt, imm));
          9:  prog.push_back(asm_i(OP_SUBI, rs, rt, imm));
          10: prog.push_back(asm_i(OP_MULI, rs, rt, imm));
          11: prog.push_back(asm_i(OP_LOAD, rs, rt, imm));
          12: prog.push_back(asm_i(OP_STORE, rs, rt, imm));
          13: prog.push_back(asm_i(OP_JMPE, rs, ($urandom % 2 == 0) ? rs : rt, fwd));
          14: prog.push_back(asm_i(OP_JMPC, 0, 0, fwd));
          default: prog.push_back(asm_j(4 * (i + 1 + fwd)));
        endcase
      end
      prog.push_back(asm_j(4 * n));
      load_program(prog, 1);
      run_lockstep(200, cyc);
    end

    // ---- mechanism coverage ----
    $display("mechanisms: macc=%0d jmpe taken=%0d not=%0d jmpc taken=%0d not=%0d jmp=%0d load=%0d store=%0d div=%0d div0=%0d carry=%0d",
             n_macc, n_beq_t, n_beq_n, n_bc_t, n_bc_n, n_jmp, n_load, n_store, n_div, n_div0, n_carry);
    checks++; if (n_macc  == 0) fail("MAC accumulate never happened");
    checks++; if (n_beq_t == 0) fail("JMPE taken never happened");
    checks++; if (n_beq_n == 0) fail("JMPE not taken never happened");
    checks++; if (n_bc_t  == 0) fail("JMPC taken never happened");
    checks++; if (n_bc_n  == 0) fail("JMPC not taken never happened");
    checks++; if (n_jmp   == 0) fail("JMP never happened");
    checks++; if (n_load  == 0) fail("LOAD never happened");
    checks++; if (n_store == 0) fail("STORE never happened");
    checks++; if (n_div   == 0) fail("DIV never happened");
    checks++; if (n_div0  == 0) fail("division by zero never happened");
    checks++; if (n_carry == 0) fail("carry flag never set");
    $display("total executed cycles: %0d", total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
