# A single-cycle 32-bit DSP core with a multiply-accumulate unit

This is a small fixed-point digital signal processor. Its structure follows the
classic single-cycle MIPS datapath. On top of that it has a separate
multiplier-accumulator (MAC), so a convolution or FIR tap costs one
instruction per product. The core is a Harvard machine:

- instructions come from a byte-wide program memory;
- data lives in a 32-bit word memory;
- both memories are read in the same cycle.

Every instruction is fetched, decoded, executed, written back and retired in
one clock cycle. There is no pipeline, and so there are no hazards, stalls or
forwarding paths. The core was designed as a teaching-scale processor for a
Spartan-3E FPGA. Its reference workload is the convolution
{1,2,3} * {4,5,6} = {4,13,28,27,18}.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable and
parameterised. Verilator lint and the slang front end of yosys accept it
without errors.

## Instruction set

All instructions are 32 bits long, and the opcode is always in bits 31..26.
There are three formats:

| format | fields (msb → lsb)                                   |
|--------|------------------------------------------------------|
| R      | `op[6] rs[5] rt[5] rd[5] shamt[5] funct[6]`          |
| I      | `op[6] rs[5] rt[5] imm[16]`                          |
| J      | `op[6] target[26]`                                   |

| mnemonic | fmt | op   | funct | operation |
|----------|-----|------|-------|-----------|
| ADD      | R   | 0x00 | 0x00  | rd = rs + rt; carry = carry-out |
| SUB      | R   | 0x00 | 0x01  | rd = rs - rt; carry = borrow (rs < rt unsigned) |
| MOV      | R   | 0x00 | 0x02  | rd = rs |
| MUL      | R   | 0x00 | 0x04  | rd = acc = rs * rt (low 32 bits) |
| DIV      | R   | 0x00 | 0x05  | rd = rs / rt (signed, truncating) |
| MACC     | R   | 0x00 | 0x06  | acc = acc + rs * rt; rd = acc |
| JMP      | J   | 0x02 |       | pc = {(pc+4)[31:28], target, 00} |
| JMPE     | I   | 0x04 |       | if rs == rt: pc = pc+4 + (sext(imm) << 2) |
| JMPC     | I   | 0x05 |       | if carry flag: pc = pc+4 + (sext(imm) << 2) |
| ADDI     | I   | 0x08 |       | rt = rs + sext(imm); carry = carry-out |
| SUBI     | I   | 0x09 |       | rt = rs - sext(imm); carry = borrow |
| MULI     | I   | 0x0C |       | rt = acc = rs * sext(imm) |
| MOVI     | I   | 0x0F |       | rt = sext(imm) |
| LOAD     | I   | 0x23 |       | rt = dmem[rs + sext(imm)] |
| STORE    | I   | 0x2B |       | dmem[rs + sext(imm)] = rt |

Where the encodings come from:

- Only two encodings come from the original design: R-type opcode 0 with
  funct 0 for ADD, and funct 4 for MUL. They can be read back from the
  instruction words of its convolution program, for example `0x00033004`,
  which is MUL r6 = r0 * r3, and `0x00E84800`, which is ADD r9 = r7 + r8.
- All other numbers are assigned by this implementation.
- Where MIPS has the same instruction, the MIPS number is reused (lw, sw,
  beq, j, addi).

All values live in `rtl/dsp_pkg.sv`, so changing an encoding touches one
file.

Notes:

- Register 0 is an ordinary register, not hard-wired zero. The reference
  program keeps its first input sample in r0.
- Unknown opcodes are no-operations. An unknown R-type funct behaves as ADD.
- There is no halt instruction. A program ends with a jump to itself
  (`JMP .`).
- The carry flag is a one-bit register. Only ADD, SUB, ADDI and SUBI change
  it: carry-out for addition, borrow for subtraction. LOAD/STORE address
  arithmetic and the JMPE comparison leave it alone.

## One cycle through the datapath (`dsp_top`)

```
 pc ──► instr_mem ──► instr ─┬─► control_unit ──► ctrl (RegDst, ALUSrc, MemtoReg, RegWrite,
  ▲                          │                          MemRead, MemWrite, Branch, JMPC, Jump,
  │                          │                          Multen, ALUOp[1:0])
  │                          ├─► reg_file rs,rt ──► A, B
  │                          ├─► sign_extend(imm16) ──► imm
  │                          └─► RegDst mux: rd or rt ──► write register
  │        ALUSrc mux (B or imm) ──► alu (add/sub/div/mov) ──┐
  │                             └──► mac_unit (mul/macc)  ──┴─► result mux ──► data_mem addr
  │                                                                   │
  │                                   MemtoReg mux (result or load) ◄─┘──► reg_file write
  └── next-PC: pc+4 │ branch target │ jump target
```

Next-PC selection:

- The branch target is pc+4 plus the sign-extended immediate shifted left
  by two.
- The branch mux picks the branch target when `(Branch & zero) | (JMPC & carry)`.
- The jump mux then picks `{(pc+4)[31:28], target26, 00}` when `Jump` is set.

All state is written on the rising clock edge:

- PC
- register file
- MAC accumulator
- carry flag
- data memory (on STORE)

The memory reads and all decoding are combinational. So the clock period
spans the whole chain: fetch, decode, register read, multiply, memory read,
and the path back to the register-file input.

Control is in two levels:

- `control_unit` decodes the opcode alone into the control word above. The
  full table is at the top of its file.
- `alu_control` refines the 2-bit ALUOp. Code `00` is add (LOAD/STORE
  address), `01` is subtract (JMPE compare), and `10` means R-type, decoded
  from funct. The code `11` is this implementation's own: "immediate
  arithmetic, decode from the opcode". Two bits cannot name ADDI, SUBI,
  MULI and MOVI separately.
- `alu_control` also decides whether the MAC result replaces the ALU result,
  whether the accumulator loads or accumulates, and whether the carry flag
  is written.

## The MAC and its carry-lookahead arithmetic

The MAC is where this core differs from a plain MIPS datapath, and where
most of its logic sits (about 6,000 of the 6,200 word-level cells).

- `cla_adder` is a W-bit adder built from 4-bit carry-lookahead groups.
  Inside a group, each carry is a two-level function of the bit
  generate/propagate terms and the group carry-in. The groups pass their
  carries along through group generate/propagate terms.
- `cla_multiplier` is an array multiplier. Partial product *i* is
  `a << i`, gated by `b[i]`. The 31 rows are added one after another by
  31 `cla_adder` instances. Only the low 32 bits are kept. These are the
  same for signed and unsigned operands, so MUL, MULI and MACC work on
  two's-complement data.
- `mac_unit` puts the multiplier and a 32-bit accumulator register
  together:
  - MUL and MULI load the product into the accumulator and write it to the
    destination register.
  - MACC adds the product to the accumulator and writes the new sum.
  - So a dot product is one MUL followed by MACCs, and every partial sum
    is visible in a register.

The accumulator is 32 bits wide, like the registers. It has no guard bits.
Long sums of large products wrap modulo 2^32.

## Memories and program loading

`instr_mem` holds 256 bytes:

- It is byte-wide, with an 8-bit program address space.
- A fetch at byte address A returns bytes A..A+3, big-endian.
- PC bits above bit 7 are ignored, so 64 instructions fit.
- A synchronous byte-wide write port (`imem_we`, `imem_waddr`,
  `imem_wdata`) loads the program. Hold `rst` high while loading, then
  release it. The core starts at address 0.

`data_mem` holds 256 words of 32 bits:

- It is addressed by the byte address the ALU computes. Address bits 1..0
  are ignored, so every access is an aligned word.
- STORE writes on the clock edge.
- LOAD reads in the same cycle.
- The memory is not reset, so a program must store before it loads.

Input data usually enters through MOVI instructions. The original
simulation instead pre-set the registers.

## Interface of `dsp_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset. Clears PC, registers, accumulator and carry flag. |
| `imem_we`, `imem_waddr`, `imem_wdata` | in | 1, 8, 8 | program load port |
| `pc`, `instr` | out | 32 | current PC and instruction |
| `aluout` | out | 32 | ALU or MAC result |
| `memdata` | out | 32 | data memory read data (0 unless LOAD) |
| `writedata` | out | 32 | register write data |
| `aluop`, `regdst`, `alusrc`, `memtoreg`, `regwrite`, `memread`, `memwrite`, `branch`, `jump`, `multen` | out | 2, 1… | control signals |
| `zero`, `carry_flag` | out | 1 | ALU zero, carry flag register |
| `acc` | out | 32 | MAC accumulator |
| `regs` | out | 32×32 | all registers, `regs[i]` = r*i* |

The outputs are the signals you need to watch a program run. They match the
set traced in the original design's simulation.

Parameters:

- `IMEM_BYTES` (default 256)
- `DMEM_WORDS` (default 256)
- The data width and the register count (32 and 32) are package constants.

Two assertions hold in `dsp_top`:

- No instruction both reads and writes data memory.
- A STORE never writes the register file.

## How far this follows the original design, and where it departs

The following are taken from the original design:

- the 32-bit instruction word with the opcode in bits 31..26;
- the three formats;
- the instruction list;
- the 32 × 32-bit register file;
- the single-cycle datapath with its muxes and control signals (RegDst,
  ALUSrc, MemtoReg, RegWrite, MemRead, MemWrite, Branch, Jump, Multen,
  ALUOp1..0);
- the separate MAC with a carry-lookahead multiplier;
- PC+4 sequencing;
- branch and jump address formation;
- the reference convolution and its results.

The following are this implementation's choices:

- all opcode and funct numbers other than ADD and MUL;
- the ALUOp code `11`;
- the semantics of the carry flag, and the flag register that JMPC tests;
- the division corner cases (x/0 = all ones, −2^31/−1 = −2^31);
- the MAC accumulator behaviour and its width;
- memory depths and byte order;
- the program-load port;
- synchronous reset;
- no-operation for unknown opcodes.

Two points in the original description contradict each other. This
implementation resolves them as follows:

- **ALUSrc.** One passage says ALUSrc selects between the register and the
  accumulator. The datapath description has it select the sign-extended
  immediate. The datapath reading is implemented: the immediate
  instructions need it, and the accumulator already reaches the result
  through the MAC.
- **Branch and Jump.** One passage swaps "conditional" and "unconditional"
  for these two signals. The datapath is followed: Branch with zero is
  the conditional JMPE, and Jump is the unconditional JMP.

The following are not included:

- The original design was first drawn as a multi-cycle control state
  machine and then reduced to the combinational controller used here. Only
  the combinational, single-cycle version is implemented.
- The FPGA demonstration ran a cut-down convolution: two 2-element, 1-bit
  sequences on four switches, with eight LEDs for the result. No board
  wrapper is included, because the mapping of switches and LEDs onto the
  processor is not specified. The same two cases run on the core in the
  testbench: {1,0}*{1,0} = {1,0,0} and {1,0}*{0,1} = {0,1,0}.
- Seven instruction words of the original unrolled convolution program are
  published. The reference program in the testbench reproduces those seven
  multiply/add words exactly. It adds its own MOVI set-up and the
  remaining MUL/MACC/ADD steps.

## Verification

Each block in `rtl/` has a self-checking testbench, `tb/tb_<module>.sv`.

- Each testbench compares its block with values computed independently:
  integer arithmetic, array models and decode tables.
- Each ends with a `TB_RESULT checks=N failures=M` line.
- Each has a watchdog.

`tb/tb_dsp_top.sv` tests the whole core at its default sizes:

- It contains an assembler and an instruction-set model.
- Every cycle it compares the core's PC and instruction before the clock
  edge, and all 32 registers, the accumulator and the carry flag after it.
  The data memory is compared after each program.
- Because one instruction must retire per cycle, it also checks cycle
  counts:
  - the reference convolution: 18 cycles for 18 instructions;
  - an 8-tap FIR loop over data memory: 69 cycles.

The programs are:

1. the reference convolution, with results in r6, r9, r12, r15, r16 =
   4, 13, 28, 27, 18;
2. generated MUL/MACC convolutions: 3×3, both 2×2 one-bit cases, and a
   signed 4×3;
3. the FIR loop (LOAD, MACC, ADDI, JMPE, JMP, STORE), followed by carry,
   division, MOV and MULI tests;
4. 40 random programs that use every instruction, with forward branches.

The testbench counts taken and untaken JMPE and JMPC, JMP, LOAD, STORE,
MACC, DIV, division by zero and carry set. If any of them never occurs, it
counts a failure.

Running a testbench with plain Verilator, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dsp_pkg.sv tb/tb_dsp_top.sv \
          --top-module tb_dsp_top -Mdir obj_top -o sim
./obj_top/sim +verilator+rand+reset+2
```

For a block testbench, replace `tb_dsp_top` with `tb_<module>`. Lint a
module with:

```
verilator --lint-only -Wall -Irtl rtl/dsp_pkg.sv rtl/<module>.sv
```

The lint warnings that remain are address bits that the memories ignore on
purpose, and package constants that a given module does not use.

## Changing it

- **New instruction.** Add its opcode or funct to `dsp_pkg`, a row to
  `control_unit`, and a case to `alu_control`. If the instruction needs a
  new operation, also add one to `alu` or `mac_unit`. Then teach
  `m_step` in `tb_dsp_top.sv` the same semantics.
- **Larger programs or data.** Raise `IMEM_BYTES` or `DMEM_WORDS`. The
  testbench assumes the 256-byte and 256-word defaults.
- **Faster multiplier.** `cla_multiplier` is the long combinational path.
  A tree of carry-save adders with one final `cla_adder` could replace it
  behind the same ports.
