# Single-cycle processor for a MIPS instruction subset

This is a processor that runs every instruction in exactly one clock cycle. It
implements seven MIPS instructions: `add`, `sub`, `ori`, `lw`, `sw`, `beq` and
`j`. During one cycle the instruction is fetched at the PC, decoded,
executed and, where needed, used to access memory. The rising clock edge at
the end of the cycle then updates the register file, the data memory and the
PC together. Nothing is pipelined and nothing stalls, so an instruction's
result is visible to the next one.

The interesting part is the **controller**. It is a purely combinational
two-level logic array. An AND plane recognises the instruction, and an OR
plane turns the recognised instruction into the nine control signals that
steer a fixed datapath.

## Structure

```
single_cycle_cpu
├── instr_fetch_unit      PC register, instruction memory, next-PC logic
│   ├── inst_memory
│   └── mux2 x2           branch select, then jump select
├── control               main controller
│   ├── ctrl_and_plane    op/func  -> one line per instruction
│   └── ctrl_or_plane     lines    -> control signals
└── datapath
    ├── mux2              RegDst:   write register Rt (0) or Rd (1)
    ├── regfile           32 x 32 bit, 2 read ports, 1 write port
    ├── extender          imm16 -> 32 bit, zero or sign
    ├── mux2              ALUSrc:   busB (0) or extended immediate (1)
    ├── alu               ADD / SUB / OR, Zero flag
    ├── data_memory
    └── mux2              MemtoReg: ALU result (0) or memory data (1)
```

`cpu_pkg` holds the shared types. These are the ALU operation enum, the
decoded-instruction struct `dec_t`, the control struct `ctrl_t` and small
functions that pull fields out of an instruction word.

## Instruction formats

| format | 31:26 | 25:21 | 20:16 | 15:11 | 10:6  | 5:0   |
|--------|-------|-------|-------|-------|-------|-------|
| R      | op    | rs    | rt    | rd    | shamt | funct |
| I      | op    | rs    | rt    | immediate (15:0)      |||
| J      | op    | target (25:0)                         |||||

| instr | op     | funct  | effect |
|-------|--------|--------|--------|
| add   | 000000 | 100000 | R[rd] = R[rs] + R[rt] |
| sub   | 000000 | 100010 | R[rd] = R[rs] - R[rt] |
| ori   | 001101 |        | R[rt] = R[rs] OR ZeroExt(imm16) |
| lw    | 100011 |        | R[rt] = MEM[R[rs] + SignExt(imm16)] |
| sw    | 101011 |        | MEM[R[rs] + SignExt(imm16)] = R[rt] |
| beq   | 000100 |        | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)·4 |
| j     | 000010 |        | PC = {PC[31:28], target, 00} |

Every other instruction is PC + 4. Nothing is written.

## The controller

### Control signals

| signal    | meaning when 0        | meaning when 1                  |
|-----------|-----------------------|---------------------------------|
| RegDst    | write register Rt     | write register Rd               |
| ALUSrc    | ALU operand B = busB  | ALU operand B = extended imm16  |
| MemtoReg  | write back ALU result | write back memory data          |
| RegWrite  | –                     | write the register file         |
| MemWrite  | –                     | write the data memory           |
| nPC_sel   | not a branch          | branch instruction              |
| Jump      | –                     | jump instruction                |
| ExtOp     | zero-extend imm16     | sign-extend imm16               |
| ALUctr    | 00 ADD, 01 SUB, 10 OR |                                 |

### AND plane

Each output is one product term over the six opcode bits. For `add` and `sub`
the term also covers the six function bits, ANDed with the R-type term
(`op == 000000`). The terms are written bit by bit, the way gates would build
them. At most one line is 1 at a time. An assertion in `control` checks
this in simulation, along with the rule that no instruction writes both the
register file and the data memory.

### OR plane

Each control signal is the OR of the instructions that need it:

```
RegDst   = add + sub              ALUSrc   = ori + lw + sw
MemtoReg = lw                     RegWrite = add + sub + ori + lw
MemWrite = sw                     nPC_sel  = beq
Jump     = jump                   ExtOp    = lw + sw
ALUctr[0] = sub + beq             ALUctr[1] = ori
```

### Don't-cares

Many table entries are don't-cares. For example, RegDst does not matter for
`sw`, and MemtoReg does not matter for `beq`. These sums-of-products give 0
for every one of them. A designer can exploit this freedom to shrink the
array. The resulting table, which the controller testbench checks
exhaustively, is:

| instr | RegDst | ALUSrc | MemtoReg | RegWrite | MemWrite | nPC_sel | Jump | ExtOp | ALUctr |
|-------|---|---|---|---|---|---|---|---|-----|
| add   | 1 | 0 | 0 | 1 | 0 | 0 | 0 | 0 | ADD |
| sub   | 1 | 0 | 0 | 1 | 0 | 0 | 0 | 0 | SUB |
| ori   | 0 | 1 | 0 | 1 | 0 | 0 | 0 | 0 | OR  |
| lw    | 0 | 1 | 1 | 1 | 0 | 0 | 0 | 1 | ADD |
| sw    | 0 | 1 | 0 | 0 | 1 | 0 | 0 | 1 | ADD |
| beq   | 0 | 0 | 0 | 0 | 0 | 1 | 0 | 0 | SUB |
| j     | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 0 | ADD |

## Next-PC logic

The PC register holds bits 31:2. Bits 1:0 are always `00`, because every
instruction is word aligned. Each cycle, the next PC is chosen in two steps:

1. Two adders form `PC + 4` and `PC + 4 + (SignExt(imm16) << 2)`. A
   multiplexer picks the second one when `nPC_MUX_sel = nPC_sel & Zero`. In
   other words, the controller's nPC_sel only says "this is a branch", and
   the ALU's Zero flag says whether it is taken. For `beq` the ALU computes
   `R[rs] - R[rt]`, so Zero means the two registers are equal.
2. A second multiplexer replaces that result with the jump target
   `{PC[31:28], target, 00}` when Jump is 1. The jump path bypasses the
   branch logic, so nPC_sel does not matter during a jump.

The upper four bits of the jump target come from the PC of the jump itself.
Standard MIPS takes them from PC + 4 instead. The two differ only when a jump
sits in the last word of a 256 MB region.

## Timing

- Everything between the PC register and the state elements is
  combinational. This includes instruction memory read, controller,
  register read, extender, ALU, data memory read and the write-back
  multiplexer.
- The register file, the data memory and the PC are written at the rising
  edge.
- The register file and both memories read combinationally. A value written
  by one instruction is therefore read correctly by the next one.
- `rst_n` is synchronous and active low. While it is low, the PC is held at
  0 and no register or memory write takes place. This lets you load the
  memories and registers before releasing reset without the instruction at
  address 0 corrupting them.

## Choices made in this design

These are choices where the design's source gives no value, or where its
statements disagree:

- **Memory sizes.** Both memories default to 1024 words (`IMEM_WORDS` and
  `DMEM_WORDS` on the top). Addresses are 32 bits. Word-index bits above the
  memory size are ignored, so each memory repeats through the address space.
  Address bits 1:0 are also ignored, because only whole words are accessed.
- **Register 0** always reads zero and ignores writes, as in MIPS. Registers
  and memories are not reset.
- **ALU.** Code `11` is unused and gives 0. Overflow is not detected;
  results wrap.
- **Store data** is R[rt], taken from busB.
- **ALUctr** is 2 bits wide.
- **Reset** (see Timing) is this design's own addition.
- **Unknown instructions** are executed as no-ops.
- **Loading programs.** The instruction memory is loaded from outside. You
  can give a `$readmemh` file through the `INIT_FILE` parameter of
  `inst_memory`, or write `u_ifu.u_imem.mem` from a testbench. The
  processor never writes its instruction memory.
- **Observation ports.** The top brings out `pc`, `instr`, the `ctrl`
  struct, `zero`, `alu_y` (which is also the data address), `busb` (the
  store data) and `busw` (the write-back value).

The computer around the processor is not modelled. Its input and output
devices have no defined interface here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it does |
|-----------|--------------|
| `tb_ctrl_and_plane`, `tb_control` | All 4096 op/funct pairs against the table above |
| `tb_ctrl_or_plane` | All 128 patterns of decoded lines |
| `tb_extender` | All 65536 immediates, both modes |
| `tb_alu` | Corner and random operands for all three operations, plus Zero |
| `tb_regfile`, `tb_data_memory` | Random traffic against an array model, checked before and after each edge |
| `tb_inst_memory` | Pattern fill and readback |
| `tb_instr_fetch_unit` | Random npc_sel/zero/jump over random instruction words; every path is checked and counted |
| `tb_datapath` | The testbench acts as the controller. It runs 20000 random add/sub/ori/lw/sw/beq instructions against a register and memory model |
| `tb_single_cycle_cpu` | End to end at the default sizes (details below) |

`tb_single_cycle_cpu` has two parts:

- **A hand-written loop program.** It uses store, load, add, sub, a taken
  and an untaken `beq`, `j`, a negative offset, a zero-extended immediate
  with bit 15 set, and a write to r0. The test checks the cycle count to the
  halt, one instruction per cycle, as well as the final registers and
  memory.
- **Ten random programs.** Each runs for 2000 cycles in lockstep with an
  instruction-level model inside the testbench. The test compares the PC and
  the write-back value every cycle, and all registers and data memory at the
  end.

It counts each mechanism and fails if any of them never occurs.

`tb_asm_pkg` holds the instruction encoders used by the testbenches.

To simulate a test with Verilator 5, run this from the folder that holds
`rtl/` and `tb/`. Verilator finds every other module by its file name.

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/cpu_pkg.sv tb/tb_asm_pkg.sv \
    tb/tb_single_cycle_cpu.sv -o sim
./obj_dir/sim
```

For other tests, change the testbench file. The whole end-to-end test runs
in well under a second.

## Changing it

- **Adding an instruction** takes three edits:
  - a product term in `ctrl_and_plane` and a field in `dec_t`;
  - the new line ORed into the right signals in `ctrl_or_plane`;
  - a row in the tables of `tb_control` and `tb_ctrl_or_plane`, and a case
    in the model in `tb_single_cycle_cpu`.
- **A new ALU operation** needs a wider `alu_ctr_e` and a case in `alu`.
- **Memory sizes** are the top's two parameters. The testbenches use the
  defaults, and they hard-code the word-index bits [11:2] that 1024 words
  imply.
