# Single-cycle MIPS-subset processor

A processor that runs every instruction in one clock cycle. It supports seven
MIPS instructions: `add`, `sub`, `ori`, `lw`, `sw`, `beq` and `j`. There is no
pipeline and no multi-cycle sequencing. The instruction at PC is read, decoded,
executed and retired within one period. PC, the register file and data memory
all update together at the rising clock edge that ends the period. CPI is
exactly 1. The clock period must cover the slowest path:
instruction memory → register read → ALU → data memory → register write (`lw`).

The design splits into two parts:

* a **datapath** of standard components (register file, ALU, extender, data
  memory, three multiplexers and an instruction fetch unit), and
* a **controller**: a purely combinational decoder that turns the opcode and
  function fields into the datapath's nine control points.

## Instruction formats and semantics

```
R-type  op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
I-type  op[31:26] rs[25:21] rt[20:16] imm16[15:0]
J-type  op[31:26] target[25:0]
```

| instr | op      | funct   | register transfer                                     |
|-------|---------|---------|-------------------------------------------------------|
| add   | 000000  | 100000  | R[rd] = R[rs] + R[rt]                                 |
| sub   | 000000  | 100110  | R[rd] = R[rs] − R[rt]                                 |
| ori   | 001101  | –       | R[rt] = R[rs] \| ZeroExt(imm16)                       |
| lw    | 100011  | –       | R[rt] = M[R[rs] + SignExt(imm16)]                     |
| sw    | 101011  | –       | M[R[rs] + SignExt(imm16)] = R[rt]                     |
| beq   | 000100  | –       | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)·4     |
| j     | 000010  | –       | PC = {PC[31:28], target, 00}                          |

Every other instruction sets PC = PC + 4.

**Compatibility note.** The `sub` function code is `100110`, as this design
defines it. Stock MIPS uses `100010` for `sub` (and `100110` for `xor`). To run
standard MIPS binaries, change `FUNCT_SUB` in `rtl/mips_pkg.sv`; the testbench
helper `tb/mips_tb_pkg.sv` holds its own copy (`T_FN_SUB`). The jump takes
its top four bits from the current PC, not from PC + 4 as stock MIPS does. The
two differ only for a jump in the last word of a 256 MB region.

## The datapath, one cycle

`rtl/datapath.sv` wires the components like this:

1. **Fetch.** The instruction fetch unit (`ifu`) presents `instr = IMEM[PC]`.
2. **Register read.** `busA = R[rs]` and `busB = R[rt]`. Both read ports are
   combinational.
3. **Immediate.** The `extender` widens imm16. It fills with zeros when
   `ExtOp = 0` (ori) and with bit 15 when `ExtOp = 1` (lw, sw).
4. **ALU.** The **ALUSrc** mux picks the second operand: busB (0) or the
   immediate (1). The `alu` computes ADD, SUB or OR. Its `equal` output is 1
   when the result is zero, so under SUB it means busA == busB.
5. **Memory.** `data_mem` is addressed by the ALU result. Data In is busB, so
   `sw` stores R[rt]. The write is enabled by **MemWr**.
6. **Write back.** The **MemtoReg** mux puts the ALU result (0) or the memory
   word (1) on busW. The **RegDst** mux picks rt (0) or rd (1) as the
   destination. The register file writes when **RegWr** is 1.
7. **Next PC.** The fetch unit picks the next PC from **nPC_sel**, Equal and
   **Jump**.

Nothing is latched mid-cycle. The register file, data memory and PC register
all write at the same rising edge. Their read sides are combinational, so the
values settle during the following cycle.

## The instruction fetch unit

`rtl/ifu.sv` holds the PC register and the instruction memory. Instructions
are word aligned, so the register stores only PC[31:2] and PC[1:0] is always
`00`. Two adders run in parallel:

* `PC + 4`, and
* `PC + 4 + (SignExt(imm16) << 2)`, where the "PC Ext" block does the sign
  extension and the ×4.

The branch mux takes the branch target only when `nPC_sel AND Equal`:

| nPC_sel | Equal | next PC            |
|---------|-------|--------------------|
| 0       | x     | PC + 4             |
| 1       | 0     | PC + 4             |
| 1       | 1     | branch target      |

So the controller does not need to know the outcome. It only says "this is a
branch", and the ALU's Equal decides. A second mux after the branch mux
selects the jump target `{PC[31:28], target, 00}` when `Jump = 1`.

## The controller

`rtl/control.sv` works like a two-plane PLA.

* **AND plane.** Each instruction gets one line: `add`, `sub`, `ori`, `lw`,
  `sw`, `beq`, `jump`. The line is true when op matches. For `add` and `sub`,
  the op must be 000000 and funct must match too.
* **OR plane.** Each control point is the OR of the instructions that need it:

```
RegDst   = add + sub              ALUSrc    = ori + lw + sw
MemtoReg = lw                     RegWrite  = add + sub + ori + lw
MemWrite = sw                     nPCsel    = beq
Jump     = jump                   ExtOp     = lw + sw
ALUctr[0] = sub + beq             ALUctr[1] = ori      (00 ADD, 01 SUB, 10 OR)
```

The full truth table, with x for "don't care":

| signal   | add | sub | ori | lw  | sw  | beq | j   |
|----------|-----|-----|-----|-----|-----|-----|-----|
| RegDst   | 1   | 1   | 0   | 0   | x   | x   | x   |
| ALUSrc   | 0   | 0   | 1   | 1   | 1   | 0   | x   |
| MemtoReg | 0   | 0   | 0   | 1   | x   | x   | x   |
| RegWrite | 1   | 1   | 1   | 1   | 0   | 0   | 0   |
| MemWrite | 0   | 0   | 0   | 0   | 1   | 0   | 0   |
| nPCsel   | 0   | 0   | 0   | 0   | 0   | 1   | 0   |
| Jump     | 0   | 0   | 0   | 0   | 0   | 0   | 1   |
| ExtOp    | x   | x   | 0   | 1   | 1   | x   | x   |
| ALUctr   | ADD | SUB | OR  | ADD | ADD | SUB | x   |

The OR-plane equations set every x entry to 0. An unknown opcode or function
code raises no AND line. Nothing is then written and PC advances by 4, so
unknown instructions act as no-ops. The control points travel to the datapath
as one packed struct, `mips_pkg::ctrl_t`. Immediate assertions in the
controller check three rules. At most one instruction line is active. No
instruction writes both a register and memory. No instruction is both a
branch and a jump.

## Choices made in this implementation

These points are this implementation's own choices:

* **Reset.** Asynchronous and active low (`rst_n`). It sets PC to 0 and
  clears all 32 registers. Memory contents are not reset.
* **Register 0.** Reads as zero and ignores writes (the MIPS convention).
* **Memories.** Instruction and data memory each hold 1024 32-bit words
  (`IMEM_DEPTH`, `DMEM_DEPTH`). Only whole words are accessed. Address bits
  1:0 are ignored, and addresses past the end wrap around. Both read
  combinationally, which a single-cycle design needs. The data memory writes
  at the rising edge.
* **Program loading.** The instruction memory has a separate write port
  (`prog_we`, `prog_addr`, `prog_wdata`) that the top brings out. Load the
  program while reset is held.
* **Arithmetic.** No overflow detection. `add` and `sub` wrap modulo 2³².
* **ALU code 11.** Unused; the ALU outputs zero for it.

## Files

| file | contents |
|------|----------|
| `rtl/mips_pkg.sv` | opcodes, function codes, `alu_ctr_e`, `ctrl_t`, field extractors |
| `rtl/single_cycle_cpu.sv` | top: controller + datapath |
| `rtl/control.sv` | AND/OR-plane controller |
| `rtl/datapath.sv` | datapath wiring |
| `rtl/ifu.sv` | PC, next-PC logic, instruction memory instance |
| `rtl/inst_mem.sv`, `rtl/data_mem.sv` | memories |
| `rtl/regfile.sv` | 32 × 32 register file |
| `rtl/alu.sv`, `rtl/extender.sv`, `rtl/mux2.sv` | datapath components |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/mips_tb_pkg.sv` | instruction encoders and an instruction-level reference model |

Top-level ports of `single_cycle_cpu`: `clk`, `rst_n`, `prog_we`,
`prog_addr[31:0]`, `prog_wdata[31:0]`, and the outputs `pc[31:0]` and
`instr[31:0]`, which show the instruction executing in the current cycle.

## Verification

Each testbench checks its module against values it computes on its own. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `single_cycle_cpu_tb` runs at the default sizes. It first runs a directed
  program: a store loop and a load-and-sum loop built from `sw`, `add`, `sub`,
  `beq` and `j`. The sum must be 55. The program also does a store and load
  with a negative offset, an `ori` whose immediate must zero-extend, and an
  ignored write to register 0. The testbench then runs eight programs of
  random instructions. A reference model (`mips_tb_pkg::mips_ref_model`) runs
  alongside. Every cycle the PC must match. After every edge all 32
  registers must match, which also confirms CPI = 1. Data memory is compared
  at the end of each program. The test fails unless every instruction, both
  `beq` outcomes and a register-0 write all occur. About 16,000 cycles take
  well under a second.
* `datapath_tb` runs the same programs on the datapath alone. It drives the
  control points from its own copy of the truth table and randomises the
  don't-care entries.
* The component testbenches cover reset, the register-0 rule, write timing,
  the ALU's Equal flag, zero and sign extension, every next-PC case, and all
  seven instructions plus random unknown codes for the controller.

The CPU and datapath testbenches reach inside the design by hierarchical name
in two places. They read the register array (`u_rf.regs`) and preset and read
the data memory array (`u_dmem.mem`). If you rename those instances or
arrays, update the testbenches too.

Simulating with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module single_cycle_cpu_tb \
  -y rtl -y tb +libext+.sv rtl/mips_pkg.sv tb/mips_tb_pkg.sv tb/single_cycle_cpu_tb.sv
./obj_dir/Vsingle_cycle_cpu_tb
```

For any other module, swap in `<module>_tb` for the top module and the file
name. Lint reports unused bits of the field-extractor function arguments in
`mips_pkg`. Those bits are unused by design; each extractor returns only its
own slice.
