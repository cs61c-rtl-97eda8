# MIPS-lite single-cycle processor

This is a processor that finishes one instruction on every clock edge. It runs
a six-instruction subset of MIPS: `addu`, `subu`, `ori`, `lw`, `sw` and `beq`.
All the work of an instruction happens inside one clock period:

- fetch the instruction
- read two registers
- compute in the ALU
- read or write data memory
- decide the next PC

The PC, the register file and the data memory then update together on the next
rising edge. The design is kept simple on purpose. It shows how the meaning of
each instruction, written as a register transfer, turns into a set of datapath
parts plus the control settings that steer them.

Each instruction's meaning:

| instruction        | register transfer                                   |
|--------------------|-----------------------------------------------------|
| `addu rd,rs,rt`    | R[rd] = R[rs] + R[rt]; PC = PC + 4                  |
| `subu rd,rs,rt`    | R[rd] = R[rs] - R[rt]; PC = PC + 4                  |
| `ori rt,rs,imm16`  | R[rt] = R[rs] \| zero_ext(imm16); PC = PC + 4        |
| `lw rt,imm16(rs)`  | R[rt] = MEM[R[rs] + sign_ext(imm16)]; PC = PC + 4   |
| `sw rt,imm16(rs)`  | MEM[R[rs] + sign_ext(imm16)] = R[rt]; PC = PC + 4   |
| `beq rs,rt,imm16`  | if R[rs] == R[rt]: PC = PC + 4 + sign_ext(imm16)·4, else PC + 4 |

Instructions are 32 bits. R-type instructions have the fields op[31:26],
rs[25:21], rt[20:16], rd[15:11], shamt[10:6] and funct[5:0]. I-type
instructions have op, rs, rt and imm16[15:0]. The opcodes are the standard MIPS
ones:

- R-type: op 0x00, with funct `addu` 0x21 and `subu` 0x23
- `ori` 0x0d, `lw` 0x23, `sw` 0x2b, `beq` 0x04

Any other encoding does nothing and moves to PC + 4.

## How one instruction flows through the datapath

```
PC ──> instr mem ──> rs, rt, rd, imm16
                      │
 rs, rt ──> register file ──> busA ─────────────> ALU A
                             busB ──┐
 imm16 ──> extender ──> imm32 ──────┴─[ALUSrc]──> ALU B
 ALU result ──> data mem address      busB ──> data mem write data
 ALU result / mem word ──[MemtoReg]──> register file write data
 rt / rd ──[RegDst]──> register file write address
 PC + 4 ─────────────────────────┐
 PC + 4 + (imm32 << 2) ──────────┴─[branch & zero]──> next PC
```

- **PC and next PC** (`pc_reg`, two `add32`, `left_shift2`, `mux32`). One
  adder always forms PC + 4. A second adder forms the branch target: PC + 4
  plus the sign-extended offset shifted left by two. The PC-source mux picks
  the branch target only when the control says `branch` and the ALU's `zero`
  flag is 1. PC + 4 has an adder of its own because the ALU is busy with the
  instruction in the same cycle.
- **Register file** (`regfile`). 32 registers of 32 bits, with two read ports
  (rs and rt) and one write port, so one instruction can read two registers
  and write a third. Reads are combinational. The write lands on the rising
  edge, so a read of the register being written sees the old value during
  the cycle. Register 0 always reads 0.
- **Extender** (`extender`). Widens imm16 to 32 bits. `lw`, `sw` and `beq` fill
  the top with the sign bit. `ori` fills it with zeros. One select input,
  `ext_op`, chooses which.
- **ALU** (`alu`). A 3-bit operation code picks the operation:

  | code  | operation |
  |-------|-----------|
  | 000   | AND       |
  | 001   | OR        |
  | 010   | add       |
  | 110   | subtract  |
  | 111   | set-on-less-than (signed) |
  | other | result 0  |

  `zero` is 1 when the result is 0. After a subtract, `zero` is the
  equality test that `beq` needs, so no separate comparator is built.
- **Data memory** (`mem`). The ALU result is the byte address and R[rt] is the
  store data. The loaded word goes to the write-back mux.
- **Write-back**. The destination is rd for R-type instructions and rt for
  `ori` and `lw` (the RegDst mux, 5 bits wide). The value written is the ALU
  result, or the memory word for `lw` (the MemtoReg mux).

### Set-on-less-than

A comparison that only looks at the sign of A - B is wrong when the
subtraction overflows. For example, A = 0x80000000 and B = 1 gives A - B =
0x7fffffff, which is positive, yet A < B. The ALU avoids this:

- If A and B have the same sign, A - B cannot overflow, so its sign decides.
- If the signs differ, A < B exactly when A is negative, so the result is
  A[31].

The subset above does not use `slt`. It is in the ALU because the ALU is meant
to serve the rest of the MIPS instruction set as well.

## Control

`control` is a combinational decoder from op and funct to the `ctrl_t` struct
of control points, defined in `mips_lite_pkg`:

| instr | reg_dst | alu_src | mem_to_reg | reg_wr | mem_wr | branch | ext_op | alu_ctrl |
|-------|---------|---------|------------|--------|--------|--------|--------|----------|
| addu  | 1 | 0 | 0 | 1 | 0 | 0 | - | add |
| subu  | 1 | 0 | 0 | 1 | 0 | 0 | - | sub |
| ori   | 0 | 1 | 0 | 1 | 0 | 0 | 0 | or  |
| lw    | 0 | 1 | 1 | 1 | 0 | 0 | 1 | add |
| sw    | - | 1 | 0 | 0 | 1 | 0 | 1 | add |
| beq   | - | 0 | 0 | 0 | 0 | 1 | 1 | sub |

Each row is read directly off that instruction's register transfer. The signal
names and this table belong to this implementation.

## Memories and timing

`mem` is an idealized memory of 256 words × 32 bits (parameter `MEM_WORDS`):

- **Read** is combinational while `RD` = 1: the word at `address[9:2]`
  appears on `readD` after the access time, with no clock involved.
- **Write** happens on the rising edge of `CLK` when `WR` = 1. The clock
  matters only for writes.
- The two low address bits and the bits above bit 9 are ignored. A word
  address therefore wraps every 1 KiB.
- While `RD` = 0, `readD` is 0.

`mips_lite_computer` uses two instances of `mem`: one for instructions and one
for data. A single-cycle machine fetches and loads in the same cycle, so one
single-ported memory cannot serve both.

The clock period has to cover the slowest instruction, `lw`:

1. instruction read
2. register read
3. address add
4. data read
5. write-back mux and register set-up

Every instruction takes exactly one cycle (CPI = 1).

## Top level: `mips_lite_computer`

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1  | clock; all state changes on the rising edge |
| `rst`       | in  | 1  | synchronous reset: PC = 0; no register or data-memory writes while high |
| `load_we`   | in  | 1  | while `rst` is high: write `load_data` into the instruction memory |
| `load_addr` | in  | 32 | byte address of that instruction word |
| `load_data` | in  | 32 | instruction word |
| `pc`        | out | 32 | current PC |
| `instr`     | out | 32 | instruction executing this cycle |

To run a program:

1. Hold `rst` high.
2. Write the program words through the loader port, one per clock.
3. Drop `rst`. Execution starts at address 0.

The register file and the memories are not reset. A program should set a
register, for example with `ori`, before reading it. A `beq $0,$0,-1` parks
the processor in a loop.

## Files

| file | contents |
|------|----------|
| `rtl/mips_lite_pkg.sv` | opcodes, ALU codes (`alu_ctrl_e`), control struct `ctrl_t`, field helpers |
| `rtl/mips_lite_computer.sv` | top: control, datapath, instruction and data memories, loader port |
| `rtl/datapath.sv` | PC, adders, extender, shifter, register file, ALU and muxes |
| `rtl/control.sv` | main decoder |
| `rtl/alu.sv`, `rtl/regfile.sv`, `rtl/mem.sv` | ALU, register file, memory |
| `rtl/add32.sv`, `rtl/mux32.sv`, `rtl/extender.sv`, `rtl/left_shift2.sv`, `rtl/pc_reg.sv` | building blocks |
| `tb/tb_<module>.sv` | one self-checking bench per module |
| `tb/mips_lite_ref_pkg.sv` | instruction-level reference model and instruction encoders used by the benches |

`add32` has `CarryIn` and `CarryOut`. The datapath ties `CarryIn` low and
leaves `CarryOut` unused. `mux32` and `add32` have a `WIDTH` parameter.

## Simulating

Every bench prints `TB_RESULT checks=N failures=M` and stops on its own. Each
also has a watchdog that counts a failure if the bench hangs. Run a bench from
the project root like this:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/mips_lite_pkg.sv tb/mips_lite_ref_pkg.sv tb/tb_mips_lite_computer.sv \
  --top-module tb_mips_lite_computer -o sim
./obj_dir/sim
```

For the other benches, replace the bench name. The benches that do not use the
packages need only their own file plus `-y rtl`.

`tb_mips_lite_computer` runs the top at its default size in two phases:

1. **Directed program.** The program fills an 8-word array with `sw` in a
   loop, sums the array back with `lw`/`addu`, and stores the sum and a
   `subu` result. The bench compares the sum with a value worked out by hand
   (0x1234 · 255).
2. **Random program.** The bench loads a 256-word random program, with forward branches only, and runs it
   for 2000 cycles.

In both phases the reference model runs in lock step. The bench compares:

- the fetched instruction and the PC, every cycle
- the whole register file and data memory, at the end

It also counts how many times each of these happened, and fails if any never
did:

- each instruction
- taken and not-taken branches
- loader writes
- resets

`tb_datapath` feeds random instructions straight into the datapath and checks
store requests and the PC every cycle.

## Where this implementation makes its own choices

- **Opcode and funct numbers** are the standard MIPS values.
- **Separate memories.** Instruction and data memory are two instances of
  the same memory.
- **Program loading.** Programs go in through a loader port that is active
  during reset. There is no load from a file.
- **No memory dump.** There is no dump-to-file port. Benches read
  `memArray` hierarchically instead.
- **Memory with RD = 0.** `readD` is 0 while `RD` = 0. It does not hold the
  last value read, because holding it would infer a latch.
- **Register 0** is hard-wired to zero.
- **Reset.** The PC resets synchronously to 0. Nothing else is reset.
- **Unused ALU codes.** The three spare ALU codes give 0.
- **Extender.** The extender can zero-extend as well as sign-extend, so that
  `ori` works.
- **Active clock edge.** All storage uses the rising clock edge.
- **Control.** The control table and its signal names are this design's
  own: the control logic is derived here from the register transfers.
- **Not built.** Input and output devices are not modelled. The processor has
  no instructions that reach them.
