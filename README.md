# Two-way superscalar MIPS pipeline

A five-stage MIPS pipeline (Fetch, Decode, Execute, Memory, Write-back) that
issues **two instructions per clock**. Each cycle it fetches an aligned or
unaligned *pair* of consecutive instructions. The first goes down lane 1 and
the second down lane 2. The two lanes are copies of the classic single-issue
teaching pipeline: each has its own control unit, sign extension, ALU and four
pipeline registers. The instruction memory, the register file and the data
memory are shared. The hazard unit works across lanes, so a result made in
either lane can be forwarded to an operand of either lane. With no stalls the
machine retires two instructions per cycle (CPI 0.5).

The design keeps the simple in-order pipeline and asks the program to do part
of the work. A branch or jump may only be the first instruction of a pair, and
the two instructions of a pair must not depend on each other. Everything
between *different* pairs is handled in hardware.

## Datapath at a glance

```
              +-------- lane 1 ------------------------------------------+
 PC --> imem  | F/D1 -> Decode1 (CU1, branch unit) -> D/E1 -> ALU1 -> E/M1 -> M/W1 --> ResultW1
  ^   {RAM[a],|                       |  regfile  |             |  dmem  |
  |   RAM[a+1]| F/D2 -> Decode2 (CU2)  -> D/E2 -> ALU2 -> E/M2 -> M/W2 --> ResultW2
  |    64 bit +-------- lane 2 ------------------------------------------+
  +-- PC+8 | branch target (PC+4 + imm*4) | jump target
```

* **Fetch.** `imem` returns `{RAM[a], RAM[a+1]}` on a 64-bit port, where `a`
  is `PC[31:2]`. Bits 63:32 are the lane-1 instruction and bits 31:0 the
  lane-2 instruction. So control unit 1 decodes opcode bits 63:58 and function
  bits 37:32, and control unit 2 decodes bits 31:26 and 5:0. The PC advances by
  8.
* **Decode.** One register file with four read ports serves rs and rt of both
  lanes. A write in the same cycle as a read is passed through to the read.
  Only lane 1 has the branch unit and the jump logic.
* **Execute.** Each lane has two five-input forwarding multiplexers and an
  ALU.
* **Memory.** One data memory with one port per lane.
* **Write-back.** Two register-file write ports. If both lanes write one
  register, lane 2 wins because it holds the later instruction.

## Forwarding between lanes

This is the part that differs most from a single-issue pipeline. Each Execute
operand (`rs`, `rt` of lane 1 and of lane 2) comes through a 5:1 multiplexer
(`fwd_mux`) with these inputs:

| select | value | path |
|---|---|---|
| `FWD_RF` | register file value read in Decode | no hazard |
| `FWD_M1` | `ALUOutM1` | lane 1 Memory → Execute (lane 1: within lane, lane 2: cross) |
| `FWD_M2` | `ALUOutM2` | lane 2 Memory → Execute (lane 2: within lane, lane 1: cross) |
| `FWD_W1` | `ResultW1` | lane 1 Write-back → Execute |
| `FWD_W2` | `ResultW2` | lane 2 Write-back → Execute |

Several stages may hold a write to the same register. `hazard_unit` then picks
the youngest in program order: **M2, then M1, then W2, then W1**. The Memory
stage is younger than Write-back. Within a stage, lane 2 is younger than
lane 1. Register `$0` is never forwarded.

Two examples:

* `add $3,$2,$2` in lane 1 right after a pair whose lane 2 wrote `$2` takes
  `ALUOutM2` (cross-lane Memory → Execute).
* `add $4,$1,$1` in lane 2 right after a pair whose lane 1 wrote `$1` takes
  `ALUOutM1`.

The branch comparator in Decode has two smaller multiplexers of its own. They
choose between the register file value, `ALUOutM1` and `ALUOutM2`, again with
lane 2 preferred.

## Stalls

Both lanes always stall together, so a pair stays a pair.

* **Load-use.** A `lw` in Execute (either lane) whose destination is a source
  of either Decode instruction causes a stall. Fetch and Decode hold for one
  cycle and both Execute stages get a bubble. The consumer then takes the
  loaded value from Write-back.
* **Branch operand.** A lane-1 `beq` in Decode can need a register that is
  still being computed in Execute (either lane), or still being loaded in
  Memory (either lane). It then waits one cycle, or two behind a load. After
  that it takes its operands from the Memory stage or the register file.

## Branches and jumps

`beq` and `j` are decoded only by control unit 1. Control unit 2 has its
`BRANCH_EN` parameter at 0 and never asserts `branch` or `jump`. An assertion
in the core checks this. Both resolve in Decode:

* `beq rs, rt, off`: taken when the forwarded operands are equal
  (`pcsrc = branch & (a == b)`). The target is `(signext(off) << 2) + PC + 4`,
  where PC is the address of the `beq`. The sequential next PC is PC+8, but the
  offset still counts from PC+4, as MIPS defines it. So the assembler's usual
  offsets work unchanged.
* `j target`: goes to `{PC+4[31:28], target, 2'b00}`.

When the PC is redirected, the pair fetched behind the branch is dropped. The
instruction in the **second slot of the branch's own pair** is already in
Decode, and it completes. It behaves as a MIPS branch delay slot. A taken
branch or jump therefore costs one cycle, which is one pair.

## Rules for programs

The hardware does not check these; a program that breaks them gives wrong
results.

1. `beq` and `j` only in the first slot of a pair, and their targets keep the
   pair boundaries the program expects. A pair is whatever two words start at
   the target.
2. The second instruction of a pair must not read a register written by the
   first. Both instructions reach Execute together and nothing forwards from
   one to the other.
3. The second instruction must not load from a word the first one stores to.
   Both reach the data memory in the same cycle.
4. The second slot after a `beq`/`j` always executes. Put a `nop` there if that
   is not wanted.

Two writes to the same register or memory word within a pair are allowed; the
second instruction's value is kept.

## Instruction set

`add sub and or slt` (R-type), `addi lw sw beq j`, with the standard MIPS
encodings. `slt` is signed. Any other opcode or function code is a no-op: no
register or memory write. The all-zero word is the bubble and the `nop`. Data
addresses are word addresses; the two low bits are ignored.

## Timing

* Reset is synchronous and active high. It clears the PC and all eight
  pipeline registers; execution starts at address 0.
* A pair fetched in cycle *n* writes back its results in cycle *n*+4.
* Twelve independent instructions retire in six consecutive cycles.
* Costs: a load-use hazard costs 1 cycle, a branch stall 1 cycle (2 behind a
  load), and a taken branch or jump 1 cycle.
* The register file and the data memory write at the rising edge. Their reads
  are combinational. The instruction memory is a combinational-read ROM.

## Files

| file | contents |
|---|---|
| `rtl/mips_ss_pkg.sv` | opcodes, ALU codes, control word `ctrl_t`, forwarding selects, pipeline register structs |
| `rtl/mips_ss_top.sv` | top: core + `imem` + `dmem`; outputs `result_w1/2`, `writereg_w1/2`, `regwrite_w1/2` |
| `rtl/mips_ss_core.sv` | the two-lane pipeline without memories |
| `rtl/hazard_unit.sv` | forwarding selects, load-use and branch stalls |
| `rtl/fwd_mux.sv` | 5:1 Execute forwarding multiplexer |
| `rtl/control_unit.sv` | main + ALU decoder; `BRANCH_EN` selects unit 1 or unit 2 behaviour |
| `rtl/branch_unit.sv` | lane-1 sign extension, shift, PC+4 adder, equality comparator, AND |
| `rtl/alu.sv` | ALU |
| `rtl/regfile.sv` | 32×32 register file, 4 read / 2 write ports |
| `rtl/imem.sv` | pair-reading instruction ROM, loaded by `$readmemh` |
| `rtl/dmem.sv` | two-port data RAM |
| `rtl/pipe_reg.sv` | type-parameterised pipeline register with enable (stall) and clear (flush) |
| `rtl/mips_ss_demo.hex` | default program: the branch example below plus a load-use pair |

Parameters of the top: `IMEM_WORDS = 64` and `DMEM_WORDS = 64`. `IMEM_FILE`
defaults to `"rtl/mips_ss_demo.hex"`. The path is relative to the directory the
tool runs in, so run from the repository root, or pass your own file (one hex
word per line, word 0 first). On an FPGA board, `result_w1` and `result_w2` are
meant to drive two banks of LEDs. Clock and reset come from board inputs.

The default program shows the branch rule:

```
        addi $s0, $0, 0
        addi $t1, $0, 33
        beq  $s0, $0, label     # taken; offset counted from this address + 4
        addi $s0, $0, 1         # second slot: executes
        addi $t0, $0, 77        # dropped
        addi $t2, $0, 77        # dropped
label:  sw   $s0, 80($0)        # stores 1
        add  $t0, $t1, $s0      # $t0 = 34
        lw   $t3, 80($0)
        addi $t4, $0, 7
        add  $t5, $t3, $t0      # load-use: one stall, $t5 = 35
        sub  $t6, $t0, $t4      # $t6 = 27
done:   j    done
        nop
```

## Simulation

Every testbench in `tb/` checks itself. Each one ends by printing
`TB_RESULT checks=N failures=M`. From the repository root, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module mips_ss_top_tb rtl/mips_ss_pkg.sv tb/mips_asm_pkg.sv tb/mips_ss_top_tb.sv
./obj_dir/Vmips_ss_top_tb
```

Replace `mips_ss_top_tb` by any other `*_tb` to run a unit test.

* `mips_ss_top_tb` runs the top at its default sizes. It checks:
  * the default program;
  * the CPI 0.5 throughput and the fetch-to-write-back latency;
  * the branch example;
  * 300 random programs with forward branches and jumps, following the rules
    above. After each program it compares all registers and all data memory
    with a sequential reference model (`tb/mips_asm_pkg.sv`).

  It also counts every mechanism: both stalls, taken and not-taken branches,
  jumps, all eight lane×source forwarding paths, comparator forwarding and dual
  write-back. A mechanism that never occurs counts as a failure.
* `mips_ss_core_tb` checks the core edge by edge against hand-worked schedules.
  The cases are cross-lane forwarding without a stall, the one-cycle load-use
  bubble, the taken-branch bubble with its executed second slot, and the
  one-cycle branch stall.
* Unit tests: `alu_tb`, `fwd_mux_tb`, `control_unit_tb`, `branch_unit_tb`,
  `regfile_tb`, `imem_tb`, `dmem_tb`, `pipe_reg_tb`, `hazard_unit_tb`. Most use
  random stimulus against an independent model.

The random program generator in `mips_ss_top_tb` encodes the program rules.
Change it to explore other instruction mixes.

## What is specified and what is chosen here

These parts follow the design as specified:

* pair fetch from a 64-bit instruction memory port and the lane bit split;
* two lanes with doubled control units, sign extension, ALUs and pipeline
  registers, and one shared instruction memory, register file and data memory;
* PC+8 sequencing and a branch target relative to PC+4;
* branch and jump in lane 1 only, with an equality comparator ANDed with the
  branch signal;
* five-input Execute forwarding from the Memory and Write-back stages of both
  lanes;
* result outputs for the two lanes.

These are this implementation's own choices:

* the instruction subset;
* the ALU codes;
* 64-word memories;
* register-file write-through and the two-write-port priority;
* a two-port data memory;
* load-use and branch stalls carried over from the single-issue pipeline and
  applied to both lanes;
* forwarding priority by program order;
* Decode-stage forwarding for the comparator;
* the jump target format;
* keeping the second slot of a branch pair as a delay slot;
* synchronous reset;
* the demonstration program.

Known limits:

* Dependencies inside a pair are not detected (rules 2 and 3 above).
* There is no exception or interrupt handling.
* Only the ten listed instructions are implemented.
* No FPGA timing, area or power figures are claimed for this RTL. Those depend
  on the target device and its tools.
