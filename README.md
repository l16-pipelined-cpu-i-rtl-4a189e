# Pipelined miniMIPS: a 4-stage core with bypassing and 2-stage cores with branch annulment

A single-cycle MIPS-style processor has to fit every step of an instruction
into one clock period. That means fetch, register read, ALU, data memory and
register write, and the period must cover the slowest instruction. Pipelining
splits that path with registers so the clock can run at the speed of one piece.
Each instruction still takes about the same time, but a new one starts every
cycle. The price is *hazards*: an instruction may need a register value or a
branch decision that an instruction ahead of it has not produced yet.

This repository holds three pipelined versions of the miniMIPS datapath. They
show different answers to those hazards:

| | `minimips4` (main design) | `minimips2` | `minimips2mc` |
|---|---|---|---|
| stages | IF, RF, ALU, WB | IF, EXE | IF, EXE |
| branch decision | RF stage, by an equality comparator | EXE stage, by the same comparator | as `minimips2` |
| instruction after a branch or jump | **always executed** (one delay slot) | **annulled** (replaced by a NOP) when the PC is redirected | as `minimips2` |
| data hazards | two bypass paths, plus a one-cycle stall after `lw`/`jal` | none: registers are read and written in the same stage | none |
| cycles per `lw`/`sw` | 1 | 1 | **2**, so that EXE fits a much shorter clock period |
| `jal`/`jalr` link value | PC+8 (past the delay slot) | PC+4 | PC+4 |

All cores share the decoder, register file, ALU, comparator, PC multiplexer
and memories. `minimips_top` places the three systems side by side. Each
system is one core plus its own instruction and data memory.

## Programmer's view

All cores run the same 32-bit MIPS-I integer subset, with the standard MIPS
encodings:

* `add addu sub subu and or xor nor slt sltu sll srl sra sllv srlv srav jr jalr`
* `addi addiu slti sltiu andi ori xori lui lw sw beq bne j jal`

Anything else is an *undefined instruction* and traps. That includes the other
branch forms (`bltz`, `bgez`, ...), which are meant to be emulated in software.
`add` and `addi` do not trap on overflow. Loads and stores move whole words.

* **Reset** starts fetching at `0x80000000`.
* **Undefined instruction**: the instruction is not executed. Its address + 4
  goes to register 27 and the PC jumps to `0x80000040`. A handler that
  emulates the instruction returns with `jr $27`.
* **Interrupt** (`irq`, level-sensitive): the interrupted instruction is not
  executed. Its address + 4 goes to register 27 and the PC jumps to
  `0x80000080`. The handler returns to the interrupted instruction with
  `addi $27,$27,-4 ; jr $27`. There is no interrupt mask. Software or the
  interrupt source must keep `irq` low while a handler runs.
* Register 0 always reads 0. Register 31 receives `jal`/`jalr` return addresses.

The cores differ in one visible way. On `minimips4` the instruction right
after a branch or jump is executed before control moves, whether or not the
branch is taken. On `minimips2` and `minimips2mc` code runs exactly as on an
unpipelined machine. The same loop gives different results on the two cores:

```
loop: add  $9,$9,$8      # $8 = 3, $10 = 200 on entry
      srl  $10,$10,1
      bne  $10,$0,loop
      andi $8,$10,1      # delay slot on minimips4; annulled when taken on minimips2
```

`minimips2` ends with `$9 = 24`. `minimips4` ends with `$9 = 6`, because the
`andi` also runs on every taken iteration. For `minimips4`, code should fill
the delay slot with a NOP or with an instruction that is useful on both paths.
The test `tb_branch_alternatives` runs both rewrites.

## The 4-stage pipeline (`minimips4`)

```
 IF            | RF                               | ALU        | WB
 PC, imem, +4  | decode, regfile read, bypass      | ALU        | dmem at Y, WDSEL/WASEL,
               | muxes, "=" -> BZ, BT/JT, ASEL/BSEL |            | regfile write
        PC^RF, IR^RF       PC^ALU, IR^ALU, A, B, WD^ALU   PC^MEM, IR^MEM, Y, WD^MEM
```

The PC pipeline registers hold the instruction's address + 4. The whole
instruction word travels down the pipe, and the last stage takes its write
address from it. Data memory is read and written in the last stage, in the
same cycle as the register-file write. So a `lw` result exists only there.

### Branch decision and the delay slot

`beq`/`bne` compare the two register operands in the RF stage with a 32-bit
equality comparator (`eq_comparator`). They do not wait for the ALU's Z flag
at the end of the next stage. Jump targets are also ready in RF:

* `j`/`jal`: `PC<31:28>:J<25:0>:00`
* `jr`/`jalr`: the register value

So the PC is redirected one cycle after the branch was fetched. Exactly one
instruction, the one fetched meanwhile, is already in the pipe, and it is
executed. Taken branches therefore cost no cycles. A loop of *n* instructions
takes *n* cycles per iteration.

### Bypass paths (the part to read closely)

The register file is read in RF and written at the end of WB. A value an
instruction produces is therefore written two or three cycles after the
instruction behind it reads the register. `bypass_unit` picks one of three
sources for each source operand of the RF-stage instruction:

| select | source | when |
|---|---|---|
| `BYP_ALU` | output Y of the ALU | the ALU-stage instruction writes this register **and** its result is its ALU output (`WDSEL` = ALU) |
| `BYP_WB` | data being written to the register file | otherwise, if the WB-stage instruction writes this register this cycle (`WERF`=1, `WA` equal) |
| `BYP_RF` | register-file read port | otherwise |

No bypass is taken for register 0 or for an operand the instruction does not
read (for example, `sll` does not read Rs, and `lui` reads nothing). The
ALU-stage result takes priority because it is newer. The destination compared
is Rd for R-type and Rt for I-type instructions, as WASEL would select it.

The bypassed value feeds every use in RF: the ASEL/BSEL operand muxes, the
branch comparator, the `jr` target and the store data. Example, one
instruction per cycle with no stall:

```
cycle        i      i+1    i+2    i+3    i+4
IF         addi   sll    andi   sub
RF                addi   sll*   andi   sub
ALU                      addi   sll    andi
WB                              addi   sll
           * sll $9,$8,2 takes $8 from the ALU output of addi $8,$8,1
```

If the register is written two instructions ahead, the value comes from WB.
An example is `xor r1,...` followed by `addi` and then `sub r3,r1,r2`.

### Load-use stall

When the ALU-stage instruction is a `lw`, or a `jal`/`jalr`, its result does
not exist yet: memory is read in WB, and the link value is formed there too.
If the RF instruction needs that register, `bypass_unit` raises `stall`. The
PC and the RF stage hold, and a NOP enters the ALU stage. One cycle later the
value comes over the WB bypass. A load followed at once by a user of its
result costs exactly one cycle.

### Traps in the pipe

Interrupts and undefined instructions are taken on the instruction in RF.

* The decoder turns that instruction into a trap: it writes PC+4 to register
  27 and nothing else.
* The PC gets the vector.
* The instruction fetched in the same cycle is annulled to a NOP.

An interrupt is not taken while the RF instruction is a delay-slot
instruction or an annulled bubble. Returning to either would break the
program, so the interrupt waits. An interrupt decided during a stall takes
effect when the stall ends, because a stalled cycle commits nothing.

## The 2-stage pipeline (`minimips2`)

IF fetches and computes PC+4. Every other step happens in EXE in one cycle:
decode, register read, comparator, ALU, data memory and register write. So no
instruction ever reads a register another instruction still has to write.

The branch decision comes at the end of EXE. By then the next instruction
has already been fetched. Whenever EXE selects a next PC other than PC+4, the
*annul* multiplexer loads the NOP word `0x00000000` into IR^EXE in place of
that instruction. This covers a taken branch, any jump, a trap and reset. Each
redirect therefore costs one cycle, and programs behave exactly as on an
unpipelined machine. Interrupts are not taken on an annulled bubble.

## The 2-stage pipeline with 2-cycle loads and stores (`minimips2mc`)

In `minimips2` the EXE stage carries the longest path of the machine: the
register read, the ALU, a data-memory access and the register write, all in
one cycle. Most instructions do not touch data memory, so this variant gives
the memory access a cycle of its own. The clock period then only has to
cover the longer of "read, ALU, write" and "memory access, write".

* **First cycle of `lw`/`sw`.** The ALU forms the address. The address and
  the store data are captured in two registers. Nothing is written. The PC,
  PC^EXE and IR^EXE hold, so the instruction behind waits in IF.
* **Second cycle.** Data memory is accessed from the captured address. A
  store writes; a load writes its word to the register file. The pipeline
  then moves on.

Every other instruction takes one cycle, as in `minimips2`, and redirects
annul in the same way. A program therefore takes one cycle per instruction,
plus one per load or store, plus one per annulled slot. If 30% of the
instructions are loads or stores, that is 1.3 cycles per instruction, which
pays off if the clock period drops by more than that factor. The first cycle
of a load or store is reported as `stall` on the events output. An interrupt
is taken only in that first cycle, so an access that has started always
completes.

The split into two cycles is this variant's defining rule. The address
registers, holding IF and the interrupt rule are this design's own choices.

## Shared units

| module | what it is |
|---|---|
| `mips_pkg` | shared types: opcodes, ALU functions, mux selects, the `ctrl_t` control word, `pipe_events_t`, vectors, the field, jump-target and branch-target helpers |
| `control_logic` | combinational decoder. Produces WASEL, SEXT, BSEL, ASEL, ALUFN, WDSEL, Wr, WERF, source-read flags, branch class and PCSEL (from the branch class and BZ). RESET forces PCSEL=4. `DELAY_SLOT` picks the `jal` link (PC+8 or PC+4). |
| `regfile` | 32×32 bits. Two combinational read ports, one write port at the clock edge, no write-through, cleared on reset. |
| `alu` | add, sub, and, or, xor, nor, slt, sltu, sll, srl, sra, with flags N V C Z. Shifts shift B by A<4:0>, so ASEL can supply `shamt` or the constant 16 (for `lui`). |
| `eq_comparator` | BZ = (A == B), written as a reduction of A XOR B |
| `pc_mux` | PCSEL: 0 PC+4, 1 BT, 2 jump target, 3 JT, 4 `0x80000000`, 5 `0x80000040`, 6 `0x80000080` |
| `imem` | 1024 words, combinational read by byte address (bits 11:2), plus a load port |
| `dmem` | 1024 words, combinational read, write at the clock edge when Wr |

Mux encodings: WASEL 0 Rd, 1 Rt, 2 r31, 3 r27. ASEL 0 RD1, 1 shamt, 2 the
constant 16. BSEL 0 RD2, 1 the extended immediate. WDSEL 0 PC+4, 1 ALU,
2 memory, 3 PC+8.

## Top level (`minimips_top`)

Parameters: `IMEM_WORDS` = 1024 and `DMEM_WORDS` = 1024.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset of all systems (hold for at least one edge) |
| `irq4`, `irq2`, `irq2m` | in | 1 | interrupt request of the 4-stage / 2-stage / 2-cycle-memory system |
| `load4_we`, `load4_addr`, `load4_data` | in | 1, 10, 32 | instruction-memory load port of the 4-stage system (word address, written at the clock edge) |
| `load2_we`, `load2_addr`, `load2_data` | in | 1, 10, 32 | the same for the 2-stage system |
| `load2m_we`, `load2m_addr`, `load2m_data` | in | 1, 10, 32 | the same for the 2-cycle-memory system |
| `pc4`, `pc2`, `pc2m` | out | 32 | current fetch address of each system |
| `events4`, `events2`, `events2m` | out | 7 | `pipe_events_t`, one flag per cycle for: stall, ALU bypass, WB bypass, taken branch, jump, annul, trap |

To run a program:

1. Hold `rst` high.
2. Write the program through the load port. Word 0 is address `0x80000000`,
   word 16 is `0x80000040`, word 32 is `0x80000080`.
3. Release `rst`.

Data memory starts with whatever it holds. The testbenches clear it.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

* `mips_tb_pkg` holds the testbench tools:
  * an instruction encoder;
  * a random program generator. Its programs include data hazards, loads and
    stores, forward branches, counting loops, `jal`/`jalr` calls and
    undefined instructions;
  * `iss`, an instruction-at-a-time reference model of the programmer's
    view, with or without delay slots.
* `tb_minimips4` checks these textbook cases with exact cycle counts, then
  twelve random programs against `iss`, eight of them with random interrupts:
  * the ALU bypass (`addi`→`sll`, 1 instruction per cycle, no stall);
  * the same four instructions reordered with `sll` last (same results, no
    ALU bypass needed);
  * the WB bypass (`xor … addi … sub`);
  * the load-use stall (+1 cycle);
  * the counting loop (no cycle lost to branches).
* `tb_minimips2` checks straight-line code at one instruction per cycle, and
  one annulled cycle per taken branch. Its random programs are also checked
  against the cycle count (instructions + redirects).
* `tb_minimips2mc` does the same for the 2-cycle-memory core. It adds a
  store/load sequence with exactly one extra cycle per `lw`/`sw`, and checks
  cycles = instructions + redirects + loads/stores on random programs.
* `tb_minimips_top` is the end-to-end test at default sizes. All three
  systems run the same programs (the counting loop and 30 random programs,
  20 with interrupts). Each mechanism listed above must occur at least once.
  On runs without interrupts, the 2-cycle-memory system must take exactly one
  cycle per load or store more than the plain 2-stage system.
* `tb_branch_alternatives` runs the loop three ways and checks that all give
  the sequential result in the expected number of cycles:
  * the original code on the 2-stage core;
  * with a NOP in the delay slot, on the 4-stage core;
  * rewritten with useful work in the delay slot, on the 4-stage core.
* Unit tests: `tb_alu`, `tb_regfile`, `tb_eq_comparator`, `tb_bypass_unit`,
  `tb_control_logic`, `tb_pc_mux`, `tb_imem`, `tb_dmem`.

Each testbench runs in well under a second. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mips_pkg.sv tb/mips_tb_pkg.sv rtl/*.sv tb/tb_minimips_top.sv \
    --top-module tb_minimips_top -Mdir obj -o sim
./obj/sim
```

The cores also carry assertions:

* a stalled RF stage holds its instruction and sends a bubble;
* an interrupt is never taken on a bubble or a delay slot;
* an annulled slot in the 2-stage core writes nothing;
* in the 2-cycle-memory core, a load or store's first cycle never redirects
  and is followed by its second cycle.

## What follows the lecture and what is this design's own

Taken from the lecture on pipelined miniMIPS that this design is built from:

* the datapath units and their select signals;
* the 2-stage split with annulment by a NOP multiplexer;
* the 2-stage variant whose loads and stores take two cycles;
* the 4-stage split and its pipeline registers;
* the early branch decision by an equality comparator in the register stage;
* one always-executed delay slot, which the lecture calls the standard MIPS
  approach;
* the two bypass rules;
* the exception vector constants and registers 27/31.

Choices made here:

* **Encodings and instruction set.** The lecture names the instructions and
  the selects but prints no encodings. The MIPS-I encodings and the ALUFN
  encoding are this design's.
* **`jal` link value in the 4-stage core.** The lecture's datapath feeds PC+4
  to the register file. This design links with PC+8, so a return does not run
  the delay-slot instruction a second time. The lecture describes delay-slot
  semantics this way: the jump takes effect after the slot.
* **Load-use stall.** The lecture's ALU bypass covers only ALU results and
  leaves loads for later. Here a one-cycle stall covers them.
* **Traps and interrupts inside the pipelines.** The lecture gives only the
  vectors and register 27. Which vector serves which event is this design's
  reading of the datapath drawing.
* **Jump target bits.** `PC<31:28>` is used for the upper bits, so the target
  makes a full 32-bit address.
* **Reset.** Reset clears the register file and the pipeline registers.
* **Memories.** The depths (1024 words) and the instruction-memory load port
  are this design's.

Not built:

* the 5-stage pipeline with a separate memory stage, whose hazard handling
  the lecture leaves for later;
* branches that annul their delay slot when not taken (`bne.t`);
* a supervisor mode or interrupt mask;
* overflow traps;
* byte and halfword memory accesses.
