# Simple RISC: an out-of-order core with counter-based register renaming

This is a small out-of-order processor core in SystemVerilog. Instructions are
fetched and renamed in order. They then wait in a central instruction window
until their operands are ready, issue out of order to one of three execution
units, and write back out of order. The core has no reorder buffer and no free
list. Renaming rests on two fields of every physical register:

* a **valid bit** (the value has been written), and
* a **reader counter** (how many renamed instructions still have to read it).

A physical register can be given to a new destination only when it is valid
and nobody still has to read it. This scheduling scheme is a Thornton-style
(scoreboard) scheme extended with renaming. It tracks both data and structural
hazards with very little state.

```
            (1) map lookup        (3) new destination
             +-----------+   +------------------------+
             v           |   |                        |
 FETCH -> IR -> DECODE&RENAME --(2)--> WINDOW --> READ --(5)--> EXI  --+
  PC                 ^                  ^  ^      |(4)          EXLS --+--> WB reg -> WRITE BACK
                     |                  |  |      v             EXF  --+       |   (6) dest, result
               Register Map   Free Reg. |  +-- Physical Register Set <---------+
                              Allocate  +-------- dest broadcast --------------+
```

The numbers mark the six steps of an instruction's life described below.

## Life of an instruction

| Cycle | Stage | What happens |
|---|---|---|
| n | FETCH | The PC addresses program memory. The word is loaded into the IR and the PC advances by one word. |
| n+1 | DECODE&RENAME | (1) Sources and destination are looked up in the register map. (2) The renamed instruction enters the window with the source valid bits read from the register set. Each source it uses increments that register's reader counter. (3) A destination register is chosen and its valid bit cleared. |
| n+2 or later | READ | The instruction waits until both source valid bits are set and its unit can accept. Then, if it is the oldest such entry, (4) it reads its operands, decrements their reader counters and (5) is written into the unit's input register. |
| +1 (EXI, EXLS) or +4 (EXF) | EX | The unit computes. If several units finish in the same cycle, only the oldest instruction moves on. The others hold, and each holding unit accepts no new work. |
| next | WRITE BACK | (6) The result is written and the register marked valid. The destination number is broadcast to the window to set matching source valid bits, and the window entry is freed. |

Timing that follows from this:

* A dependent integer instruction issues three cycles after its producer: issue, EXI, write back, then the broadcast is seen.
* A dependent instruction issues six cycles after a floating point producer.
* With no dependences, the core fetches, renames and issues one instruction per cycle.

## Renaming without a free list

All of this logic is in `srisc_prf`, `srisc_free_alloc`, `srisc_regmap` and
`srisc_decode_rename`.

A physical register *P* moves through these states:

1. **Mapped, valid, cnt = 0.** It holds the current value of an architectural register and nobody is waiting for it.
2. **Mapped, valid, cnt > 0.** Renamed instructions that read it are still in the window and have not issued.
3. **Allocated as a destination.** Its valid bit is cleared at rename and set again at write back. Meanwhile, readers renamed after it count up its counter and wait on its valid bit in the window.
4. **Unmapped.** A later instruction wrote the same architectural register and was given a different physical register. *P* stays busy until its counter is 0 and its valid bit is set. From then on it is free.

The allocation rule for an instruction with architectural destination `rd`, where `map[rd] = P`:

* **Keep P** if it is valid, has `cnt == 0` and is not one of the instruction's own sources. There is then no reason to move `rd` to another register, and the map is left alone.
* **Otherwise, take the lowest-numbered free register.** Free means unmapped, valid and `cnt == 0`. The map entry is rewritten.
* **Otherwise, stall.** The instruction stays in decode and fetch holds.

Why the valid bit matters for reuse: a register whose writer is still in
flight is never reused. Two pending writers of one register could finish in
either order.

Why the counter matters: a value can be overwritten as soon as the last reader
has read it at issue. It does not have to wait for the reader to complete.
Every reader that has issued carries its operand values in its pipeline
register.

Decode also stalls when the window is full, unless write back frees an entry
in the same cycle. That freed entry is then reused at once.

**Same-cycle write back.** An instruction can be renamed in the same cycle as
its source is written back. The register set forwards that write, so the
entry enters the window already marked valid and does not miss the broadcast.

**Sizes.** The default sizes are 16 architectural registers, 24 physical
registers and 16 window entries. With at least NARCH + IW_DEPTH physical
registers, the "no free register" stall can never occur. The default is
deliberately below that bound, so that both structural stalls are part of the
design.

## Window, ages and issue order

Each window entry (`iw_entry_t`) holds:

* op, dest, src1, src2;
* the source valid bits v1 and v2;
* an age;
* the immediate and the PC;
* a valid bit, and an `issued` bit that separates entries still waiting in the read stage from those already in execution.

**What the age means.** The age is the number of *younger* entries currently
in the window. It is 0 when the instruction enters. It goes up by one whenever
a later instruction enters, and down by one whenever a younger instruction
leaves. The largest age is therefore the oldest instruction, and ages of the
valid entries are always exactly 0..n-1.

**Why not a wrapping sequence number.** Instructions complete out of order, so
an old load waiting for its data can stay while any number of younger
instructions pass through the window. A sequence number of any fixed width
would then compare wrongly.

**Where ages are used.** The read stage and the write-back arbiter both choose
the largest age. Write back gets the current age of each finished instruction
from the window, using the window index the instruction carries through
execution.

**Issue rules.** At most one instruction issues per cycle. It is the oldest
entry that meets all of these:

* valid and not yet issued;
* both source valid bits set (unused sources enter the window already valid);
* its unit can take work this cycle.

Loads and stores also wait while any older load or store has not issued.
Memory is therefore accessed in program order, and a load never passes a store
to the same address.

**Round robin instead.** The parameter `ISSUE_RR` of `srisc_core` (passed on to
`srisc_read`) replaces the oldest-first choice with a round robin over the
window slots:

* a pointer names the slot that is searched first;
* the first ready slot at or after the pointer, wrapping around, issues;
* the pointer then moves to the slot after the one that issued.

Every slot gets its turn, but an old instruction can then wait behind younger
ones. The memory-order rule applies in both modes. Write-back arbitration is
always oldest first.

## Execution units

* **EXI** (`srisc_exi`) handles integer arithmetic, logic and control instructions. It has one cycle of latency. It computes the branch condition, the target `pc + imm` and JAL's link value `pc + 1`.
* **EXLS** (`srisc_exls`) computes `addr = src1 + imm`, with `data out = src2` for stores. Memory is accessed in the cycle the unit wins write back:
  * a store is written at that clock edge;
  * a load's data is expected on `dmem_rdata` one cycle later, when the load is in write back.
* **EXF** (`srisc_exf`) is IEEE-754 single precision FADD, FSUB and FMUL in four pipeline stages:
  1. unpack, and order the operands by magnitude;
  2. significand product, or aligned add/subtract with a sticky bit;
  3. normalise;
  4. round to nearest even and pack.

  The whole pipeline holds while its last stage waits for write back.

## Instruction set (this design's own)

Instruction word: `op[31:26] rd[25:22] rs1[21:18] rs2[17:14] imm[13:0]`. The
immediate is signed. The PC and data addresses count 32-bit words. Integer and
floating point values share one register file.

| Class | Instructions | Semantics |
|---|---|---|
| EXI | ADD SUB AND OR XOR SLT SLL SRL | `rd = rs1 op rs2` (SLT signed; shifts use rs2[4:0]) |
| EXI | ADDI | `rd = rs1 + imm` |
| EXI | BEQ BNE | if `rs1 ==/!= rs2` then `pc = pc + imm` |
| EXI | JAL | `rd = pc + 1; pc = pc + imm` |
| EXI | NOP | nothing |
| EXLS | LW / SW | `rd = mem[rs1 + imm]` / `mem[rs1 + imm] = rs2` |
| EXF | FADD FSUB FMUL | single precision `rd = rs1 op rs2` |
| — | HALT | stops fetch; `halted` rises when the window is empty |

Register 0 is an ordinary register.

**Control instructions.** After decode accepts a control instruction, fetch
stops. It resumes at the next PC that the instruction delivers in write back.
There is no prediction and nothing to squash.

## Departures and limits

The design follows a short microarchitecture description. The stage structure,
register and window fields, stall conditions and oldest-first rules come from
that description. The following are this design's own choices or limits:

* **Instruction set, encoding, widths, sizes and reset state** are all chosen here.
* **Issue order.** The description names both a round-robin and an oldest-first choice among ready instructions. Both are built. Oldest first is the default, and `ISSUE_RR = 1` selects round robin. What the round robin rotates over is not described; here it rotates over window slots.
* **Width.** One instruction is fetched, renamed, issued and written back per cycle.
* **Memory ordering** (loads and stores in program order) is an addition. The description does not discuss memory dependences.
* **Branches** stall fetch until they resolve. There is no speculation.
* **No precise state.** There is no reorder buffer and results are written out of order. There are no exceptions or interrupts, and architectural state is only consistent once the core is drained (after HALT, `halted`).
* **Floating point simplifications:**
  * subnormal inputs are read as zero and subnormal results flush to zero;
  * overflow gives infinity;
  * NaN and infinity inputs get no special treatment.
* **Program and data memories are outside the core.** The program memory is read combinationally (the word arrives in the cycle `imem_addr` is presented). The data memory has the one-cycle load timing described above.

## Files

| File | Contents |
|---|---|
| `rtl/srisc_pkg.sv` | sizes, opcodes, window entry and pipeline packet types, `older()` |
| `rtl/srisc_core.sv` | top level: wires all blocks; memory ports; `halted` |
| `rtl/srisc_fetch.sv` | PC and IR, control-instruction wait |
| `rtl/srisc_decode_rename.sv` | decode, rename, stall decision |
| `rtl/srisc_regmap.sv` | register map table |
| `rtl/srisc_free_alloc.sv` | free register choice |
| `rtl/srisc_prf.sv` | physical registers: value, valid, reader counter |
| `rtl/srisc_iw.sv` | instruction window with ages and broadcast |
| `rtl/srisc_read.sv` | ready selection (oldest first or round robin), operand read, dispatch |
| `rtl/srisc_exi.sv`, `srisc_exls.sv`, `srisc_exf.sv` | execution units with their input registers |
| `rtl/srisc_wb.sv` | write-back arbitration and register |

Sizes are package constants in `srisc_pkg` (`NARCH`, `NPHYS`, `IW_DEPTH`). Edit
them there. The register field widths in the instruction word assume
`NARCH = 16`.

## Simulation

Each block has a self-checking testbench in `tb/`. Each prints one line,
`TB_RESULT checks=N failures=M`.

* `tb/srisc_tb_pkg.sv` holds the testbench helpers:
  * single precision conversion through the simulator's double precision reals, used as the floating point reference;
  * an instruction encoder.
* `tb/tb_srisc_core.sv` runs 40 programs on the full core at its default sizes:
  * one directed program fills the window and the register set;
  * 39 are random programs with loops, jumps, loads, stores and FP operations.

  Each program is also run on an instruction-level reference model in the testbench. After every run, all architectural registers and all data memory words are compared with the model. The testbench also counts each mechanism and fails if one never happened: both stalls, register reuse and remapping, out-of-order issue and write back, write-back conflicts, the same-cycle valid forwarding, redirects, and the memory-order hold.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/srisc_pkg.sv tb/srisc_tb_pkg.sv tb/tb_srisc_core.sv \
  --top-module tb_srisc_core -o sim
./obj_dir/sim
```

Replace `tb_srisc_core` with any other `tb_srisc_<block>` to test one block.
The read stage's own testbench checks both issue modes.
`tb/tb_srisc_core_rr.sv` is the core test with `ISSUE_RR = 1`. It also counts
how often round robin issues a younger instruction while an older one is
ready.
The core test runs in well under a second.
