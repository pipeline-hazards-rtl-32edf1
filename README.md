# A three-stage RV32I pipeline and its hazards

This is a small RISC-V (RV32I) processor. It splits the classic single-cycle
datapath into three stages, **Fetch**, **Decode** and **Execute**, so it can run
at roughly three times the clock. The cost is three kinds of hazard, which
the pipeline resolves in hardware without exposing them to software:

| hazard | situation | what the hardware does | cost |
|---|---|---|---|
| control | a branch or jump is known only after the next instruction has already been fetched | decide conditional branches and JAL in Decode, redirect the PC at once and **annul** the one instruction fetched behind the branch | a taken branch or JAL takes 2 clocks (1 if not taken) |
| data | an instruction in Decode reads a register that the instruction in Execute writes at the end of this clock | **bypass multiplexers** route the result being written straight into the Decode operands | none |
| structural | instructions and data live in **one** memory with one port | a load or store **freezes** PC and pipeline registers for one clock (the `NoStall` flip-flop), and the memory serves the data access in that clock | a load or store takes 2 clocks |

Every other instruction retires one per clock. JALR (register jump) is
resolved in Execute and costs 3 clocks.

## The stages

```
        +----+   +--------+  ir_d   +--------------------------+  E regs   +---------------------+
 PC --->| PC |-->| memory |-------->| fetch_decode, regfile    |---------->| execute_decode, ALU |--> Din
        +----+   | (shared)|  pc_d  | read, bypass muxes, bsel,|  a_e b_e  | write-back mux asel |    regfile
          ^      +--------+         | branch_cmp, next_pc      |  str_e    | data access         |
          |                         +--------------------------+  link_e,  +---------------------+
          +------------ next_pc (PC+4 / PC-relative target / BT / 0) ----------------+ pcrel_e
```

* **Fetch.** The PC addresses the shared memory (combinational read). At the
  clock edge the word and its PC go into the Decode register (`ir_d`, `pc_d`).
* **Decode.** `fetch_decode` takes the word apart. The register file is read
  (`rs1`, `rs2`), both values pass through a `bypass_mux`, and the B operand
  is chosen (`bsel`: I immediate, rs2, S immediate or U immediate). The A and
  B operands and the store data go into the Execute register. So do two
  "delayed" PC values: PC+4, for the link register of JAL and JALR, and the
  PC-relative sum, for AUIPC. Conditional branches and JAL are resolved here.
* **Execute.** `execute_decode` drives the ALU. It also picks the value for
  the register file (`asel`: ALU result, load data, PC+4 or PC-relative sum)
  and asserts `werf`. The register file is written at the clock edge that
  ends Execute. The first decoder works in Decode and the second in Execute:
  each stage decodes only the fields it needs.

Each pipeline slot carries a `valid` bit. An annulled slot keeps flowing
down the pipeline, but it writes nothing: no register, no memory, no
redirect. In effect it becomes a NOP.

## Control hazards: early detection and annul

The branch condition is evaluated in Decode by `branch_cmp`, not by the ALU.
It forms `rs1 - rs2` and evaluates the flags C, V, N and Z against the
branch's funct3. Its operands come from the bypass multiplexers, so a branch
may test a register that the instruction just ahead of it is computing. When
the branch is taken, or the instruction is a JAL, `next_pc` loads the PC with
`pc_d + offset`. The instruction fetched in the same clock enters Decode
marked invalid. Timing for a taken backward branch (`blt` with `addi` just
before it):

```
clock     i        i+1      i+2      i+3         i+4
Fetch     add      addi     blt      srai        add (target)
Decode             add      addi     blt  taken  srai (annulled)
Execute                     add      addi        blt        -> i+5: NOP
```

JALR needs `rs1 + imm`, which the ALU computes in Execute (the ALU result
is also the jump target `BT`). A JALR in Execute redirects the PC and annuls
both younger instructions. It overrides any decision Decode makes in the
same clock.

## Data hazards: the bypass

The register file is written at the end of Execute. The instruction right
behind reads its operands in Decode during that same clock. So each Decode
operand passes through a `bypass_mux`, which compares the source register
with the Execute instruction's `rd`. The compare qualifies on x0 and on
whether the Execute instruction writes at all (`fwd_en`). On a match the mux
takes the value being written. The Execute register and the register file
then capture the same value at the same edge. The store-data register, the
branch comparator and the B-operand multiplexer all see the bypassed values.
No other bypass exists or is needed: the pipeline has only one stage past
Decode.

Loads are not forwarded. A load writes the register file in its first
Execute clock, while the pipeline is frozen (see below). Decode is evaluated
again in the next clock, so the dependent instruction simply reads the new
value. This pipeline therefore has no load-use stall.

## Structural hazard: one memory, the NoStall machine

The memory has one port, which serves both instruction fetch and loads and
stores. `stall_fsm` is a single flip-flop, `NoStall`:

```
NoStall(next) = !(ls && NoStall)      ls = valid load/store in Decode (about to enter Execute)
```

`NoStall` is the clock enable of the PC and of both pipeline registers. When
a load or store moves into Execute, `NoStall` is low for exactly one clock.
It then returns high on its own, because a low `NoStall` forces the next
state high. Back-to-back loads and stores work, and each costs exactly one
extra clock.

| clock | NoStall | shared memory does | Execute holds | register/memory write |
|---|---|---|---|---|
| first clock of a load/store | 0 | data read or write at the ALU address | the load/store | load data to `rd`, or store to memory |
| second clock | 1 | fetch at PC | the load/store (retires) | none |

All registers hold in the first clock, including the Decode instruction. In
the second clock the pipeline runs normally. Loads support LB, LH, LW, LBU
and LHU, and stores support SB, SH and SW, using byte enables. Misaligned
accesses are not supported: the low address bits only select byte lanes.

## What the cycle costs add up to

Take a mix of 100 instructions: 10 branches (8 of them taken), 15 loads or
stores and 75 others. It needs

    10 * (0.8*2 + 0.2*1) + 15*2 + 75*1 = 123 clocks

instead of 100 on a single-cycle machine. At three times the clock that is
a 300/123 = 2.44x speed-up rather than 3x. `tb_rv3_mix` builds exactly this
mix and measures 123 clocks on the RTL. The clock rate itself is a property
of a physical implementation and is not modelled.

## Files

| file | content |
|---|---|
| `rtl/rv3_pkg.sv` | opcodes, `bsel`/`btype`/`asel` encodings, ALU control struct, byte-lane helper functions |
| `rtl/rv3_pipeline.sv` | top: stages, pipeline registers, write-back multiplexer, memory port sharing |
| `rtl/fetch_decode.sv` | Decode-stage decoder: fields, immediates, `bsel`, `btype`, branch/JAL/load-store flags |
| `rtl/execute_decode.sv` | Execute-stage decoder: ALU control, `werf`, `asel`, memory write, JALR redirect, annul gating |
| `rtl/regfile.sv` | 32x32 register file, 2 read and 1 write port, x0 = 0 |
| `rtl/alu.sv` | add/sub, shifts, boolean truth table (b00..b11), set-less-than, flags C V N Z |
| `rtl/branch_cmp.sv` | Decode-stage branch condition |
| `rtl/bypass_mux.sv` | one Execute-to-Decode bypass multiplexer |
| `rtl/next_pc.sv` | btype multiplexer, PC-relative adder, +4, taken and reset multiplexers |
| `rtl/stall_fsm.sv` | the NoStall flip-flop |
| `rtl/unified_mem.sv` | shared memory, combinational read, byte-enabled synchronous write |
| `tb/rv3_tb_pkg.sv` | instruction encoders and `rv_iss`, an instruction-set reference model |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rv3_pipeline` (end to end), `tb_rv3_tables` (clock-by-clock stage occupancy) and `tb_rv3_mix` (instruction-mix workload) |

The ALU's control line names (sub, math, shift, b00..b11, set) and the
multiplexer input numbering follow the original datapath drawing. The
encodings behind them are this implementation's own.

## Top-level interface (`rv3_pipeline`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active high; PC := 0, pipeline slots invalid, registers cleared |
| `pc_o` | out | 32 | fetch PC |
| `retire_o`, `retire_pc_o` | out | 1, 32 | one pulse per completed instruction, with its PC |
| `rf_we_o`, `rf_waddr_o`, `rf_wdata_o` | out | 1, 5, 32 | register-file write port |
| `ev_stall_o` | out | 1 | NoStall is low (load/store data clock) |
| `ev_annul_o` | out | 1 | PC redirected, younger instruction(s) annulled |
| `ev_bypass_o` | out | 1 | a Decode operand came through the bypass |

Parameter: `MEM_WORDS` (default 4096 words, so 16 KiB). The memory has no
load port. Program it through the array `u_mem.mem`, as the testbenches
do, or add an initialisation of your own in `unified_mem`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_rv3_pipeline rtl/rv3_pkg.sv tb/rv3_tb_pkg.sv tb/tb_rv3_pipeline.sv
./obj_dir/Vtb_rv3_pipeline
```

Replace the module name to run any other testbench. Uninitialised state is
never read: everything the design reads is reset except the memory, which the testbenches fill completely before releasing reset.

`tb_rv3_pipeline` runs the pipeline at its default parameters, in lock step
with the reference model. It runs these programs: a dependent ALU chain, a
counted loop with a backward branch, a load/modify/store sequence, a call
and return through JAL/JALR, and six random programs of 300 instructions.
The random programs mix all ALU operations, LUI/AUIPC, loads and stores of
every size, forward branches, JAL and JALR.

For each retired instruction the testbench checks the PC, the register
written and its value. It also checks the number of clocks since the
previous retirement: 1, plus 1 for a load or store, plus 1 after a taken
branch or JAL, plus 2 after a JALR. At the end of each program it compares
the register file and data memory. It also fails if a stall, an annul, a
bypass or a JALR redirect never happened.

`tb_rv3_tables` checks, clock by clock, which instruction the Fetch PC
points at and what sits in Decode and in Execute, for three short
sequences: an ALU chain, a loop whose branch is always taken, and a
load/modify/store. It also checks in which clocks the memory serves a data
access.

## How far to trust it, and where it departs from the original description

The following are taken from the original description:

* the three stages, with read in Decode and write at the end of Execute
* the two decoders
* the immediate bit fields
* branch detection in Decode, with the following instruction annulled
* the bypass from the Execute result into the Decode operands, including
  the store-data register
* the shared memory
* the one-flip-flop stall machine that enables the PC and pipeline
  registers
* the 2-clock costs and the 123-clock instruction-mix estimate

Choices made here where the description is silent or inconsistent:

* **Where branches are decided.** The description says branches can be
  decided in Decode and cost 2 clocks. Its datapath drawing instead feeds
  ALU flags to the Execute decoder for a "taken" signal, and one timing
  table shows the branch target fetched a clock later than the 2-clock
  figure allows. This design follows the 2-clock statement and uses its own
  comparator in Decode. Because it compares bypassed operands, the path
  ALU → bypass → comparator → PC multiplexer is the longest combinational
  path in the design.
* **JALR** resolved in Execute (3 clocks). The description does not treat
  it. The drawing only routes the ALU result `BT` into the PC multiplexer.
* **Order of the two load/store clocks.** The data access happens in the
  first clock and the refetch in the second. The original timing table
  shows them the other way round. The total is the same, and this order
  removes the need for a load-data bypass.
* **PC-relative base.** Branch, JAL and AUIPC offsets are added to the PC
  of the instruction in Decode. `BT` is used directly as the JALR target
  (bit 0 cleared), not added to a PC.
* **Separate memories.** The datapath drawing shows separate instruction
  and data memories. The shared single-port memory from the text is
  implemented instead, since the stall machine exists because of it.
* **Not described, chosen here:**
  * register and bus widths other than those drawn
  * memory size
  * byte enables and sub-word loads/stores
  * synchronous reset that also clears the register file
  * the `valid` bit per slot as the annul mechanism
  * the observation ports
* **Not implemented:**
  * FENCE, ECALL/EBREAK and CSR instructions
  * misaligned access traps
  * any exception or interrupt mechanism

  None of them is part of the described pipeline.
* **A second bypassed register.** The original mentions bypass
  multiplexers on a "BXreg" pipeline register without defining it. Here
  every consumer of a source register in Decode is bypassed: the ALU
  operands, the store data and the branch comparator. Nothing more was
  added.
* **Conditional execution and a status register.** The original speaks of
  suppressing "PSR" updates in annulled slots and of eliminating branches
  by conditional execution. RV32I has neither, so annulling suppresses the
  register and memory writes only.
* **Unused outputs.** RV32I has no condition-code register. The ALU
  still produces C, V, N and Z, as drawn, but the pipeline does not use
  them.
