# A statically scheduled dual-issue RV32IM core

This core runs the RV32IM instruction set and issues up to two instructions
per clock. It widens a classic in-order, single-issue five-stage pipeline
(fetch, decode, execute, memory, write-back). Instead of a general
superscalar machine with two identical pipelines, it uses two *specialised*
pipelines fed by one fetch stage:

* **pipe 0** executes branches, jumps and ALU instructions;
* **pipe 1** executes loads, stores and ALU instructions.

Each cycle the instruction memory returns two consecutive words. A small
table decides which word goes to which pipe, whether one of them must wait,
and how far the PC moves (4 or 8 bytes). No reordering happens: the two
words always come from consecutive addresses, and an instruction never issues
ahead of an older one. What makes this work is hazard handling across the two
pipes. It is the hardest part of the design and gets most of the space below.

## Block structure

```
            +-----------+  pc_next  +-----------+ inst_a, inst_b
            | pc_logic  |---------->| inst_mem  |-----------------+
            +-----------+           +-----------+                 v
              ^   ^  ^                                   +--------------+
 take_branch  |   |  | stall_0/1, stall_dual, stall_ex   |  issue_unit  |
              |   |  +-----------------------------------| (issue table)|
              |   |                                      +--------------+
              |   |                     inst_0 |  priority    | inst_1
              |   |                    decoder |      |       | decoder
              |   |                            v      v       v
              |   |   hazard_unit x2 <--- dual_hazard_unit ----> reg_bank (4R/2W)
              |   |                            |                |
              |   |               +------------+----+   +-------+---------+
              +---|---------------| pipeline 0 (EX,  |<->| pipeline 1 (EX,  |--> data_mem
                  |   div busy    |  MEM, WB) branch |fwd|  MEM, WB) memory |   (+ debug word)
                  +---------------+------------------+   +------------------+
```

| File | Role |
|---|---|
| `rtl/rv_pkg.sv` | opcodes, instruction classes, ALU codes, decoded-instruction and forwarding records |
| `rtl/pc_logic.sv` | fetch PC register and next-PC selection |
| `rtl/inst_mem.sv` | instruction memory with two read outputs (word and word + 4), Wishbone slave |
| `rtl/issue_unit.sv` | class decode of the pair, routing table, issue decision |
| `rtl/decoder.sv` | one decoder per pipe: instruction word to `dec_t` |
| `rtl/dual_hazard_unit.sv` | dependency check inside the issued pair |
| `rtl/hazard_unit.sv` | per-pipe load-use check against the execute stage |
| `rtl/reg_bank.sv` | 32 x 32-bit register file, four read and two write ports |
| `rtl/pipeline.sv` | EX/MEM/WB of one pipe; parameters `HAS_BRANCH`, `HAS_MEM` pick its role |
| `rtl/alu.sv` | single-cycle RV32I operations and the four multiplies |
| `rtl/divider.sv` | 33-cycle divide/remainder unit |
| `rtl/data_mem.sv` | data memory, byte-masked writes, Wishbone slave |
| `rtl/dual_issue_top.sv` | the core with both memories |

## Fetch: two words per cycle

`pc_logic` holds `pc`, the address of the older word of the pair now at the
instruction-memory outputs. In the same cycle it computes `pc_next` and sends
it to the memory. The memory registers both `mem[pc_next]` and
`mem[pc_next + 4]`, so they become the next cycle's pair. The PC therefore
has no alignment to 8 bytes. After one word issues alone, the pair starts at
an odd word, and the memory simply reads two consecutive words from there.
A stall re-reads the same pair by sending the old PC again.

`pc_next` is chosen in this order:

| condition | next PC |
|---|---|
| first cycle after reset (`pair_valid` = 0) | `pc` (= `RESET_PC`) |
| `take_branch` | branch or jump target |
| `stall_0` or `stall_1` (load-use) or `stall_ex` (divider) | `pc` (hold) |
| `stall_dual` | `pc + 4` |
| otherwise | `pc + pc_increment` (4 or 8) |

## Issue: the routing table

`issue_unit` classifies each word by its opcode. Branch means BRANCH, JAL or
JALR. Memory means LOAD or STORE. Everything else is ALU, including FENCE and
SYSTEM, which run as no-ops. With *older* meaning the word at `pc`:

| older | younger | pipe 0 | pipe 1 | `issue_stall_0` | `issue_stall_1` | `priority` | `pc_increment` |
|---|---|---|---|---|---|---|---|
| branch | any | older | NOP | 0 | 1 | 0 | 4 |
| memory | memory | NOP | older | 1 | 0 | 1 | 4 |
| memory | branch / ALU | younger | older | 0 | 0 | 1 | 8 |
| ALU | memory | older | younger | 0 | 0 | 0 | 8 |
| ALU | branch | younger | older | 0 | 0 | 1 | 8 |
| ALU | ALU | older | younger | 0 | 0 | 0 | 8 |

There are two rules behind the table. First, each pipe accepts only its own
classes, so two memory operations cannot pair. Second, a branch never takes
a younger partner, because that partner may lie on the wrong path. A branch
*can* be the younger of a pair: the older instruction must execute anyway.
`priority` records which pipe holds the older instruction. All later
hazard logic uses it to decide which direction a dependency runs.

## Hazards: three detectors in one stage

All three detectors look at the pair at the memory outputs in the same cycle
as the issue decision.

**Dual hazard (inside the pair).** The two instructions read the register
bank in the same cycle. So the younger one cannot see a result the older one
has not yet produced. `dual_hazard_unit` raises `stall_dual` in two cases:

* the younger reads (rs1 or rs2, depending on its opcode) a non-zero
  register that the older writes;
* both write the same register.

The second rule keeps the two write-back ports and the forwarding network
free of same-cycle conflicts. On `stall_dual`, only the older instruction
issues, the younger pipe gets a NOP, and the PC moves by 4. The younger
instruction then heads the next pair.

**Load-use (per pipe).** Each pipe has a `hazard_unit`. It compares the
sources of the pipe's decode-slot instruction with the destination of a load
in pipe 1's execute stage. Only pipe 1 has loads, so both units watch pipe 1.
A load's data returns from the data memory during write-back. That is one
cycle too late to reach an instruction that enters execute right behind the
load. On a match, `stall_0`/`stall_1` holds the PC, nothing issues, and a
bubble enters execute. That costs one cycle.

**Execute stall.** A divide holds its pipe's execute stage for 33 cycles.
The busy signal freezes both execute stages, the issue stage and the PC.
This keeps the two pipes in lockstep, so "same stage" always means "issued in
the same cycle". While frozen, each execute stage keeps reloading its
operands from the forwarding network. Values that retire during the freeze
are therefore not lost.

**Forwarding.** Each execute stage picks each operand from, in order: pipe 0
MEM, pipe 1 MEM, pipe 0 WB, pipe 1 WB, and then the value read at issue. The
two entries of one stage never share a destination (the write-after-write
rule), so the order within a stage does not matter. A load in MEM offers
nothing, and the load-use stall guarantees nobody needs it. An assertion in
`pipeline.sv` checks this.

**Branches.** Branches and jumps resolve in pipe 0's execute stage. A taken
branch (or any JAL or JALR) redirects `pc_next` and squashes the pair being
issued, so it costs one cycle. No prediction is made: fetch always continues
sequentially.

## Pipelines

`pipeline.sv` is instantiated twice: `HAS_BRANCH=1, HAS_MEM=0` for pipe 0 and
`HAS_BRANCH=0, HAS_MEM=1` for pipe 1. In each instance:

* EX runs the ALU (single-cycle, multiplies included), the divider and the
  branch comparator.
* MEM (pipe 1) drives the data-memory Wishbone master. Byte and halfword
  stores are placed on their lanes with `sel`.
* WB takes the load word, which arrives one cycle after the strobe. It
  extracts and sign- or zero-extends the byte or halfword and writes the
  result through the pipe's register-bank port.

The register bank reads combinationally and passes a same-cycle write
straight through, so WB and the issue stage need no gap between them.

## Memories and the outside

Both memories are synchronous SRAM arrays with a Wishbone-style slave port.
They acknowledge one cycle after the strobe and never stall or raise errors.
The default size is 512 words each (`ADDR_WIDTH = 9`). The instruction memory
is written through the top's `load_*` port while `rst_n` is low. Execution
starts at `RESET_PC` (0) when `rst_n` rises. A word store to `DEBUG_ADDR`
(`0x0000_2010`) does not reach the data memory. Instead it pulses
`dbg_valid` with the stored word on `dbg_data`. Test programs use it to
report results. `retire0`/`retire1` pulse for each instruction leaving
write-back.

## Timing summary

| event | cost |
|---|---|
| pair of independent, compatible instructions | 1 cycle for 2 instructions |
| pair split by the table or by `stall_dual` | 1 cycle for 1 instruction |
| load followed by a use | 1 stall cycle |
| taken branch or jump | 1 squashed issue cycle |
| DIV/DIVU/REM/REMU | 33 cycles in execute, both pipes frozen |
| reset to first issue | 1 cycle |

## Where this design departs from, or adds to, the reference description

* **PC on a dual hazard.** The reference gives two different rules. Its
  PC truth table holds the PC when `stall_dual` is set. Its prose advances
  the PC by 4 when a single hazard unit fires. Holding would re-issue the same
  dependent pair forever, so this core advances by 4 and issues the older
  instruction alone.
* **Dual hazard unit.** The unit also checks that the older instruction
  really writes a non-zero `rd`, which avoids false stalls on a store's or
  branch's immediate bits. It also stalls on a shared destination
  (write-after-write).
* **Register bank.** The reference writes on the falling clock edge and
  keeps the ID/EX operand registers inside the bank. Here writes happen on
  the rising edge with a write-first bypass, and each pipeline owns its
  operand registers.
* **Own choices where the reference is silent:** forwarding; the stage
  where branches resolve; the iterative divider and its latency; the debug
  word and the program-load port; the reset vector; the data-memory size.
* **Not implemented:** CSRs, traps and interrupts (SYSTEM instructions are
  no-ops); the misaligned-access exception (misaligned accesses use the
  aligned word); branch prediction. The memories assume a one-cycle
  acknowledge.

## Verification

Every module in `rtl/` except the package and `decoder` has a self-checking
testbench `tb/tb_<module>.sv`. `decoder` is exercised through `tb_pipeline`
and `tb_dual_issue_top`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/rv_asm_pkg.sv` holds instruction encoders, so the test programs are
assembled inside the testbenches.

* `tb_issue_unit` checks every pair of instruction classes against the
  routing table, and the issue decision under each stall.
* `tb_dual_hazard_unit` and `tb_hazard_unit` compare the detectors with
  reference rules on random fields.
* `tb_alu` and `tb_divider` compare results with SystemVerilog arithmetic,
  including the RISC-V divide-by-zero and overflow cases. `tb_divider` also
  checks the 33-cycle latency.
* `tb_pipeline` runs a program through one pipe with forwarding, load-use,
  divides, branches, jumps and sub-word memory accesses.
* `tb_dual_issue_top` runs the whole core at its default parameters. It
  bubble-sorts the array {195, 14, 176, 103, 54, 32, 128} and compares the
  result in a JAL/JALR subroutine. It computes 15 arithmetic and logic
  results. It checks that a run of 34 independent instructions takes 17 to
  20 cycles, which is close to two instructions per cycle. It also counts
  each mechanism (dual issue, both priorities, memory/memory split, lone
  branch, dual-hazard split, load-use stall, divider stall, taken branch)
  and fails if any never occurred. The whole program retires 472
  instructions in about 720 cycles.
* `tb_dual_issue_random` runs 24 random programs of about 250 instructions.
  Each uses registers x1..x8, so most instructions depend on recent ones.
  The programs mix ALU, multiply, divide, load, store, forward-branch and
  jump instructions. A simple instruction-set model in the testbench runs
  the same program, and the registers and data memory are compared at the
  end. With the default seed, about 6050 instructions retire in 8340
  cycles. 3600 of those cycles are divider stalls; outside them the core
  retires about 1.28 instructions per cycle.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rv_pkg.sv tb/rv_asm_pkg.sv tb/tb_dual_issue_top.sv \
    --top-module tb_dual_issue_top -o sim
./obj_dir/sim
```

Replace the testbench name for any other block. Packages are found through
`-Irtl -Itb` and must come first on the command line.
