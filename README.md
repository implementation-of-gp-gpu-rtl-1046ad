# A small SIMT GP-GPU core with dual-warp issue and a 4-stage operand collector

This is synthesizable SystemVerilog for one core of a general-purpose GPU meant for embedded
systems. It is based on the paper *Implementation of GP-GPU with SIMT Architecture in the
Embedded Environment*. The core runs warps of 16 threads on 16 stream processors (SPs), and
all 16 SPs execute the same instruction. SIMT (single instruction, multiple threads) means
that one control unit can drive every SP; there is no per-SP sequencer.

The paper adds two ideas to a plain SIMT pipeline, and they are the heart of this RTL:

1. **Superscalar issue from two warps.** The warps are split into even and odd warps. Every
   cycle the scheduler takes one even and one odd warp and offers two consecutive
   instructions of each: up to four instructions. Each SP has only three ALUs and one LD/ST
   unit, so the offer is cut down to at most three ALU instructions and one LD/ST
   instruction.
2. **A banked register file read through a 4-stage operand collector.** Each register file
   has four single-ported banks instead of one four-ported array. The operands of an
   instruction pair are collected over two cycles. A read that loses its bank is retried in
   the next stage. The cost of a conflict is at most a stall cycle, instead of extra read
   ports or a longer collector.

Everything beyond these ideas had to be chosen here: the instruction set, the register
count, how branches and memory work, and the caches. The section
[What comes from the paper and what does not](#what-comes-from-the-paper-and-what-does-not)
lists these choices.

## Core organisation

```
             prog_* --> icache (4 read ports)
                              |
                        warp_scheduler ---- one even + one odd warp, 2 instr. each,
                              |             arbitrated to <= 3 ALU + 1 LD/ST
                        sp_control_unit --- operand_collector (+ 2 bank_arbiters)
                              | ctrl (one control word, broadcast)
        +---------------------+---------------------+
  stream_processor #0   stream_processor #1  ...  stream_processor #15
   2 x 4 register_banks, 3 crossbars, collector registers, 3 alu, ldst_lane
        +---------------------+---------------------+
                              |  16 LD/ST lanes
                        sp_interconnect (round robin, one access at a time)
                              |
                          l1_cache (direct mapped, write-through)
                              |
                        mem_* port  (external DRAM, not part of the RTL)
```

Each SP has two register files, one per warp group. Registers of even warps live in half 0
and registers of odd warps in half 1. Both halves hold four banks. Register `r` of a warp `w`
is in bank `r mod 4`, row `{w/2, r/4}`. The control unit's word `sp_ctrl_t`
(`rtl/gpgpu_pkg.sv`) carries every select and enable the SPs need. An SP differs from the
others only in its lane number.

## Issue: even warp, odd warp, three ALUs, one LD/ST unit

`warp_scheduler` keeps `enable`, `busy` and `pc` for each of the 16 warps. In each group it
picks, round robin, a warp that is enabled and not busy. It fetches `pc` and `pc+1` of that
warp and builds a *bundle*: the warp's instruction pair with each instruction's execution
unit.

The slots are granted in the order even-0, even-1, odd-0, odd-1:

* An ALU-class instruction (everything except `LD` and `ST`) takes the next free ALU.
  After three ALU instructions, the next ALU instruction is refused.
* A `LD` or `ST` takes the single LD/ST unit. It is refused if another LD/ST slot already
  took the unit this cycle, or if the unit still holds an earlier instruction.
* A warp issues in order: once one of its slots is refused, its second slot is refused too.
* A warp's second instruction is also held back in these cases:
  * it reads or writes the register the first one writes;
  * the first instruction is a branch or `EXIT`;
  * both instructions are LD/ST.

So the core issues four instructions only as three ALU instructions plus one LD/ST. Two
warps that offer four ALU instructions issue three. A warp whose pair is two loads issues
one.

A warp stays *busy* from issue until its bundle has written back. A warp therefore has at
most one bundle in flight, and no scoreboard or forwarding is needed. The 8 warps of a group
hide the pipeline latency from one another. The `pc` is advanced at issue. A taken branch
overwrites it when the branch resolves.

## Register banks and the 4-stage operand collector

This is the part of the design that is least like a textbook pipeline.

A bundle of up to two instructions holds four source operands: OP0 (`ra`) and OP1 (`rb`)
of instruction 0 and of instruction 1. Each bank has one read port. Reading all four
operands at once would need four ports, or it would conflict whenever two operands share a
bank. The paper's collector spreads the reads over two stages and overlaps consecutive
bundles:

```
cycle          t        t+1        t+2          t+3
bundle n     stage 0   stage 1    stage 2  ->  execute + write back (end of t+2)
             read OP0  read OP1   all operands
             of both   of both    held
bundle n+1             stage 0    stage 1      stage 2
```

Each half therefore receives up to six read requests per cycle, ordered oldest first:

1. stage 1, slot 0: a missing OP0, then OP1;
2. stage 1, slot 1: a missing OP0, then OP1;
3. stage 0, slot 0: OP0;
4. stage 0, slot 1: OP0.

`bank_arbiter` grants each bank to the first request that names it. A request that loses
is a **bank conflict** and is retried, and each stage keeps what it has already read:

* Stage 0 moves to stage 1 whenever stage 1 is free, even if one of its OP0 reads lost.
  Stage 1 then fetches that OP0 along with the OP1s.
* Stage 1 waits until its pair has every operand. A bubble goes to stage 2 meanwhile, and
  stage 0 and the scheduler wait too.
* The scheduler's bundle is taken whenever stage 0 is free.

The paper does not say how its collector handles a conflict, so this retry rule is the
design's own.

The retry rule matters for throughput. The paper's test streams 8192 instruction pairs with
random register numbers through one half. The paper compares its collector with a 6-stage
baseline that reads one operand per stage: INST0 OP0, INST0 OP1, INST1 OP0, INST1 OP1.
That baseline is built here too, as `operand_collector_6stage`. The core does not use it;
it exists for this comparison.

| collector | this RTL, stream A | this RTL, stream B | paper |
|---|---|---|---|
| 4-stage (`operand_collector`) | 13,715 | 13,768 | 13,141 |
| 6-stage (`operand_collector_6stage`) | – | 16,084 | 14,930 |
| 4-stage, stage 0 held until its own reads are done | 17,478 | – | – |

The two streams come from `tb_operand_collector` and `tb_operand_collector_6stage`.

Holding stage 0 until its own reads finish wastes bank cycles that stage 1 could use. That
version is slower than even the 6-stage baseline. The rule built here lands within 5 % of
the paper's figure. It keeps the paper's ordering, with the 4-stage collector about 15 %
faster than the 6-stage one; the paper reports 12 %. The 6-stage model here holds a stalled
stage and every younger one, which is again a choice the paper leaves open.

The paper also compares flip-flop counts: 5156 bits for the 4-stage collector and 7728 for
the 6-stage one. After synthesis, the control of one half takes 255 flip-flop bits here for
the 4-stage collector and 419 for the 6-stage one. The operand registers come on top. In the
4-stage collector they sit in each stream processor: 320 bits per half and lane.

Operands an instruction does not use are not read. Two reads of the same register still
count as two reads.

The even and odd halves move together. This keeps the ALU assignment made at issue valid:
the three ALUs are shared by both halves, and the bundles that entered together must reach
stage 2 together.

On the data side, in `stream_processor`, each bank is read at the row chosen for it. The
first crossbar routes each bank's output to the request slot that owns it. The slot latches
the value when granted. On `adv0` and `adv1` the values shift down the stages.

Without conflicts a pair enters every cycle, and its operands reach the units two cycles
after it was accepted, as in the paper's 4-stage collector figure.

## Execution, write back and the memory path

In stage 2 the second crossbar feeds the three ALUs and the LD/ST lane from the four
collected instructions. ALU results go through the third crossbar to the write ports of the
warp's half at the end of the same cycle. Each bank has three write ports: the two results
of a warp pair and one for load data.

`BNZ` is resolved from **lane 0's** ALU output. Branches are assumed uniform across the warp;
divergence is not supported.

A LD/ST instruction starts all 16 `ldst_lane`s at once. Each lane computes `ra + imm` and
requests the interconnect. `sp_interconnect` serves one lane at a time, round robin, through
the L1 cache. When every lane is done, the control unit writes the loaded words into the
destination register of all lanes in one cycle, then releases the lanes and the warp.

A load therefore takes at least 2 × 16 cycles with L1 hits: one grant cycle plus the access
for each lane. Memory traffic, not issue width, bounds memory-heavy kernels.

`l1_cache` is direct mapped, with 64 sets of 4 words:

* A read hit is acknowledged in the cycle of the request.
* A read miss refills the line one word at a time.
* Writes go through to memory; a write hit also updates the line.

## Instruction set (own)

The paper defines no instruction set. This one is 32 bits wide:
`[31:28] opcode, [27:24] rd, [23:20] ra, [19:16] rb, [15:0] signed imm`. Each thread has 16
registers of 32 bits. Memory uses word addresses.

| op | name | effect |
|----|------|--------|
| 0 | NOP | – |
| 1–8 | ADD SUB AND OR XOR SHL SHR MUL | `rd = ra op rb` (shifts by `rb[4:0]`, MUL keeps the low 32 bits) |
| 9 | ADDI | `rd = ra + imm` |
| 10 | TID | `rd = warp*16 + lane + imm` |
| 11 | LD | `rd = mem[ra + imm]` |
| 12 | ST | `mem[ra + imm] = rb` |
| 13 | BNZ | if `ra` of lane 0 ≠ 0: `pc = pc + 1 + imm` |
| 14 | SLT | `rd = (signed) ra < rb` |
| 15 | EXIT | the warp stops |

`gpgpu_pkg::encode()` builds instruction words.

## Using the core

1. With `start` low, write the kernel through `prog_we` / `prog_addr` / `prog_wdata`.
2. Pulse `start` for one cycle with `warp_mask` naming the warps to run. All warps begin at
   pc 0; a kernel uses `TID` to tell its threads apart.
3. Wait for `busy` to fall. It falls once every enabled warp has executed `EXIT` and its
   instructions are complete.

The `mem_*` port is a simple handshake:

* The core holds `mem_req` and the other request signals until `mem_ack` is high for one
  cycle.
* On a read, `mem_rdata` must be valid in that cycle.

`evt` (`core_evt_t`) reports each cycle:

* how many instructions issued;
* bank conflicts;
* refusals due to the ALU limit and to the LD/ST limit;
* dependent pairs that were split;
* taken branches;
* L1 hits and misses.

## What comes from the paper and what does not

From the paper:

* 16 SPs per core, and warps of up to 16 threads.
* 16 warps, numbered 0–15 and split into even and odd.
* The dual-warp fetch of four instructions and the 3 ALU + 1 LD/ST issue limit.
* The SIMT control by one SP control unit.
* Four single-read-port register banks.
* The 4-stage collector schedule: OP0s in stage 0, OP1s in stage 1, out after stage 2.
* The SP's internal order: banks, crossbar, collectors, crossbar, units.
* The top-level chain: instruction cache, scheduler, SPs, interconnect, L1, DRAM.

One point in the paper conflicts with the rest of its description. One sentence limits issue
to "four ALU or two LD/ST instructions". The unit counts and the worked examples both say
three ALU and one LD/ST instruction, and that limit is the one implemented.

Chosen here, where the paper is silent:

* the instruction set and the 16 registers per thread;
* the 32-bit data width and word addressing;
* round-robin warp choice and the slot priority;
* the dependency rules and the one-bundle-per-warp rule;
* lane-0 branch resolution;
* oldest-first bank arbitration, the stage-1 retry of refused reads, and the lockstep of
  the two halves;
* three write ports per bank;
* the LD/ST handshake with one access at a time through the interconnect (the paper's
  block diagram draws several links between the interconnect, the L1 and DRAM, without
  saying what they carry);
* the cache organisation;
* the instruction cache as a preloaded memory with four read ports;
* kernel launch.

Not built:

* The **SFU**, and the unit labelled **DBL** in one of the paper's figures. Their functions
  are not described.
* **DDR3**, which is external. The core has a plain memory port instead.
* **More than one core.** The paper's evaluation uses one core.

The paper's **6-stage collector** is built, but only as a separate block for the cycle
comparison. It is not wired into the core.

## How far it can be trusted

Every block has a self-checking testbench in `tb/`. The testbenches compare against values
computed independently, and each one has been shown to fail on a deliberately broken copy of
its block.

`tb_gpgpu_top` runs the whole core at its default sizes. It runs a kernel on all 16 warps
(256 threads) with loads, stores, arithmetic, a three-trip loop and `EXIT`. It checks every
word written to memory and the total instruction count. It also fails unless each of these
has happened at least once:

* 3- and 4-instruction issue;
* an ALU-limit refusal and a LD/ST-limit refusal;
* a dependent-pair split;
* a bank conflict;
* a taken branch;
* an L1 hit and an L1 miss.

`tb_operand_collector` repeats the paper's collector experiment; the result is in the table
above.

Two testbenches run the paper's image workloads on the whole core, at the paper's image size
of 640 × 480. They check every output pixel against a value computed in the testbench. Pixels
are 32-bit words, and the memory model answers in 3 cycles.

| workload | testbench | cycles | cycles/pixel | paper (its runtime × 50 MHz / pixels) |
|---|---|---|---|---|
| integral image | `tb_integral_image` | 5,381,204 | 17.5 | 31.3 |
| 3×3 Gaussian filter | `tb_gaussian_3x3` | 9,692,805 | 31.6 | 37.7 |

How the kernels are written:

* Each kernel has a warp own 16 adjacent rows or columns. This keeps every loop branch the
  same for all threads of a warp.
* The integral image takes two launches: row sums, then column sums. The core has no barrier
  between warps, so the second pass must wait for a new launch.
* The Gaussian input carries a one-pixel zero border, so every pixel takes the same nine
  loads.

Both workloads are bound by the single LD/ST unit: each load or store instruction costs about
two cycles per thread. The paper's kernels and memory system are unknown, so the comparison
above is only indicative.

The paper's conclusion speaks of three image algorithms, but it reports only these two.

## Simulating

All files are plain SystemVerilog 2017. The package has to come first. For example:

```
verilator --binary --timing -Irtl -Itb rtl/gpgpu_pkg.sv tb/tb_gpgpu_top.sv \
          --top-module tb_gpgpu_top -Mdir obj_top -o sim && ./obj_top/sim
```

Every testbench ends with `TB_RESULT checks=<n> failures=<n>`. The two image testbenches
simulate 5 to 10 million cycles each and take several seconds. The others finish in well
under a second. Block testbenches are named `tb_<module>`. Sizes are parameters in `gpgpu_pkg` (SP, warp, bank, register and ALU counts)
and on `gpgpu_top` (instruction cache depth and L1 geometry).
