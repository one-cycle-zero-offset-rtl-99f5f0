# One-cycle zero-offset loads: an in-order superscalar core

Many loads and stores in integer code have a displacement of zero: `ld r1, 0(r2)`.
List traversals, pointer chasing and indexed vector accesses produce them all the
time. For such an instruction the effective address *is* the base register, so the
address-calculation stage of a classic `I - ALU - M - WR` pipeline does no useful
work. This core turns that wasted stage into saved cycles in two ways:

* **ZA, zero-offset load/store advancing.** If the base register is ready when the
  instruction issues, the access skips address calculation and uses the data cache
  in the ALU stage. An advanced load therefore has a latency of one cycle instead
  of two, which removes one load-use stall.
* **ACC, address-calculation collapsing.** If the base register is *not* ready yet,
  the instruction may still issue, as long as the base will exist by the end of the
  next cycle. The base is then bypassed from the functional units directly into the
  memory address register at the end of the ALU stage. The memory reference can
  issue in the same cycle as an ALU instruction that computes its base, or one cycle
  after a load that fetches it. This removes one address-generation stall.

Everything else is a conventional in-order superscalar machine:

* the stages IF, D, I, ALU, M and WR, in the style of the Alpha 21164 integer pipeline
* 2-way or 4-way issue
* a small branch predictor
* a write-through data cache with nonblocking loads

Two runtime inputs, `acc_en` and `za_en`, switch the techniques on and off. With both
low the core is the baseline machine. The parameter `W` selects the two-way or the
four-way model.

## How the two techniques change the timing

An instruction issued in cycle *t* is in the ALU stage in *t+1*, in M in *t+2* and in
WR in *t+3*. Every instruction writes the register file in WR, so an advanced load
carries its data through M unchanged. Stage usage:

| instruction                     | t | t+1          | t+2          | t+3 |
|---------------------------------|---|--------------|--------------|-----|
| ALU operation                   | I | ALU          | –            | WR  |
| load/store (normal)             | I | ALU (address)| M (cache)    | WR  |
| zero-offset load/store with ZA  | I | M (cache)    | – (carry)    | WR  |
| zero-offset load/store with ACC | I | – (wait)     | M (cache)    | WR  |

The issue logic works with two numbers: when an operand is *needed*, and when a
producer makes it *usable*. Both are counted in cycles after the issue cycle *t* of
the consumer.

A value is usable from the start of:

| cycle | producer |
|-------|----------|
| t+1 | an ALU op or an advanced load now in the ALU stage; anything in M or WR |
| t+2 | a normal load now in the ALU stage; an ALU op or advanced load issued in the same cycle in an older slot |
| t+3 | a normal load issued in the same cycle in an older slot |

An operand is normally needed at t+1. The base of an ACC reference is needed only
at t+2. Store data is always needed at t+1.

From these rules:

* The ALU latency is 1 cycle.
* A normal load has a latency of 2 cycles.
* An advanced load has a latency of 1 cycle.
* ACC removes exactly one interlock cycle from an address dependence.

### When a zero-offset reference is advanced

ZA is tried first. An instruction is advanced when all of the following hold:

* `za_en` is high.
* The displacement is zero.
* Its operands are usable at t+1.
* The data cache has a free port in cycle t+1. That cycle also holds the normal
  (M-stage) accesses of the group issued one cycle earlier. Those accesses get the
  ports first.
* Memory order is kept:
  * A load may not overtake an older store that has not yet accessed the cache.
  * A store may not overtake any older access.

If a port or ordering check fails, the instruction is **not stalled**. It is issued as
an ordinary two-stage access, and `za_denied` counts it.

Because the port checks count accesses per cache cycle, not per issue group, ZA can
relax the two-way issue rule. A load and a store may issue together if one of them
is advanced, since they then use the cache in different cycles.

### When ACC applies

If a reference is not advanced and its base register is not usable at t+1, ACC
(`acc_en`) lets it issue anyway, provided the base is usable at t+2. The
instruction is marked `late`.

At the end of its ALU stage, the processor picks the base for such an instruction
from two places:

* the results of older ALU-stage slots in its own group (case a: the producer
  issued together with it)
* the M stage, where a load fetched one cycle earlier has its data (case b)

The base is written into the M-stage address register.

A single reference can use only one of the two techniques:

* A reference that waited for its base can then be advanced.
* A reference that was collapsed still has the normal two-cycle load latency.

So on kernels where every load both depends on a just-computed address and feeds
the next instruction, enabling both gives the same gain as either one alone. The
gains add up only across different loads.

## Issue stage

The I stage holds one aligned group of `W` instructions. Instructions issue strictly
in order. The first one that cannot issue stops itself and every younger one. A new
group is taken from the instruction buffers only when the whole group has issued.

Static rules, checked per group. Memory accesses are counted per data-cache cycle,
as described above.

| model | memory accesses per cache cycle | control transfers per group |
|-------|--------------------------------|-----------------------------|
| two-way (`W=2`)  | two loads, or one store alone | one |
| four-way (`W=4`) | any two | two |

A cycle in which the I stage has nothing to issue, because a misprediction flushed
it or fetch has not refilled it yet, counts as `stall_branch`. Otherwise each stall
cycle goes to one counter, chosen by the reason the oldest waiting instruction cannot
issue:

* `stall_static`: an issue rule
* `stall_agi`: its base comes from a load or ALU op that is not ready
* `stall_lui`: it uses load data that is not ready
* `stall_arith`: an ALU-to-ALU dependence
* `stall_miss`: it reads or writes a register that a missing load has not yet
  delivered (see below)

Two more counters give the zero-offset share of the interlocks, the stalls the two
techniques attack: `stall_agi0` counts the `stall_agi` cycles in which the waiting
instruction is a zero-offset access, and `stall_lui0` the `stall_lui` cycles in which
the load it waits for is a zero-offset load. A zero-offset load waiting for another
zero-offset load counts as an AGI.

## Pipeline and front end

* **IF** (`fetch_unit`, `icache`): reads the aligned half cache block (four
  instructions) that holds the fetch address. The instruction cache is perfect: an
  instruction memory loaded before reset.
* **D** (`fetch_unit`, `branch_predictor`, `instr_buffer`): predicts up to `NPRED`
  control transfers per block, using 256 untagged 2-bit counters indexed by `pc[9:2]`.
  * `NPRED` is 1 in the two-way model and 2 in the four-way model.
  * A predicted-taken branch discards the rest of the block and the block being
    fetched. Fetch goes to the target, which costs one bubble.
  * A block with more control transfers than can be predicted is cut before the
    first unpredicted one, which is fetched again.
  * `BR` is always predicted taken. `JMP` (indirect) is predicted not taken and is
    always corrected in the ALU stage.
  * The block then enters the instruction buffers: 2 half-block buffers in the
    two-way model, 4 in the four-way model. If they are full, the block is dropped
    and fetched again.
* **I** (`issue_unit`): takes the oldest aligned group from the buffers when it is
  empty. It reads operands from the register file (which forwards the value being
  written in WR) or from the ALU-stage and M-stage results, youngest first.
* **ALU** (`alu`, one per slot): computes results, effective addresses and branch
  outcomes, and performs advanced accesses. On a misprediction it discards:
  * the younger slots of its group
  * the I stage
  * the buffers
  * the fetched block

  The correct path is fetched in the next cycle.
* **M** (`dcache`): normal accesses; ACC addresses arrive here from the bypass.
* **WR** (`regfile`): `W` write ports, plus one for the word of a missing load;
  register 31 is always zero.

## Data memory system

`dcache` is an 8 KB direct-mapped cache:

* 32-byte blocks of four 64-bit words
* write-through, with no allocation on a write miss
* two access ports

Behind it sits `write_buffer`: eight block-sized entries that merge stores to the
same block. The oldest entry drains to memory and takes no more merges once its
write has started.

The cache serves one miss at a time. For each miss, the controller:

1. waits until no write-buffer entry holds the block
2. reads the block over the `mem_rd_*` channel
3. fills the line `MISS_LATENCY - 1 = 5` cycles after the miss (when no write
   has to drain first), so that a retried load hits `MISS_LATENCY = 6` cycles after
   its first attempt

Loads are nonblocking. A load that misses is normally let go: it flows on through
the pipeline without writing, and its destination register is marked as owed. Instructions that neither
read nor write that register keep issuing and may hit in the cache meanwhile. One
that does touch it waits in the I stage (`stall_miss`). When the block arrives, the
cache hands the word to an extra register-file write port and the register is free
again.

A load miss is let go only when all of these hold:

* no other miss is being served
* it is the only load missing in this cycle
* no younger instruction in the ALU or M stage reads or writes its destination
* no older instruction in the M stage writes its destination
* no store in the same cycle touches its block

Otherwise the whole pipeline freezes (`freeze_cycles`) and the load retries until it
hits. The pipeline also freezes when:

* a second miss arrives while one is served
* a store goes to the block being filled
* the stores of a cycle do not fit in the write buffer

While the pipeline is frozen, no register or cache state changes. Stores take effect
only in a cycle without a freeze (`commit`). A load reads the word stored by an older
store in the same cycle.

Port use in one cycle follows program order: first the M-stage accesses, then the
advanced ALU-stage ones. The assertion `a_ports` in `zo_processor` checks that the
issue logic never asks for more than two.

The memory itself is not part of the design. Its ports come out of the top:

* **Read channel.** `mem_rd_req`/`mem_rd_addr` request a block. The memory answers
  with one cycle of `mem_rd_valid` and the block on `mem_rd_data`.
* **Write channel.** `mem_wr_req` carries a block address, data and word mask. It is
  held until `mem_wr_ack`.

`tb/mem_model.sv` is a behavioural memory that answers both channels after one
cycle.

## Instruction set

The core runs a small 64-bit load/store instruction set of its own. It has the one
addressing mode the technique needs: base register plus a 16-bit signed displacement.
Register 31 reads as zero. Instructions are 32 bits wide:

```
[31:26] opcode  [25:21] ra  [20:16] rb  [15:0] displacement / immediate
ALU  (op 1):  rc = ra <fn> rb        rc in [15:11], fn in [3:0]
ADDI ANDI ORI XORI LDAH SLLI SRLI:   rb = ra <op> imm   (LDAH adds imm << 16)
LD   (op 9):  ra = M[rb + disp]      ST (op 10): M[rb + disp] = ra
BEQ BNE BLT BGE (11-14): test ra, target pc+4 + 4*sext([20:0])
BR   (op 15): ra = pc+4, jump to pc+4 + 4*sext([20:0])
JMP  (op 16): ra = pc+4, jump to rb
HALT (op 63): stop fetch and issue; `halted` rises when it reaches WR and no load is owed
```

The ALU functions are:

* add, sub, and, or, xor
* sll, srl, sra
* cmpeq, cmplt, cmpult
* s4add and s8add (`(a << 2) + b` and `(a << 3) + b`), used for indexing
* pass-b

Memory is addressed in bytes. Accesses are whole aligned 64-bit words; address bits
[2:0] are ignored.

`zo_pkg` holds the decoder and helper encoders (`enc_r`, `enc_i`, `enc_m`, `enc_b`,
`enc_j`) for writing programs in a testbench. A reference is *zero-offset* when its
displacement field is 0.

## Top-level interface and counters

`zo_processor` has the following parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `W` | 4 | issue width |
| `IB_ENTRIES` | 4, or 2 when `W` ≤ 2 | instruction buffers |
| `NPRED` | 2, or 1 when `W` ≤ 2 | predictions per cycle |
| `BP_ENTRIES` | 256 | predictor counters |
| `IC_WORDS` | 4096 | instruction memory words |
| `DC_BYTES` | 8192 | data cache size |
| `BLOCK_BYTES` | 32 | cache block size |
| `MISS_LATENCY` | 6 | load miss latency in cycles |
| `WB_ENTRIES` | 8 | write-buffer entries |

Loading and running a program:

1. Hold `rst_n` low and write the program into the instruction memory through
   `prog_we`/`prog_addr`/`prog_data`.
2. Release `rst_n`. Execution starts at address 0.
3. Wait for `halted`. Then wait for `wb_empty` before inspecting memory.

The `perf` output (`zo_perf_pkg::perf_t`) has these 32-bit counters:

* `cycles`, `retired`
* `stall_branch` and the five stall classes above, and `stall_agi0`, `stall_lui0`
* `za_loads`, `za_stores` (advanced accesses), `za_denied`
* `acc_used` (late-base references)
* `mispredicts`, `d_redirects` (taken predictions in D)
* `dc_misses`, `freeze_cycles`
* `nb_loads` (missing loads let go)

The ZA, ACC and stall counters count instructions at issue. They therefore include
wrong-path instructions that a misprediction later discards. `retired` counts only
instructions that reach WR.

## Files

Each file in `rtl/` holds one package or module:

* `zo_pkg.sv`: types, the instruction format, the decoder, the issue-rule function `mem_fits`
* `zo_perf_pkg.sv`: the counter struct
* `zo_processor.sv`: top level; pipeline registers, bypass network, memory address register, misprediction recovery, counters
* `issue_unit.sv`: I-stage checks, ZA and ACC decisions
* `fetch_unit.sv`, `instr_buffer.sv`, `branch_predictor.sv`, `icache.sv`: front end
* `alu.sv`, `regfile.sv`: execution units
* `dcache.sv`, `write_buffer.sv`: data memory system

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`) and these
shared files:

* `mem_model.sv`: the behavioural memory
* `zo_tb_pkg.sv`: test programs and an instruction-level reference model
* `tb_zo_processor.sv`: end-to-end test of the four-way model
* `tb_zo_processor_2way.sv`: end-to-end test of the two-way model

## Simulating

Packages must come first. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/zo_pkg.sv rtl/zo_perf_pkg.sv tb/zo_tb_pkg.sv \
  rtl/alu.sv rtl/regfile.sv rtl/branch_predictor.sv rtl/icache.sv \
  rtl/write_buffer.sv rtl/dcache.sv rtl/fetch_unit.sv rtl/instr_buffer.sv \
  rtl/issue_unit.sv rtl/zo_processor.sv tb/mem_model.sv tb/tb_zo_processor.sv \
  --top-module tb_zo_processor -o sim && ./obj_dir/sim
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each has a cycle
watchdog that counts a failure and stops the run. The end-to-end tests need a few
seconds.

## What the end-to-end test shows

`tb_zo_processor` runs six small programs, each in four modes (baseline, ACC only, ZA
only, both). After each run, the testbench compares the result against the reference
model:

* every register
* the data memory from 0x2000 to 0x7FF8
* the retired-instruction count

The programs:

* `chain`: dependent zero-offset loads
* `agi`: an address computation followed immediately by its load
* `list`: a linked list of records
* `vec`: a list held in two vectors, indexed with `s8add`
* `store`: zero-offset copies plus a store burst that fills the write buffer
* `misc`: calls, returns, shifts, compares and signed branches
* `nb`: a loop of strided loads that all miss, with independent work after each

The four-way model at default parameters gives these cycle counts:

| program | baseline | ACC | ZA | ACC+ZA |
|---------|---------:|----:|---:|-------:|
| chain   | 69  | 54  | 53  | 53  |
| agi     | 91  | 75  | 91  | 75  |
| vec     | 432 | 352 | 352 | 352 |
| store   | 381 | 381 | 340 | 340 |
| list    | 256 | 256 | 233 | 233 |
| nb      | 161 | 161 | 145 | 145 |

In `chain`, ZA saves exactly one cycle per advanced dependent load (16), and ACC one
per collapsed load (15). The testbench checks both numbers exactly.

`list` gains little: each record is in a different block, so the misses dominate.
The next record's address comes from the missing load itself, so most of those
misses freeze the pipeline. In `nb`, all 16 misses are let go and the pipeline never
freezes; the testbench checks this.

The testbench also checks that every mechanism happened at least once:

* each stall class, and interlocks on zero-offset accesses (`stall_agi0`, `stall_lui0`)
* advanced loads and stores
* refused advances
* collapses
* mispredictions and D-stage redirects
* misses and freezes
* missing loads let go, and waits for their registers
* a full write buffer

`tb_zo_processor_2way` runs the same test with `W = 2`.

## Departures and own choices

* **How loads are nonblocking.** The original machine is described only as having
  a blocking cache with nonblocking loads. Here one miss is outstanding at a time.
  The release conditions and the register scoreboard are this design's own, as is
  freezing on a second miss or on a store to the block being filled.
* **Own instruction set.** The original machine runs Alpha binaries. This core uses
  the small instruction set above, so real benchmark programs cannot run without
  recompiling them for it.
* **Own choices where the description is silent:**
  * the store-overtaking rule for advanced stores
  * store data always needed at the start of the ALU stage
  * the port order within a cache cycle
  * predictor reset to weakly not taken, and the predictor index bits
  * `BR`/`JMP` prediction
  * refetching a block the buffers could not take
  * how stall cycles are attributed
  * the write-buffer drain order and its memory handshake
  * the instruction-memory size
  * a fill waiting until the write buffer holds no entry for the block
* Both models have two data-cache ports. In the two-way model the issue rules keep
  stores exclusive, which matches its "two read ports, one write port" organisation.

## How far to trust it

The following is verified:

* Every module has a self-checking testbench that compares it with an independent
  model: 2,000 to 27,000 checks each for the datapath and memory blocks, directed
  cases plus a random program walked by a model for fetch, and directed cases for
  issue.
* For every testbench, a deliberately broken copy of its module was shown to fail it.
* The two end-to-end tests compare architectural state with an instruction-level
  reference after every program and mode. They also check the cycle savings of the
  two techniques on the dependent-chain kernel exactly.
* The code passes Verilator lint and the slang front end of Yosys.

Not verified:

* Cycle counts of the other kernels are only checked to be no worse than the baseline.
* Nothing was compared against the original simulator's numbers, which come from
  full benchmark runs on Alpha code.
