# Turboscalar core in SystemVerilog

A superscalar core usually has to choose between a very wide front end and a
short one. A wide front end must decode, rename and check dependencies for
many instructions per cycle. That logic is deep, so the pipeline gets long,
and every branch misprediction then costs many cycles.

Turboscalar avoids that choice by using two front ends that share one
out-of-order execution core:

* **Cold pipeline.** A narrow, conventional front end: 1 instruction wide and
  4 stages deep. It runs whenever the program is on a path it has not seen
  recently, for example right after a misprediction.
* **Hot pipeline.** A 24-wide front end only 3 stages deep. It does almost no
  work per cycle, because it fetches instructions whose decoding,
  dependency checking and register renaming were done ahead of time, off the
  critical path.

The work is done ahead of time by an **optimizing back-end** behind the
completion stage. It watches the instructions that the cold pipeline
completes, packs them into 6-instruction *blocks* and 4-block *traces*, and
stores them in a **dynamic instruction cache**. The next time fetch reaches
the start of a trace, the hot pipeline takes over.

This repository is a synthesizable-style RTL model of that organisation.
Every parameter defaults to the sizes of the published design point:

| Parameter | Value |
|---|---|
| Hot pipeline | 24 wide, 3 stages (4 blocks of 6 instructions) |
| Cold pipeline | 1 wide, 4 stages |
| Reservation stations | 128 entries in each of 5 class clusters |
| Per-cycle dispatch limits | 12 simple-integer, 10 load/store, 2 complex, 1 FP, 4 branch |
| Instruction and data memory | 32 KB each |

## Top level and data flow

`turboscalar` (rtl/turboscalar.sv) connects the parts:

```
          +-------------+        +-----------+
 imem --> | cold_pipe   |--lane--|           |     5 x rs_cluster      rob
          | F D R S     |        | dispatch_ |---> SI LS CX FP BR ---> (completion)
          +-------------+        | xbar      |         |   results      |   |
                 ^  rename/read  |           |         +---> quack_rf <-+   |
 fetch_ctrl -----+               |           |                            v
                 v  rename/read  |           |                        backend
          +-------------+        |           |                            |
 dyn_  -->| hot_pipe    |--24----|           |       blocks, traces       |
 icache   | IB1 IB2     | lanes  +-----------+ <--------------------------+
          +-------------+
```

* `fetch_ctrl` decides each cycle which pipeline fetches (see "Hot or cold").
* Both pipelines rename and read operands through the same silo register
  file (`quack_rf`). The cold pipeline uses lane 0; the hot pipeline uses
  all 24 lanes.
* The dispatch crossbar takes one group per cycle, from either pipeline. It
  allocates reorder-buffer entries and sends each instruction to the
  reservation-station cluster of its class.
* Results are broadcast on 20 writeback lanes. These go to the register
  file, to every reservation station (wakeup and forwarding) and to the
  reorder buffer.
* The reorder buffer (`rob`) completes instructions in order. It commits
  register versions, trains the cold pipeline's branch predictor, and feeds
  completed cold instructions to `backend`. `backend` writes blocks and
  traces into `dyn_icache`.

### Instruction format

The core executes a small predecoded format (`ts_pkg::instr_t`):

* Fields: class, operation, `rd`, `rs1`, `rs2`, 16-bit immediate.
* Five classes: simple integer, load/store, complex integer, floating
  point, branch. The class decides which cluster executes an instruction
  and which dispatch positions it may occupy.
* Operations:
  * simple integer: add, sub, and, or, xor, addi, slli, li
  * complex integer: mul, slt
  * floating point: an integer add (only integer programs are targeted)
  * load/store: ld, st (word addressed)
  * branch: beq, bne, blt, jmp, halt

Instruction addresses are 16-bit word indices. Branch offsets are relative
to the branch.

This is not a real architectural ISA. A production front end would translate
its ISA into this form.

## The silo register file (quack_rf)

This is the part that lets the hot pipeline skip renaming. There is no
rename map table. Instead there is one *silo* per architected register: a
small stack of versions of that register.

* **Reading.** The newest version is always on top of its silo. A source
  operand is read from a fixed place: "top of silo `rs`".
* **Naming versions.** A physical register is named `{register, version}`.
  Each silo counts the versions it has handed out.
* **Dependencies inside a group.** An instruction that depends on an
  earlier instruction of the same fetch group cannot read the silo top,
  because the producer has not been renamed yet. The back-end therefore
  records, for every instruction of a block, how many earlier instructions
  of the block write `rd`, `rs1` and `rs2` (the *prior-write counts*). At
  fetch, the tiny decoder adds the writes of the group's earlier blocks.
* **Forming tags.** The register file turns the counts into tags:
  * destination version = silo counter + prior writes to `rd`;
  * a source with a non-zero count `p` waits for version counter + p - 1;
  * a source with count 0 reads the silo top.

  So a 24-instruction group is renamed in one cycle, with no comparisons
  between the instructions of the group.
* **Allocation.** It writes the new versions above the top. Each silo is
  stored as a ring of 32 entries with a top pointer.
* **Writeback.** Each silo compares the version of every live entry with
  the 20 writeback tags.
* **Commit and flush.**
  * A silo holds one committed version and up to 31 speculative ones.
  * Commit advances the committed point.
  * A flush drops all speculative versions and restarts the version
    counter just above the committed one. Without that restart, the 6-bit
    version numbers could wrap onto a live version after many flushes.
* **Back-pressure.** `ren_ok` goes low when a group would overflow a silo.
  The front end then waits.

The silo depth (32), the version width (6 bits) and the whole commit and
recovery scheme are this design's choices. The source description only
states that each register has a stack whose top is the newest version, and
that the tags come from the back-end.

## Blocks, traces and the dynamic instruction cache

### Blocks

A block (`ts_pkg::block_t`) holds up to 6 instructions of straight-line code.
Each instruction sits on a *dispatch position* that accepts its class:

| Position | 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| Classes | SI | SI | SI, LS | LS, CX | LS, FP | BR |

This gives 9 class slots over 6 positions, and no position takes more than
two classes. Per block that is 3 simple-integer, 3 load/store, 1 complex,
1 FP and 1 branch slot.

Each instruction also keeps:

* its program-order index within the block (`prog`);
* its prior-write counts.

### The back-end (backend)

It receives completed cold instructions one per cycle, in program order, and
places each one on the first free position of its class. It closes the
block in any of these cases:

* after a branch;
* at 6 instructions;
* when the next instruction's class has no free position left;
* when the next instruction does not follow on in address;
* on a *break*, that is, when completion leaves the cold pipeline's
  instructions (a hot instruction completes, or a flush).

In the last three cases it raises `in_ready` low for one cycle so the
reorder buffer holds the instruction back.

Consecutive blocks are gathered into a trace of up to 4 blocks. A trace
records:

* the start address of each block;
* the address that followed the last block.

So a trace is the path the program actually took the last time. A break
also closes the open trace.

### dyn_icache

It holds a direct-mapped trace table and four identical block caches,
each 256 entries:

* **Lookup.** A trace start address is looked up in the trace table. Each
  of the trace's up to 4 block addresses is read from its own block-cache
  copy, so all four blocks come out in the same cycle.
* **Missing blocks.** If a block is missing, the trace is cut just before
  it, and the successor address becomes that block's address.
* **Invalidation.** A trace is invalidated when a branch fetched from it
  mispredicts.

## The hot pipeline (hot_pipe, tiny_decoder)

| Stage | What happens |
|---|---|
| 1 | The four blocks from `dyn_icache` are latched into instruction buffer 1. |
| 2 | The tiny decoder expands the blocks into 24 lanes (address, reorder-buffer offset, predicted successor, group-wide prior-write counts), and the silo register file is read and renamed for all lanes. The result is latched into instruction buffer 2. |
| 3 | The group is handed to the dispatch crossbar. |

A group waiting in buffer 2 keeps capturing results for its waiting
operands. The hot pipeline does no branch prediction: the trace already
fixes the path.

## The cold pipeline (cold_pipe)

The stages are:

* **F**: read the instruction memory and predict with a 1024-entry table
  of 2-bit counters (`branch_pred`). Jumps are always taken.
* **D**: decode.
* **R**: rename and read through lane 0 of the silo register file.
* **S**: dispatch. A waiting operand keeps capturing results here.

With no stalls, an instruction fetched in cycle t reaches dispatch in
cycle t+3. The predictor is trained by completed cold conditional
branches.

## Hot or cold? (fetch_ctrl)

One fetch address is kept. Each cycle it is looked up in the trace table.

* **Cold mode.** A hit makes fetch stop and wait until the cold pipeline has
  dispatched everything it holds. Only then does the hot pipeline start. A
  miss lets the cold pipeline fetch.
* **Hot mode.** A miss makes fetch wait for the hot pipeline to drain, then
  hand back to the cold pipeline.

This is the fetch interlock: the two pipelines never have instructions in
flight at the same time, so program order at dispatch is simply fetch
order. A flush restarts fetch in cold mode at the corrected address.

## Dispatch (dispatch_xbar)

The crossbar is sparse. Each class has its own small crossbar, and it only
connects the lanes whose position accepts that class, plus the cold lane.
With 4 blocks that gives:

| Class | Inputs : outputs |
|---|---|
| Branch | 4 : 4 |
| Complex integer | 4 : 2 |
| FP | 4 : 1 |
| Simple integer | 12 : 12 |
| Load/store | 12 : 10 |

The outputs are the per-cycle limits.

* **Groups over several cycles.** A group with more instructions of one
  class than its limit is dispatched over several cycles. A registered
  "sent" mask remembers what has already gone.
* **Reorder buffer.** Entries for the whole group are allocated in its first
  dispatch cycle. Each instruction's entry is the group base plus its
  program-order offset.
* **Busy clusters.** A cluster that reports not ready receives nothing that
  cycle.

## Execution core (rs_cluster)

Each class has one cluster with a 128-entry reservation station:

| Cluster | Issue per cycle |
|---|---|
| Simple integer | 12 |
| Load/store | 1 |
| Complex integer | 2 |
| FP | 1 |
| Branch | 4 |

* **Issue and forwarding.** Entries capture results by tag. The issue logic
  also sees the current cycle's results, so a dependent instruction issues
  in the cycle after its producer. Every unit has a one-cycle latency.
* **Branches.** The branch cluster resolves the successor address and flags
  a misprediction when it differs from the predicted one.
* **Memory.** Loads and stores issue only when they are the oldest
  instruction in the machine. Memory is therefore accessed in program order
  and never speculatively.
* **Units.** Each cluster builds only the units of its own class (parameter
  `CLS`).

## Completion and recovery (rob)

The reorder buffer has 256 entries and completes up to 24 instructions per
cycle. At most one of those may be a cold-pipeline instruction, because the
back-end takes one per cycle. When a mispredicted branch completes:

* the whole machine is flushed, including the speculative silo versions;
* fetch restarts at the resolved address, in cold mode;
* if the branch came from a trace, that trace is invalidated.

A `halt` instruction stops completion and raises `halted`.

## Interface of the top

| Port | Use |
|---|---|
| `clk`, `rst_n` | clock, asynchronous active-low reset |
| `im_we/im_addr/im_wdata` | load the program into instruction memory |
| `dm_we/dm_addr/dm_wdata/dm_rdata` | environment access to data memory |
| `run` | start fetching at address 0 |
| `halted` | a `halt` has completed |
| `dbg_reg/dbg_data` | read the committed value of a register |
| `ev_*`, `hot_mode` | one-cycle event outputs for measurement (completions, hot completions, flushes, hand-overs, fetches, dispatch and silo stalls, blocks and traces built) |

## Where this model departs from the source description

* **The per-class crossbar sizes.** The description states 6:4, 6:2, 6:1,
  18:12 and 18:10. That does not match its own slot counts per 6-instruction
  block (1 branch, 1 complex, 1 FP, 3 load/store, 3 simple) over 4 blocks,
  which give 4, 4, 4, 12 and 12 inputs. The slot counts were followed.
* **Which classes share a position.** The description does not give the
  layout; the table above is this design's choice.
* **Trace selection.** The description selects traces at completion with a
  tree-structured multiple-branch predictor from other work. Here the trace
  table records the path last seen, and a trace is dropped when it
  mispredicts.
* **Execution resources.** The description assumes unbounded functional
  units, PowerPC 604 latencies, out-of-order loads and stores with unlimited
  queues and store-to-load forwarding, and unlimited rename registers and
  reorder-buffer entries. Here:
  * issue widths equal the dispatch limits (load/store: 1);
  * every unit takes one cycle;
  * memory instructions go in order at the head of the reorder buffer;
  * the silos hold 32 versions;
  * the reorder buffer has 256 entries;
  * completion is 24 wide (the reference superscalar in the description
    completes 16).
* **Memory hierarchy.** The 256 KB L2 and main memory are not modelled.
  The 32 KB instruction and data memories never miss, so a program must fit
  in them.
* **Back-end optimizations.** Compiler-style optimizations and instruction
  translation, which the description mentions as possible back-end work,
  are not done. The back-end only forms blocks, aligns slots and counts
  prior writes.
* **Cold pipeline configuration.** Depth and width are fixed at 4 and 1 by
  the structure of `cold_pipe`, not by parameters.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`).
Each one:

* drives random stimulus with `$urandom`;
* compares against a model written independently of the RTL, or against
  properties;
* prints `TB_RESULT checks=<n> failures=<n>`;
* has a watchdog.

The testbenches also check that the mechanisms they target really
happened. For example, the reservation-station test checks that the station
filled up and that a result arrived in the same cycle a consumer was written.

`tb_turboscalar` runs the full-size top with no parameter changes. It
loads two looping programs:

1. an array loop with an alternating data-dependent branch;
2. a straight-line loop dense in complex-integer and FP operations.

It runs them against an instruction-level reference model and compares all
32 registers, the touched memory and the completed instruction count. It
also requires that each of the following happened at least once:

* cold and hot fetch;
* hand-overs both ways;
* blocks and traces built;
* flushes;
* dispatch stalls;
* more than 6 completions in one cycle.

In the current run about 78% of the completed instructions came through
the hot pipeline.

To simulate with Verilator (5.x), compile the package first:

```
verilator --binary --timing -Irtl rtl/ts_pkg.sv rtl/*.sv tb/tb_turboscalar.sv \
          --top-module tb_turboscalar -o sim && ./obj_dir/sim
```

For a unit test, replace the testbench file and `--top-module`, for example
`tb/tb_quack_rf.sv` and `tb_quack_rf`.

The end-to-end test runs in under a second once built. The Verilator build
takes about ten seconds.

The full-size design is large: five 128-entry stations snooping 20
writeback lanes, and 32 silos of 32 versions. Elaboration and lint are
quick, but a full logic synthesis of the top takes a long time.
