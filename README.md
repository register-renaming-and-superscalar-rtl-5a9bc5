# Superscalar fetch/decode and register renaming for an out-of-order RISC-V core

An out-of-order RISC-V core splits into a front-end (fetch, branch prediction,
decode), a back-end (renaming, execution, commit) and a memory system (I$, D$,
store buffer, L2). This RTL covers the front-end and the renaming stage. Its
main features are:

* **A front-end that moves up to K instructions per cycle** (K = 2 by
  default). Fetch forms a *strike*: a run of consecutive instructions that
  stay in one cache line and that the BTB predicts as sequential. The
  instruction cache answers a whole strike in one access. Instructions then
  travel in order through K-wide FIFOs and K decode lanes.
* **A register renaming table with speculation masks.** It keeps the committed
  architectural-to-physical map plus a stack of in-flight renamings. Each
  in-flight renaming carries a mask of the unresolved branches it depends on.
  A mispredicted branch removes its dependants in one cycle; a confirmed
  branch clears its bit everywhere.

The back-end itself (execution units, register file, reorder buffer) and the
memory system are not part of this RTL. The top module brings their
connections out as ports.

## Pipeline

```
        +-----+  btb_pc[K] / hit / target
        | btb |<------------------+
        +-----+                   |
           ^ train_*        +-----------+   +--------+   +--------+   mem_* (line refill)
           |                |  fetch1   |-->| fetch2 |-->| icache |<------------------->
  be_redir_* ------------->| pc, epoch |   +--------+   +--------+
                            +-----------+                   | K maybe-instructions
                                  ^ dec_redir_*             v
                                  |                    +--------+
                                  |                    | fetch3 |
                                  |                    +--------+
                                  |                        | K enqueue lanes
                                  |                  [ sup_fifo: fetch -> decode ]
                                  |                        | K first/deq lanes
                                  +--------------------[ decode (K lanes) ]
                                                           | K enqueue lanes
                                                   [ sup_fifo: decode -> rename ]
                                                           | lane 0
                                                   [ rename_stage + reg_rename_table ]
                                                           |
                                    ren_* to the back-end; commit_*, wrong_spec_*, right_spec_* back
```

| Module | Role |
|---|---|
| `superscalar_core_top` | Wires the pipeline and produces event pulses for performance counters |
| `fetch1` | Holds pc and epoch; computes the strike length and the predicted next pc (ppc); applies redirects |
| `btb` | Direct-mapped branch target buffer with K lookup ports and one training port |
| `fetch2` | One-entry request register between fetch1 and the cache; flushed on a redirect |
| `icache` | Direct-mapped, blocking instruction cache; returns K instructions of one line per hit |
| `fetch3` | Enqueues the cache answer, in order, into the fetch FIFO |
| `sup_fifo` | K-wide FIFO built from K ordinary FIFOs (`sync_fifo`) |
| `decode` | K in-order decode lanes: wrong-path drop, RV64I field decode, JAL redirect |
| `rename_stage` | Renames one instruction per cycle and hands it to the back-end |
| `reg_rename_table` | Committed map, in-flight renaming stack, free list, speculation masks |
| `ooo_pkg` | Shared sizes, types and the event struct |

## The strike: what fetch1 asks for

Each cycle fetch1 looks at pc, pc+4, …, pc+4(K−1) and sends the BTB all of
them. Lane i belongs to the strike if:

* all earlier lanes belong to it,
* no earlier lane was predicted as a jump, and
* pc+4i is still in the cache line of pc.

The first lane that the BTB predicts as a jump still belongs to the strike,
but it ends the strike there. The predicted next pc is then:

* that lane's BTB target, if the strike ended on a predicted jump;
* pc + 4·count otherwise.

On the request handshake, pc becomes the predicted next pc.

Because a strike never crosses a line, the cache can answer it with one line
read. Its answer is a vector of K *maybe-instructions*: lane i is valid for
i < count. fetch3 turns lane i into an instruction record. That record holds:

* pc + 4i;
* its own predicted next pc (pc + 4(i+1), or the strike's ppc for the last
  lane);
* the epoch.

A strike goes into the FIFO whole or waits; it is never split.

## The K-wide FIFO

`sup_fifo` has K enqueue lanes and K dequeue lanes with the usual per-lane
"first" outputs. Inside are K ordinary FIFOs of depth N, filled round-robin.
Two pointers of log2(K) bits give the internal FIFO for the next enqueue and
for the oldest element:

* enqueue lane i writes FIFO (enq_ptr + i) mod K;
* dequeue lane i reads FIFO (deq_ptr + i) mod K.

At the clock edge each pointer moves by the number of lanes used. All lanes
are resolved together, so two lanes never need the same pointer value in
sequence within a cycle. This keeps the logic shallow. The rules are:

* Lanes are used as a prefix: lane i only if lanes 0..i−1 are also used.
  Assertions check this, and that no lane writes a full FIFO or reads an
  empty one.
* `enq_rdy[i]` is the not-full of the FIFO that lane i would write.
* `not_full` and `not_empty` are lane 0's.
* K must be a power of two.
* An element is visible at the output one cycle after it is enqueued.

## Removing wrong-path instructions

A redirect (from the back-end, or from decode on a mispredicted JAL) makes
every younger instruction in the front-end wrong. They are removed in two
ways:

* **Killed in place.** A redirect clears the fetch-to-decode FIFO with the
  FIFO's `clear`: everything in it is younger than the redirecting
  instruction. A back-end redirect also clears the decode-to-rename FIFO. The
  redirecting instruction has already been renamed, so everything in that
  FIFO is younger too. A decode redirect leaves the rename FIFO alone: the JAL
  and the older instructions are already there, and they are correct.
* **Dropped by epoch.** Some requests are still in fetch2, the cache or the
  cache's answer register. fetch1 tags each request with a 4-bit epoch and
  increments the epoch on every redirect. Decode drops an instruction whose
  epoch is not the current one.

The decode lanes act in order. When lane i redirects, lanes i+1.. in the same
cycle see the new epoch and drop their instructions.

Redirect priorities and effects:

* A back-end redirect has priority over a decode redirect.
* No fetch request is made in a redirect cycle.
* fetch2 drops the request it holds.

## Renaming table

State:

| Structure | Contents |
|---|---|
| `map_q[32]` | Committed physical register of each architectural register (reset: xN → pN) |
| Stack of NUM_PHY − NUM_ARCH = 32 entries (circular, `enq_p`/`deq_p`) | valid, architectural register, physical register, 4-bit speculation mask |
| `free_q[64]` | Free physical registers (reset: p32..p63) |

Operations, all in one cycle:

* **lookup** (combinational): a source maps to the *youngest* valid stack
  entry for that register, or else to `map_q`. `lk_phys.rd` shows the
  register a claim in this cycle would get: the lowest free one.
* **claim**: pushes {rd, new physical register, mask} at the young end.
* **commit**: pops the oldest entry into `map_q`. The physical register it
  replaces becomes free.
* **wrong speculation (tag t)**:
  * every valid entry whose mask has bit t is invalidated and its register
    freed;
  * `enq_p` moves back by the number killed.

  This relies on masks following program order: everything younger than a
  branch carries the branch's bit. The killed entries are then exactly the
  youngest ones.
* **right speculation (tag t)**: clears bit t in every mask. It also clears
  the bit in the mask of a claim made in the same cycle.

Usage rules:

* A claim is refused in a cycle with a wrong-speculation kill.
* Claims are made only for instructions that write a register (writes to x0
  are not renamed).
* Commits are given once per claim, in program order, and only for
  non-speculative entries (an assertion checks that a committing entry is not
  being killed).

`rename_stage` handles one instruction per cycle (the back-end is
single-issue). The instruction's mask comes from the back-end on
`spec_bits_in`, because branch-tag allocation lives there.

## Top-level interface

All ports are synchronous to `clk`. Reset (`rst_n`) is synchronous and active
low. Every handshake is valid/ready: data moves in a cycle where both are
high.

| Ports | Direction | Meaning |
|---|---|---|
| `mem_req_valid/addr/ready` | out/out/in | Line refill request (64-byte aligned address) |
| `mem_resp_valid/data` | in | The whole 16-word line in one beat; word w at bits [32w+31:32w] |
| `be_redir_valid/pc` | in | Back-end redirect |
| `train_valid/pc/target/taken` | in | BTB training: a taken transfer writes an entry, a not-taken one removes a matching entry |
| `ren_valid/inst/ready` | out/out/in | Renamed instruction: decoded fields, physical sources and destination, mask |
| `spec_bits_in` | in | Mask of the instruction being renamed |
| `commit_valid/rdy/arch/phy` | in/out/out/out | Commit the oldest renaming |
| `wrong_spec_valid/tag`, `right_spec_valid/tag` | in | Speculation outcome |
| `events` | out | One-cycle pulses (see `perf_events_t` in `ooo_pkg`) |

Timing:

* An I$ hit answers one cycle after its request.
* A miss costs the refill latency plus two cycles.
* Each FIFO adds one cycle.
* fetch3, decode and rename are combinational between their FIFOs.

## Parameters and sizes

| Parameter | Default | Origin |
|---|---|---|
| Architectural registers | 32 | Source description (and RISC-V) |
| Speculation mask | 4 bits | Source description |
| Superscalar degree `K` | 2 | Inferred from the source's two-lane FIFO proposal; the FIFO and decode are written for any power of two |
| Physical registers | 64 | Design choice; the source's example mapping names p57, so it assumes at least 58 |
| FIFO depth per internal FIFO `FIFO_DEPTH` | 4 | Design choice |
| I$ | 64 sets × 16 words, direct mapped | Design choice |
| BTB | 64 entries, direct mapped | Design choice |
| pc | 64 bits, reset 0x8000_0000 | Design choice |
| Fetch epoch | 4 bits | Design choice |

Register-file sizes, `SUP_K`, `LINE_WORDS` and `EPOCH_W` live in `ooo_pkg`.
The module parameters (`K`, `FIFO_DEPTH`, `IC_SETS`, `BTB_ENTRIES`,
`RESET_PC`) are on `superscalar_core_top`.

## Where this design fills gaps

The source description specifies these parts closely: the strike rule, the
K-FIFO organisation with rotating pointers, the ordered decode lanes and the
renaming table's interface and state. It only names the other blocks (BTB,
I$, pc, decode) and says what they do. The following are this design's own
choices; judge them as such:

* **Instruction set.** Decode handles RV64I base opcodes only, with 4-byte
  instructions. There are no compressed, floating-point or atomic
  instructions.
* **Fetch and decode behaviour.**
  * Decode redirects only for a JAL whose target was mispredicted.
  * The BTB has no direction predictor: the BHT that such cores usually have
    is not built.
* **Renaming details.** The free list is a bitmap with lowest-first
  allocation.
* **I$.** It is a blocking cache with one outstanding miss and a one-beat line
  refill.
* **Epochs.** The 4-bit epoch could alias only if 16 redirects happened while
  one request was still between fetch2 and decode. Only a few requests can
  be in flight there, so this is unlikely, but nothing checks it.
* **Missing address translation.** No address translation (iTLB/MMU) is done:
  fetch addresses are physical.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_reg_rename_table` | 6000 random cycles against a queue-based reference model, with branch tags allocated in program order; lookups, allocation, fill to full, kills, confirmations, commits |
| `tb_sup_fifo` | Random prefix enqueue/dequeue against a reference queue; one-cycle latency, full K-wide throughput, per-lane ready, clear |
| `tb_btb`, `tb_fetch1`, `tb_fetch2`, `tb_fetch3`, `tb_icache`, `tb_decode`, `tb_rename_stage` | Per-module reference models (strike rule, refill and hit latency, lane ordering, JAL redirect, renaming against the latest writer) |
| `tb_superscalar_core_top` | The whole design at default parameters (described below) |
| `tb_superscalar_core_top_k4` | The same end-to-end test with K = 4 |
| `tb_sup_fifo_k4`, `tb_decode_k4` | The FIFO and decode unit tests with K = 4 (FIFO depth 3) |

`tb_superscalar_core_top` runs the whole design at its default parameters on
a generated looping program. The program has sequential code, stores, a
JAL, conditional branches (one alternates direction every pass) and a jump
back to the start. The testbench plays two roles:

* **Next memory level:** it answers refills with random latency.
* **Back-end:**
  * allocates speculation tags;
  * resolves branches 3–12 cycles after rename, redirecting, killing and
    training on a misprediction;
  * commits in order.

At each of 4000 commits it checks:

* the pc and instruction word against the program's true path;
* every renamed source against the committed physical register of that
  architectural register.

It also requires each mechanism to occur at least once: full strikes, strikes
cut by a line end, strikes cut by a BTB hit, fetch back-pressure, K-wide
decode, decode redirects, wrong-path drops in decode, in-place kills in both
FIFOs, rename waiting for a free register, refills, back-end redirects, kills,
confirmations and BTB-predicted taken branches.

To run one testbench with Verilator (package first, modules found by
directory search):

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_superscalar_core_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/ooo_pkg.sv tb/tb_superscalar_core_top.sv
./obj_dir/Vtb_superscalar_core_top
```

The testbenches use only two-state values and `$urandom`. The end-to-end run
takes well under a second.
