# Execution migration across the L2 caches of a four-core chip

A sequential program running on one core of a multi-core chip can use only that core's L2 cache,
while the other cores' L2s sit idle. This design lets one thread move ("migrate") from core to
core as it runs. The goal is for each L2 to end up holding a different part of the working set,
so that the thread sees the sum of the four L2 capacities. For example, four 512-KB L2s then act
like one 2-MB cache.

Two pieces of hardware make this work:

- **A migration controller.** It watches the stream of L1 misses of the running core. It learns,
  with no help from software, how to cut the set of cache lines in use into four subsets that are
  seldom used at the same time. It then moves execution to the core that owns the subset of the
  lines being touched.
- **Support for fast migrations.** An *update bus* carries every retired instruction of the
  running ("active") core to the other cores. Each idle core therefore keeps an up-to-date copy
  of the architectural registers and of the data in its L2. A migration then costs roughly one
  pipeline drain, not a context switch.

The RTL follows the execution-migration scheme of P. Michaud, *Exploiting the Cache Capacity of a
Single-Chip Multi-Core Processor with Execution Migration*. It supplies the
controller, the update bus, the per-core update logic, and L2 caches with the coherence rules
that migration needs. The cores themselves are not included: pipeline, I-fetch, L1 caches, TLBs,
branch predictors and the L3 are outside, and their signals are ports of the top. The last
section lists where this RTL departs from the published description.

## The affinity algorithm

Call each cache line an *element* `e` of the working set. Every element has a signed *affinity*
`A_e`. Let `R` be the window of the most recent references, and let `A_R` be the sum of the
affinities of the elements in `R`. On every reference, with `s = sign(A_R)`:

- every element inside `R` gains `s`;
- every element outside `R` loses `s`.

The effect is that elements used close together in time drift to the same sign. Elements used
at other times drift to the opposite sign. The sign of `A_e` thus cuts the working set in two,
with only a few *transitions* (sign changes along the reference stream).

Updating every element on every reference is impossible in hardware. Two tricks make it cheap:

- **Offsets instead of affinities.** The memory stores `O_e = A_e + Δ`, where `Δ` is a single
  running counter that changes by `s` on every reference. An element that is not touched thereby
  loses `s` per step without being written.
- **Window slots.** The elements inside `R` are held in a FIFO (`split2.sv`). Each slot stores
  `W = A - Δ` at the time it entered, so that the "+s while inside" also comes free. When a slot
  leaves the window, its true affinity is `W + Δ`, and `A + Δ` is written back as the new offset.

`A_R` itself is kept in a register and updated exactly:

1. add the affinity of the entering element;
2. subtract that of the leaving element;
3. add `s` times the window occupancy.

Affinities are 16 bits and saturate when they are written back. Inside the window they are kept
exact. A lookup that misses in the offset store allocates an entry with `O_e = Δ`, that is, with
`A_e = 0`.

### Transition filter

Migrating on every sign change would thrash on working sets that cannot be split. The sign used
to decide is therefore not that of `A_e`, but that of an 18-bit saturating accumulator
`F += A_e` (`transition_filter.sv`). On a working set with no structure, the affinities hover
near the saturation value. The filter then needs about 2^(18−16) references of the same sign
before it turns.

### From two subsets to four

Three 2-way mechanisms run side by side, each with its own window, `A_R`, `Δ` and filter:

- `X` splits the whole working set;
- `Y[+1]` and `Y[-1]` split each half again.

All three share one offset store. A line goes either to `X` or to one `Y`, never to both. This
works through *sampling*: `H(e) = e mod 31` (`sample_hash.sv`, computed by adding the 5-bit
fields of the line address and folding the sum).

- Lines with `H(e) ≥ 8` are not sampled. They touch no state; for them the filters alone tell
  the subset.
- Odd `H` feeds `X`.
- Even `H` feeds `Y[sign F_X]`.

The subset, and with it the target core, is the pair `(sign F_X, sign F_Y[sign F_X])`. Core
number = `{F_X < 0, F_Y < 0}`.

Sampling a quarter of the lines lets an 8k-entry store (`affinity_cache.sv`, 4-way skewed,
20-bit partial tags, 2-bit ages) cover a working set four times larger.

### L2 filtering

If the working set fits in one L2, migrating gains nothing. The filters are therefore updated
only by references that missed the L2. Windows, `A_R`, `Δ` and offsets still change on every
sampled L1 miss. A migration can only happen on an L2 miss.

## Migration controller (`migration_controller.sv`)

The controller handles one L1-miss request at a time, through these steps:

| step | cycles | action |
|---|---|---|
| HASH | 1 | compute `H(e)`; an unsampled request ends here (`decided` after 3 cycles) |
| WB | 0 or 2 | if the chosen window is full, write the offset of the leaving slot back |
| LOOKUP | 2 | read `O_e`; on a miss allocate it with `Δ` |
| STEP | 1 | the chosen mechanism applies one step of the algorithm |
| DECIDE | 1 | compute the target core from the filters |

A sampled request takes 8 cycles, or 10 with a write-back. Requests arrive through a small queue
in the top. When the queue is full they are dropped and counted, which only thins the sample.

When the target differs from the active core and no migration is in flight, the controller runs
the migration handshake below. `migrating` is high from the interrupt until the switch.

1. It pulses `irq_valid`/`irq_core` to the active core's I-fetch. That core stops fetching,
   marks its last fetched instruction as the transition instruction **T**, and returns
   `tpc` (the PC after T).
2. The controller forwards `tpc` as `start_valid/start_core/start_pc` to the new core. The new
   core fetches from there but its issue stage is locked.
3. If the old core later redirects, for example on a mispredicted branch before T, it sends
   `tpc` again. The controller forwards it with `start_flush`, and the new core flushes and
   refetches.
4. When T retires on the old core and arrives over the update bus, the new core's issue stage
   unlocks and `active_core` switches.

## Update bus and per-core receivers

The bus (`update_bus.sv`) takes the retirement packet of the active core and delivers it to all
cores after two pipeline stages. A packet describes up to four retired instructions per cycle.
Each instruction has a kind (register write, store, branch, TLB update), a T flag, a 6-bit
register number and a 64-bit value. The packet also carries one store address and the 16
low-order bits of one branch address. A packet driven by a core that is not active is ignored,
and the event is flagged.

Every core has an `update_receiver.sv`, which:

- writes the register values into its copy of the architectural register file. The active core
  does this too, so the copy is complete whichever core becomes active next. Register reads are
  combinational.
- passes the first store, branch and TLB update of a packet to its L2 update queue, its branch
  predictor and its TLB ports. It does this only when the core is inactive.
- holds the issue-stage lock, set when a migration starts on this core and released by T.

## L2 caches in migration mode (`l2_cache.sv`, `l2_l3_bus.sv`)

Each core keeps its own 512-KB, 4-way, write-back, write-allocate L2 with 64-byte lines. Only one
core executes, so there is a single writer, and that gives simple coherence rules:

- A write by the active core sets the line's *modified* bit. At most one L2 holds a given line
  modified.
- A store arriving over the update bus writes a copy that is present in an idle L2 and clears
  its modified bit. It never allocates. Because of this, copies without the modified bit stay
  current.
- An eviction writes back to L3 only if the line is modified.
- On an L2 miss, `l2_l3_bus` snoops all the other L2s. An L2 with the line modified forwards it,
  writes it back to L3 at the same time, and clears its modified bit. Otherwise the line is read
  from L3.

Each L2 gives priority to snoops, then update-bus stores, then its own core. Stores queued before
T have therefore reached the new core's L2 before that core's first access. Accesses are single
64-bit words: the L1 and its tags are outside. A hit answers in 3 cycles.

## Top level (`emig_top.sv`)

The top connects:

- the four L2s, each behind its update receiver and a 16-entry store queue (`sync_fifo.sv`);
- the update bus;
- the shared L2–L3 side;
- the controller, fed through an 8-entry queue with each completed access of the active core
  (its line address and whether it missed the L2).

The ports are:

- per core: retirement packets in; register-copy reads; issue lock, branch and TLB updates out;
  L1-miss accesses to the L2;
- the migration handshake (`irq`, `tpc`, `start`);
- the L3 request, response and write-back ports;
- one-cycle event pulses for statistics and testing: controller decision, L2-to-L2 forward, L3
  fill, controller-queue drop, update-queue drop, bus conflict.

Defaults are the published configuration: 4 cores, 512-KB L2s, an 8k-entry affinity cache, 25%
sampling, 18-bit filters, and windows of 128 (`X`) and 64 (`Y`). At these sizes the four L2s
hold about 18.7 Mbit of memory.

## Simulating

Each `tb/tb_<module>.sv` is a self-checking testbench. It ends by printing
`TB_RESULT checks=N failures=M`. To build one with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/emig_pkg.sv tb/tb_emig_top.sv --top-module tb_emig_top
    ./obj_dir/Vtb_emig_top

What each testbench shows:

- `tb_split2` compares one mechanism with an exact model of the algorithm. It then reproduces
  the two synthetic tests of the published study, both with 4000 elements and a window of 100:
  - *Circular* (elements referenced in a loop) ends with 2 sign boundaries and 4 transitions
    per 8000 references.
  - *HalfRandom(300)* (random groups of 300 in the lower half, then in the upper half) ends with
    the two halves split exactly.
- `tb_migration_controller` checks:
  - sampling and the latencies;
  - that 20000 L2-hit requests cause no migration;
  - a 16384-line loop, cut into four subsets of 4194 to 4268 sampled lines;
  - 487 migrations, 162 of them redirected.
- `tb_emig_top` runs the whole design with 8-KB L2s and small windows. Behavioural cores walk a
  400-line loop, which is larger than one L2 and smaller than four. The testbench checks every
  read against a memory model and every core's register copy. It counts migrations, redirects,
  issue locks, L2 hits, L2-to-L2 forwards, L3 fills, write-backs, predictor and TLB updates,
  controller-queue drops, update-queue overflows and bus conflicts, and it fails if any of them
  never happened.
- `tb_emig_top_full` runs the same driver (`tb/emig_top_driver.sv`) at the default sizes. It
  uses a 12000-line loop walked 40 times: 480k accesses, about 94 migrations, and no failures.
  It takes about 6 seconds.

## Where this RTL departs from the published description, and what it leaves out

- **The window holds references, not distinct elements.** The published `R` is the `n` most
  recently used distinct elements. Here it is a FIFO of the last `n` sampled references, so a
  line that repeats quickly occupies two slots. The synthetic tests above still split as
  published.
- **The controller datapath and its timing are this design's own.** They were derived from the
  equations: the order of the `A_R` update, the write-back step, and one request at a time.
- **Own choices where the description is silent:**
  - the skewing functions, the age rule and the reset sweep of the affinity cache;
  - the core numbering of the four subsets;
  - the two-stage update bus;
  - the queue depths and the dropping of controller requests when the queue is full;
  - the L2 arbitration.
- **The L2 is set-associative**, with round-robin replacement. The published L2 is 4-way
  skewed-associative.
- **The L2–L3 side assumes migration mode.** It relies on a single writer: one miss served at a
  time, and at most one write-back per cycle, which is checked by an assertion. Running four
  independent programs (migration off) would need a conventional coherence protocol, which is
  not included.
- **Not built:** the cores (pipeline, I-fetch with transition point, retirement unit), the L1
  caches, TLBs, branch predictors and L3. The published design takes them as conventional; their
  connections are ports.
- **Not run:** the benchmark experiments of the published study (SPEC CPU2000 and Olden traces
  on the LRU-stack model and on the four-core configuration). They need cores and traces.
  The LRU-stack study also assumed an unlimited affinity store and 20-bit filters, which is not
  this configuration.
