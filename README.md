# Load-criticality unit: one small predictor, several load-path optimizations

Not every load is equally urgent. A load whose value feeds many later
instructions is likely to sit on the critical path: if even one of its
consumers is a mispredicted branch, a cache miss or a long-latency operation,
delaying the load delays the program. A load that feeds one or two adds can
usually wait.

This RTL predicts, per load PC, how many direct consumers the load had the last
time it ran. It then uses that one number to make several parts of the load
path cheaper or smarter:

| Optimization | What a non-critical load gets | Critical when count ≥ |
|---|---|---|
| Load-port priority ("fake second load port") | yields the single DL1 read port to critical loads | 5 |
| Store AGU sharing | — (more loads get addresses early) | — |
| Store-queue search filter | no associative store-queue search; waits for older stores to drain | 2 |
| Dependence-predictor filter | no speculation past unknown store addresses | 2 (own choice) |
| Selective LRU insertion | its miss fill goes in at the LRU position | 8 |
| Selective DL1 bypass | its miss fill is not installed in the DL1 | 4 |
| Selective prefetch | it may not trigger the prefetcher | 5 |

A load also counts as critical when the confidence of its prediction is low.
For port priority it also counts as critical when it was "ready but delayed"
last time, or when it has already been passed over three times. Each
optimization can be switched off on its own. It then falls back to the usual
behaviour.

The prediction state is small: 1024 entries × 7 bits in the table, one bit per
rename-table entry and a 4-bit counter per ROB entry.

## Predicting criticality

### Counting consumers while the load is in flight (`ccl`)

The consumer collection logic sits alongside register renaming. The rename table
(RAT) maps each logical register to the ROB entry of its in-flight producer.
The CCL adds one bit per mapping: "the producer is a load".

* When a load is allocated, it sets the bit for its destination register and
  clears the consumer counter of its ROB entry.
* When any other instruction is allocated, each source whose producer is a
  load increments that load's counter. If both sources read the same load, the
  instruction counts once.
* The lookups reuse the normal rename reads, so no extra RAT ports are needed.
* Producers in earlier slots of the same 4-wide allocation group are found by
  comparing with those slots, as rename bypass logic does.
* When an instruction commits, its mapping is retired if it is still the
  newest mapping for that register.

Example: `I0: load R1`, `I1: load R2`, `I2: R3 = R1 + R2`, `I3: R4 = R1 + R3`.
After allocation, I0's counter is 2 and I1's is 1. When I0 commits, the table
entry for I0's PC receives 2. `tb_ccl` runs exactly this sequence twice: once
one micro-op per cycle and once as a single group.

Counters saturate at 15. Only consumers allocated while the load is still in the
window are counted. A reader that arrives after the load has committed finds the
mapping already retired.

### The critical load prediction table (`clpt`)

This is a 1024-entry table indexed by the low PC bits, with no tags. Each entry
holds:

* **count**: the consumer count of the last committed instance (4 bits);
* **confidence**: a 2-bit counter. When a new count is written, it goes up if the
  new count is within 1 of the old one and down otherwise. At 0 or 1 the entry
  counts as low confidence, and the load is treated as critical whatever its
  count;
* **ready-but-delayed**: whether the last instance was ready for the cache port
  but lost it to an older load.

The table stores the count itself rather than a critical/non-critical bit. Each
optimization can therefore apply its own threshold to the same entry. The table
is read combinationally at allocation (one port per slot) and written at commit
(one port per slot). After reset every entry is zero, so a load never seen
before is treated as critical.

### Training only when it matters (`issue_rate_monitor`)

The monitor adds up the micro-ops issued per cycle over a window of `WINDOW`
cycles (128 by default). If the average is below 4 (the peak is 6), the machine
is stalling. Only then does the CCL count consumers and the table learn. Loads
that run while throughput is good are not worth optimizing, and leaving them out
reduces aliasing in the table. A second flag is set below 3 per cycle: then every
load may search the store queue, whatever its prediction. Both flags are
registered and hold for the whole next window.

## The single DL1 read port: who goes first (`ldq`, `crit_select`)

This is the part with the most interacting rules.

**Bidding.** The 32-entry load queue holds each load's prediction, its address
(written by an AGU), and the store-queue tail at its allocation (its "color").
The color marks which stores are older than the load. A load bids for the port
when all of these hold:

1. its address is known and it has not issued;
2. **disambiguation** allows it. If the load may use the load-wait predictor
   (all loads, or only critical ones when that filter is on) and the predictor
   did not say "wait", it goes. Otherwise it waits until no older store has an
   unknown address;
3. **forwarding** allows it. If the load may search the store queue, it goes and
   searches when it issues. Otherwise it waits until every older store has left
   the store queue. The cache then holds the right data without a search.

**Granting.** The scheduler normally picks the oldest bidder, using a timestamp
per entry: the distance from the queue head. This design puts one extra bit
above the timestamp: 0 for critical loads, 1 for the rest. Taking the smallest
`{bit, timestamp}` then grants the oldest *critical* bidder, or the oldest
bidder if none is critical.

In the eight-entry example in `tb_crit_select`, the ready loads are A
(timestamp 000), D (011) and H (111). Plain oldest-first picks A. If D is
critical, its key 0011 beats A's 1000 and D goes.

Only one load per cycle reaches the cache. No extra result buses or wakeup
paths are needed.

**Bookkeeping in the same cycle as a grant.** For every ready load that did not
win:

* If it lost to a *younger* load, it was **deferred**. A 2-bit counter counts
  deferrals. At 3 the load counts as critical, so a non-critical load cannot
  starve.
* If it lost to an *older* load, it was **ready but delayed**. The bit stays
  with the entry and goes back to the table when the load commits (`cm_rbd`).
  Next time that load is critical for port priority.

**After the grant.** The granted load looks up the DL1 tags. If it may search,
it also searches the store queue:

* forwarded data wins over a hit;
* a forwarding match whose store data is not there yet replays the load: it
  goes back to bidding;
* a miss leaves the unit with the fill policy to use when the line returns
  (`miss_fill_lru`, `miss_fill_bypass`).

## Store queue and dependence prediction (`stq`, `load_wait_table`)

The 20-entry store queue takes stores in program order. Addresses come from the
store AGU and data from store-data micro-ops. Stores are marked at commit and
leave from the head once their write-back is acknowledged. The forwarding search
runs only when the unit asks for it: the youngest older store with a known,
matching address (8-byte word) supplies the data. Non-critical loads never
trigger the search. This is where the energy is saved: most searches find
nothing anyway.

The load-wait table has 64 one-bit entries, indexed by PC. A bit is set when the
core reports that a load of that PC issued ahead of a conflicting older store.
All bits are cleared every 16384 cycles. Only critical loads read it and train
it. Non-critical loads always wait for older store addresses, so fewer loads
compete for entries and a small table is enough.

## Address generation (`agu_steer`)

There is one load AGU and one store AGU. The load AGU takes the oldest offered
load address. The store AGU takes a store address if one is waiting. If none is
waiting and the option is on, it computes a second load's address. Its output is
therefore wired to both the load queue and the store queue. A second address
unit for loads means more ready loads, which gives the port scheduler more
choice.

## DL1 tags, insertion and bypass (`dl1_tags`)

The cache is 32KB, 8-way, with 64-byte lines, which gives 64 sets. Each way has a
recency rank from 0 (MRU) to 7 (LRU). A hit moves the line to rank 0. A fill
replaces an invalid way, or otherwise the LRU way. It then places the new line
at MRU, or leaves it at LRU when `fill_lru` is set. An LRU-placed line is the
next victim in its set unless it is hit first. A fill with `fill_bypass` set is
not installed. If LRU insertion and bypass are both enabled, LRU insertion wins
and bypass is disabled. Only tags and replacement state are here; the data array
is outside.

## Top level (`load_crit_top`)

The unit connects to a core that provides:

* rename/allocation groups of 4 micro-ops (`alloc`, accepted while
  `alloc_ready`). The unit answers with the load- and store-queue slot of each
  micro-op in the same cycle;
* commit groups of 4;
* address micro-ops (two load candidates, one store) and store data;
* the number of micro-ops issued each cycle (for the monitor);
* ordering violations (a load-queue index) and flushes.

Towards memory it:

* issues at most one load per cycle, with its outcome (`ld_fwd`, `ld_hit`,
  `miss_v`, `ld_replay`) in the same cycle;
* takes line fills with their policy bits;
* reports evictions;
* writes back committed stores one at a time (`wb_v`/`wb_ack`);
* gives a qualified prefetch trigger (`pf_trig_v`) to an external prefetcher.

`cfg` (type `opt_cfg_t`) has one enable bit per optimization: `fslp`, `fsla`,
`stq_filt`, `mdp_filt`, `ins_slru`, `ins_sl1`, `ins_sp`. Event strobes
(`ev_defer`, `ev_rbd`, `ev_starve`, `ev_clpt_write`, `ev_lwt_set`) and the two
monitor flags are brought out for observation.

All state changes on the rising edge of `clk`. The active-low `rst_n` is
asynchronous. Table reads, the grant and the cache lookup are combinational
within a cycle. A real pipeline would register them at stage boundaries that
depend on the core.

## Parameters

Sizes fixed by the processor this unit was designed for are in `lcp_pkg`:

| Name | Value | Origin |
|---|---|---|
| ROB / load queue / store queue | 96 / 32 / 20 | given |
| allocate / commit / issue width | 4 / 4 / 6 | given |
| table entries, count bits, confidence bits | 1024, 4, 2 | given |
| confidence band | 2 | given |
| thresholds: port 5, store-queue 2, LRU 8, bypass 4, prefetch 5 | | given |
| deferral limit | 3 | given |
| issue-rate targets | 4 (training), 3 (search override) | given |
| load-wait table | 64 entries | given |
| DL1 | 32KB, 8-way | given |
| logical registers | 16 | own choice |
| PC / address / data widths | 32 / 32 / 64 | own choice |
| line size | 64 B | own choice |
| issue-rate window | 128 cycles | own choice |
| low-confidence level | counter ≤ 1 | own choice |
| dependence-filter threshold | 2 | own choice |
| load-wait clear interval | 16384 cycles | own choice |

## How far to trust it, and where it departs

* The core around the unit is not here: ROB, reservation stations, execution
  units, the DL1 data array, L2, memory and the prefetcher. The unit's ports
  stand in for them. The end-to-end testbench drives it with a small behavioural
  core.
* The ordering-violation detector belongs to the core. The unit only learns from
  the violations it is told about.
* All flushes are full flushes. Loads and uncommitted stores are dropped, and
  committed stores still drain. Consumer counts are not repaired after a flush.
* Store-to-load forwarding assumes same-size, 8-byte-aligned accesses.
* x86 addressing (scaled index, segment) is reduced to base + displacement.
* Every result is verified in simulation only. No timing closure or area has
  been done, and the combinational paths (table read at allocation, 32-way
  select, 20-entry search) would need pipelining in a real core.

## Verification

Every block has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`. Most compare against a reference model
written inside the testbench with random stimulus: CCL, table, store queue, DL1
tags, select. The others are directed or exhaustive: the policy decisions over
every input. Each has a watchdog.

`tb_load_crit_top` runs the whole unit, at default parameters, with a core model
that executes a 24-micro-op loop 400 times. The loop contains loads, stores, a
load with many consumers and a store/load pair to the same address. The loop
runs twice from reset: first with every optimization off, then with all of them
on. It checks:

* in-order completion of all 9600 micro-ops;
* forwarded data;
* that no load skipped the store-queue search while an older store was still
  queued;
* that the trained table entry matches the consumer count of the loop body;
* that the run with all optimizations makes fewer store-queue searches than the
  run without;
* that loads the table marks critical wait fewer cycles, on average, between
  becoming ready and taking the DL1 port than the other loads do (about 0.8
  against 1.9 cycles in this loop).

The loop is synthetic, so cycle counts from it say nothing about performance.
With this loop, the optimized run takes more cycles than the baseline
(about 4600 against 3700). Its addresses are chosen to force evictions,
bypasses and store/load conflicts, not to resemble a real program.

It also checks that every mechanism happened at least once: training on and off,
table writes, deferral, ready-but-delayed, the deferral limit, search skipped,
forwarding, replay, load-wait training, LRU and bypass fills, prefetch
suppression, store-AGU hijack, eviction and flush.

To simulate one testbench with Verilator:

```sh
verilator --binary --timing --assert -Irtl rtl/lcp_pkg.sv tb/tb_load_crit_top.sv \
          --top-module tb_load_crit_top -Mdir obj_top -o sim
./obj_top/sim +verilator+rand+reset+2
```

Replace `load_crit_top` with any block's name for its own testbench. Verilator
finds the modules through `-Irtl`. The package must come first.

## Files

* `rtl/lcp_pkg.sv`: constants, `crit_info_t`, `opt_cfg_t`, `alloc_uop_t`,
  store-queue pointer helpers, `is_crit()`.
* `rtl/ccl.sv`, `rtl/clpt.sv`, `rtl/issue_rate_monitor.sv`: the predictor.
* `rtl/load_policy.sv`: thresholds to decisions.
* `rtl/crit_select.sv`, `rtl/ldq.sv`: port scheduling.
* `rtl/stq.sv`, `rtl/load_wait_table.sv`: the store-queue and disambiguation
  filters.
* `rtl/agu_steer.sv`: the shared store AGU.
* `rtl/dl1_tags.sv`: the DL1 tags with insertion and bypass.
* `rtl/load_crit_top.sv`: everything wired together.
* `tb/tb_*.sv`: one testbench per module.
