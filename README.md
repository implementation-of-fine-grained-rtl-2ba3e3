# Fine-grained cache activity monitor for SMT scheduling

Threads that run together on a simultaneously multithreaded (SMT) core share
its caches. When two threads hammer the same region of a cache, they evict each
other's lines. These inter-thread kick-outs cost performance that neither thread
would lose if it ran alone. A normal performance counter only reports a total
miss count. It cannot say *where* in the cache a thread is busy, so an operating
system scheduler cannot tell two threads that collide from two threads that use
different regions.

This RTL gives the scheduler that spatial view. It snoops a cache's bus and
divides the cache's sets into **super sets**: groups of contiguous sets. For each
hardware thread it counts the accesses to each super set over a fixed
**sampling interval** (one million cycles by default). At the end of each
interval it reduces every count to a small **usage level** (0–3 by default).
The result is one **activity vector** per thread: one few-bit level per super
set. Software reads that compact vector, not the raw counters, and compares
the vectors of candidate threads to predict how much they would interfere.

The default build watches the level-2 cache (512 KB) and the level-3 cache
(2 MB) of a two-thread processor. It uses 32 super sets per cache and four
usage levels.

## Super sets: from a bus address to a counter

The super set of an access is the top `log2(N_SS)` bits of the cache set index:

```
super set = addr[LINE_BITS+SET_BITS-1 -: log2(N_SS)]
```

| cache | size   | sets (assumed 64 B lines, 8 ways) | set index    | super set (N_SS = 32) | sets per super set |
|-------|--------|-----------------------------------|--------------|-----------------------|--------------------|
| L2    | 512 KB | 1024                              | `addr[15:6]` | `addr[15:11]`         | 32                 |
| L3    | 2 MB   | 4096                              | `addr[17:6]` | `addr[17:13]`         | 128                |

The monitor needs the thread id of each access, so the cache bus must carry
it. Each cache bus has these signals: `valid`, `addr`, `tid` (the hardware
thread) and `miss`. The bus carries at most one access per cycle. The control
bit `miss_only` chooses what is counted: every access (the default) or only
misses.

There is one counter for each (thread, super set) pair: 2 × 32 per cache by
default. Each counter is 20 bits wide. That holds the at most one million
accesses an interval of one million cycles can bring, and a counter that still
overflows (because of a longer interval) **saturates** at 2²⁰−1.

## From counts to usage levels

The level of a super set tells how busy it was compared with one cutoff,
**C**, that software programs. C is the decision point of a two-level
(low/high) score. For `LEVELS` levels, the cutoffs are spread linearly from C:

```
cutoff_j = j · 2C / LEVELS          j = 1 … LEVELS-1
level    = number of cutoffs the count reaches (count ≥ cutoff_j)
         = min(LEVELS-1, floor(count · LEVELS / (2C)))
```

With four levels the cutoffs are C/2, C and 3C/2. For example, with C = 1000,
counts 0–499 give level 0, 500–999 level 1, 1000–1499 level 2 and 1500 or more
level 3. A count equal to a cutoff takes the higher level. A cutoff of 0
makes every level the maximum. The hardware needs no divider: it tests
`count·LEVELS ≥ j·2·C`.

The hardware does not choose C. The intended use is to set it from global
statistics of earlier runs. Among the median, the first and third quartiles
and the mean of all per-super-set counts, the third quartile gave the best
correlation with kick-outs. The counts depend on the interval length, the
cache and the workload, so the reset value (1024) is only a placeholder. Software should write
`CUTOFF` before it relies on the levels.

## Sampling intervals and what lands where

`cmon_interval_timer` raises `sample` in the last cycle of every interval.
In that cycle:

* each counter is reduced by its own quantizer (all `THREADS·N_SS` of them
  work in parallel), and the levels are loaded into the vector register;
* each counter restarts at 0. If that cycle's event selects the counter, it
  restarts at 1 instead;
* one cycle later `irq` pulses and `STATUS.valid` goes high.

The vector then stays unchanged for the whole next interval, so software can
read it at any time before the next `irq`.

An access crosses two register stages: the snoop register, then the counter.
So an access that is on the bus in cycle *c* is added to the counter at the
end of cycle *c+1*. If `sample` is high in cycle *c+1*, the access counts in
the new interval. The testbench model (`tb/cmon_tb_pkg.sv`) follows this rule
exactly, and checks it at every interval boundary it sees.

Writing `INTERVAL` restarts the timer, and a sample due in that same cycle is
dropped. Clearing `CTRL.enable` stops both the counting and the timer. The
timer keeps its position and continues from there when the monitor is enabled
again.

## Registers

Each monitor has a 1 KB window of 32-bit registers. Reads return data one
cycle after the request, with `csr_rvalid`. Writes take effect at the next
clock edge. There are no wait states. In `cmon_top`, address bit 10 selects
the monitor: 0 for the L2 monitor, 1 for the L3 monitor.

| offset  | name       | access | contents |
|---------|------------|--------|----------|
| `0x000` | `CTRL`     | rw     | bit 0 `enable` (reset 0), bit 1 `miss_only` |
| `0x004` | `CUTOFF`   | rw     | two-level cutoff C, `CNT_W` bits (reset `DEF_CUTOFF` = 1024) |
| `0x008` | `INTERVAL` | rw     | interval in cycles (reset `DEF_INTERVAL` = 1 000 000); writing restarts the timer |
| `0x00C` | `SAMPLES`  | ro     | number of completed intervals |
| `0x010` | `CONFIG`   | ro     | `{THREADS[7:0], LEVELS[7:0], N_SS[15:0]}` |
| `0x014` | `STATUS`   | ro     | bit 0: a vector has been produced since reset |
| `0x100`+ | vector    | ro     | activity vector words |

Each thread's vector takes `W = ceil(N_SS·log2(LEVELS)/32)` words: 2 words by
default, or 8 words with 128 super sets. Thread *t* starts at
`0x100 + 4·W·t`. The level of super set *s* is bits
`[s·log2(LEVELS) +: log2(LEVELS)]` of that thread's concatenated words, with
the first word holding the low bits. Unmapped addresses read as 0. Writes to
read-only registers are ignored.

### Using the vectors (software)

The scheduler, not the hardware, turns two vectors into an interference
estimate. For each super set it takes the two threads' levels *a* and *b* and
scores them. The recommended score is a hybrid: 0 if either level is 0,
otherwise *a + b − 1*. It then adds the scores of all super sets. Two simpler
rules, min(*a*, *b*) and *a + b*, were also considered and found weaker. A
lower total means a better pair of threads to run together. The scheduler is
also expected to predict the next interval's vector from past ones. This RTL
contains neither the scoring nor the prediction.

## Module hierarchy

```
cmon_top                      L2 and L3 monitors, register-bus decode
└── cache_monitor  (×2)       one cache
    ├── cmon_bus_snoop        filter accesses, extract thread and super set   (1 cycle)
    ├── cmon_activity_counters THREADS×N_SS saturating counters, restart on sample
    ├── cmon_interval_timer   sample pulse every INTERVAL cycles, interval count
    ├── cmon_activity_vector  per-counter quantizers + vector register
    │   └── cmon_quantizer    count → level against C/2, C, 3C/2 …
    └── cmon_csr              registers and vector readout
cmon_pkg                      register map, control-register struct, idx_w()
```

`idx_w(n)` is the width of an index over *n* items, with a minimum of 1. All
flops reset asynchronously on `rst_n` low. At the default sizes a synthesized
`cmon_top` has about 3 100 flip-flops, mostly the 128 counters of 20 bits.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `THREADS` | 2 | hardware threads (a two-way SMT core) |
| `N_SS` | 32 | super sets per cache (power of two, at most the number of sets) |
| `LEVELS` | 4 | usage levels (power of two ≥ 2) |
| `CNT_W` | 20 | counter width |
| `LINE_BITS` | 6 | log2 of the line size (assumed 64 B) |
| `SET_BITS` / `L2_SET_BITS` / `L3_SET_BITS` | 10 / 10 / 12 | log2 of the number of sets (assumed 8-way) |
| `DEF_CUTOFF` | 1024 | reset value of `CUTOFF` (placeholder) |
| `DEF_INTERVAL` | 1 000 000 | reset value of `INTERVAL` |
| `ADDR_W` | 32 | bus address width |

The geometry parameters (super sets, levels, interval, thread count) are the
ones this monitoring scheme was evaluated with. The other parameters, and the
line size and associativity, are assumptions. A finer configuration,
`N_SS = 128` (8 sets per super set in the L2 cache), was also used to compare
scheduling decisions with those based on a plain miss counter. It is tested
below.

## Where this RTL goes beyond, or falls short of, the original scheme

The original scheme fixes only the concepts: snooped address bits index
per-super-set counters, the counters are reduced to a few bits, and the
vector goes to the operating system. The following are choices made in this
RTL:

* one counter set per hardware thread, with the thread id taken from the
  cache bus;
* one access per bus per cycle, a one-cycle snoop register and 20-bit
  saturating counters;
* all counters quantized in parallel in one cycle. A cheaper
  implementation could scan a counter RAM over several cycles;
* the register map and bus, the interrupt, the reset state (disabled) and the
  `miss_only` bit;
* the cache line size and associativity;
* level-1 caches are not monitored, because their sizes are not known. A third
  `cache_monitor` can be added in `cmon_top` with the right `SET_BITS`.

Not implemented:

* cutoffs computed in hardware from each vector's own statistics (its median
  or quartiles). This alternative correlated less well with interference than
  a globally chosen cutoff;
* activity prediction and interference scoring, which belong to the scheduler;
* the processor and its caches, which are only the source of the bus signals.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each has a watchdog. Build and run one with
Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cmon_pkg.sv tb/cmon_tb_pkg.sv tb/tb_cmon_top.sv --top-module tb_cmon_top
./obj_dir/Vtb_cmon_top
```

| testbench | what it checks |
|-----------|----------------|
| `tb_cmon_quantizer` | levels for 4 and 2 levels against the closed-form formula, exact cutoff boundaries |
| `tb_cmon_bus_snoop` | filtering (enable, miss-only) and the super-set and thread fields |
| `tb_cmon_activity_counters` | every counter against a model, saturation, an event in the sample cycle |
| `tb_cmon_interval_timer` | pulse spacing for several intervals, hold while disabled, restart |
| `tb_cmon_activity_vector` | quantize-and-hold, vector stable between samples, every level produced |
| `tb_cmon_csr` | reset values, read/write, one-cycle read latency, vector word packing |
| `tb_cache_monitor` | one small monitor against the reference model over many intervals |
| `tb_cache_monitor_ss128` | the 128-super-set L2 configuration against the reference model |
| `tb_cache_monitor_two_level` | the L2 monitor with `LEVELS = 2` (one bit per super set) against the reference model |
| `tb_cmon_top` | the full default design, end to end (below) |

`tb_cmon_top` leaves every parameter at its default and runs about 2.3
million cycles, which takes a few seconds. Both caches carry random traffic
from both threads, half of it aimed at a few hot super sets per thread. After
every `irq` it reads each vector over the register bus and compares it with
the prediction of the reference model in `tb/cmon_tb_pkg.sv`. The test runs:

1. a complete one-million-cycle interval at the reset configuration;
2. short programmed intervals with a rescaled cutoff;
3. miss-only counting;
4. a disabled period with traffic still running;
5. a 1.1-million-cycle interval in which every L2 access of thread 0 goes to
   one super set. The counter saturates at 2²⁰−1, which shows up as level 2;
   a counter that wrapped would give level 0.

It checks that interrupts come exactly one interval apart. It also counts how
often each mechanism occurred: intervals, full-length intervals, reprogramming,
filtered and ignored accesses, saturation, accesses in flight at a boundary,
and every level in both caches. Any mechanism that never occurred counts as a
failure.

The reference model shares no code with the RTL. It computes levels with the
closed-form division, not with the comparator chain. All testbenches pass.
Each one was also run against a deliberately broken copy of its module
(for example, a super-set index shifted by one bit, counters that wrap, or a
timer one cycle slow), and each of those runs failed.
