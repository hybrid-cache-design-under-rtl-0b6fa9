# Hybrid SRAM / STT-RAM cache for intermittently powered processors

A processor running from harvested energy loses its supply often. Everything held in volatile
storage must either be saved before the capacitor runs dry or be lost. A cache built only
from SRAM must then write back every dirty line on each outage, and it restarts empty. A cache
built only from STT-RAM keeps its content, but every write costs four times the latency and
about six times the energy of an SRAM write.

This design takes the middle road. Every set of the data cache is split into two sections:

- a few **volatile ways**, in SRAM, which are fast to write;
- the remaining **non-volatile ways**, in STT-RAM, which survive an outage.

Tags, valid and dirty bits live in the same technology as the data they describe. On a power
failure only the dirty volatile lines have to be written back. The non-volatile lines are still
valid when the supply returns.

How well this works depends on which data goes where. Read-mostly data belongs in the
non-volatile section: reads cost the same there, and the data survives. Write-heavy data
belongs in SRAM. The replacement policy decides this placement. Three policies are built in:

| policy | placement of a missing line | victim inside the section | extra |
|---|---|---|---|
| LRU | whole set, technology-blind | least recently used | – |
| WI (write intensity) | set by a 4-state predictor, looked up by the PC of the missing access | LRU | per-line cost, predictor training on eviction |
| CM (confidence migration) | set by a 1-bit "where was it last evicted from" table, looked up by PC | Eq. 1 / Eq. 2 below | per-line read/write counters, migration swaps, confidence-based backup |

The RTL holds:

- the configurable hybrid cache;
- a fully non-volatile instruction cache, which is the same module with every way in STT-RAM;
- a memory arbiter;
- a power-outage controller that makes repeatable outage schedules for experiments.

Everything is SystemVerilog-2017 and simulates with plain Verilator.

## Organisation of a set

```
 way:      0        1        2        3            (D_WAYS = 4, D_NV_WAYS = 1)
        +--------+--------+--------+--------+
 tag    |  SRAM  |  SRAM  |  SRAM  | STT-RAM|  valid, dirty, tag, placing-PC hash
 data   |  SRAM  |  SRAM  |  SRAM  | STT-RAM|  64-byte line
 meta   |  volatile flip-flops (LRU rank, WI cost, CM ric/wic/conf)       |
        +--------+--------+--------+--------+
          volatile section          non-volatile section
```

Volatile ways are always the low indices, `0 .. WAYS-NV_WAYS-1`. The default data cache has
the following shape:

| property | value |
|---|---|
| size | 32 KB |
| associativity | 4 ways, 64-byte lines |
| sets | 128 |
| address split (32-bit addresses) | 19-bit tag, 7-bit index, 6-bit offset |
| volatile / non-volatile ways | 3 / 1 (25 % non-volatile) |
| policy | WI |

50 % and 75 % non-volatility are `D_NV_WAYS = 2` and `3`. The instruction cache is 32 KB,
2-way and entirely STT-RAM.

All per-line replacement metadata is volatile and returns to its reset value after every
outage. The two PC-indexed policy tables are small and rarely written, so they are treated as
non-volatile: only the power-on reset clears them.

Access latencies, in cycles of the 240 MHz cache clock. These are parameters of
`hc_hybrid_cache`:

| | read | write |
|---|---|---|
| SRAM way | 2 | 2 |
| STT-RAM way | 2 | 8 |

Main memory is a non-volatile phase-change memory. It is outside this RTL. Its latency is about
48 cycles at 400 MHz, which the testbench model rounds to 29 cache cycles.

## The WI policy

WI uses a table of 256 predictors. Each predictor is a saturating four-state counter:

```
 read intensive <-> weakly read intensive <-> weakly write intensive <-> write intensive
     (place in STT-RAM)                            (place in SRAM)
```

1. **Indexing.** The table is indexed by a hash of the PC of the load or store that missed:
   `pc[9:2] ^ pc[17:10]`.
2. **Placement.** The two read states place the new line in the non-volatile section. The two
   write states place it in the volatile section. The victim inside the section is the least
   recently used way, or an invalid way if there is one.
3. **Cost.** Each line carries a signed cost, starting at 0. A read hit subtracts 1 and a write
   hit adds 24. This is roughly the energy ratio of an STT-RAM write to a read.
4. **Training.** The line remembers the hash of the PC that placed it. When the line is
   evicted, that predictor moves one step towards "write" if the cost is at least `theta_wi`,
   otherwise one step towards "read".

`theta_wi` is an input because the best value depends on the application. Tuned values:

| application | `theta_wi` |
|---|---|
| AES | 100 |
| 3×3 image convolution | 10 |
| merge sort | −2 |

Predictors start at "weakly write intensive", so a cold cache fills its SRAM section first.

## The CM policy

CM does not predict. It corrects placements after they happen.

**Placement.** A 256-entry one-bit table, indexed by the same PC hash, records which section
that PC's line was in when it was last evicted. A miss places its line in that section. The
table resets to "non-volatile". A line leaves the non-volatile section only when a fill into
that section evicts it. A table that started at "volatile" would therefore never point to the
non-volatile section. This reset value is a design decision; the reference design does not specify one.

**Counters.** Every line has:

- a read counter `ric`;
- a write counter `wic`;
- a confidence `conf`, saturating at 3.

All three start at zero. Read hits count `ric` and write hits count `wic`. When a counter
reaches `theta_cm`, what happens depends on whether the access type suits the section:

- **Suitable section** (reads in STT-RAM, writes in SRAM): the counter resets and `conf`
  increases.
- **Unsuitable section** (reads in SRAM, writes in STT-RAM): the line is swapped with a
  partner in the other section. The counter that fired is reset.

The swap partner is chosen like this:

- in the volatile section, `argmin(wic + conf·theta_cm)` (Eq. 1): the least write-intensive
  line;
- in the non-volatile section, `argmin(ric + conf·theta_cm)` (Eq. 2): the least
  read-intensive line.

The same two formulas choose the victim on a miss. `conf·theta_cm` restores the accesses that
the counter resets threw away, so the score approximates the total access count.

While a swap is in progress the cache accepts no request. A swap takes the slowest read plus
the slowest write, 10 cycles. Both lines keep their metadata when they move.

Tuned `theta_cm` values:

| application | `theta_cm` |
|---|---|
| AES | 8 |
| image convolution | 10 |
| merge sort | 150 |

The counters are 8 bits wide, enough for 150.

## Power failure and backup

`pwr_fail` is raised either by the outage controller or by an external supply monitor
(`ext_pwr_fail`). While `pwr_fail` is high, the top level's `cpu_halt` tells the CPU to stop
issuing requests and to save its registers. The CPU and its non-volatile shadow registers are
outside this design.

Each cache then does the following:

1. Finishes the request it is serving, including any miss and write-back. A request still
   waiting at the port is not accepted. It stays pending until the supply is back.
2. Walks all sets, one at a time:
   - **CM only:** while the most confident valid volatile line has a higher `conf` than the
     least confident non-volatile line, swap them. This keeps the most used data in STT-RAM.
   - **Every volatile way:** a valid line counts as evicted for the policy tables. A dirty
     line is written back to main memory and marked clean.
3. Raises `backup_done` and holds it.

`backup_done` at the top is the AND of both caches. The outage controller takes the supply as
restored at once. When `pwr_fail` falls, the volatile ways become invalid and all per-line
metadata is reset. This is reported as `ev.pwr_loss`. Non-volatile lines, their dirty bits and
the policy tables survive.

**Backup time.** The walk costs:

- one cycle per set;
- one cycle per volatile way;
- one memory write per dirty volatile line;
- 10 cycles per CM swap.

An idle 32 KB cache with three SRAM ways takes about 600 cycles.

The instruction cache has no volatile ways. Its walk does nothing and finishes in one cycle
per set.

## Outage controller

The controller is configured through three inputs:

| input | meaning | notes |
|---|---|---|
| `cfg_outage_start` | cycle of the first outage | counted from reset |
| `cfg_outage_period` | cycles of normal execution between the end of one backup and the next outage | – |
| `cfg_outage_max` | number of outages | 0 means none |

The reference schedule is an outage every 2,500,000 CPU cycles. With a 480 MHz CPU and a
240 MHz cache clock that is 1,250,000 cache cycles. `outage_cnt` counts the outages made so
far.

## Interfaces and timing

**CPU ports.**

- The data port is `d_req_*`: valid, we, addr, wdata, byte enables, and the PC of the access.
- The instruction port is `i_req_*`: valid and addr.
- Both use the same handshake. Hold the request stable from `valid` until the one-cycle
  `ready`. `ready` carries the read data.
- A hit answers 2 cycles after the cache first sees the request while idle. A store hitting an
  STT-RAM way answers after 8 cycles.
- A miss works in this order:
  1. writes back a dirty victim;
  2. reads the line from memory;
  3. answers after the write latency of the section it fills.
- The instruction cache uses the fetch address as its PC.

**Memory port.** `mem_req_*` carries whole 64-byte lines with the same held-request /
one-cycle-ready handshake. The two caches share it through `hc_mem_arbiter`, which has fixed
priority to the data cache, one transfer at a time.

**Events.** `d_ev` and `i_ev` pulse for one cycle on:

- hit, miss, eviction and write-back;
- SRAM write and STT-RAM write;
- migration swap and backup swap;
- loss of the volatile content.

These pulses are meant for statistics, for example write counts for energy estimates.

## Files

| file | content |
|---|---|
| `rtl/hc_pkg.sv` | enums, metadata struct, event struct, constants (256 entries, +24 / −1, conf cap 3), PC hash |
| `rtl/hc_tag_array.sv` | tags, valid/dirty, placing-PC hash; power loss clears only volatile ways |
| `rtl/hc_data_array.sv` | one line store per way |
| `rtl/hc_meta_array.sv` | per-line LRU rank, WI cost, CM ric/wic/conf; reset on power loss |
| `rtl/hc_victim_sel.sv` | invalid-first, then LRU / Eq. 1 / Eq. 2 within a section mask |
| `rtl/hc_wi_predictor.sv` | 256 four-state predictors |
| `rtl/hc_cm_table.sv` | 256-entry previous-placement bits |
| `rtl/hc_hybrid_cache.sv` | the cache controller: lookup, fill, write-back, swaps, backup walk |
| `rtl/hc_outage_ctrl.sv` | outage schedule |
| `rtl/hc_mem_arbiter.sv` | shares the memory port |
| `rtl/hc_system.sv` | top level: data cache, instruction cache, arbiter, outage controller |
| `tb/tb_line_mem.sv` | behavioural main memory (29-cycle latency, address-pattern content) |
| `tb/tb_cache_harness.sv`, `tb/tb_system_harness.sv` | reusable drivers with reference models |
| `tb/tb_hc_*.sv` | one self-checking testbench per module |
| `tb/tb_hc_system.sv` | end-to-end test at reduced size |
| `tb/tb_hc_system_full.sv` | end-to-end test at default size |
| `tb/tb_hc_workloads.sv`, `tb/tb_workload_harness.sv` | application kernels on every policy, stable and intermittent supply |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each also has a watchdog, so
a hang counts as a failure. Any testbench builds the same way, with the library directories
resolving the other modules:

```
verilator --binary --timing --assert -y rtl -y tb rtl/hc_pkg.sv tb/tb_hc_system.sv \
          --top-module tb_hc_system
./obj_dir/Vtb_hc_system
```

What the main tests cover:

- **`tb_hc_hybrid_cache`** runs three 1 KB caches side by side: LRU, WI and CM with 50 %
  non-volatile. Each one:
  - checks hit latencies per section;
  - runs random traffic from two groups of PCs (read-mostly and write-mostly);
  - goes through seven outages;
  - checks every load against a reference memory.

  It also requires that WI placed lines in STT-RAM and that CM made migration swaps and backup
  swaps.
- **`tb_hc_system`** runs the whole top twice, once with WI at 25 % and once with CM at 50 %.
  Instruction and data traffic run concurrently, through three controller outages and one
  external outage. Every mechanism must be counted at least once: hits, misses, evictions,
  write-backs, SRAM writes, STT-RAM writes, STT-RAM fills, swaps, backup swaps, memory
  conflicts, halted requests, outages and content loss.
- **`tb_hc_system_full`** uses every default. It checks:
  - the 2- and 8-cycle hits;
  - a conflict write-back;
  - the WI predictor learning a read-only PC;
  - one controller outage;
  - that every stored word reads back after it.

## Application kernels

`tb_hc_workloads` acts as the CPU and runs three kernels through a reduced system. Every load
and store goes through the data cache with its own PC, and the result in memory is checked.
The system has a 2 KB data cache, each application uses its own thresholds, and an outage
comes every 40,000 cycles when enabled. The kernels:

- an AES-shaped cipher over 32 blocks, with a read-only 256-entry substitution table. It has
  AES's access pattern but is not AES;
- a 3×3 convolution of a 40×40 image;
- a merge sort of 512 words.

Measured with one STT-RAM way in four:

| kernel | policy | cycles stable / with outages | misses stable / with outages | STT-RAM writes (stable) |
|---|---|---|---|---|
| cipher | LRU | 116 k / 117 k | 286 / 319 | 262 |
| cipher | WI | 127 k / 224 k | 576 / 3127 | 438 |
| cipher | CM | 293 k / 186 k | 3562 / 776 | 9574 |
| convolution | LRU | 115 k / 115 k | 393 / 404 | 755 |
| convolution | WI | 111 k / 142 k | 393 / 1205 | 160 |
| convolution | CM | 375 k / 146 k | 6018 / 918 | 7186 |
| merge sort | LRU | 103 k / 105 k | 302 / 350 | 2704 |
| merge sort | WI | 91 k / 92 k | 365 / 389 | 103 |
| merge sort | CM | 1023 k / 1024 k | 18397 / 18397 | 20314 |

WI does what it is meant to do. It keeps STT-RAM writes low at little cost in misses while
the supply is stable.

CM behaves poorly in this small cache. This follows from a property of its placement table,
which learns only from evictions:

- A fresh table sends every fill to the STT-RAM section. That section is one way here.
- Only a line that migrated to SRAM and was later evicted from there can teach a PC
  "volatile".
- With `theta_cm = 150` (merge sort), no line in a 2 KB cache lives long enough to migrate.
  The table never changes, and the cache behaves as a direct-mapped STT-RAM cache.
- Outages help CM. The backup counts the lost SRAM lines as evictions, which teaches their PCs
  "volatile".

A larger cache, a different initial table value, or updating the table on migration would
change this picture. The reference design does not settle it. The 50 % and 75 % configurations
can be enabled in the testbench with one constant.

## Where this design makes its own choices

Followed from the reference design:

- the per-set split with matching tag volatility;
- write-back;
- the latencies;
- the three policies with their constants (256 entries, +24 / −1, four predictor states,
  `>= theta_wi`, Eq. 1 / Eq. 2, the cap of 3);
- swapping instead of evicting on migration, with accesses blocked during a swap;
- the CM backup rule;
- volatile per-line metadata and persistent tables;
- the outage controller's three settings;
- the cache sizes and the fully non-volatile instruction cache.

Chosen here:

- **Parameters and encodings:** 64-byte lines; the PC hash; the counter and cost widths; the
  reset states of both tables.
- **Victims:** invalid ways are used before any victim is ranked, and ties go to the lowest
  way.
- **Interfaces:** one outstanding request per cache; the handshakes; the arbiter and its fixed
  priority.
- **Swap cost:** a swap blocks the whole cache, not only its set, and costs 10 cycles.
- **Migration counters:** the counter that triggered a migration is reset.
- **Backup bookkeeping:** the backup counts a lost volatile line as an eviction for the tables.
- **Timing of the loss:** volatile content is dropped at the moment power returns, not when it
  fails.
- **Instruction cache:** it uses LRU.

Not modelled:

- energy;
- the CPU, its shadow registers, the supply monitor and the backup capacitor;
- main memory, except as a testbench model.

The benchmark programs (AES, image convolution, merge sort) need a processor. They are not run
here. Their data sets live in main memory and their thresholds fit the field widths. The
traffic in the testbenches is synthetic and imitates their read-mostly and write-mostly
patterns.
