# Thermal-aware dynamic subarray permutation for an L1 data cache

Process variation makes some parts of an SRAM array leak much more than others. Leakage grows
exponentially with temperature, and most wear-out mechanisms speed up exponentially with it
too. A leaky subarray that is also the busiest one becomes a hot spot, and that hot spot sets
the lifetime of the whole cache. This RTL implements a run-time remedy. The cache moves its
busiest logical subarrays onto physical subarrays that are currently cool. It does this by
permuting the predecoded subarray-select lines of each way, steered by on-die temperature
sensors and per-subarray access counters.

The scheme follows the dynamic subarray permutation cache of Wu, Tan, Yang and Lu
("Improving the Reliability of On-Chip Data Caches Under Process Variations"). That work
specifies the crossbar network, the update equation and the control rules. The surrounding
cache controller, the interfaces and the number formats are this implementation's own choices.
They are marked as such below.

## Cache geometry

| item | value |
|---|---|
| capacity | 64 KB, 4 ways, 32-byte lines, 512 sets |
| subarrays | 8 per way, 64 lines each (16 KB per way) |
| hit latency | 2 clocks, request to response |
| control interval | 1 ms = 4,000,000 clocks at 4 GHz |
| permutation threshold | hottest − coolest > 5 °C |
| minimum access rate for a "busy" hot spot | 5 % of the interval's clocks |

Address split (32-bit byte address, `pvc_pkg`):

```
[31:14] tag   [13:11] subarray (predecoder)   [10:5] row (row decoder)   [4:2] word   [1:0] byte
```

## The permutation network

Subarray decoding has two stages. The predecoder (`subarray_predecoder`) turns the three
subarray bits into eight one-hot lines, in sorted order: index 0 selects the top subarray.
Each way then passes these lines through its own `subarray_permuter` before they reach its
subarrays. The permuter has three stages of four mini-crossbars (`xbar_cell`). A mini-crossbar
passes two lines straight through, or swaps them when its select is 1. The stages pair lines
at distance 1, 2 and 4, and `sel[0]`, `sel[1]` and `sel[2]` control them in that order.

Each stage either leaves a line in place or flips one bit of its position, so the whole
network computes

```
physical position = logical subarray XOR sel
```

There are eight settings per way, and any subarray can be moved to any position. For example,
`sel = 3'b101` swaps odd and even subarrays and also moves the lower four to the top. Each way
has its own `sel`. The same logical subarray can therefore sit in different places in
different ways, which spreads the heat of a busy set.

To move whatever is at physical position `a` to position `b` (and vice versa), the controller
only needs the two positions, not the logical numbers:

```
sel_new = sel_old ^ (a ^ b)
```

This is a XOR permutation, so every other subarray of the way moves as well. The mapping of all
data in the way changes, so the way is flushed when the new setting takes effect.

## The control algorithm

`perm_controller` runs the algorithm once per interval tick (`interval_timer`). Its inputs are
the sensor readings and `access_counters`, both indexed by physical position. For each way,
`perm_way_ctrl` does the following:

1. It finds the hottest, the second-hottest and the coolest position (`hot_cool_finder`).
2. It does nothing unless the hottest reading exceeds the coolest by more than `THRESH`
   (5 °C).
3. **Keep rule.** If the way's peak is lower than its peak in the previous interval, the
   current setting is already helping, so it is kept. This is reported as `evt_kept`.
4. **Leakage rule.** If the hottest position was accessed less often than the coolest, or in
   fewer than 5 % of the interval's clocks, its heat comes from leakage. Moving its logical
   subarray would not help, so the second-hottest position is swapped with the coolest
   instead. This is reported as `evt_alt`.
5. Otherwise, `sel_new = sel_old ^ (target ^ coolest)` is recorded as pending, and `evt_perm`
   is reported.

The controller keeps two registers per way: the current `sel` and the previous interval's peak.
The peak register resets to 0, so the keep rule never applies in the first interval.

### Applying a change: pending, grant, flush

A change does not take effect at the tick. The controller holds it as `pending`. When
`dcache_ctrl` is idle, it spends one clock granting it instead of accepting a request. In that
clock:

- the new `sel` takes effect;
- the tag array clears every valid bit of each permuted way, and only of those ways.

If another tick arrives before the grant, it replaces the pending change. If a tick and a grant
fall in the same clock, the new decision starts from the setting that is just taking effect.
This hand-shake is this implementation's own; the published scheme only says the cache is
flushed after a permutation.

## The cache around it (implementation choices)

`dcache_ctrl` is a blocking controller that handles one request at a time:

- **Read hit.** The tags and all four data ways are read in parallel in the clock the request
  is accepted. The tags are compared in the next clock, and the word appears on `resp_rdata`
  with `resp_valid` in the clock after that (2-clock latency).
- **Read miss.** The controller requests the 32-byte line from the next level. It writes the
  line into an invalid way, or into the round-robin victim if the set is full, and then
  answers.
- **Writes.** Writes are write-through with no write-allocate. A write hit also updates the
  word in the cache. The CPU gets a `resp_valid` pulse once the write has been handed to the
  next level.

Write-through was chosen so that flushing a way never loses data, and never needs a write-back
burst in the middle of a permutation. The published scheme only notes that data in the permuted
way is lost. With a write-back cache, the grant would first have to write back the way's dirty
lines.

All ways are activated on every read. The access counters therefore count one access in each
way per lookup, at that way's physical position. Refill writes and write hits count only in the
way they write.

## Interfaces and timing (`pv_dcache`)

| port | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `req_valid`, `req_ready`, `req_we`, `req_addr[31:0]`, `req_wdata[31:0]` | in/out | CPU request. It is accepted in a clock where `req_valid && req_ready`. |
| `resp_valid`, `resp_rdata[31:0]` | out | one-clock response pulse, for reads and for writes |
| `mem_req_valid`, `mem_req_ready`, `mem_req_we`, `mem_req_addr`, `mem_req_wdata` | out/in | next-level request: a line read, with a line-aligned address, or a word write |
| `mem_resp_valid`, `mem_resp_line[255:0]` | in | refill line (word 0 in bits 31:0) |
| `temp[4][8]` | in | sensor reading per way and physical subarray. 10-bit unsigned, 0.25 °C per step (for example, 320 = 80 °C). |
| `sel[4]` | out | current crossbar setting of each way |
| `evt_tick`, `evt_perm[4]`, `evt_kept[4]`, `evt_alt[4]`, `evt_flush[4]`, `evt_hit`, `evt_miss` | out | one-clock event pulses for statistics |

`req_ready` is low while a request is in flight and during a grant clock. The sensor readings
are sampled only in the tick clock.

Parameters of `pv_dcache`: `INTERVAL_CYCLES` (default 4,000,000), `THRESH` (default 20, in
0.25 °C steps, so 5 °C) and `RATE_PCT` (default 5). The geometry lives in `pvc_pkg`.

## Module hierarchy

```
pv_dcache
├── dcache_ctrl                 request FSM, replacement, grant
├── tag_array                   tags (memories) + valid bits (flops, one-clock way flush)
├── data_array
│   ├── subarray_predecoder     3-to-8, shared by all ways
│   └── data_way ×4
│       ├── subarray_permuter   3 stages × 4 xbar_cell
│       └── data_subarray ×8    64 × 256-bit SRAM, synchronous read, word write mask
└── perm_controller
    ├── interval_timer
    ├── access_counters         4 × 8 counters, cleared every tick
    └── perm_way_ctrl ×4
        └── hot_cool_finder
```

## What is not in the RTL

- **Temperature sensors.** These are analog, so the design takes their readings as the `temp`
  inputs. The testbenches drive them from a simple thermal model.
- **Next cache level and memory.** `tb/l2_model.sv` is a behavioural stand-in with a fixed
  latency and a random ready signal.
- **Interpretations.** "The hot subarray's temperature has been reduced since last interval"
  is implemented as "this interval's peak is below the last interval's peak", using the
  per-way peak registers. The 5 % rate is taken as accesses per clock of the interval.
- **Omitted parts.** The static placement and unpermuted baselines, which the scheme is
  compared against, are not included. Nor are the leakage, thermal and lifetime models used to
  evaluate it.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog:

- The permuter is checked exhaustively against `logical ^ sel`.
- The arrays, counters and timer are checked against reference models.
- `perm_way_ctrl` is checked against a model of the five rules, with directed cases for each
  rule.
- `tb_dcache_ctrl` checks random traffic with evictions, the 2-clock hit latency, and random
  grants that flush a way and change its setting.
- `tb_pv_dcache` runs the full design with a 4000-clock interval and a closed thermal loop. The
  loop uses a leakage map plus 150 °C per unit access rate, with a first-order step per
  interval. The test has a bzip2-like busy phase on two logical subarrays, then a near-idle,
  leakage-dominated phase. It checks all read data and each decision against readings it
  computes itself. It requires that hits, misses, permutations, flushes, grant stalls, keeps
  and second-hottest choices each occur.
- `tb_thermal_compare` runs two caches side by side on the same pseudo-random, bzip2-like
  request stream and the same thermal model, for 40 intervals of 4000 clocks. One cache uses
  dynamic permutation. The other has its threshold set out of reach, so it keeps the in-order
  placement. The test requires correct data in both and a lower mean peak with permutation.
  In this toy model the mean per-interval peak falls from 77.75 °C to 73.0 °C. These figures
  come from the testbench's own simple thermal model, not from a physical model.
- `tb_pv_dcache_full` runs one full 4,000,000-clock interval at the default parameters. It
  checks the tick time, that all four ways permute to `sel = 3` and are flushed, and that the
  data survives.

To run a testbench with Verilator:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb rtl/pvc_pkg.sv tb/tb_pv_dcache.sv \
          --top-module tb_pv_dcache -Mdir obj -o sim && obj/sim
```

`tb_pv_dcache_full` takes about 20 s. The other testbenches take a few seconds or less.
