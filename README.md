# Refresh-optimised eDRAM last-level cache with dead-line prediction

A large last-level cache built from gain-cell eDRAM is dense and leaks
little. However, every cell has to be refreshed within its retention time,
about 20 µs at 75 °C. In a 32 MB cache that refresh becomes the largest part
of the power. Many of those refreshes are wasted: a line that will never be
used again before it is evicted (a *dead* line) is still kept alive.

This RTL implements such a cache with a cheap time-based dead-line predictor
attached to every line. When the predictor decides that a line is dead, the
refresh manager skips that line. One retention period later the line's
content is gone, and the line is marked *disabled*. If the line was dirty, it
is written back to memory just before its data is lost. Each set also holds a
small *prediction indicator*. The indicator learns from mistakes and
lengthens the time a line must stay idle before it is declared dead. After
too many mistakes it switches prediction off for that set.

## Organisation

| | default | notes |
|---|---|---|
| capacity | 32 MB | 16 banks × 2048 sets × 16 ways × 64 B |
| line | 64 B (512 bits) | |
| banks | 16 | interleaved on the lowest line-address bits |
| physical address | 40 bits | line address 34 = tag 19 + set 11 + bank 4 |
| clock | 2 GHz assumed | sets every cycle count below |
| hit latency | 9 cycles | 4.29 ns rounded up |
| retention time | 40 000 cycles | 20 µs at 75 °C |
| refresh request | every 19 cycles at 75 °C | 2048 rows × 19 = 38 912 cycles per sweep |
| TIME (predictor step) | 256 sweeps | about 10 M cycles, about 5 ms |

```
              temp_c_i
                 │
   ┌─────────────▼──────────────────────────────┐
   │ edram_refresh_manager                      │
   │ ring_oscillator → refresh_pulse_gen →      │
   │                   line_pointer_gen         │
   └──────┬─────────────── ref_valid/row/epoch ─┘
          │ (to every bank)
   ┌──────▼───────┐ ┌──────────────┐      ┌──────────────┐
   │ l3_bank 0    │ │ l3_bank 1    │ ...  │ l3_bank 15   │  ← req/resp port per bank
   │ sram_tag_arr │ │              │      │              │
   │ 16 × edram_  │ │              │      │              │
   │   data_array │ │              │      │              │
   └──────┬───────┘ └──────┬───────┘      └──────┬───────┘
          └────────────┬───┴─────────────────────┘
                 ┌─────▼──────┐
                 │ mem_arbiter│ → one main-memory channel
                 └────────────┘
```

## Refresh timing

`ring_oscillator` stands in for the analog ring oscillator, whose frequency
rises with temperature. It is a phase accumulator that adds the temperature
(in °C) every cycle. It emits a tick each time the sum passes 75 × 19. That
gives one tick every 19 cycles at 75 °C and about one every 15 cycles at
95 °C. `refresh_pulse_gen` turns ticks into refresh pulses, dividing by
`OSC_DIV`, which is 1 by default. `line_pointer_gen` steps through the 2048
rows, one row per pulse. Each pulse is sent to all 16 banks at once. Each
bank then refreshes that row (set) in all 16 of its ways, except the ways it
skips.

The pulse generator also counts sweeps. During every 256th sweep it raises
`ref_epoch`. While `ref_epoch` is high, each line takes one predictor TIME
step, at the moment the pointer reaches its set. This gives every line a
TIME step exactly once every 256 retention periods, using only the three
predictor bits per line and no per-line timer. A line used just before its
step has aged by less than one full TIME. That coarseness is the usual price
of a global decay clock.

## The dead-line predictor (per line, 3 bits)

```
 S0 live ──TIME──► S1 (indicator I0)
    │     ──TIME──► S3 (I1)  S4 (I2)  S5 (I3)  S6 (I4)  S7 (I5)
    │     then each further TIME: S7 → S6 → S5 → S4 → S3 → S1
 S1 dead: refresh skipped. At the next refresh slot → S2
 S2 disabled: content lost. Any access misses
 hit or insertion in any state → S0
```

With the set's indicator at I*k*, a line becomes dead after *k*+1 TIME steps
without an access. One retention period after that it becomes disabled. A
hit in S1 still finds valid data, because the last refresh is less than one
retention time old. The hit revives the line. If the indicator is I6, the
predictors of that set are off: lines stay in their state and nothing is
skipped.

Invalid lines (never filled since reset) age like any other line. A cold
cache therefore stops refreshing its empty rows after one TIME period. A
fill writes the row and brings the line back to S0.

## The prediction indicator (per set, 3 bits)

The tag array keeps the tag of a disabled line, so a later request for the
same address is recognised:

* **False prediction**: a request matches the tag of a disabled line. The
  line was declared dead too early. The request misses, the line is refilled
  in the same way, and the indicator moves up (I0 → I1 → … → I6), so the
  decay interval grows.
* **True prediction**: a disabled line is chosen as the victim and evicted.
  The indicator moves down towards I0.
* I6 has no exit except reset.

## A bank

`l3_bank` runs one job at a time, except that the last part of a hit
overlaps with later jobs:

1. **Tag clear**. After reset the bank writes the 2048 tag words, one per
   cycle. It ignores refresh requests meanwhile, because no line holds data
   yet.
2. **Refresh slot** (it has priority over requests). The bank reads the
   set's tag word. It steps all 16 predictors (`dead_line_predictor`),
   refreshes the rows it does not skip, and writes the tag word back. A
   dirty line that goes from S1 to S2 is first read out and written to
   memory. That read happens within its retention time, because the line's
   last refresh is one sweep old.
3. **Access**. The tags and the data are read one after the other. On a hit,
   the predictor goes back to S0, the pseudo-LRU bits are updated, and the
   data array is read or written, all in the lookup cycle. The response
   then passes through a delay line and comes out exactly 9 cycles after
   the request is taken. Meanwhile the bank is already free for the next
   request. Hits are therefore pipelined, with one request taken every two
   cycles: the single-port tag array needs one cycle to read and one to
   write. On a miss, the bank picks a victim: the way whose
   tag matched a disabled line, else an invalid way, else a disabled way,
   else the tree pseudo-LRU way. A dirty live victim is written back first.
   A read miss then fetches the line. A write miss allocates the line
   without fetching it, because writes are full-line write-backs from the
   private L2. A miss blocks the bank. It answers only after every older
   hit has answered, so responses always come back in request order.

Refresh requests that arrive during a job wait in a 32-entry queue. Requests
from the cores are stalled while refresh work is pending. At the defaults, a
refresh request can wait up to 1088 cycles (40 000 − 38 912) before a row
would expire. A queue overflow or a read of expired data is reported on
`ev_o`, and an assertion fires.

The tag word of a set is 418 bits: 16 × (valid, dirty, disable, 3-bit
predictor, 19-bit tag) + 3-bit indicator + 15 pseudo-LRU bits. The line
overhead of the scheme is 4 bits (disable + predictor) and the set overhead
is 3 bits.

## Interfaces of `l3c_top`

* `temp_c_i[7:0]`: temperature in °C. It comes from an analog sensor that is
  not part of this RTL.
* Per bank *b* (all ports are packed arrays indexed by bank):
  * `req_valid_i`/`req_ready_o`: request handshake.
  * `req_op_i`: `REQ_READ` or `REQ_WRITE` (a full 64 B line).
  * `req_addr_i`: line address with the 4 bank bits removed, i.e.
    `{tag, set}`. Only requests whose line address ends in *b* belong on port
    *b*.
  * `resp_valid_o`, `resp_hit_o`, `resp_rdata_o`: the response. There is one
    one-cycle response per request, with no back-pressure.
* Main memory:
  * `mem_req_valid_o`/`mem_req_ready_i`: request handshake. The request is
    held until it is taken.
  * `mem_req_we_o`, `mem_req_addr_o[33:0]` (line address), `mem_req_wdata_o`,
    `mem_req_id_o` (the bank number).
  * `mem_resp_valid_i`, `mem_resp_id_i`, `mem_resp_rdata_i`: read data. The
    cache always accepts it. Each bank has at most one outstanding read.
* `ev_o[b]`: a `bank_ev_t` per cycle with these fields: hit, miss, false or
  true prediction, refresh slot with rows refreshed, rows skipped and lines
  disabled, dead-line write-back, victim write-back, request stalled by
  refresh, lost refresh request, and expired read.

## The eDRAM data array model

`edram_data_array` is a behavioural model, not a memory macro. It stores
the data together with the cycle at which each row was last restored by a
write or a refresh. A read does not restore a row, because gain-cell reads
are non-destructive. A row read, or refreshed, after more than
`RETENTION_CYCLES` is lost. It then reads back as the complement of its data
and raises `decayed_o`. This lets the testbenches prove that skipping never
loses data that is still needed. For a real chip, replace it with the eDRAM
macro and its row driver. The timestamp logic is not meant for synthesis
into silicon.

## What is this design's own choice

These parts are fixed by the architecture being implemented:

* sizes, associativity and banking;
* the two state machines;
* the use of the refresh pulse generator as the predictor clock, with TIME =
  256 retention periods;
* sequential tag/data access;
* write-back;
* the false and true prediction conditions;
* write-back of dirty dead lines;
* the 4.29 ns hit latency and the 20 µs retention.

These are choices made here:

* the pipeline structure. The architecture calls for a pipelined bank but
  does not describe one. Here hits overlap, with one accepted every two
  cycles, while misses block the bank;
* the per-bank request ports, the address split and the bank interleaving;
* the shared refresh manager and its sequential row order;
* the linear temperature law of the oscillator;
* the epoch-sweep way of applying TIME, and taking S1 → S2 at the next
  refresh slot;
* invalid lines ageing like valid ones;
* victim order, tree pseudo-LRU, and write-allocate without fetch;
* the refresh queue and dropping refresh requests during the tag clear;
* round-robin memory arbitration;
* a 40-bit physical address.

The cache does not model these:

* the temperature dependence of the retention time (the model keeps the
  75 °C value);
* coherence with the private caches.

The low-leakage SRAM and low-write-energy STT-RAM caches that such an eDRAM
cache is usually compared with are not included.

## Simulating

All files are SystemVerilog 2017. `rtl/l3c_pkg.sv` must be compiled first.
For example, to run the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/l3c_pkg.sv rtl/*.sv tb/l3_mem_model.sv tb/tb_l3c_top.sv \
  --top-module tb_l3c_top -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog.

| testbench | what it covers |
|---|---|
| `tb_l3c_top_full` | the whole cache at default size: one write, read-hit, miss and re-hit per bank; 19-cycle refresh spacing; lines still intact after a full sweep longer than the retention time |
| `tb_l3c_top` | all 16 banks at a small size (16 sets × 4 ways, fast TIME) under concurrent random traffic. It checks data, write-backs and hit latency, and fails unless every mechanism occurs: hits, misses, refresh skipping, disabling, dead-line write-back, false and true predictions, victim write-back, refresh stalls, memory contention, and a faster refresh at 95 °C |
| `tb_l3c_refresh_saving` | default bank size with TIME shortened to 2 sweeps; a hot quarter of the working set keeps hitting while the cold rest dies. Reports the fraction of row refreshes skipped: about 75 %, with every hot access still hitting and every dirty cold line in memory |
| `tb_l3_bank` | one bank, directed phases for every mechanism, then random traffic, then back-to-back bursts. The bursts check in-order responses, the 9-cycle hit latency under overlap, and acceptance every two cycles |
| `tb_dead_line_predictor`, `tb_prediction_indicator` | exhaustive checks of the two state machines against reference tables |
| `tb_edram_refresh_manager`, `tb_ring_oscillator`, `tb_refresh_pulse_gen`, `tb_line_pointer_gen` | pulse spacing, row order, epoch placement, temperature response |
| `tb_sram_tag_array`, `tb_edram_data_array`, `tb_plru`, `tb_mem_arbiter` | storage, retention model, replacement, arbitration |

`tb/l3_mem_model.sv` is a behavioural main memory. It has random ready and
5 to 20 cycles of read latency, which is far faster than real DRAM. Its
purpose is to exercise the cache, not to time it.

## How far to trust it

Every block has a self-checking testbench. Each testbench has been shown to
fail on a deliberately broken copy of its block. The full-size configuration
compiles and runs. The predictor's full 256-sweep TIME at full size
(20 M cycles for two steps) was not simulated end to end. The same logic ran
with TIME = 2 sweeps at full bank size and with TIME = 4 sweeps at reduced
size. Only hits are pipelined. A miss holds its bank until the line is filled,
so a miss-heavy stream gets less bandwidth than it would from a
non-blocking design. Power, leakage and energy results need circuit models and are
outside the scope of RTL.
