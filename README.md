# Cache-utilization based voltage-frequency scaling with a 7T/14T L1

A core's L1 data cache built from 7T/14T SRAM cells can pair each two cells
into one. The paired cells store a single value. This gives a half-size
"line-merged" cache that is reliable at a low supply voltage, and fast at
the regular supply. The question is when a core can give up half of its L1.
This design answers it in hardware, period by period:

- It measures how many extra misses the half-size cache costs. Every core
  has a private L1 whose LRU state doubles as a half-size cache simulator.
- At the end of every period of one million instructions, it switches the
  core's power island between three modes:

| mode | supply / clock | L1 organisation | L1 hit latency |
|---|---|---|---|
| normal | 0.8 V / 800 MHz | 32 KB, 8-way (regular) | 4 cycles |
| dependable low-power | 0.55 V / 400 MHz | 16 KB, 4-way (line-merged) | 4 cycles |
| high-speed | 0.8 V / 800 MHz | 16 KB, 4-way (line-merged) | 3 cycles |

The rule applied at each period end:

1. If the core's L1 misses per kilo-instruction (MPKI) exceed a threshold,
   the core is memory-bound and slowing it costs little. Go to
   **dependable low-power**.
2. Otherwise estimate the cycles the half-size cache would cost:

       overhead = delta_misses * avg_L2_latency - rw_instructions * delta_L1_latency

   - `delta_misses` are accesses that hit the full cache but would miss the
     half-size one.
   - `delta_L1_latency` = 4 - 3 = 1 cycle, the hit-time gain of the merged
     cells.
   - If the overhead is negative, go to **high-speed**. Otherwise stay in
     (or return to) **normal**.

The system (`cub_system`) has four such core islands. Each island's link to
the shared L2 passes through level-shift registers.

## Measuring the half-size cache: delta misses

All of this lives in `lru_controller` and `tag_array`. Each set keeps a true
LRU rank per way: 0 is the most recently used, 7 the least. A cache with
half the ways would hold exactly the blocks at ranks 0..3. With HALF = 4,
half_1 is ways 0..3 and half_2 is ways 4..7.

**Normal mode.** Blocks never move between ways.

- A hit at rank 4 or more is a *delta miss*. The full cache hits, but a
  4-way cache would have missed.
- Counting delta misses needs no extra tags.

**Line-merged modes.** Only half_1 holds data. Each half_2 way's data cells
are paired with a half_1 way and store the same value. Half_2's *tags* stay
useful: they keep shadow tags of the blocks at ranks 4..7. Those are the
blocks the full-size cache would still have.

- A hit in half_1 is an ordinary hit.
- A hit on a half_2 shadow tag is a real miss and also a delta miss. The
  full cache would have hit.
- On any real miss, the victim is the half_1 block at rank 3 (the oldest
  block still held). The requested block takes its way and rank 0.
- The victim's tag moves into half_2 and takes rank 4. It goes into the
  half_2 way that hit, or into the LRU way on a plain miss. Ways younger
  than that destination age by one.
- So the ranks of a set always describe the full-size cache, even though
  only half of it holds data.

**The tag move.** It uses two multiplexers and a `tag_buffer` register next
to the tag arrays:

- **mux_A** selects the sense output of one half_1 way. In the lookup cycle
  it loads the victim's tag into `tag_buffer`.
- **mux_B** routes `tag_buffer` into the write driver of one half_2 way. It
  does so in the fill cycle, the same cycle in which the new tag is written
  into the victim's half_1 way.
- The move therefore costs no cycle of its own. An assertion checks that the
  two writes never target the same way.

The misses used for the MPKI test are those the *full-size* cache would have
(`ev_miss && !ev_delta_miss`). A core in a merged mode is thus judged by its
program's behaviour, not by the extra misses of the halved cache. Without
this, a phase could trap itself in low-power mode.

## Switching modes

`mode_transition` executes each decision with two handshakes: one to the L1
and one to the island's supply regulator.

- When the supply must rise (leaving low-power), it raises the supply
  before changing the cache.
- When the supply must fall (entering low-power), it changes the cache
  first.
- The 7T/14T cells therefore never run at 0.55 V in the regular
  organisation. An assertion checks this.

In `l1_cache`, the switch works as follows.

**Normal to line-merged.** The four most recent blocks of each set must end
up in half_1. The cache walks the sets:

1. Every half_2 block of rank below 4 is swapped with a half_1 block of rank
   4 or more (block copy). If the half_1 block is dirty, it is written back
   first. Its tag goes to half_2 through `tag_buffer` and becomes a shadow
   tag.
2. Every dirty block still in half_2 is written back, because its data is
   lost when the cells pair up.

The cost of this switch is block copying, dirty write-backs and the supply
change.

**Line-merged to normal.** Half_2 holds copies of half_1, not the shadow
blocks. So the half_2 valid bits are cleared in one cycle, and the cost is
only the supply change.

**Between the two merged modes**, only the supply and the hit latency
change.

## Blocks

| module | role |
|---|---|
| `cub_pkg` | mode and supply enums, line geometry, per-mode hit latency |
| `tag_array` | per-way tags, valid bits, hit comparators, `tag_buffer` with mux_A / mux_B |
| `lru_controller` | LRU ranks, delta-miss detection, victim and shadow-tag choice |
| `sram_7t14t_array` | data array; in merged mode a write to half_1 way w also writes its partner w+4 |
| `l1_cache` | the cache controller: lookup, fill, write-back, tag copy, set reorganisation |
| `delta_miss_counter` | delta misses per period |
| `pmc` | per-period counters: instructions, read/write instructions, misses, L2 reads and L2 wait cycles |
| `overhead_estimator` | average L2 latency (bit-serial divider) and the signed overhead |
| `mode_decision` | MPKI test, then overhead sign |
| `mode_transition` | order of supply change and cache switch; handshakes |
| `lsr` | level-shift register stage(s) on the island boundary |
| `cub_core_node` | one power island: L1, LSRs and the decision chain |
| `cub_system` | top: four islands, per-core ports |

## Interfaces and timing

**Core side** (per core): `req_valid/req_ready/req_we/req_addr/req_wdata`,
then `resp_valid/resp_rdata`, plus `instr_retired` (one pulse per retired
instruction).

- A request accepted in cycle t hits with `resp_valid` in cycle t+4, or
  t+3 in high-speed mode.
- The L1 is blocking: one request at a time.

**L2 side** (per core, after the LSR):

- `l2_req_valid` is a one-cycle request pulse with `l2_req_we/addr/wdata`.
  Lines are 64 bytes.
- `l2_resp_valid` is a one-cycle response pulse, with `l2_resp_rdata` for
  reads.
- One request is outstanding at a time. Each LSR stage adds one cycle in
  each direction.

**Supply** (per core):

- `vf_req` together with `vf_level` (0 = 0.8 V/800 MHz, 1 = 0.55 V/400 MHz).
- `vf_ack` is returned when the level is reached.
- The regulator and clock generator are outside this RTL. Everything here
  runs on one clock.

**Control and status.** `mpki_threshold` is an input in misses per 1000
instructions. Each core reports its committed mode, the mode of its L1, its
switch count, the last decision, the overhead value, the last delta-miss
count, and its write-back, block-copy and tag-copy counts.

**Decision latency.** At the period end the counters are latched. The
overhead is ready 34 cycles later (32 divider steps plus two). The decision
follows one cycle after that. A switch then takes as long as the
reorganisation and the regulator take.

## What follows the original paper and what is this design's choice

**Taken from the paper:**

- the three modes with their voltages, clocks, sizes and latencies;
- the MPKI-then-overhead decision and the overhead formula;
- the one-million-instruction period;
- four cores with private L1s, level shifters and a shared 256 KB L2;
- the LRU bookkeeping of both organisations (hit, half_2 hit and miss
  cases);
- the tag_buffer with its two multiplexers, and the copy happening
  together with the new tag write;
- block copying and dirty write-back on entering the merged organisation,
  and only a supply change when leaving it.

**This design's own choices:**

- **Geometry:** 64-byte lines, 32-bit addresses, 64 sets, 20-bit tags and
  32-bit words.
- **Cache policy:** blocking, write-back and write-allocate.
- **Protocols:** all handshakes and pulse protocols.
- **Reorganisation:** the set-by-set order of the reorganisation, and
  clearing half_2 when leaving the merged organisation.
- **Switch ordering:** the order of supply change and cache switch.
- **MPKI counting:** counting only full-size misses for the MPKI test.
- **Arithmetic:** integer average latency, with 20 cycles used when a
  period had no L2 read.
- **LSR:** one LSR stage.
- **Threshold:** the paper derives the MPKI threshold from benchmark
  statistics and gives no number. Here it is a run-time input. The
  testbenches use 150.
- **Not modelled:** the paired cells' noise margin, the supply voltage
  itself, and the bit errors that the low-power mode protects against.

The cores, the L2 and the regulators are not part of the RTL. They are
represented by the top's ports, and the testbenches use behavioural
models: `tb/core_model.sv` and `tb/l2_model.sv`.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and stops. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/cub_pkg.sv tb/tb_lru_controller.sv --top-module tb_lru_controller
    ./obj_dir/Vtb_lru_controller

Modules are found through `-Irtl` (`-y rtl` works as well). For the system
benches, add `tb/core_model.sv tb/l2_model.sv`.

| testbench | what it runs |
|---|---|
| `tb_tag_array`, `tb_lru_controller`, ... | one block each; `tb_lru_controller` replays the ten 4-way LRU examples of both organisations, then random traffic against a reference recency stack |
| `tb_l1_cache` | 4-way, 4-set cache; random reads and writes in all modes and across every switch, checked for data, hits, delta misses and hit latency |
| `tb_cub_system` | four cores, 32 KB L1s, period of 4000 instructions; phase programs that cause all six kinds of mode switch (about 2 s) |
| `tb_cub_system_full` | everything at defaults: 1.1 million instructions per core, one full decision period; expects high-speed for two 4 KB working sets, normal for a 24 KB one, low-power for a streaming core (about 1 min) |

To change the cache, set `WAYS` and `SETS` on `cub_system`, and the line
size in `cub_pkg`. To change the period, set `PERIOD_INSTR`. To add more
level-shift delay, set `LSR_STAGES`.
