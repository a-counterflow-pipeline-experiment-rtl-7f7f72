# Counterflow pipeline ring: a clocked RTL model of the "Zeke" test chip

A counterflow pipeline has two pipelines that share their stages and carry
items in opposite directions. The one property that makes it useful, and hard
to build, is that **every item going one way must meet every item going the
other way in some stage**, and interact with it there. If a northbound item
and a southbound item both cross the same stage boundary at the same moment,
they swap places without ever sharing a stage and the interaction is lost. So
every boundary needs an arbiter that lets only one of the two cross, and every
stage must keep its two items in place until they have interacted.

This repository is synthesizable SystemVerilog for a test chip built to check
exactly that. It has two counterflowing rings of 28 stages. Each item is eight
bits: a marker bit, a two-bit address and a five-bit count. When a northbound
and a southbound item share a stage and their addresses are equal, both counts
step once, modulo 31. Because items in one ring never overtake each other, the
host can load the rings, run them, stop them and read them back. From the
start and end positions and two lap counters it can then work out what every
count must be. A single missed meeting shows up as a wrong count. A second,
3-stage ring with adjustable request delays forces the arbiters into close
races.

The original chip is asynchronous, built from pulse-mode handshake circuits.
**This RTL is a clocked, cycle-level model**: one clock is one move time, and
all state is in flip-flops. It reproduces the chip's logical behaviour (who
moves, who meets, what gets counted). It does not reproduce its analog timing.
The departures are listed in "Where this model departs from the chip".

## The item and the rings

```
 item_t (8 bits):  [7] marker   [6:5] addr   [4:0] count
```

Stages are numbered 0 to NSTAGES-1 (default 28). Northbound items move from
stage k to stage k+1. Southbound items move from stage k+1 to stage k, with
indices taken modulo NSTAGES. Boundary b lies between stage b and stage b+1,
and boundary NSTAGES-1 closes the ring.

Each stage has a north half and a south half. Each half has a full flag and an
8-bit data register. A half can be entered only while it is empty and left
only while it is full. So moves into and out of one half alternate, and an
isolated item advances one stage per clock. A ring's throughput is limited by
free space: 14 items in 28 stages, all moving every clock, is the most a ring
can carry, at 14 moves per clock.

## The boundary controller (COP)

Each boundary has a `cop`. It sees two level requests:

* north: stage b north half full **and** stage b+1 north half empty;
* south: stage b+1 south half full **and** stage b south half empty.

Both requests are masked by `run`. The COP is a mutual-exclusion element
followed by two AND gates. The mutex grants at most one request. The granted
side moves only if the stage it is leaving says **May Leave**. The two things
work together like this:

1. **Arbitration.** The mutex never lets a north and a south move cross one
   boundary in the same clock. If both requests arrive in the same clock, the
   side that lost the previous tie on this boundary wins (alternating
   priority). The `contest` output flags such ties.
2. **Held grant.** If the granted side's May Leave is low, the grant is kept,
   and the other side stays out until the granted move has happened. A real
   mutex behaves the same way: it keeps its grant until the request is
   withdrawn.
3. **Blocking until interaction.** May Leave comes from the stage's FULL/EMPTY
   box (below). It is low for the one clock in which a matching pair is
   incremented.

Why every pair meets: let g be a northbound item's unwrapped position minus a
southbound item's. Each clock, g grows by at most 2. It grows by 2 only when
both items move. If they move across the same boundary towards each other,
g jumps over a multiple of NSTAGES, and the mutex forbids exactly that move.
In every other case where both move, they land in the same stage. So g cannot
pass a multiple of NSTAGES without the two items sharing a stage.

A move is combinational from the registered full flags in the same clock. No
move decision depends on a move decided in the same clock, so the model has
no combinational loop.

## The FULL/EMPTY box and the increment

`fe_box` looks at its stage's two full flags and two addresses. A stage goes
through five states: empty, north only, south only, both ("full") and
"interaction complete". The box handles the last two:

* Both halves full, addresses equal, not yet done: `increment` is high for
  one clock. Both counts step through their `lfsr_inc`, and both May Leave
  outputs are low, so neither item can leave. The stage's data registers take
  no move in that clock.
* After that clock, a `done` bit is set and both items may leave, in either
  order. `done` is cleared as soon as the stage no longer holds two items, so
  each meeting increments exactly once.
* Addresses different: the comparison is combinational. Both items may leave
  at once, and the meeting costs no clock.

The count is a 5-bit maximal-length LFSR with polynomial x^5 + x^3 + 1: shift
left, new bit 0 = bit 4 xor bit 2. It visits the 31 non-zero values, so
"increment" means "counter modulo 31". Zero is the lock-up state, so **load
non-zero counts**.

## Cycle counters and how a run is checked

Each direction has a 48-bit `cycle_counter`. It counts the clocks in which an
item with its marker bit set crosses boundary NSTAGES-1 (from the last stage
to stage 0 northbound, the other way southbound). Load exactly one marked
item per ring, and the counter counts that item's laps. `cnt_src` connects
both counters to the main ring (0) or to the stress ring (1). `mon_n` and
`mon_s` bring out bit 0 of each counter, for measuring throughput from
outside.

To check a run:

1. List each ring's items in travel order, starting from the marked one, at
   load time and again at read-back. The i-th item of one list is the i-th of
   the other, because items never overtake.
2. The marked north item travelled `D_m = end_m + NSTAGES*C_n - start_m`
   stages, where `C_n` is the north counter. Every other north item travelled
   `D_m` plus the change in its distance ahead of the marker. The same holds
   for the south ring, going the other way.
3. For north item x and south item y, let
   `g0 = start_x - start_y` and `g1 = g0 + D_x + D_y`. They met
   `floor(g1/NSTAGES) - floor((g0-1)/NSTAGES)` times.
4. Each item's final count is its loaded count stepped once per meeting with
   an item of equal address.

`tb_zeke_top` and `tb_zeke_sweep` check every item this way. They use only
the access bus.

## The arbiter stress ring

`zeke_top` also holds a 3-stage `cf_ring` with `ADJ_DELAY = 1`. Every COP
request input passes through a `req_delay`. This block delays the rise of a
request by 0 to 15 clocks, set at run time (`stress_n_dly[b]`,
`stress_s_dly[b]`), and drops the request at once. Its boundaries carry the
chip's COP names:

| boundary | between stages (0-based) | COP |
|----------|--------------------------|-----|
| 0        | 0 and 1                  | A   |
| 1        | 1 and 2                  | C   |
| 2        | 2 and 0                  | B   |

The experiment loads one northbound and one southbound item with equal
addresses into stage 0. It biases COPs A and B so that the two items always
meet again in stage 0, then sweeps the north delay at COP C. When the
northbound item reaches C first, they meet alternately in stages 0 and 2
(the chip numbers them 1 and 3). When the southbound item is first, they meet in
stages 0 and 1 (chip numbering: 1 and 2). At the crossover the two requests tie at C's
mutex. `tb_zeke_top` runs this sweep, with the south delay at C set to 3 and
A and B biased by 3:

| north delay at C | meetings in stage 0/1/2 | ties at C |
|------------------|-------------------------|-----------|
| 0, 1, 2          | ~66 / 0 / ~66           | 0         |
| 3                | 59 / 0 / 60             | 1         |
| 4, 5             | ~57 / ~57 / 0           | 0         |

The count check passes in every case. In the chip, a near-tie makes the
arbiter slow (metastable). A clocked model cannot show that, so the ring here
only shows which side wins.

## Access bus

All accesses go through one bus. Writes (`acc_we`) take effect at the clock
edge and are ignored while `run` is high. Reads are combinational.

| `acc_sel` | target                                  | data                                   |
|-----------|-----------------------------------------|----------------------------------------|
| 0         | north half of stage `acc_idx`           | `[8]` full, `[7:0]` item               |
| 1         | south half of stage `acc_idx`           | `[8]` full, `[7:0]` item               |
| 2         | north cycle counter                     | `[47:0]`                               |
| 3         | south cycle counter                     | `[47:0]`                               |

`acc_ring` picks the main ring (0) or the stress ring (1) for stage accesses.
Loading a stage clears its "interaction complete" state, so a pair loaded
into one stage interacts once.

Lowering `run` stops all moves after the current clock. An increment that is
already due still completes in the next clock (`busy` shows it). After that
the rings are quiescent and can be read.

## Timing of the clocked model

* An isolated item moves one stage per clock: a 28-stage lap takes 28 clocks.
  This is checked exactly.
* A matching meeting holds both items for one extra clock. A lone matching
  pair in an 8-stage ring laps in 10 clocks instead of 8 (checked).
* A non-matching meeting is free, except that a tie at a mutex delays the
  loser by a clock.

Total throughput (item moves per clock) measured by `tb_zeke_sweep` on the
28-stage ring, averaged over 1000 clocks after a 500-clock warm-up:

| #N \ #S (no match) | 0  | 1  | 7  | 14 | 21 | 28 |
|--------------------|----|----|----|----|----|----|
| 0                  | 0  | 1  | 7  | 14 | 7  | 0  |
| 14                 | 14 | 15 | 21 | 28 | 21 | 14 |
| 28                 | 0  | 1  | 7  | 14 | 7  | 0  |

| #N \ #S (all match) | 0  | 1   | 7    | 14   | 21   | 28  |
|---------------------|----|-----|------|------|------|-----|
| 14                  | 14 | 7.5 | 10.5 | 14.0 | 10.5 | 7.0 |

With #N = #S = 14 and no matches, the two rings lock into a mode where every
item moves every clock (28 moves per clock). With all addresses matching, the
same load gives 14. With random addresses (one meeting in four matches), it
gives about 18. One ring alone follows a triangle that peaks at half
occupancy. A full ring or an empty ring does not move.

## Where this model departs from the chip

* **Clocked, not asynchronous.** The chip's SR control latches, transparent
  data latches, pulse-mode moves and analog mutex are replaced by flip-flops
  and one move decision per boundary per clock. Delay constraints of the
  handshake circuits do not exist here.
* **Relative costs differ.** On the chip a move cycle is about 12 gate
  delays. A meeting adds about 2 gate delays without a match and about 5.5
  with one. Here a move costs one clock, a non-matching meeting nothing and a
  matching one a whole clock. So matches hurt throughput relatively more than
  on the chip, and the drop caused by a single non-matching opposite item is
  absent.
* **No metastability.** Ties at a mutex are resolved by alternating priority
  in zero time.
* **Adjustable delays are whole clocks (0 to 15).** The chip's delays are
  current-controlled, with picosecond resolution.
* **No physical asymmetry.** The chip's slow corner stages and its faster
  inner ring come from layout. This model's stages are all identical.
* **Choices not fixed by the chip description:**
  * the LFSR polynomial;
  * the bus encoding and the rule that writes happen only while stopped;
  * one `run` input for both rings;
  * the counter boundary (NSTAGES-1);
  * one monitor bit per counter;
  * reset values (all stages empty, all registers zero).
* **Not modelled:** the I/O pads, the off-chip current sources for the delays
  and the test host.

## Files

| file | contents |
|------|----------|
| `rtl/cf_pkg.sv` | item type, widths, LFSR step function, bus selector enum |
| `rtl/lfsr_inc.sv` | count incrementer (one LFSR step) |
| `rtl/fe_box.sv` | FULL/EMPTY box: meeting detection, increment, May Leave |
| `rtl/cf_stage.sv` | one stage: two full flags, two data registers, `fe_box`, two `lfsr_inc` |
| `rtl/cop.sv` | boundary controller: mutex with held grant, May Leave gating |
| `rtl/req_delay.sv` | adjustable request delay for the stress ring |
| `rtl/cf_ring.sv` | ring of `cf_stage` and `cop`, optional `req_delay`, load/read port |
| `rtl/cycle_counter.sv` | 48-bit marker-passage counter |
| `rtl/zeke_top.sv` | chip top: 28-stage ring, 3-stage stress ring, counters, bus |
| `tb/cf_tb_pkg.sv` | reference LFSR and meeting-count arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_zeke_sweep` |

Parameters: `cf_ring` takes `NSTAGES` (28), `ADJ_DELAY` (0), `DLY_W` (4) and
`CNT_BOUNDARY` (NSTAGES-1). `zeke_top` takes `NSTAGES` (28), `NSTRESS` (3),
`DLY_W` (4) and `CYCW` (48). The item widths are fixed in `cf_pkg`, because
the LFSR is specific to five bits.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and exits. Build and
run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/cf_pkg.sv tb/cf_tb_pkg.sv tb/tb_zeke_top.sv --top-module tb_zeke_top
./obj_dir/Vtb_zeke_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_lfsr_inc` | every step against a bit-level reference; period 31 from every start |
| `tb_cop` | lone moves, alternating ties, held grant; 5000 random clocks against a reference arbiter, no starvation |
| `tb_fe_box` | the five-state walk, one increment per meeting, reload clears `done` |
| `tb_cf_stage` | directed moves and increments; 3000 random legal clocks against a stage model |
| `tb_req_delay` | delays 0 to 15 exact; short requests held back |
| `tb_cycle_counter` | counting, write priority, 48-bit carry and wrap |
| `tb_cf_ring` | 8-stage ring: every move legal, every count right, lap times 8 / 8 / 10 clocks |
| `tb_zeke_top` | full chip, defaults: lone-item rate, 15 occupancy/match mixes with #N = 14, stress-ring sweep; counts each mechanism |
| `tb_zeke_sweep` | full chip: #N x #S grid, no match and all match, the two emission-test loads; throughput tables |

The full-size tests run in well under a minute. The concurrent assertions in
`cop`, `fe_box` and `cf_stage` (mutual exclusion, no move during an
increment, no set and reset of a full flag in one clock) are active in every
simulation built with `--assert`.
