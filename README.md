# Wave-pipelined on-chip global interconnect

A long global wire on a chip is normally either slow (one bit per wire
delay) or cut into flip-flop pipeline stages. The flip-flops cost a
clock-to-output delay, a setup time and a clock-skew margin in every stage,
so the speed-up does not grow in step with the number of stages.

This design takes a third route. The wire keeps only its repeaters, and the
transmitter launches a new bit every clock cycle while earlier bits are still
on their way. Several bits travel down the wire at once, as "waves". A logic
block is hard to wave-pipeline because its paths differ in delay and its
multi-input gates must see their inputs arrive together. A buffered wire has
neither problem: it is a single path made of single-input gates (inverters).
What the wire does add is an unknown total delay, jitter and some distortion
of the pulse widths. A small all-digital clock-and-data-recovery (CDR)
receiver absorbs these, followed by a four-entry FIFO that hands the bits to
the receiver's own clock.

The RTL models one such wire end to end at 2 Gb/s: a transmitter flip-flop,
20 repeater segments of 1400 µm (2.8 cm), and the receiver.

```
 clk_t          wire: 20 x (inverter + 1400 um)              clk_2r            clk_r
   |                                                           |                 |
 [FF] --d_tx--> >o--~~~--> >o--~~~-- ... -->o--~~~--d_wire--> [ CDR PLL ] --d_s--> [FIFO] --> d_out
 wp_transmitter             wp_channel (behavioural)           cdr_pll   clk_s-->  fifo_retimer
                                                               \_______ wp_receiver ________/
```

## Clocks and rates

All clocks have fixed frequencies. Their phases are unknown to each other.

| clock    | period (tests) | role |
|----------|----------------|------|
| `clk_t`  | 500 ps         | transmitter; one bit launched per rising edge |
| `clk_r`  | 500 ps         | receiver clock; `d_out` is in this domain |
| `clk_2r` | 250 ps         | twice the receiver rate; the source of the four PLL phases |
| `clk_s`  | 500 ps on average | recovered sampling clock, one of four phases of `clk_2r / 2` |

`clk_t` and `clk_r` must have the same frequency (they come from one
reference). The design does not track a frequency offset.

## The receiver PLL (`cdr_pll`)

The PLL is built from four small digital parts. Between them they keep the
falling edge of `clk_s` on the data transitions, so that the rising edge of
`clk_s`, which samples the data, lands in the middle of each bit.

### Phase generator (`phase_generator`)

A 2-bit Johnson counter driven by both edges of `clk_2r`. `q0` toggles on
each rising edge, which gives the receiver-rate clock at phase 0. `q1`
copies `q0` on each falling edge, which gives phase 90. Their complements
give phases 180 and 270. So `ph[k]` is the receiver clock delayed by
k x 90 degrees. `ph[0]` and `ph[2]` change only on rising edges of
`clk_2r`, and `ph[1]` and `ph[3]` only on falling edges. The VCO relies on
this.

### Alexander phase detector (`alexander_pd`)

This detector samples the incoming waveform twice per bit:

* on the rising edge of `clk_s`, the data sample. This is the recovered
  bit `d_s`.
* on the falling edge, the edge sample.

At each rising edge it compares the previous data sample, the edge sample
and the new data sample:

| previous vs new | edge sample equals | meaning                            | decision      |
|-----------------|--------------------|------------------------------------|---------------|
| equal           | –                  | no transition                      | `ADJ_HOLD`    |
| different       | new bit            | transition before the falling edge, so `clk_s` is late | `ADJ_EARLIER` |
| different       | old bit            | transition after the falling edge, so `clk_s` is early | `ADJ_LATER`   |

### Loop filter (`loop_filter`)

A phase step shows in the detector's decisions only about three cycles
after the decision that asked for it. Decisions made in the meantime
describe the old phase, and acting on them would overshoot. The loop filter
is a 4-state counter that advances on every non-hold decision. The decision
that finds it in state 0 is passed on; the next three are dropped. A passed
decision toggles `adj_req`, and `adj_dir` carries its direction.

### VCO: a phase counter and a glitch-free clock multiplexer (`vco`)

The "VCO" is a 2-bit counter `sel` that drives a 4-to-1 multiplexer:
`clk_s = ph[sel]`. Each passed decision moves `sel` one step, up (later) or
down (earlier), modulo 4.

The hard part is when `sel` may change. If the multiplexer switches while
the old and new phases differ, `clk_s` gets a runt pulse. A runt pulse
clocks the detector, the loop filter and the FIFO one extra time. The VCO
therefore takes a pending step only at an edge of `clk_2r` where both of
these hold:

* the target phase is low just after the edge, and
* the current phase is low just before or just after the edge.

Then `clk_s` either falls normally at that edge or is already low and stays
low. It never loses part of a high pulse, and it never gains an extra edge.
The values just after an edge are known in advance, because a rising edge
of `clk_2r` toggles only `ph[0]` and `ph[2]` and a falling edge toggles only
`ph[1]` and `ph[3]`.

Working through all cases shows that no single edge type is enough:

* Stepping later from an odd phase, or earlier from an even phase, is safe
  only on a rising edge.
* Stepping later from an even phase, or earlier from an odd phase, is safe
  only on a falling edge.

So `sel` is a dual-edge register: `sel = sel_p ^ sel_n`, where `sel_p` is
written only on rising edges and `sel_n` only on falling edges. Each edge
writes its own half so that the XOR takes the new value. The request
acknowledge is built the same way. A safe edge always comes within one
receiver period of the request. Each step changes one period of `clk_s`:

* a step later stretches it to 625 ps;
* a step earlier shrinks it to 375 ps;
* the high time is always 250 ps, and the shortest low time is 125 ps.

`adj_req` comes from a flip-flop clocked by `clk_s`, which is itself made
from `clk_2r`. The VCO samples it no earlier than the next `clk_2r` edge, a
quarter period later, so no synchroniser is used.

### Lock and distortion tolerance

In lock, the loop steps back and forth between the two phases on either side
of the mean transition position. Each transition therefore stays within
T/4 of a falling edge, and the sampling edge stays at least T/4 away from
every transition. A bit is still sampled correctly while its width differs
from T by up to 25 % (with N phases the bound is 0.5 - 1/N).

The tests confirm this:

* `tb_wp_distortion` displaces every edge by a random ±60 ps, so bit widths
  run from 380 to 620 ps (up to 24 %). It uses four alignments of the data
  to the phase grid and sees no errors.
* At ±100 ps (bit widths off by up to 40 %), the worst alignment makes the
  loop walk past the sampling point and slip whole bits. This is expected
  outside the bound.

## FIFO retimer (`fifo_retimer`)

`clk_s` has the frequency of `clk_r` but an unknown phase, and it moves in
90-degree steps while tracking. The retimer is a cyclic array of four
entries:

* every rising edge of `clk_s` writes at the enqueue pointer;
* every rising edge of `clk_r` reads at the dequeue pointer;
* both pointers advance by one every cycle.

Both pointers move at the same rate, so there are no full or empty flags.
After reset the dequeue pointer sits two entries from the enqueue pointer.
This leaves one buffering entry on each side, whichever clock leads, which
covers a phase difference of at least ±180 degrees plus the PLL's steps.
Four entries is the smallest size with a spare entry on both sides. Each
side is released from reset by its own two-flip-flop synchroniser
(`reset_sync`, inside `wp_receiver`). Words written before the PLL has
locked are garbage and come out as such.

## The wire (`wp_segment`, `wp_channel`): behavioural models

A segment is an inverter driving 1400 µm of wire. In the model it is an
inversion with a transport delay of `SEG_DELAY_PS` (150 ps by default) plus
a random 0..`JITTER_PS`. Each edge waits out its own delay in its own
process, so pulses shorter than the delay still arrive. Twenty segments
give a 3 ns wire, so six bits are in flight at once.

These two files use delays and are for simulation only. `wp_interconnect`
contains the channel, so it is a simulation top too. `wp_transmitter`,
`wp_receiver` and everything below them are synthesizable. Every segment
inverts, so an even `N_SEG` (all the lengths of interest: 4 to 20) keeps
the data polarity.

## Latency

Measured in the full-size test:

* from a bit entering the transmitter flip-flop to its appearance on
  `d_out`: 11 `clk_r` cycles;
* launch to wire output: one transmitter cycle plus 3 ns of wire;
* sampling: at most one cycle;
* FIFO: about two cycles.

The number depends on the wire delay and the clock phases, and stays fixed
once the PLL has locked. The loop itself works like this: a decision
registered on `clk_s` edge n is passed on at edge n+1, and the phase moves
before or just after edge n+2.

## Parameters

| parameter       | module | default | origin |
|-----------------|--------|---------|--------|
| `N_PHASE`       | `wp_pkg` | 4  | four phases: with two the loop would not settle; the VCO and phase generator are written for four |
| `FIFO_DEPTH`    | `wp_pkg` | 4  | minimum size for ±180 degrees |
| `N_STATE`       | `loop_filter` | 4 | pass one decision in four |
| `N_SEG`         | `wp_channel`, `wp_interconnect` | 20 | 2.8 cm wire |
| `SEG_DELAY_PS`  | `wp_segment`, `wp_channel`, `wp_interconnect` | 150 | this design's assumption |
| `JITTER_PS`     | same | 0 | this design's assumption (test knob) |
| `DEPTH`, `WIDTH`| `fifo_retimer` | 4, 1 | – |

The VCO and phase generator are written for exactly four phases.

## What is this design's own choice

The overall structure and its numbers are the source design:

* transmitter flip-flop, repeater-only wire, PLL made of phase generator,
  VCO (counter plus 4:1 multiplexer), Alexander detector and 4-state loop
  filter;
* four phases, a 4-entry cyclic FIFO with two buffering entries, transitions
  aligned to the falling edge of `clk_s`, 20 segments of 1400 µm,
  2 Gb/s.

These details were filled in here:

* the Johnson-counter structure of the phase generator;
* the glitch-free step rule and the dual-edge select register of the VCO;
* the toggle-plus-direction handshake from loop filter to VCO;
* the reading of the loop filter as "pass the decision met in state 0,
  count every decision";
* the registered FIFO output and the reset synchronisers;
* all reset values;
* the 150 ps segment delay and the uniform jitter model.

Not built:

* the flip-flop-pipelined wire, which is only a baseline for comparison;
* multi-wire buses. A bus would replicate everything but the phase
  generator per wire; the source only mentions buses in passing.
* the analog behaviour behind the distortion figures (temperature, supply,
  process, crosstalk).

## Testbenches and how to run them

Each testbench checks itself, ends with
`TB_RESULT checks=N failures=M`, and has a watchdog. Build and run one with
Verilator 5:

```
verilator --binary --timing -y rtl rtl/wp_pkg.sv tb/tb_wp_interconnect.sv \
          --top-module tb_wp_interconnect
./obj_dir/Vtb_wp_interconnect
```

Add `+verilator+rand+reset+2` to the run command to start from random
register values; every testbench passes that way too.

| testbench | checks |
|-----------|--------|
| `tb_wp_transmitter`  | one-cycle launch, reset |
| `tb_wp_segment`      | inversion, exact delay, short pulses survive, jitter window |
| `tb_wp_channel`      | 3 ns delay, polarity, every bit of a 2 Gb/s stream with six in flight |
| `tb_phase_generator` | 500 ps period, 50 % duty, phases exactly 125 ps apart |
| `tb_vco`             | `clk_s` is phase `sel`; each step within one period; one 625/375 ps period per step; 250 ps high time; wrap both ways |
| `tb_alexander_pd`    | decision for transitions 10–200 ps before or after the falling edge; `d_s` |
| `tb_loop_filter`     | against a reference count: exactly the 1st, 5th, 9th… decision passes |
| `tb_fifo_retimer`    | seven phase offsets from −180 to +180 degrees plus ±90-degree jumps: every word once, in order, at a constant distance |
| `tb_cdr_pll`         | two data phases with 0–30 ps jitter: lock to two neighbouring phases, every recovered bit, step latency, one-in-four filtering |
| `tb_wp_receiver`     | two clock/data phase pairs: every bit on `d_out`, in order |
| `tb_wp_interconnect` | full size, default parameters: every bit end to end; a 300 ps transmitter drift that the PLL follows; counts bits in flight, steps both ways, dropped decisions and FIFO wrap-around, each of which must occur |
| `tb_wp_distortion`   | bit-width distortion up to 24 % at four alignments, error-free |

With asynchronous active-low reset, simulation needs an actual falling edge
on `rst_n`. The PLL's detector and loop filter have no clock while the
phase generator is held in reset, so they are reset only by that edge. The
testbenches start `rst_n` high and pull it low after 1 ps. In silicon,
reset is level-sensitive and this does not arise.

## Files

`rtl/` holds the design, one module or package per file. `wp_pkg.sv` holds
the shared constants and the `adj_e` decision type; compile it first.
`wp_interconnect` is the top. `tb/` holds the testbenches listed above.
