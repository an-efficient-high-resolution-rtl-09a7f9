# Noise-shaping multipath gated-ring-oscillator TDC (11 bit, 50 MS/s)

A time-to-digital converter measures the interval between a Start edge and a
Stop edge. This one runs a ring oscillator only during that interval and
counts the stage transitions it makes. The ring is *gated*, not reset: when
the interval ends, the ring freezes in whatever state it reached, including
the unfinished part of the stage that was switching, and the next
measurement continues from there. The part of a stage delay that one
measurement misses is therefore counted by the next one. The quantisation
error of sample k is `q[k] - q[k-1]`, so quantisation noise is pushed to
high frequencies (first-order noise shaping). Averaged over many samples, the
output resolves time far more finely than one stage delay.

The oscillator is a 47-stage *multipath* ring. Each stage is driven by five
earlier stages rather than one (stage 1 by Z35, Z37, Z39, Z43 and Z47), which
brings the effective delay per stage down to about 6 ps. One LSB of the
output is one stage delay. An oscillator cycle has 94 transitions (47 stages,
each switching twice), about 564 ps or 1.8 GHz. Full scale is 2047 LSB, about
12.3 ns. One sample is produced per 20 ns.

This repository holds synthesizable SystemVerilog for the digital back end,
plus behavioural models of the oscillator and the timing generator so that
the whole converter can be simulated end to end.

## The counting problem and the seven cells

Counting every transition would take one counter per transition, 94 in
all, each running at 1.8 GHz. A cheaper approach keeps one counter for whole
cycles and reads the leftover phase from the sampled ring state. That fails
on the full ring, because with 6 ps stages and much slower edges several
outputs are always mid-transition. The sampled state is then unreliable.

The fix is to split the 47 outputs into **cells** whose inputs are far
apart in time, so that inside a cell only one input is ever switching. There
are seven cells, six with 7 inputs and one with 5. Each cell has its own wrap
counter (7 counters in all) and its own decoder. The sum of the seven
per-cell counts is the ring's total transition count.

Which stage goes to which cell is this design's choice. The stages are
visited in steps of 7 (Z1, Z8, Z15, ... wrapping modulo 47; 47 is prime, so
the walk reaches every stage). That walk is cut into runs of 7,7,7,7,7,7,5.
Inside a cell, inputs are then at least 5 stages (30 ps) apart:

| cell | inputs in switching order (`'` = inverted tap) |
|------|------------------------------------------------|
| 1 | Z1' Z8 Z15' Z22 Z29' Z36 Z43' |
| 2 | Z3' Z10 Z17' Z24 Z31' Z38 Z45' |
| 3 | Z5' Z12 Z19' Z26 Z33' Z40 Z47' |
| 4 | Z2' Z7 Z14' Z21 Z28' Z35 Z42' |
| 5 | Z4' Z9 Z16' Z23 Z30' Z37 Z44' |
| 6 | Z6' Z11 Z18' Z25 Z32' Z39 Z46' |
| 7 | Z13' Z20 Z27' Z34 Z41' |

The table is computed at elaboration by functions in `gro_tdc_pkg`
(`cell_node`, `cell_pol`). Change `CELL_STRIDE` or the cell sizes there to
try another partition.

### Cell phase: a Johnson code

Transitions travel around the ring in stage order. A cell's K inputs
therefore switch one after another in ring order, and each switches twice per
oscillator cycle. Some taps are inverted (free in hardware: latches have
complementary outputs). After that, the K-bit cell state steps through the
2K codes of a Johnson (twisted-ring) counter:

    0000000 -> 0000001 -> 0000011 -> ... -> 1111111 -> 1111110 -> ... -> 1000000 -> 0000000

`state_to_phase` turns this into the fine phase 0..2K-1. If bit 0 is set, the
phase is the number of ones. Otherwise it is 2K minus the number of ones. The
polarities are chosen so that the cell's last input rises exactly when the
fine phase wraps from 2K-1 back to 0. That rising edge clocks the cell's wrap
counter. The cell's total count is `coarse * 2K + fine`, in stage delays.

### Counting wraps without glitches

When EN falls, charge sharing inside the gated stages can leave the output
that was just switching near the logic threshold. It may cross the threshold
more than once. If that output clocks a counter, the counter can add an
extra cycle, and one wrong count ruins the noise shaping from then on. Three
measures prevent this:

* **Non-overlapping sampling clock.** CLK is low while EN is high, plus a
  guard time on each side. The master latch of each cell is open only while
  CLK is low. So the counter input can change only in a window around the
  enable pulse, and any bouncing has ended before CLK rises.
* **De-glitch C-element** (`deglitch`). The counter is clocked by T, not by
  the wrap input A'2 itself. T follows A'2 only when A'1 agrees with it, and
  holds otherwise. A'1 is the cell input that switches just before A'2.
  When A'2 rises at the wrap, A'1 is already high. So a bounce 1-0-1 on A'2
  cannot pull T down, and T gives exactly one rising edge per cycle:

  | A'1 | A'2 | T |
  |-----|-----|---|
  | 1 | rises | rises |
  | 1 | falls | holds |
  | 0 | falls | falls |
  | 0 | rises | holds |

  In this design, A'1 and A'2 are the complements of the cell's last two
  inputs.
* **Delayed read clock.** The wrap counter ripples at oscillator speed.
  Its value is copied into `coarse` on `clk_dly`, a delayed copy of CLK, once
  the last edge of T has settled.

## One measurement, edge by edge

```
Start  __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____
Stop   ____________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\__
EN     _____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_____________      rises TG after Start, falls TG after Stop
CLK    ‾‾\________________________/‾‾‾‾‾‾‾‾‾‾‾      falls with Start, rises TG after EN falls
CLK_DLY‾‾‾‾‾‾\________________________/‾‾‾‾‾‾‾      CLK delayed by TD
```

(TG = 100 ps, TD = 300 ps in the timing model.)

1. CLK falls and the master latches open. EN rises and the ring runs. The
   wrap counters count rising edges of T.
2. EN falls and the ring freezes. Any bounce ends within the guard time.
3. CLK rises. The master latches close, and the slave stage captures the
   frozen state B of each cell.
4. `clk_dly` rises. Each cell's wrap count is copied to `coarse`. `overflow`
   is set if the count wrapped since the previous read.
5. At the next CLK rise, each `phase_differentiator` registers
   `coarse*2K + fine` and outputs its difference from the previous total. The
   modulus `2^CNT_W * 2K` is added back if `overflow` is set.
6. At the CLK rise after that, `output_adder` registers the sum of the seven
   cell differences. That sum is `dout`.

`dout` for a measurement is therefore valid two CLK rising edges after that
measurement ends. After reset, `valid` first rises on the fourth CLK edge,
when the first difference between two real measurements reaches the output.

## Module map

```
gro_tdc                     top, for simulation (contains behavioural models)
├── timing_gen              behavioural: Start/Stop -> EN, CLK, CLK_DLY
├── multipath_gro           behavioural: 47-stage gated ring, 6 ps/stage, gating glitch
└── tdc_core                synthesizable back end
    ├── g_cell[0..6]
    │   ├── cell_state_register   master latch (A') + slave flip-flop (B)
    │   ├── deglitch              C-element -> T
    │   └── measurement_cell
    │       ├── phase_wrap_counter   counts T, read on CLK_DLY, overflow flag
    │       ├── state_to_phase       Johnson decode -> fine
    │       └── phase_differentiator coarse*2K+fine, first difference
    └── output_adder                sum of 7 cells -> 11-bit dout
gro_tdc_pkg                 sizes and the stage-to-cell functions
```

Main parameters (package `gro_tdc_pkg` unless noted):

| name | value | meaning |
|------|-------|---------|
| `N_STAGES` | 47 | ring stages |
| `N_CELLS`, `CELL_K_MAX`, `CELL_K_MIN` | 7, 7, 5 | cells and their input counts |
| `CELL_STRIDE` | 7 | step of the stage-to-cell walk (this design's choice) |
| `OUT_W` | 11 | output width |
| `CNT_W` | 5 | wrap counter width; allows up to 31 cycles (2900 LSB) per sample |
| `CELL_OUT_W` | 9 | per-cell difference width |
| `multipath_gro.STAGE_FS` | 6000 | stage delay in fs |
| `gro_tdc.GRO_MISMATCH_FS` | 0 | stage delay spread in the ring model, fs |
| `timing_gen.TG`, `.TD` | 100, 300 ps | guard time and read delay |

All files use `` `timescale 1ps/1fs ``.

## What is RTL and what is a model

`tdc_core` and everything below it is synthesizable. It uses a latch on
purpose in two places:

* the master latch of each cell state register, whose transparent output A'
  drives the de-glitch element;
* the keeper of the C-element.

Lint tools report these latches, and that is expected. The slave latch of
each master-slave pair is written as the rising-edge flip-flop it is
equivalent to. Its input is frozen while it is open, and writing it this way
gives the CLK-clocked differentiator a clean hold time. The wrap counters are
clocked by T, a signal made from the ring, exactly as in the circuit. A
synthesis flow has to treat T and `clk_dly` as clocks.

`multipath_gro` and `timing_gen` stand for analog and delay-line circuits.
They use `#` delays and are for simulation only:

* **`multipath_gro`** switches its outputs one at a time in ring order, one
  per 6 ps of enabled time. It keeps the partly elapsed stage across the
  disabled time. It models the gating glitch: if an output switched less than
  2 ps before EN fell, it re-crosses its threshold at +15 ps and +30 ps.
  `MISMATCH_FS` gives the stages fixed, unequal delays. It is set through
  `gro_tdc.GRO_MISMATCH_FS`, with a default of 0. The delays are shifted so
  that the ring period stays 94 × 6 ps. The model does not include jitter,
  1/f noise or the slow, overlapping edges of the real ring.
* **`timing_gen`** derives EN, CLK and CLK_DLY with fixed delays. Between
  measurements, Start must fall no later than Stop.

## Departures and open choices

These points are not fixed by the circuit description and were decided
here:

* the stage-to-cell map;
* the tap polarities and the Johnson decoding;
* which inputs are A'1 and A'2;
* the counter width;
* what `overflow` means: the count wrapped since the previous read;
* the two-cycle output latency;
* the valid flag;
* the asynchronous reset;
* the guard and delay times;
* wrap-around of an 11-bit output beyond full scale.

Two parts are not included:

* The transistor-level stage (five-input multipath inverter with
  supply-gating switches) exists only as the behaviour of the ring model.
* The conventional scheme with one counter per output and a register is
  only a point of comparison and is not included.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and finishes. To run the end-to-end test with
all defaults:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/gro_tdc_pkg.sv tb/tb_gro_tdc.sv --top-module tb_gro_tdc -o sim
./obj_dir/sim
```

Substitute any other `tb/tb_<module>.sv` and its module name to run that
block's test. The simulator is two-state, so the testbenches pull reset from
1 to 0 to make sure the asynchronous reset sees an edge.

What the tests establish:

* **`tb_gro_tdc`** (full size, about 2100 samples, well under a second).
  Random intervals from 0.1 ns to 12.2 ns are followed by one full period
  (1923 samples) of the evaluation input: 1.6 ns plus a 1.2 ps peak-to-peak
  sine at 26 kHz. The testbench sums the enabled time in femtoseconds and
  requires every output to equal `floor(T_k/6ps) - floor(T_{k-1}/6ps)`. That
  is an exact check of the noise-shaped count. It also checks that the mean
  output over the positive half of the sine exceeds the mean over the
  negative half (about 266.75 against 266.58). It counts gating glitches,
  glitches on a wrap input, counter overflows, carried residues and
  large-range outputs, and fails if any of them never occurs.
  It also checks one output sample per 20 ns Start period and the
  two-edge latency.
* **`tb_gro_tdc_mismatch`** runs the same evaluation input with stage
  delays spread by up to ±1.5 ps. Every output must equal the transitions
  the ring actually made. The accumulated error against ideal time must stay
  within the largest excursion of the summed stage deviations plus 1 LSB. In
  the run, about 1.8 LSB against a bound of 2.5 LSB was seen over 2000
  samples. This bound holds because successive measurements use the stages in
  rotation, so stage mismatch is shaped like quantisation error. If the ring
  were restarted from the same stage each time, the error would grow instead.
* **`tb_tdc_core`** drives the back end with an ideal ring at up to 2047
  transitions per sample, with injected bounces on the last-switched output.
* **Block tests.** Each remaining block has its own testbench. Among them:
  the de-glitch truth table and bounce, the Johnson decode for K = 7 and
  K = 5, and counter wrap and overflow.
