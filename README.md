# Squarewave BIST for crosstalk glitch faults

A coupling capacitance between two wires (an *aggressor* and a *victim*) makes
the victim glitch whenever the aggressor switches. In a combinational core the
glitch may reach an output flip-flop and be captured as a wrong value. Such
faults are hard to test with ordinary two-vector patterns because the glitch
only matters if it arrives at the sampling instant.

This RTL implements a built-in self-test that gets around the timing problem.
One core input is driven with a **squarewave** while all other inputs hold a
random pattern. Every wire on a path sensitized from that input now oscillates,
so any wire coupled to one of them glitches again and again. The outputs that
*should* follow the squarewave are learned first. Then every other output is
watched while the squarewave runs. If one of them changes between two
consecutive samples, a glitch was captured and a crosstalk fault is reported.
The squarewave visits every input in turn, and the whole sequence repeats for a
number of random patterns.

All of the test logic lives in modified boundary-scan cells. On the input side,
the capture registers become an LFSR (the random pattern) and a walking-one
register (which input gets the squarewave). On the output side, each cell gets a
small detection circuit.

The scheme is taken from the thesis *VLSI Crosstalk Fault Testing with
Oscillation Signals*, which also proposes a second, analog test for interconnect
pairs based on critical-width pulses. A pulse detector for that test, and a
behavioural model of the line pair, are included as a separate part.

## Block diagram

```
            pins_in[M]                                 from_core[N]
                |                                           |
   +------------v-------------+     to_core[M]   +----------v-------------+
   | bs_in_register (M cells) |----------------->|  core (not included)   |
   |  LFSR / walking one / MUX|                  +----------+-------------+
   +------------^-------------+                             |
                | sq                           +------------v-------------+
           +----+----+                         | bs_out_register (N cells)|--> pins_out[N]
           |  sq_gen |                         |  Cap, Update, DM, ED     |--> err_flags[N]
           +----^----+                         +------------^-------------+
                | sq_mode      in_ctrl / out_ctrl           |
           +----+-----------------------+-------------------+
           |          bist_controller (phases 1-2-3)        |
           +-----------------------------------------------+
   tdi -> input cells -> output cells -> tdo  (ordinary scan path when idle)

   line_ai/line_vi --> interconnect_pair_model --> line_ao/line_vo
                                                          |
                                  pulse_detector <--------+  (interconnect test, separate)
                                        |
                                        +--> pd_detected
```

## One test, phase by phase

A *test* is one input under squarewave for one random pattern. A *pattern* is M
tests. The controller (`bist_controller`) produces every control as a one-cycle
enable of a single test clock `clk`.

| Phase | State | Cycles | What happens |
|---|---|---|---|
| 1 pattern | `P1_RELOAD` | 1 | input Cap registers reload the LFSR state from Update; error flags cleared (EDR) |
| | `P1_LFSR` | 1 | one LFSR step in the Cap registers |
| | `P1_UPDATE` | 1 | Update takes the new pattern; the core sees it |
| | `P1_LOAD` | M | the Cap chain shifts in `0...01`, leaving a single 1 at input 0 |
| 2 select | `P2_ZERO` | 1 | selected input = Sq = 0, outputs settle |
| | `P2_CAP` | 1 | output Cap registers capture the outputs for Sq = 0 |
| | `P2_ONE`, `P2_HOLD` | 2 | Sq = 1. The detection-mode latch DM of each output stores (live output XOR Cap), i.e. whether the output follows Sq |
| 3 oscillate | `P3_OSC` | `OSC_CYCLES` | Sq toggles every clock. Output Cap and Update capture on every clock. The error detectors look from the third cycle on |
| | `P3_SHIFT` | 1 | the walking one moves to the next input (or, after the last input, `pattern_done` pulses) |

Run length: `1 + NUM_PATTERNS * (M + 3 + M * (OSC_CYCLES + 5))` clocks after
`bist_start`. With the defaults this is 886 clocks.

Phase 2 has two settling cycles: `P2_ZERO` before the capture and `P2_HOLD`
before DM is final. They exist so that DM compares *settled* output values. A
glitch caused by the Sq step itself must not make a quiet output look
sensitized. Had it done so, that output would be excused in phase 3, and the
glitches that the test is looking for would be missed.

## The output cell: how a glitch is recognised

Each `bs_out_cell` computes, from the live core output `A`, its capture
register `Cap` and its update register `B = Update`:

```
C = DMLE ? A : B          phase 2: live value;  phase 3: previous sample
E = C ^ Cap               Xor1: "the output changed"
D = DM latch of E         held after phase 2: "this output follows Sq"
F = D ^ E                 Xor2: "behaviour differs from what phase 2 predicted"
G = sticky (F while Det_ck = 0), cleared by EDR
Out = TM ? (CTM ? G : Update) : A-from-core
```

In phase 3, Cap holds sample *k* and Update holds sample *k-1*. Sq toggles
every clock, so a sensitized output gives E = 1 on every cycle and F = 0. A
quiet output gives E = 0 and F = 0. F = 1 means one of two things:

* a quiet output changed, because a glitch was captured (the crosstalk fault);
* a sensitized output failed to toggle, which also flags a defect.

`Det_ck` is active low, as in the original drawing. It is held high for the
first two oscillation cycles, because until then Update still holds a phase-2
sample.

The error flags are cleared only in phase 1, so `err_flags` gathers the results
of all M tests of a pattern. Read them while `pattern_done` is high. During the
BIST, `pins_out` shows the same flags. `fault_found` is the sticky OR of the
flags over the whole run.

## The input register: LFSR, walking one and squarewave multiplexer

`bs_in_cell` is an ordinary boundary-scan input cell (Cap and Update
registers) with two multiplexers:

| scan_reload | Cap loads |
|---|---|
| 0 | the 3-to-1 MUX output (pin capture in normal mode, Update in test mode) |
| 1 | the serial input (previous cell or LFSR feedback) |

| test_mode, Cap, ctm | core input |
|---|---|
| 0 x x | pin |
| 1 0 x | Update |
| 1 1 0 | Update |
| 1 1 1 | Sq |

`bs_in_register` chains M cells. With `lfsr_mode = 1`, each group of four
cells is a Fibonacci LFSR with the primitive polynomial 1 + x + x^4:

```
cap[b] <= cap[b+3] ^ cap[b+2]
cap[b+k] <= cap[b+k-1]
```

The period is 15. Wide registers are split into these 4-bit segments, which
is why M must be a multiple of 4. Segment *s* starts from the seed
`(s mod 15) + 1`, and after reset that seed sits in the Update registers.

The same Cap chain later holds the walking one. The LFSR state survives this
because it is kept in Update and copied back into Cap (`P1_RELOAD`) before the
next LFSR step.

## Interconnect test with a critical-width pulse

The second scheme tests a single aggressor/victim wire pair. A pulse on an RC
line reaches the far end only if it is at least as wide as the line's
*critical width* (CW); narrower pulses are absorbed. If the aggressor switches
the opposite way at the same moment, the coupling capacitance Cf widens the CW:
about 1.48 ps per fF for a 400 um line whose fault-free CW is 161 ps. The test
therefore applies a victim pulse exactly as wide as the CW allowed for the
acceptable Cf, together with an opposite aggressor edge. If the pulse arrives,
the coupling is within limits.

* `pulse_detector` (synthesizable) is a flag. It is set asynchronously by the
  leading edge of a pulse at the victim output `vo`, and cleared by `clr` or by
  reset. A two-flop synchroniser gives `detected_sync`. `POSITIVE = 0` looks
  for 0-pulses instead.
* `interconnect_pair_model` (behavioural, not synthesizable) applies the
  linear CW law above with a ±50 ps coincidence window. It has a fixed line
  delay of 284 ps and passes the pulse unchanged. Use it to exercise the
  detector and test sequences. It is not an electrical model.
* In `xtalk_bist_top` the model's victim output drives the detector. The
  top parameter `LINE_CF_FF` sets the model's coupling capacitance. The model
  makes the top a simulation-only module as a whole. For synthesis, take the
  BIST blocks and `pulse_detector` without it: each of them synthesizes on its
  own.

The pulse generator itself needs analog control of pulse width. It is not part
of this RTL.

## Parameters (`xtalk_bist_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `M` | 4 | core inputs = scan-in cells; multiple of 4 |
| `N` | 4 | core outputs = scan-out cells |
| `NUM_PATTERNS` | 15 | random patterns per run (one LFSR period) |
| `OSC_CYCLES` | 8 | oscillation cycles per test (at least 3) |
| `LINE_CF_FF` | 0.0 | coupling capacitance (fF) of the modelled line pair |

The defaults are small: a 4-bit register and four outputs. For a real core,
set `M` to its input count rounded up to a multiple of 4, and `N` to its output
count. For example, a 178-input core needs `M = 180`.

## Top-level ports

* `clk`, `rst_n`: test clock and asynchronous active-low reset.
* `bist_start`: starts a run. Hold it high until `bist_done`, then drop it to
  return to idle.
* Status outputs:
  * `bist_phase`: the current phase.
  * `bist_bit`: the input now under test.
  * `bist_pattern`: the number of patterns finished.
  * `pattern_done`, `err_flags`, `fault_found`: results, described above.
* `use_ext_sq`, `ext_sq`: take the oscillation from outside instead of the
  internal toggle flip-flop.
* `ext_in_ctrl`, `ext_out_ctrl`, `tdi`, `tdo`: ordinary boundary-scan control
  while idle.
  * The control bundles are the packed structs `in_ctrl_t` and `out_ctrl_t` in
    `xtalk_pkg`.
  * The scan path runs tdi → input cells 0..M-1 → output cells 0..N-1 → tdo.
  * In idle, `test_mode = 0` makes every cell transparent: pins to core, and
    core to pins.
* `pins_in`, `to_core`, `from_core`, `pins_out`: chip pins and core ports.
* `line_ai`, `line_vi`: near ends of the aggressor and victim lines, driven by
  an external pulse generator.
* `line_ao`, `line_vo`: far ends of the two lines.
* `pd_clear`, `pd_detected_raw`, `pd_detected`: pulse detector on `line_vo`.

An assertion in the top checks that exactly one input carries the squarewave
during phases 2 and 3.

## Where this RTL departs from the original circuits

* **One clock.** The original clocks each register group separately (TCK0,
  TCK1, capture, update and detection clocks, all synchronous with the test
  clock). Here these are enables of one clock.
* **DM and ED are clocked.** The detection-mode latch is an enabled register.
  The error detector evaluates `G = (G | (F & ~Det_ck)) & ~EDR` at each clock
  edge, not level-sensitively. A glitch is therefore detected only if it is
  present in a captured sample. This matches the stated aim of catching glitches
  that would upset the flip-flops in normal operation. It does not catch
  glitches that merely pass by between samples.
* **Phase-2 order.** Sq is 0 first, then 1. The source describes the order both
  ways; the detection logic is symmetric.
* **Polarity flip.** The selected input is not inverted from its random value.
  Sq drives it to 0 and then to 1. Any output that follows is sensitized,
  whatever the random value of that bit was, so the result is the same.
* **One LFSR step per pattern.** Each new pattern advances the LFSR by exactly
  one clock. The 4-bit segments step in parallel, so consecutive patterns are
  related. This holds down the run length but gives less random patterns than
  a single long LFSR.
* **Choices of this RTL.** The following are not specified by the source: all
  cycle counts, the settling cycles, the per-segment seeds, the way the single
  1 is loaded, the reset values, the toggle-per-clock oscillator and the scan
  chain order.
* **Not included.**
  * The core under test.
  * The IEEE 1149.1 TAP controller; its signals come in as ports.
  * The critical-width pulse generator.
  * The test generation and fault simulation programs that estimate fault
    coverage.
* **Interconnect model.** The model uses the 400 um numbers: fault-free delay
  284 ps and CW 161 ps. The delay growth with Cf (about 1.02 ps/fF) is not
  modelled, and neither are 0-pulses.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    -Irtl -Itb rtl/xtalk_pkg.sv tb/tb_xtalk_bist_top.sv \
    --top-module tb_xtalk_bist_top -o sim
./obj_dir/sim
```

`tb_xtalk_bist_top` runs the design at its default parameters. The core is the
model `tb/xt_cut_model.sv`: an aggressor `X = in0 ^ in1` and a victim
`Y = in2 & in3`. When the coupling is enabled, a rising X inverts a low Y, and
a falling X inverts a high Y, for one clock.

The test runs three full BIST runs:

* on a fault-free core;
* on a faulty core;
* on the faulty core again, with an external squarewave.

For every pattern it predicts the error flags independently, from the core's
logic and its own LFSR model. It also checks:

* the core inputs and the walking one;
* the run length;
* scan shifting and normal-mode pass-through;
* the line pair and its pulse detector: a 170 ps victim pulse arrives and is
  detected, and a 150 ps pulse is absorbed.

Finally it requires that every mechanism occurred at least once.

`tb_bist_wide` runs the BIST at a benchmark-sized width: M = 180 inputs and 180
outputs, built from 45 copies of the same small core, with couplings in a
random subset of the copies.

The unit testbenches compare each cell with a reference model under random
stimulus (`tb_bs_in_cell`, `tb_bs_out_cell`, `tb_dm_latch`,
`tb_error_detector`), or check directed sequences:

* `tb_bs_in_register`: LFSR period 15 and the walking one;
* `tb_bist_controller`: per-signal cycle counts over a run;
* `tb_interconnect_pair_model`: pulses just under and over the critical width.

## Files

| File | Contents |
|---|---|
| `rtl/xtalk_pkg.sv` | phase and Sq-mode enums, control structs, LFSR segment width |
| `rtl/bs_in_cell.sv`, `rtl/bs_in_register.sv` | input side |
| `rtl/dm_latch.sv`, `rtl/error_detector.sv`, `rtl/bs_out_cell.sv`, `rtl/bs_out_register.sv` | output side |
| `rtl/sq_gen.sv` | squarewave source |
| `rtl/bist_controller.sv` | phase sequencer |
| `rtl/xtalk_bist_top.sv` | top |
| `rtl/pulse_detector.sv` | interconnect pulse detector |
| `rtl/interconnect_pair_model.sv` | behavioural line-pair model |
| `tb/` | testbenches and the core model |
