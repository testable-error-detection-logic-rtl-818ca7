# Testable error detection logic for a Blade-style timing-resilient pipeline

A timing-resilient pipeline runs with little or no timing margin. It does not prevent
late data; it detects it. Each monitored latch gets a *transition detector* on its data
input. A data transition that arrives while the latch is already transparent is a
*timing violation*: the data borrowed time from the next stage. The stage's error
detection logic (EDL) flags it, and the asynchronous stage controller slows the
handshake to recover. The detection logic is awkward to test. It is built from cells
that ATPG tools do not understand: C-elements, Q-Flops and delay lines. Much of it only
does anything when a violation happens, and a single stuck-at fault can silently switch
off detection for many latches.

This RTL implements a *testable* EDL (TEDL). Two global test inputs and a handful of AND/OR
checker gates are added. They let a tester inject a violation on every detector at once
and bypass the C-elements. Six observation outputs per stage are captured by an ordinary
MUX-D scan chain. In each of four modes a fault-free stage produces a fixed *gold pattern*
on those six outputs. A single stuck-at fault on any internal net makes at least one
pattern differ.

The default configuration matches a three-stage MIPS core ("Plasma") converted to this
template. It has 238 monitored latches split into two controller groups of 119, with
3 detectors per C-element and 4 C-elements per Q-Flop. That gives 80 C-elements and
20 Q-Flops in total.

## One stage of error detection

```
 din[i] ─┬──────────────────────────► data_latch ──► q[i]      (open while lclk = 1)
         │
         └► transition_detector ─ x[i] ─┐   3 per slice
               (DL2, M1, tv)            ▼
                            ┌── celem_slice ─────────────────┐
   lclk ─► DL1 ─► ckd ─────►│ C-element ─ w17 ─┐             │
                            │ G5 = AND(x) ─ w18┴─ M2(tm) ─► m2 ──┐   4 per group
                            └────────────────────────────────┘   ▼
                                             ┌── qflop_group ──────────────────┐
                               sample ──────►│ G2 = OR(m2) ─► Q-Flop ─► err1/0  │
                                             │ G6 = AND(m2) ──────────► g6     │
                                             └─────────────────────────────────┘
                                                               ▼  10 per stage
                                             stage_checker: w20 w11 w12 w21 w22 w23
```

* **Transition detector** (`transition_detector`). X = din XOR a copy of din delayed by
  DL2. A transition makes X pulse high for DL2. The M1 multiplexer can instead select the
  *inverted* delayed copy (`tv = 1`). X is then high whenever din is stable, which looks
  like a violation on every detector at once.
* **Compensation delay DL1.** The C-elements see the latch clock delayed by DL1 (`ckd`).
  DL1 must be at least DL2. A transition that arrives just before the latch opens has an
  X pulse that ends before `ckd` rises, so it is not reported. The window in which
  violations are caught is shifted by DL1 against the latch's open phase.
* **Asymmetric C-element** (`c_element`). It is cleared while `ckd` is low. It is set by
  any high X while `ckd` is high, and then holds. It remembers a violation for the rest of
  the phase.
* **Q-Flop** (`q_flop`). Each Q-Flop covers four C-elements through the OR gate G2. When
  the controller raises `sample` (after the latch closes), it captures G2 into a
  dual-rail result: `err1` = violation, `err0` = clean. Both rails are 0 while `sample` is
  low, so the controller can wait for one of them.
* **Stage result.** `w11` = OR of all Err1 (G3) and `w12` = AND of all Err0 (G4) are the
  dual-rail error the controller uses. They are brought out as `err1`/`err0`.

## What the test additions catch

A fault in this logic is hard to see because of the OR structure. A C-element is set by
*any* of its X inputs, and G2 fires on *any* of its C-elements. Forcing all inputs high
therefore hides any one that is stuck at 0. The added gates turn those ORs into ANDs for
observation:

| Added element | Function | Exposes |
|---|---|---|
| `tv`, M1 + inverter in each detector | force all X high | the violation path, which otherwise needs real late data |
| G5 (per C-element) | AND of the C-element's X inputs | one X line stuck at 0 (the C-element would mask it) |
| M2 (per C-element), selected by `tm` | forward the C-element (tm = 0) or G5 (tm = 1) | puts G5 in the same path as the C-element |
| G6 (per Q-Flop) | AND of the group's M2 outputs | one C-element or G5 output stuck at 0 (G2 would mask it) |
| G7 → `w20` | AND of all Err1 | one Q-Flop failing to flag (G3 would mask it) |
| G8 → `w21` | OR of all Err0 | one Err0 rail stuck at 1 |
| G9 → `w22`, G10 → `w23` | AND / OR of all G6 | a G6 output stuck low / stuck high |

### Modes and gold patterns

`{tm, tv}` selects the mode (`tedl_pkg::tedl_mode_e`). With a fault-free stage and stable
data, the observation outputs after a sample are:

| Mode | tm | tv | w20 | w11 | w12 | w21 | w22 | w23 |
|---|---|---|---|---|---|---|---|---|
| NM   | 0 | 0 | 0 | 0 | 1 | 1 | 0 | 0 |
| NMTV | 0 | 1 | 1 | 1 | 0 | 0 | 1 | 1 |
| TM   | 1 | 0 | 0 | 0 | 1 | 1 | 0 | 0 |
| TMTV | 1 | 1 | 1 | 1 | 0 | 0 | 1 | 1 |

`tedl_pkg::gold_pattern()` returns these values. Any difference marks a fault. Which
bits differ gives a first diagnosis. For example, `w23 = 1` with `w22 = 0` in NM means
one G6 output is stuck at 1.

### Test procedure

1. Fill the pipeline so every stage holds stable data and no real violations can occur.
   In the asynchronous template, a full pipeline that is waiting for an acknowledge
   gives this lock-step state.
2. For each mode, set `tm`/`tv` and run one latch cycle: `lclk` high, then low, then
   `sample` high.
3. One clock tick after `sample` rises, pulse `scan_ce` with `scan_en = 0` to capture.
   This must happen before the C-elements clear, which is DL1 ticks after `lclk` falls.
   G6, G9 and G10 read the C-elements directly in the normal modes.
4. Shift out `N_STAGES × 6` bits and compare them with the gold patterns.
5. Invert the data while the latches are closed, then repeat the four modes. A fault
   on the delayed or inverted copy inside a detector shows up only for one data value.

Scan order: the chain holds `obs` as a packed array. Bit 0 (stage 0's `w23`) comes out
first, and stage 0's `w20` is its sixth bit.

## Time model

The real detection logic is asynchronous and depends on analog delays. Here every element
runs on one fine reference clock `clk`, which stands for elapsed time:

* A delay line is a shift register. DL1 and DL2 are lengths in `clk` ticks (defaults 3
  and 2).
* The latch clock `lclk` and the Q-Flop enable `sample` are ordinary signals, sampled by
  `clk`.
* Latches, C-elements and Q-Flops update on `clk`, one tick after their inputs.

This keeps the whole design synthesizable and simulation deterministic. Timing *order*
is reproduced: pulse width, compensation window, sample-then-clear. Real delays,
metastability and the Q-Flop's metastability filter are not. To model a wider detection
pulse or margin, change `DL2` and `DL1`, keeping `DL1 >= DL2`.

## Modules

| Module | Role | Parameters (default) |
|---|---|---|
| `tedl_top` | both stages and the scan chain | `N_STAGES` (2), `N_TD` (119), `TD_PER_CE` (3), `CE_PER_QF` (4), `DL1` (3), `DL2` (2) |
| `tedl_stage` | one controller group | same, without `N_STAGES` |
| `data_latch` | the monitored latches | `WIDTH` |
| `transition_detector` | TD with `tv` injection | `DL2` |
| `delay_line` | DL1/DL2 | `DEPTH` |
| `celem_slice` | C-element + G5 + M2 | `NX` |
| `c_element` | asymmetric C-element | `NX` |
| `qflop_group` | G2 + G6 + Q-Flop | `N_CE` |
| `q_flop` | dual-rail sampling flop | none |
| `stage_checker` | G3, G4, G7–G10 | `N_QF` |
| `scan_chain` | MUX-D observation chain | `LEN` |
| `tedl_pkg` | modes, observation struct, gold patterns | none |

When `N_TD` is not a multiple of `TD_PER_CE`, the last C-element takes the remainder.
With 119 that is two detectors. Its G5 then has two inputs.

### `tedl_top` interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | reference clock; synchronous active-high reset |
| `tm`, `tv` | in | 1 | global test mode / violation injection |
| `lclk` | in | N_STAGES | latch clock of each stage (from its controller) |
| `sample` | in | N_STAGES | Q-Flop enable of each stage (from its controller) |
| `din` / `q` | in / out | N_STAGES × N_TD | latch data in and out |
| `err1`, `err0` | out | N_STAGES | dual-rail error of each stage (`w11`, `w12`) |
| `obs` | out | N_STAGES × `tedl_obs_t` | the six observation bits, also readable in parallel |
| `scan_en`, `scan_ce`, `scan_in`, `scan_out` | in/in/in/out | 1 | scan chain: shift/capture select, clock pulse, serial data |

The stage controllers and the datapath are not part of this RTL. A system supplies
`lclk`, `sample` and `din`, and reacts to `err1`/`err0`. The intended sequence per stage:

1. Raise `lclk` and lower it after the open phase.
2. Raise `sample` after `lclk` falls.
3. Wait for `err1 | err0`.
4. Lower `sample` before the next open phase.

## Simulating

Every testbench in `tb/` prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/tedl_pkg.sv tb/tb_tedl_top.sv --top-module tb_tedl_top
./obj_dir/Vtb_tedl_top
```

Substitute any other testbench name. The testbenches are:

* one per module, for the leaf modules, checking against independent reference models;
* `tb_tedl_stage`, which checks one full-size stage with:
  * all four gold patterns;
  * violations at random latches, each flagged by the right Q-Flop;
  * early transitions that must not be flagged;
  * latch transparency and hold;
* `tb_tedl_top`, which checks the whole default-size design end to end through the scan
  chain. It also counts each mechanism (four modes, violation flagged, early transition
  ignored, scan readout, latch hold) and fails if any never happened.
* `tb_fault_coverage`, which forces 17 internal nets of a full-size stage to 0 and then
  to 1, one at a time. It runs the test procedure above each time and requires every one
  of the 34 faults to change the readout. The nets are:
  * the detector output, delayed copy, inverted copy and M1 output;
  * the delayed latch clock;
  * C-element, G5 and M2 outputs, including the two-input slice;
  * G2, G6, Err1 and Err0;
  * the stage's `tv`.

All of them run in seconds at the default size.

## Where this RTL interprets or departs from the original design

* **Checker wiring.** The exact inputs of G5, G6 and G7–G10 are reconstructed from the
  gold patterns and the fault examples of the original design:
  * G5 is the AND of one C-element's X inputs.
  * G6 is the AND of the M2 outputs that feed one Q-Flop.

  The other plausible reading, G6 as the AND of the G5 outputs, leaves a C-element output
  stuck at 0 undetectable behind G2. It was rejected because full coverage is the point
  of the design.
* **Scan chain length.** Six scan flops per stage, 12 in all. The reference design's cell
  count lists 14 MUX-D cells, and the two extra cells are unexplained.
* **Not detectable.** A stuck `tm` input is not detectable with stable data. The two paths
  it selects between agree in every mode. It is a primary test input, not one of the
  internal nets that full coverage refers to.
* **Timing.** Delays are in reference-clock ticks with assumed values (DL1 = 3, DL2 = 2).
  The original gives no numbers. The separate `sample` input stands for the controller's
  Q-Flop enable. The scan capture timing is a choice of this design (capture in the
  DL1 window after the latch closes).
* **Q-Flop.** Modelled as a flop whose rails are cleared while its enable is low. The
  metastability filter is not modelled.
* **Reset.** Reset behaviour (clear all state; delay lines load their input) is this
  design's own choice.
* **Area.** The area figures of the original (about +55% EDL area, +4.6% for the whole
  core in 28 nm FDSOI) cannot be reproduced from RTL. The structure is the same cell for
  cell, so the relative gate counts can be compared with the module table above.
