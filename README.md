# A fully synthesizable digital low-dropout regulator

A low-dropout regulator (LDO) keeps a supply rail, VOUT, at a reference level
VREF a few tens of millivolts below its input supply VSUP. A digital LDO does
this with a bank of switches between VSUP and VOUT. A comparator checks once
per clock whether VOUT is above or below VREF, and a controller turns switches
on or off in response.

This design builds every part of that loop from ordinary standard cells, so
the whole regulator can go through a normal synthesis and place-and-route
flow:

- **Comparator.** A clocked comparator made of cross-coupled NAND and NOR
  gates replaces the analog comparator.
- **Power switches.** High-threshold tri-state buffers replace the custom
  PMOS power transistors. Each buffer has its input tied to VSUP and its
  output on VOUT, and its enable decides whether it conducts.
- **Controller.** A small synthesizable controller drives the buffer enables.

Long shift registers would make a single-step controller slow and leaky, so
the buffers are split into four sections of falling strength. The controller
tunes them one after the other: coarse, then medium, then fine, then
"quivering". At the 10 MHz, 0.5 V / 0.45 V operating point used throughout,
the regulator is meant to carry loads of up to 2 mA.

Two variants share the RTL and are selected by the parameter `FREEZE_MODE` of
the top module `tfs_ldo`:

| `FREEZE_MODE` | variant | steady state |
|---|---|---|
| 1 (default) | quad-loop regulator with freeze mode | When VOUT sits inside a ±0.2 % window around VREF, every register holds. A separate window detector wakes the loop when VOUT leaves the window. |
| 0 | earlier tri-loop regulator | It never stops. One x1 buffer keeps toggling around VREF. |

## The power stage

| section | buffers | strength | enable bus | weight in x1 units |
|---|---|---|---|---|
| coarse (CT) | 13 | x64 | `ct[12:0]` | 64 each |
| medium (MT) | 4 | x16 | `mt[3:0]` | 16 each |
| fine (FT) | 4 | x4 | `ft[3:0]` | 4 each |
| quivering (QT) | 4 | x1 | `qt[3:0]` | 1 each |

All sections together give 916 x1 units. The ranges are nested:

- The medium section's full range (4 × 16 = 64) equals one coarse step.
- The fine section's full range (16) equals one medium step.
- The quivering section's full range (4) equals one fine step.

So after a loop stops within one of its own steps of the target, the next
loop can always cover what is left.

Each section is driven by a bidirectional shift register (Bi-SR):

- **Shift left** moves the word up one place and puts a 1 into bit 0. One
  more buffer turns on.
- **Shift right** moves the word down one place and puts a 0 into the top
  bit. The buffer turned on most recently turns off.

The codes are therefore always thermometer codes (a run of ones from bit 0),
and VOUT moves by exactly one buffer of one section per clock cycle.

## How the controller tunes (the part worth reading slowly)

The controller (`dldoc`) contains:

- a phase FSM (`dldo_fsm`);
- three loop control units (`tuning_ctrl`, each a `bisr` plus a
  `seq_detector`) for coarse, medium and fine;
- the quivering unit (`qtu`, a `bisr` plus a `quiver_detector`).

The comparator bit `cmp` is 1 when VOUT is below VREF.

**One loop at a time.** In the coarse, medium and fine phases the FSM passes
`cmp` to the owning loop as INC (`cmp` = 1) or DEC (`cmp` = 0). The other
loops see neither and hold their code.

**When a loop stops.** The active loop shifts once per cycle until its
sequence detector sees the comparator go **0 then 1**. That pattern means VOUT
went above VREF, one buffer was removed, and VOUT is now just below VREF.

- The detection is combinational, so the loop does not shift in that cycle.
- Its `done` flag moves the FSM to the next phase on the same clock edge.
- Each loop therefore stops with VOUT less than one of its own steps *below*
  VREF, and the next, finer loop starts by adding buffers.
- A loop also stops when it is asked to move past the end of its register,
  because the "0 then 1" pattern could then never come.

**Worked example.** Take a target of 300.5 units (VOUT crosses VREF between
300 and 301 units), starting from reset:

| phase | what happens | clock edges |
|---|---|---|
| coarse | 5 shifts to 320 units, 1 back to 256, then the phase change | 7 |
| medium | 3 shifts to 304, 1 back to 288, then the phase change | 5 |
| fine | 4 shifts to 304, 1 back to 300, then the phase change | 6 |
| quivering | 1 shift to 301, 1 back to 300, then freeze | 3 |

Freeze is reached 21 edges after reset with exactly 300 units on. `tb_dldoc`
checks this cycle count and the per-section codes.

**Quivering.** After the fine loop, the quivering unit steps its four x1
buffers toward VREF every cycle. In steady state this toggles one buffer and
keeps VOUT within one x1 step of VREF. Its detector looks for two things:

- **"0 then 1".** VOUT is toggling around VREF. With freeze mode, and if the
  window detector also reports VOUT inside VREFL..VREFH, the unit requests
  freeze and holds its code.
- **No toggle for four cycles.** Five equal comparator samples in a row (the
  first sample plus four more cycles) mean the load changed more than four
  x1 buffers can absorb. The detector pulses `rst1`, and on that edge:
  - the FSM returns to coarse tuning;
  - the medium, fine and quivering registers are cleared;
  - the coarse register keeps its code, and only its detector is re-armed,
    so coarse tuning resumes from where it stood.

**Freeze.** In freeze every register holds and the main comparator's clock
is stopped. The overshoot/undershoot detector
(`oud`) compares VOUT with VREFH and VREFL in two more comparators and
combines the two decisions with an XNOR, so its output is 1 whenever VOUT is
outside the window. A 1 moves the FSM back to quivering. A small disturbance
is then corrected by quivering and the loop freezes again. A large one runs
into the four-cycle fallback and the whole coarse → medium → fine → quivering
sequence runs again.

The window must be wider than one x1 step at the operating point for freeze
to be reachable. At VSUP = 0.5 V and 0.5–2 mA one x1 step moves VOUT by
0.07–0.27 mV, well inside ±0.9 mV. With VSUP = 1 V and VREF = 0.45 V a step
is several millivolts. The quad-loop regulator then simply keeps quivering,
which the end-to-end test shows.

## The comparator

`fs_com` is a **behavioural model**. The real circuit is standard cells whose
useful behaviour is an analog race: two cross-coupled gate pairs discharge,
and the faster one wins. Logic simulation cannot reproduce that. The model
keeps the structure visible at the logic level:

- **NAND stage.** Its outputs S2/R2 rest at 0. When it resolves it drives
  S2 = 1 (VINP above VINN) or R2 = 1 (below). It resolves only when the
  common-mode level is high enough (by default at or above 0.4·VSUP).
- **NOR stage.** Its outputs S1/R1 also rest at 0. When it resolves it drives
  R1 = 1 (VINP above VINN) or S1 = 1 (below). It resolves only when the
  common-mode level is low enough (by default at or below 0.6·VSUP).
- **Control signal generator.** An inverter on each input, followed by a
  NAND2, gives `stg_sel`. If either input is above VSUP/2, the NAND stage is
  used; otherwise the NOR stage is used. In the overlap region this picks the
  faster NAND stage.
- **Controlled latches.** `stg_sel = 1` blocks S1/R1 and `stg_sel = 0` blocks
  S2/R2, so only one stage reaches the output latch.
- **Output latch.** It takes the decision of whichever stage is active. The
  decision appears `TPD_NS` (0.662 ns) after the rising clock edge and holds
  while the clock is low. If the selected stage is out of range, neither
  stage drives the latch and the previous output is kept. If both stages were active at once
  (the controlled latches prevent it), both outputs would go low for VINP
  above VINN and high otherwise, which is the known failure of the ungated
  two-stage circuit.

The stage ranges 0.4 and 0.6 are assumptions; the design gives only the
qualitative regions.

In `tfs_ldo` the comparators are clocked on the inverted clock. Each decision
is taken mid-cycle on the VOUT produced by the code of the preceding rising
edge, and the controller uses it at the next rising edge. This gives one code
step per cycle with no extra cycle of loop delay.

VOUT goes to the comparator directly, with no resistor divider, so the
regulated level equals VREF.

## Files

| file | role |
|---|---|
| `rtl/ldo_pkg.sv` | section widths and strengths, fallback timeout, FSM state type |
| `rtl/bisr.sv` | bidirectional shift register |
| `rtl/seq_detector.sv` | "0 then 1" detector of a tuning loop, saturation exit |
| `rtl/tuning_ctrl.sv` | loop control unit: Bi-SR + detector + shift gating |
| `rtl/quiver_detector.sv` | quivering detector: four-cycle fallback, lock |
| `rtl/qtu.sv` | quivering unit: x1 Bi-SR, fallback, freeze request |
| `rtl/dldo_fsm.sv` | phase FSM, INC/DEC routing |
| `rtl/dldoc.sv` | the synthesizable controller |
| `rtl/fs_com.sv` | comparator (behavioural model) |
| `rtl/oud.sv` | window detector: two comparators + XNOR (behavioural model) |
| `rtl/tba.sv` | tri-state buffer array as conductances (behavioural model) |
| `rtl/tfs_ldo.sv` | top: comparator, window detector, controller, buffer array |
| `tb/ldo_plant.sv` | output node for simulation: 50 pF and a resistive load |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus two end-to-end |

The synthesizable core is `dldoc` and everything under it: 42 flip-flops. The
comparator, the window detector and the buffer array are analog-acting cells
in the real design. Here they are models with `real` ports, and so is the
top, which wires them to the controller. `tba` models each enabled buffer as
a conductance of `G_UNIT_S` (60 µS) per x1 unit. That value is an
assumption, chosen so that the coarse section alone can carry 2 mA at 50 mV
dropout.

### Top-level interface (`tfs_ldo`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | controller clock; synchronous active-high reset (all Bi-SRs to zero, coarse phase) |
| `vsup`, `vref`, `vrefh`, `vrefl` | in, real | supply, reference, window limits |
| `vout` | in, real | the sensed output node |
| `g_tba`, `i_tba`, `units` | out | conductance, current and x1 units delivered by the enabled buffers |
| `ct`, `mt`, `ft`, `qt` | out | buffer enables (13/4/4/4) |
| `state` | out | controller phase (`ldo_pkg::ctrl_state_e`) |
| `cmp_out`, `out_window`, `freeze`, `rst1` | out | comparator decision, window flag, freeze mode, fallback pulse |

The output capacitor and the load are outside the top. In simulation they are
`tb/ldo_plant.sv`, which advances the node with the exact exponential solution
of `C dV/dt = g (VSUP − V) − V/R` every nanosecond.

## Choices this RTL makes where the design leaves room

- The reset is synchronous and active high. Codes start at zero, as
  specified.
- A loop also finishes when it saturates. Without this rule a loop asked to
  go past its end would wait for ever.
- The first comparator sample after a loop is armed is never paired with a
  stale one.
- The fallback triggers after five equal samples: the first sample plus four
  cycles without a toggle.
- Freeze needs both the quivering "0 then 1" pattern and the window detector
  reporting "inside". The design credits freeze entry to both units.
- On fallback the coarse code is kept, and only the medium, fine and
  quivering registers are cleared.
- The comparators sample on the falling clock edge.
- Comparator stage ranges, buffer conductance and load model are modelling
  assumptions and do not come from the design.
- The maximum load is 2 mA, as the text states for both variants. One
  comparison table lists 50 mA for the tri-loop regulator. That would need
  about 16,700 x1 units at the assumed conductance, against the 916 built.
- Freeze mode saves power by stopping the main comparator's clock, which is
  gated with `!freeze`. The controller registers simply hold. The window
  detector keeps sampling. The gate cannot glitch, because `freeze` changes
  just after a rising clock edge, while the comparator clock (the inverted
  clock) is already low. How much power this saves is not modelled.

## Verification

Every testbench is self-checking and ends with a `TB_RESULT` line. The
expected values are worked out independently of the RTL: reference models in
the testbench, closed-form step counts, or the plant equations.

| testbench | what it shows |
|---|---|
| `tb_bisr` | fill rules, 13-cycle full ramp, random sequences against a model |
| `tb_seq_detector` | "0 then 1" only, saturation exit, sticky done, re-arm, random against a model |
| `tb_tuning_ctrl` | closed loop on an ideal output: stops at floor(t) after ceil(t)+1 edges; downward, saturation, clear |
| `tb_quiver_detector` | fallback on the fifth equal sample, never while toggling; lock; random against a model |
| `tb_qtu` | freeze at the right code, no freeze outside the window or without freeze mode, fallback with saturated code |
| `tb_dldo_fsm` | published phase order; 2000 random cycles against a next-state table for both variants |
| `tb_dldoc` | 21-edge start-up to freeze at 300 units, re-tuning after large steps up and down, sub-unit step absorbed |
| `tb_fs_com`, `tb_oud`, `tb_tba` | comparator decisions, stage select, delay and hold; window flag; weighted unit count and current |
| `tb_tfs_ldo` | whole regulator at default parameters (details below) |
| `tb_fs_ldo_triloop` | the same scenario with `FREEZE_MODE = 0` |

`tb_tfs_ldo` runs the whole regulator at its default parameters:

- start-up at 0.5 mA;
- load steps 0.5 → 2 → 0.5 mA;
- a one-unit step that quivering must absorb without fallback;
- the 1 V / 0.95 V operating point;
- a line sweep of VSUP over 0.5, 0.75 and 1 V at VREF 0.45 V.

At each point it checks:

- VOUT is within one fine step of VREF;
- the number of enabled units matches the load;
- the controller is in steady state;
- nothing moves and the main comparator is not clocked while frozen;
- every mechanism occurred at least once.

In this model, 1 % settling after the 0.5 → 2 mA step takes 14 cycles
(1.4 µs at 10 MHz). The design reports 0.91 µs and 1.2 µs for the two
variants from post-layout simulation. The model's figure depends on the
assumed buffer conductance and is not a prediction.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ldo_pkg.sv tb/tb_tfs_ldo.sv \
    --top-module tb_tfs_ldo -Mdir obj_tb_tfs_ldo
./obj_tb_tfs_ldo/Vtb_tfs_ldo
```

Every run takes well under a second. Files use `timescale 1ns / 1ps`.

## How far to trust it

- The controller is the part with the most published detail: the phase
  order, the one-buffer-per-cycle shifting, the "01" hand-over, the
  four-cycle fallback, the register clearing and the freeze/window behaviour.
  It is tested in isolation and in closed loop.
- The analog-acting parts are deliberately simple. They are good for
  exercising the controller, not for predicting ripple, offset or transient
  figures.
- Porting to a real cell library means replacing `fs_com`, `oud` and `tba`
  with the cell-level netlists of the comparator and the buffer array, kept
  out of synthesis optimisation. The controller can be synthesized as it is.
