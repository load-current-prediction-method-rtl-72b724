# Load-current prediction for the sustain supply of a plasma display panel

A plasma display panel (PDP) draws its sustain power in sharp discharge
pulses, from almost nothing to more than 100 A peak. The amount changes from
subfield to subfield and from one image to the next. The dc-dc converter that
feeds the sustain drivers must hold its output voltage through these steps.
The usual remedy is a large output capacitor. A cheaper remedy is to tell the
converter's controller in advance how much current is coming (feed-forward).

This RTL predicts that load current without a current sensor. Everything it
needs is already known inside the panel's digital controller:

* how many cells are lit in each subfield (from the address data), and
* when each sustain discharge fires (from the gate signals of the
  full-bridge sustain drivers).

The predictor rebuilds the pulsed discharge current from these two inputs,
passes it through digital copies of the LC input filters between converter
and drivers, and adds the X and Y results. That sum is the current the
converter will see. One sample per converter switching period is stored for
a whole TV field. During the next field the stored values are played back,
slot by slot, to the feed-forward controller.

## Signal chain

```
 address data ─► discharge_area ─► A_d ─► idpeak_lut ─► i_dpeak ──┬──────────┐
                  (S_a / 3R)                (measured curve)      │          │
 X_s ─► discharge_model (t_d window, × i_dpeak) ─► i_pdx ─► lc_filter X ─► i_ox ─┐
 Y_s ─► discharge_model (t_d window, × i_dpeak) ─► i_pdy ─► lc_filter Y ─► i_oy ─┤
                                                   ▲ T_m strobe                  │
                                                                     (+) ◄───────┘
                                                                      │ i_op
                              T_s strobe ─► prediction_sampler (register)
                                                                      │ i_op every T_s
                                              line_memory (one field) ─► ff_current
```

| module | role |
|---|---|
| `lcp_pkg` | number formats and default constants |
| `discharge_area` | counts cells selected during addressing (S_a); A_d = S_a / (3·R) |
| `idpeak_lut` | A_d → peak discharge current, 7-point measured curve, linear interpolation |
| `discharge_model` | discharge window from a gate signal; modelled current = i_dpeak while the window is open |
| `tick_gen` | T_m strobe (filters) and T_s strobe (re-sampling; restarted by each field) |
| `lc_filter` | discrete model of one LC input filter |
| `prediction_sampler` | i_op = i_ox + i_oy, saturated, registered once per T_s |
| `line_memory` | stores one field of samples; returns the previous field's value for each slot |
| `load_current_predictor` | top level: one of each block, two `discharge_model`s, two `lc_filter`s, two `tick_gen`s |

The controller that turns `ff_current` into a duty ratio is not part of this
RTL. The converter power stage, the analog filters and the panel drivers are
not part of it either.

## The discharge window

In a sustain pulse the panel discharges right after the high-side switch of
one side turns on (X_s for the X driver, Y_s for the Y driver). The discharge
lasts at most t_d = 700 ns. `discharge_model` marks that interval. It keeps
a t_d-long shift register of the gate signal and opens the window while the
gate is high now but was low t_d earlier:

    i_md = gate AND NOT gate_delayed_by_t_d

The window is therefore exactly t_d wide at every rising edge of the gate.
Pulses shorter than t_d give a shorter window. The modelled current i_pd
equals i_dpeak while the window is open and is 0 otherwise.

The method is described as an AND of the gate signal with a delayed copy of
itself. Taken literally, without the inversion, that gives a signal high for
the whole on-time minus t_d. The inverted form was chosen because it matches
the rest of the description:

* t_d is sized by the width of the widest discharge,
* the filter sampling period T_m must be shorter than t_d so that every
  discharge is sampled at least once,
* the drawings show narrow pulses at the gate's rising edges.

If your reading differs, the change is one line (`assign win`).

Because T_m (32 cycles) is shorter than t_d (35 cycles), each window is
sampled once or twice by the filter strobe, depending on its phase. The
end-to-end test sees both cases. This quantisation of pulse energy is part of
the method. Averaged over many pulses it gives the right charge.

## The filter model and why it rings

Each `lc_filter` implements

    H(z) = b (z + 1) / (z² − 2c·z + 1),   c = cos(ω T_m),  b = 1 − c,  ω = 1/√(LC)

as the difference equation

    y[n] = 2·y[n−1] − 2b·y[n−1] − y[n−2] + b·(x[n−1] + x[n−2])

with one step per T_m strobe.

* **DC gain.** Writing 2c as 2 − 2b makes H(1) = 1 exactly, whatever rounding
  the parameter `B` (b·2³⁰) has.
* **No damping.** The poles lie on the unit circle, like those of the
  lossless LC filter 1/(1 + s²LC) being modelled. A step in the input makes
  the output ring around the new level indefinitely, with peaks up to twice
  the step. This is faithful to the model, not a bug. It is also why the
  arithmetic is wide:
  * the state has 30 fraction bits, 44 bits in all;
  * the 2b·y product is rounded to nearest, not truncated.

  With b ≈ 3·10⁻⁵, a truncation bias of one output LSB per step would shift
  the ringing centre by several amperes. The output is the state saturated to
  signed Q11.12.
* **Latency.** A new input sample affects y from the next strobe on (the
  z⁻¹ in the numerator).

The filter inductances and capacitances are not known here. Both filters
default to a 2 kHz resonance at T_m = 640 ns (B = 34725). Set `B_X`/`B_Y` on
the top to `round((1 − cos(2π·f_res·T_m))·2³⁰)` for the real filters. B must
be positive and below 2²⁹.

## Peak current table

`idpeak_lut` holds the peak discharge current measured on a 42-inch HD panel
at seven values of A_d: 0, 1/6, …, 1. The default values are 17.5, 39, 48,
62, 77, 94.5 and 117 A. They were read off a plotted measurement curve, so
each may be off by about ±1 A. Replace `LUT_POINTS` (Q8.4 amperes, entry k at
A_d = k/6) with data from the target panel.

Between points the table interpolates linearly:

* A_d·6 gives the segment (integer part) and a 10-bit fraction;
* the result is floored to 1/16 A;
* A_d ≥ 1 returns the last point.

## Discharge area

`discharge_area` counts the lit cells of a subfield as address data streams
in, `LANES` cells per cycle. The default is 64 cells per cycle: the
3·1024·768 cells of a subfield then take 36 864 cycles, 0.74 ms at 50 MHz.

On `addr_done` it computes A_d = S_a/(3R) by multiplying with a constant
reciprocal, 2⁴²/(3R) rounded up. The result:

* is within one LSB of the exact quotient, and exact for S_a a multiple of
  3R/1024;
* saturates at 1.0;
* holds until the next `addr_done`.

## Line memory and field timing

The T_s divider restarts on `field_start`, so slot k of every field covers
the same 10 µs of the field. Each T_s sample of i_op is written to the next
slot. In the same cycle, the slot's previous content is read out
(read-before-write). That content is the prediction for the same moment of
the previous field, and it goes out on `ff_current`.

`ff_valid` is high only for slots that the previous field actually wrote.
There are none in the first field after reset, and a longer field than the
previous one adds slots with no valid data. Samples beyond `LINE_DEPTH`
(2048 slots, enough for 1667 at 60 Hz and T_s = 10 µs) are dropped and flagged
on `ff_overflow`. A sample in the same cycle as `field_start` goes to slot 0.

How the controller uses `ff_current`, and whether it should read some slots
ahead, is left open. The memory returns the value for the current slot only.

## Interface and per-subfield sequence

All inputs are synchronous to `clk`; the reset `rst_n` is asynchronous and
active low. Per TV field:

1. Pulse `field_start`.
2. For each subfield:
   1. pulse `sf_start`;
   2. stream the address data on `cell_sel` with `cell_valid`;
   3. pulse `addr_done`. `ad`/`ad_valid` follow one cycle later and
      `idpeak` a cycle after that;
   4. run the sustain pulses on `xs`/`ys`.
3. Take `ff_current`/`ff_valid` once per T_s, one cycle after `iop_s_valid`.

The intermediate signals (`ad`, `sa`, `idpeak`, `imdx/y`, `ipdx/y`, `iox/y`,
`iop`, `iop_s`) are brought out for observation.

Number formats:

| quantity | format |
|---|---|
| A_d | unsigned Q1.10; 1024 = whole panel lit |
| i_dpeak, i_pd | unsigned Q8.4 A |
| filter outputs, i_op, ff_current | signed Q11.12 A |

## Parameters of `load_current_predictor`

| parameter | default | meaning | origin |
|---|---|---|---|
| `TD` | 35 | t_d in clock cycles (700 ns at 50 MHz) | 700 ns from the method; the clock is assumed |
| `TM_DIV` | 32 | T_m in cycles (640 ns), must be < `TD` | assumed |
| `TS_DIV` | 500 | converter switching period T_s (10 µs) | assumed |
| `R` | 786 432 | panel resolution in pixels (1024×768) | assumed for a 42-inch HD panel |
| `LANES` | 64 | address cells per cycle | assumed |
| `B_X`, `B_Y` | 34 725 | (1 − cos ωT_m)·2³⁰ per filter (2 kHz) | assumed |
| `LINE_DEPTH` | 2048 | line-memory slots | assumed |
| `LUT_POINTS` | 280 … 1872 | i_dpeak at A_d = k/6, Q8.4 | read from a measured curve |

The 50 MHz clock itself appears only through these cycle counts.

## Where this design makes its own choices

The method fixes the structure and four things:

* t_d = 700 ns;
* T_m < t_d;
* the filter transfer function;
* A_d = S_a/(3R).

Everything below is this design's choice.

* the complemented delayed gate in the discharge window (see above);
* the clock, T_m, T_s and the filter resonances;
* the panel resolution;
* the seven-point table with interpolation, and its values (read from a plot);
* the counting interface for the address data;
* the number formats and saturation;
* read-before-write replay of the same slot in the next field, the
  valid/overflow bookkeeping and the restart of T_s at each field.

Not implemented: the duty-ratio controller that consumes the prediction (its
feed-forward law and the feedback loop around it). The power stage, input
filters and panel drivers are analog and not modelled.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares the block
against a model written independently in the testbench:

| testbench | what it checks |
|---|---|
| `tb_tick_gen` | period, first strobe, restart at every phase |
| `tb_discharge_model` | window and current every cycle against the gate history; full and short windows |
| `tb_idpeak_lut` | A_d from 0 to 1.1 against a real-valued interpolation; breakpoints exact |
| `tb_discharge_area` | random subfields on a 300-cell panel, including dark and full ones |
| `tb_lc_filter` | two resonances against a double-precision recurrence, within 1 mA; one-strobe latency; ringing after a step |
| `tb_prediction_sampler` | saturated sums; sampling only on the strobe |
| `tb_line_memory` | replay, valid flags and overflow over fields of random length |
| `tb_load_current_predictor` | end to end at the default parameters |

`tb_load_current_predictor` runs four 60 Hz fields on a 1024×768 panel. Each
field has ten subfields with 4 to 128 sustain pulses each and alternates
between two images. The last field is stretched past the line memory. The
testbench carries a model of the whole chain (gate history, both strobes,
double-precision filters) and compares every T_s sample within 10 mA. It
checks A_d and i_dpeak in every subfield and checks the line-memory replay
slot by slot. It fails if any of these never happens:

* an X window or a Y window;
* a window caught by one sample, or by two samples;
* a full-panel subfield, or a dark subfield;
* a replay;
* a T_s restart;
* an overflow.

It takes about 3.5 million cycles, a few seconds with Verilator.

Run any testbench with plain Verilator from the directory holding `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/lcp_pkg.sv tb/tb_load_current_predictor.sv \
        --top-module tb_load_current_predictor
    ./obj_dir/Vtb_load_current_predictor

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

What the tests cannot tell you:

* whether the assumed filter resonances, T_s and table values match a real
  panel;
* how close the prediction comes to a measured load current. The method was
  reported to track within about 20 %, but that depends on those calibration
  values.
