# Swappable-oscillator capacitance-to-digital converter

A capacitance-to-digital converter (CDC) meant to run straight from a tiny
energy harvester: no voltage regulator, no current or voltage reference, no
reference clock and no factory trimming. It measures an unknown capacitance
`Cx` against an on-chip reference `CREF` (500 fF) with two nominally identical
relaxation oscillators and two counters. Because the result is a ratio of two
oscillator periods, whatever the supply voltage, process corner or temperature
does to both oscillators cancels. What does not cancel is the mismatch between
the two oscillators, and that is removed by a self-calibration that needs no
known load and can run with `Cx` connected.

This repository holds synthesizable SystemVerilog for the digital part (counters,
counter multiplexers, control unit, calibration unit) and behavioural models of
the analog parts (oscillators, capacitor switch box, calibration capacitor
banks), wired into one simulatable top, `cdc_top`.

## How one readout works

Each oscillator's period is proportional to the capacitance on its load port,
`T = R_OSC * C`, where `R_OSC` (a capacitance-to-period gain) drifts with supply,
process and temperature but drifts the same way in both oscillators.

* **Counter #1** (down-counter, `cdc_down_counter`) is preset to an integer `M`
  and counts down on one oscillator. It defines the measurement window: exactly
  `M` periods of that oscillator. When it reaches 0 it raises `ENDCOUNT1`.
* **Counter #2** (up-counter, `cdc_up_counter`) is cleared to 0 and counts the
  rising edges of the other oscillator while the window is open. It is frozen
  as soon as counter #1 reaches 0. Its final value is the result `n`.

So `n ≈ M * T_window / T_counted`, with a quantisation error below one count.

## Direct and swapped loads: the conversion flowchart

The cap switch box connects the loads in one of two ways:

| load position | OSC1 load | OSC2 load | window (counter #1 on OSC1) | result |
|---|---|---|---|---|
| direct  | `Cx`   | `CREF` | `M * Tx`   | `Cx = n / M * CREF` |
| swapped | `CREF` | `Cx`   | `M * TREF` | `Cx = M / n * CREF` |

The relative error is at most `1/n` in both cases, so the position that makes
`n` larger is the better one: direct when `Cx > CREF`, swapped when
`Cx < CREF`. Since `Cx` is not known in advance, a conversion (`start_meas`)
does a direct readout first; if `n > M` the guess `Cx > CREF` was right and
that `n` is the result, otherwise the readout is repeated with swapped loads.
Either way `n > M` (or very nearly) and a larger `M` gives a finer result at a
proportionally longer conversion time.

The converter reports the raw count `out_n` and a flag `out_swapped` saying
which formula applies; no division is done in hardware. An application that
wants a capacitance computes `n/M*CREF` or `M/n*CREF`, and usually subtracts a
fixed offset for pad, bond-wire and board parasitics (about 2 pF on the
reference test setup).

## Double swapping and self-calibration

This is the least obvious part of the design. Besides the loads, the two
*counters* can also be swapped between the oscillators (`cdc_counter_mux`): in
swapped counter position OSC2 drives counter #1 (the window) and OSC1 drives
counter #2. Combining the two swaps gives four modes; calibration uses two:

* **direct-direct**: `Cx` on OSC1, OSC1 makes the window.
  `n1 = M * R1*Cx / (R2*CREF)`
* **swapped-swapped**: `Cx` on OSC2, OSC2 makes the window.
  `n2 = M * R2*Cx / (R1*CREF)`

With matched oscillators (`R1 = R2`) both give the same count whatever `Cx`
is. With mismatch, `n1 - n2 = M * (R1/R2 - R2/R1) * Cx/CREF`, whose sign tells
which oscillator is faster, independently of `Cx`. That is why no known test
capacitance and no disconnection of the sensor are needed.

Each oscillator has a bank of four binary-weighted calibration capacitors
(`CCAL1` on OSC1, `CCAL2` on OSC2, step 10 fF, codes `S_CAL1`, `S_CAL2`) in
parallel with its load port. Adding capacitance slows an oscillator down, so
the calibration unit (`cdc_calibration_unit`) only ever slows the faster one:

1. **A** read `n1` (direct-direct), **B** read `n2` (swapped-swapped), both with
   codes 0000.
2. **C** compare: `n1 = n2` ends calibration; `n1 < n2` (OSC1 faster) selects
   `CCAL1`; `n1 > n2` (OSC2 faster) selects `CCAL2`. The other bank stays 0000.
3. For each bit from the MSB down (successive approximation): **D** set the bit,
   **E** read `n1`, **F** read `n2`, **G** clear the bit again if it overshot —
   `n1 > n2` while tuning `CCAL1`, `n1 < n2` while tuning `CCAL2` — and **H**
   move on until the LSB is done.

That is 2 + 2×4 = 10 readouts. The final code is the largest one that does not
overshoot, which leaves the residual mismatch below one 10 fF step. Example:
with OSC1 faster the `CCAL1` code might go 1000 → (overshoot) 0100 → 0110 → 0111.

Two consequences worth knowing:

* The calibration capacitance sits on the oscillator's load port, so it adds to
  whatever that oscillator is loaded with. In a direct conversion on a
  calibrated `CCAL1`, `Cx` reads high by the bank's capacitance; in a swapped
  conversion on a calibrated `CCAL2`, the same applies to `Cx` on OSC2. It is an
  offset of at most 150 fF, to be handled like the pad offset.
* Because the faster oscillator is always slowed, calibration moves conversion
  time towards that of the slower native oscillator.

## Clocks and timing

There is no reference clock. The control unit and the calibration unit are
clocked by the OSC2 output `f_ref`; the counters are clocked by whichever
oscillator the counter mux gives them. The consequences:

* Counter #1 is preset and counter #2 cleared asynchronously by `cnt_load` from
  the control unit, which is held high for 3 control cycles before each readout.
  The load and counter swaps only change while `cnt_load` is high, so glitches
  on the switched clocks cannot corrupt a count.
* After `cnt_load` falls and `EN1`/`EN2` rise, the first edge of the window
  oscillator only opens the window; each of the next `M` edges decrements
  counter #1. Counter #2 counts its edges while the window is open.
* `ENDCOUNT1` crosses into the control clock domain through a two-flop
  synchroniser. By then counter #2 has stopped, so the multi-bit count is
  read safely.
* One readout takes `M + 1` window-oscillator periods plus about 5 control
  cycles. A conversion is one readout for `Cx > CREF`, two for `Cx ≤ CREF`.
  With the default oscillator gain (1.05 ms/pF), 30 pF at `M = 32` converts in
  1.04 s.

`start_meas` and `start_cal` are sampled on `f_ref` edges while the unit is
idle; `out_valid` and `cal_done` are one-cycle pulses on `f_ref`. The
oscillators run whenever `enable` is high; the logic has no clock without it.

## Counter range

Counters are 12 bits wide. `n` reaches `M * Cx / CREF`:

| setting | largest count | fits 4095? |
|---|---|---|
| `M = 32`, 30 pF | 1920 | yes |
| `M = 64`, 30 pF | 3840 | yes |
| `M = 128`, 15 pF | 3840 | yes |
| `M = 32`, 64 pF (or 32 pF at 64, 16 pF at 128) | 4096 | no, one count over |

Counter #2 saturates at 4095 and raises `out_ovf` instead of wrapping.

## Blocks and files

```
cdc_top                    whole converter (simulation top, not synthesizable: analog models)
├── cdc_cap_switch_box     model: Cx/CREF to OSC1/OSC2, direct or swapped
├── cdc_cal_cap_bank ×2    model: CCAL1, CCAL2 = code * 10 fF
├── cdc_dml_osc ×2         model: OSC1 (f_x), OSC2 (f_ref), T = K * (C_load + C_cal)
├── cdc_core_logic         synthesizable: counters, counter mux, control unit
│   ├── cdc_counter_mux    two 2:1 clock muxes (counter swap)
│   ├── cdc_down_counter   counter #1, window and ENDCOUNT1
│   ├── cdc_up_counter     counter #2, result n
│   └── cdc_control_unit   readout sequencer and conversion flowchart
│       └── cdc_sync2      ENDCOUNT1 synchroniser
└── cdc_calibration_unit   synthesizable: self-calibration state machine
cdc_pkg                    widths and the conn_e / cal_sel_e enums
```

The synthesizable part is `cdc_core_logic` plus `cdc_calibration_unit`
(about 100 flip-flops together at the default widths). The calibration unit is
optional in a system that has a microcontroller: the same sequence can be run
in software through the `cal_req`/`cal_swap`/`cal_ack`/`rd_n` readout port of
the control unit.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `CNT_W` | 12 | counter width |
| `CAL_W` | 4 | bits per calibration bank |
| `CREF_AF` | 500 000 | reference capacitance, aF |
| `CCAL_LSB_AF` | 10 000 | calibration step, aF |
| `K1_NS_PER_AF`, `K2_NS_PER_AF` | 1.05 | gains of OSC1 and OSC2 (ns per aF = ms per pF); set them unequal to model mismatch |
| `PRESET_CYC` (control unit) | 3 | control cycles of counter preset before a window |

`M` is a run-time input (`m`, at least 1).

## What is modelled and what is not

The analog parts are behavioural: ideal square-wave oscillators with
`T = K * C`, an ideal switch box and ideal capacitor banks, all carrying
capacitance as integers in aF. Not modelled: oscillator noise and jitter,
supply and temperature dependence of `K`, switch parasitics, and the
transistor-level dual-mode logic with swapped header/footer biasing in which
the real oscillators, counters and control are built (it is a circuit style that
lowers leakage and supply sensitivity, not a logic function). With noise-free
models, repeated readouts differ only by the ±1 count of quantisation.

Choices made in this design where the converter's description is silent:

* control and calibration units clocked by the OSC2 output;
* asynchronous preset/clear of the counters, the window arming edge, the
  two-flop synchroniser and the 3-cycle preset;
* the readout request/acknowledge handshake between calibration and control
  unit (request held until a one-cycle acknowledge; assertions check this);
* result given as raw `n` plus `out_swapped`, with saturation and `out_ovf`;
* calibration codes cleared at `start_cal` and held afterwards; a SAR bit is
  kept when `n1 = n2`;
* the calibration banks span 0–150 fF (four binary bits of 10 fF);
* oscillator gain 1.05 ms/pF, chosen to reproduce a 1.04 s conversion at 30 pF
  and `M = 32`;
* two further control inputs drawn at the control unit in the block diagram
  (`endcount2`, `EF`) have no described function and are not implemented, and
  the oscillators are enabled by the top-level `enable` rather than by the
  control unit.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_cdc_top -y rtl -y tb +libext+.sv -Irtl rtl/cdc_pkg.sv tb/tb_cdc_top.sv
./obj_dir/Vtb_cdc_top
```

| testbench | what it checks |
|---|---|
| `tb_cdc_top_full` | default parameters: calibration with matched oscillators, conversions over the 30 pF range at `M` = 32, 64, 128, swapped conversion below `CREF`, 1.04 s at 30 pF, counter saturation at 66 pF and `M` = 32 |
| `tb_cdc_top` | two converters with 4–5 % mismatch either way: CCAL1 and CCAL2 searches, SAR bit clearing, direct/swapped conversions against the period formula, improvement from calibration, overflow |
| `tb_cdc_workloads` | repeated readouts at `Cx = 20 CREF`, a 500 fF-step sweep of 2–30 pF before and after calibration, conversion time proportional to `Cx` and `M`, the 1-second limits |
| `tb_cdc_core_logic` | counters + control with ideal testbench oscillators: `n` within one count of the exact period ratio, calibration readout positions, conversion time |
| `tb_cdc_control_unit` | flowchart (`n > M`, `n = M`, `n < M`), switch positions, handshake, overflow, cycle count |
| `tb_cdc_calibration_unit` | SAR result against an exhaustive search over all 16 codes, both banks, no-mismatch exit, readout count |
| `tb_cdc_down_counter`, `tb_cdc_up_counter` | window length exactly `M`, freeze, preset/clear, saturation |
| `tb_cdc_counter_mux`, `tb_cdc_cap_switch_box`, `tb_cdc_cal_cap_bank`, `tb_cdc_dml_osc` | routing, capacitances and oscillator period |

Simulated time is real time (a 30 pF conversion is about one simulated second),
but the event count is small: every testbench finishes in well under a second of
wall-clock time.
