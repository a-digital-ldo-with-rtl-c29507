# Coarse-fine-tuning digital LDO controller with burst mode and LCO reduction

A digital low-dropout regulator (D-LDO) replaces the error amplifier and pass
transistor of an analog LDO with a clocked comparator, a digital integrator
and an array of PMOS switches. It works at low supply voltages and shrinks with
the process. The catch is a trade-off. A plain D-LDO turns one PMOS on or off
per clock, so it only reacts quickly to a load step when the clock is fast,
and a fast clock burns quiescent current. A slow clock, for its part, makes the
steady-state limit cycle (LCO) large.

This RTL is the digital half of a D-LDO that attacks both problems:

* **Coarse-fine tuning with burst mode.** The power array is split into 64
  coarse units, each as strong as 16 fine units, and 32 fine units. In steady
  state only the fine register runs, at 50 MHz. When the output leaves a
  voltage window, the controller switches to a *burst*: for 128 cycles of the
  500 MHz clock (256 ns) the coarse register takes over, moving 16 units per
  step, while the fine word is frozen. Fine tuning then resumes.
* **Feed-forward LCO reduction.** The comparator output also drives a small
  auxiliary PMOS section of strength β = 2 directly, bypassing the integrator.
  This adds a zero to the loop and pushes the steady-state limit cycle
  towards mode 1, the smallest possible.

The design follows M. Huang, Y. Lu, S.-P. U and R. P. Martins, *A Digital LDO
with Transient Enhancement and Limit Cycle Oscillation Reduction* (65 nm CMOS,
1 nF on-chip capacitor, 2–100 mA load). The sizes, clock rates and burst
length here are taken from that publication. Where it is silent, the choices
are this implementation's own and are listed in
[Departures and own choices](#departures-and-own-choices).

The comparators, the PMOS arrays, the output capacitor and the load are
analog. They are **not** part of the RTL: they connect through the ports of
`dldo_top`. A behavioural model of them, `tb/ldo_plant.sv`, closes the loop in
simulation.

## The control words

Each register holds a thermometer code. A `1` on a gate bit turns that PMOS
off, so the number of ones is the number of PMOS turned **off**:

```
CRS  = ones in crs[63:0]     (coarse, 16 units each)
FINE = ones in fine[31:0]    (fine,    1 unit each)
CMB  = 16 * CRS + FINE       (units off, 0 .. 1056)
```

The comparator CMP1 outputs `cmp_out = 1` when V_OUT > V_REF, which means
"too much current". A register step with `up = 1` shifts a 1 in at the top
end, so one more PMOS is off. A step with `up = 0` shifts a 0 in at the bottom
end (Q1), so one more PMOS is on. At either end the register saturates.
After reset every coarse PMOS is off and the fine word is half full, so the
regulator starts with no current and enters its first burst as soon as V_OUT
is found below the window.

## Modes and their timing

```
               out_of_range (synchronised)
   FINE ------------------------------------> BURST  (MOD = 1, 128 cycles)
    ^                                            |
    |   128 cycles, detections ignored           v
    +---------------------------------------- GUARD  (MOD = 0)
```

`burst_ctrl` holds the phase. A detection seen in phase FINE makes `mod` go
high in the next cycle. `mod` then stays high for exactly `BURST_CYCLES` = 128
cycles. That is enough for the coarse word to sweep its whole range (64 steps)
with margin. A guard period of `GUARD_CYCLES` follows. It runs in fine mode,
and a detection during it is dropped, so that the residual error just after a
burst does not start a new burst at once.

The window detection (`peak_detector`) takes the two window comparators:
CMP2 = (V_OUT < V_REF_H) and CMP3 = (V_OUT > V_REF_L). Inside the window both
are 1. Outside it exactly one is 0. Their XOR is therefore the out-of-window
flag. Both inputs pass a two-flop synchroniser first, so a detection reaches
`burst_ctrl` two cycles after the comparators change.

What runs in each phase:

| phase | `mod` | coarse register | fine register | CMP1 samples |
|-------|-------|-----------------|---------------|--------------|
| BURST | 1 | every 500 MHz cycle, direction from `cmp_out` | frozen | every cycle |
| FINE, GUARD | 0 | only on a compensation step | every 10th cycle (50 MHz) | every 10th cycle |

## Regulation compensation: leaving the fine range without a burst

A slowly drifting load can need more current than the 32 fine units can give
around the present coarse word. Waiting until V_OUT leaves the window, and
then firing a burst, would be slow and noisy. `reg_comp` acts instead at a
fine sampling instant where the fine word is already at an end **and** the
comparator asks to go further:

* `comp` = 1 for that cycle, and `comp_up` = `cmp_out` gives the direction.
* The coarse register takes one step in that direction.
* In the same clock edge the fine register is reloaded to its middle (16 of 32).

The reload is what makes this smooth. One coarse unit equals 16 fine units,
so (CRS + 1, FINE = 16) gives the same CMB as (CRS, FINE = 32), and
(CRS − 1, 16) the same as (CRS, 0). The current does not jump at the
handover. Afterwards the fine word has 16 units of room on each side. This is
also why the fine array is twice as large as one coarse step.

Without the reload, a coarse step would leave a 16-unit error for the 50 MHz
fine loop to work off, and at light load that pushes V_OUT out of the window
and fires a burst. The end-to-end testbench checks that slow ramps cause no
burst, which catches a missing reload.

## The feed-forward path and comparator timing

CMP1 is assumed to be a clocked comparator. It decides on the cycles flagged
by `cmp_sample`, which are every cycle in a burst and every tenth cycle in fine
mode. Two things then happen with that decision:

* The shift registers use it at the **next** sampling edge. The integrator
  output therefore lags the comparator by one sample.
* `aux_off` is simply `{BETA{cmp_out}}`. The two auxiliary PMOS switch at
  once, in phase with the decision.

In a mode-1 limit cycle the comparator toggles at every sample. The
integrator word then toggles by one unit, half a period late. The auxiliary
section toggles by β = 2 units, in phase. Their sum toggles by β − 1 = 1
unit, in phase with the comparator. That is a proportional term, and it lets
the loop settle into the shortest limit cycle. In the RTL the path is only
wiring. `aux_off` and `comp_up` are copies of `cmp_out` by design.

How much the path helps depends on the analog output node. The path works as
intended when V_OUT follows a current change within one sampling period,
which is the situation the original design relies on. The closed-loop
sweep `tb_lco_modes` uses a first-order plant: each PMOS unit is a 0.3 mS
conductance from a 1.0 V supply into 1 nF at 0.5 V. It gives:

| I_LOAD (mA) | LCO mode, with path | ripple (mV) | mode, without path | ripple (mV) |
|------------:|--------------------:|------------:|-------------------:|------------:|
| 2.0   | 4.0 | 21.4 | 13.8 | 149 (bursts fire) |
| 5.3   | 2.0 | 8.4  | 6.9  | 34.3 |
| 14.1  | 2.0 | 3.5  | 4.0  | 10.2 |
| 37.6  | 1.0 | 1.3  | 3.0  | 4.9  |
| 100   | 1.0 | 0.7  | 3.0  | 2.2  |

The path lowers the mode and the ripple at every load. At the two heavy loads
it gives mode 1. At light load, only about 13 units are on, and the model's
output time constant (about 250 ns) is far longer than the 20 ns sampling
period. There the loop stays at mode 2 to 4. The original design reports
mode 1 across the whole 2–100 mA range from transistor-level simulation. This
simple plant does not reproduce that, and the RTL has no knob that would
change it: the remedy would be in the analog design (β, unit size, output
pole).

## Clocking

The original design gates two clocks, CLK_FAST = 500 MHz for the coarse
register and CLK_SLOW = 50 MHz for the fine register. Here the whole
controller runs on `clk_fast`. `clk_gate_ctrl` derives the 50 MHz sampling
strobe with a divide-by-10 counter and turns the two gated clocks into clock
enables:

```
coarse_en = mod | comp
fine_en   = slow_tick & ~mod
sample_en = mod | fine_en          (-> cmp_sample)
```

A synthesis flow maps these enables onto integrated clock-gating cells, so
each register is still clocked only when it moves. One clock domain also
makes the compensation path, from the fine register to the coarse register,
free of clock-domain crossings.

## Files

| file | contents |
|------|----------|
| `rtl/dldo_pkg.sv` | sizes (`CFG_*`) and the phase enum |
| `rtl/dldo_top.sv` | top level: wiring, feed-forward path, fine-word hold assertion |
| `rtl/bidir_sr.sv` | bidirectional thermometer shift register (coarse and fine) |
| `rtl/burst_ctrl.sv` | FINE / BURST / GUARD phase machine, `mod` |
| `rtl/peak_detector.sv` | synchronisers and XOR of the window comparators |
| `rtl/reg_comp.sv` | regulation compensation decision (`comp`, `comp_up`) |
| `rtl/clk_gate_ctrl.sv` | 50 MHz strobe and clock enables |
| `tb/ldo_plant.sv` | behavioural analog model: CMP1–3, PMOS arrays, C_OUT, load (simulation only) |
| `tb/tb_*.sv` | self-checking testbenches |

### `dldo_top` parameters

| parameter | default | meaning |
|-----------|--------:|---------|
| `N_COARSE` | 64 | coarse PMOS units (each ×16) |
| `N_FINE` | 32 | fine PMOS units (×1); should be 2 × the coarse strength for a seamless compensation step |
| `BETA` | 2 | auxiliary feed-forward units |
| `SLOW_DIV` | 10 | CLK_FAST / fine sampling rate |
| `BURST_CYCLES` | 128 | burst length ΔT1 in CLK_FAST cycles |
| `GUARD_CYCLES` | 128 | guard length ΔT2 (own choice) |

### `dldo_top` ports

| port | dir | width | meaning |
|------|-----|------:|---------|
| `clk_fast` | in | 1 | 500 MHz clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `cmp_out` | in | 1 | CMP1: V_OUT > V_REF, decided on `cmp_sample` cycles |
| `cmp2_out` | in | 1 | CMP2: V_OUT < V_REF_H (asynchronous) |
| `cmp3_out` | in | 1 | CMP3: V_OUT > V_REF_L (asynchronous) |
| `crs` | out | 64 | coarse PMOS gates, 1 = off |
| `fine` | out | 32 | fine PMOS gates, 1 = off |
| `aux_off` | out | 2 | auxiliary PMOS gates, 1 = off (= `cmp_out`) |
| `mod` | out | 1 | 1 during a burst |
| `cmp_sample` | out | 1 | CMP1 should decide at the end of this cycle |
| `guard` | out | 1 | guard period |
| `comp`, `comp_up` | out | 1, 1 | compensation step and its direction |

## Verification

Every testbench is self-checking. Each one ends with a line
`TB_RESULT checks=N failures=M`.

* `tb_bidir_sr` runs both register widths against a counter model: random
  shifts, saturation at both ends, and reloads.
* `tb_reg_comp` is exhaustive over all 16 input combinations.
* `tb_clk_gate_ctrl` checks that the strobe period is exactly 10 cycles and
  that the enables follow `mod` and `comp`.
* `tb_peak_detector` drives random window positions and checks the XOR, the
  side and the two-cycle latency.
* `tb_burst_ctrl` compares against a phase model. Every burst must be exactly
  128 cycles. Detections in the guard period must be ignored.
* `tb_dldo_top` is the whole controller at default sizes, closed around
  `ldo_plant`. It covers start-up at 2 mA, a 2→100 mA step and a 100→2 mA
  step (20 ns edges), and slow 2→20→2 mA ramps. It checks:
  * every burst is exactly 128 cycles;
  * the fine word never moves in a burst;
  * outside a burst the coarse word moves only on a compensation step, in its
    direction;
  * fine steps fall on the 50 MHz grid;
  * V_OUT settles inside the window, with its mean within 10 mV of V_REF;
  * the slow ramps cause no burst.

  It also counts undershoot bursts, overshoot bursts, guard periods,
  compensation steps up and down, fine steps and auxiliary switching. Each
  must occur at least once.
* `tb_lco_modes` is the steady-state sweep in the table above.

In `ldo_plant`, the window is ±25 mV around V_REF = 0.5 V and V_IN is 1.0 V.
Each PMOS unit is a 0.3 mS conductance. All three values are the model's own
choices. With them, the 2→100 mA step drives V_OUT far below the window in
this ideal model. Large droops are expected, because the model has no
resistive load or other fast analog behaviour. The test therefore checks
recovery and settling, not the undershoot voltage.

## Simulating

With Verilator 5. The package goes first:

```
verilator --binary --timing --assert -Mdir obj_top \
  rtl/dldo_pkg.sv rtl/bidir_sr.sv rtl/burst_ctrl.sv rtl/clk_gate_ctrl.sv \
  rtl/peak_detector.sv rtl/reg_comp.sv rtl/dldo_top.sv \
  tb/ldo_plant.sv tb/tb_dldo_top.sv --top-module tb_dldo_top
./obj_top/Vtb_dldo_top
```

Use the same form for `tb_lco_modes`. A unit testbench needs only the
package, its module and the testbench file. Each simulation finishes in well
under a second. `bidir_sr` and `dldo_top` carry concurrent assertions: the
register word stays a thermometer code, and the fine word holds during a
burst. Run with `--assert` to enable them.

## Departures and own choices

* **Single clock.** CLK_SLOW is derived from CLK_FAST. It is not a separate
  input.
* **Comparator timing.** CMP1 is taken as clocked, sampling on the active
  register's clock (`cmp_sample`). The registers use the previous decision.
* **Compensation rule.** The trigger (at an end and pushing further) and the
  reload of the fine word to its middle are this design's own rules. The
  original design names the UP/COMP signals and their purpose but not the
  mechanism.
* **Guard length.** ΔT2 is not published. It is 128 fast cycles here, and a
  detection inside it is dropped.
* **Synchronisers.** Two flops on each window comparator output.
* **Reset.** All coarse PMOS off, fine word half full.
* **Aux strength.** The auxiliary section is two unit-size switches driven
  together (`BETA` gate bits).
* **Analog blocks.** The comparators, PMOS arrays, output capacitor and load
  are outside the RTL. Their model in `tb/ldo_plant.sv` is a first-order
  conductance model. It is meant for exercising the controller, not for
  predicting undershoot or ripple in millivolts.
