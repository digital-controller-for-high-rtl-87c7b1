# Digital PFC controller with delay-line ADCs and a segmented-ring DPWM

A single-phase power-factor-correction (PFC) rectifier needs two control
loops: a fast inner loop that makes the line current follow the shape of the
line voltage, and a slow outer loop that holds the output voltage by scaling
that current. A textbook digital controller for it uses three ADCs, a
multiplier, a processor and a counter-based PWM with a fast clock, which is
more silicon than the analog controller it would replace.

This controller removes almost all of that:

* **No conventional ADCs.** Both measurements are made by *windowed
  delay-line ADCs*: two chains of flip-flops whose supply is the voltage
  being measured, raced against each other. They only resolve a few levels
  around the operating point, which is all a regulator needs.
* **No multiplier, no line-voltage ADC.** The current reference
  `u * vg(t)` is made in the analog domain: a 1-bit sigma-delta modulator
  chops the scaled line voltage onto a filter capacitor (the *floating
  reference*), and the current ADC compares the sensed current against that
  capacitor voltage directly.
* **No fast clock.** A ring oscillator drives an 8-bit *segmented-ring
  DPWM*, which also provides the one clock of all synchronous logic.
* **No processor.** Both compensators are small look-up tables indexed by a
  4-bit error.
* **Dead-zone voltage loop.** The voltage ADC's zero-error bin is wider than
  the twice-line-frequency output ripple, so the outer loop ignores the
  ripple and can be fast; the bin width is programmable and shrinks at light
  load.

The RTL is SystemVerilog (IEEE 1800-2017). The synchronous logic is
synthesizable; the two parts whose behaviour is physical (the
supply-starved flip-flop and the ring oscillator) are behavioural models
with real-valued supply inputs, written so that the whole controller can be
simulated with its analog surroundings in plain Verilator.

## Block diagram

```
            v_ref ─┐                       ┌──────────── zb ◄───────────┐
  H1·vout ─ v_fb ──┴► windowed_adc (PROG=1) ──e_v──► voltage_compensator ─┴─ u ─► sigma_delta ─► sd_bit ─► (off chip:
                         ▲ adc_clk                       ▲ sample_en                              switch + capacitor
                         │                               │                                        → v_iref ≈ u·H2·vg)
                      adc_clk_div (÷10) ◄────────────────┤
                                                         │ clk_sw
  v_iref ──────┐                                         │
  Rs·ig ─ v_isense ┴► windowed_adc (PROG=0) ──e_i──► current_compensator ──d──► segmented_dpwm ──► gate
                         ▲ ~clk_sw (mid-period)                                    ▲       │
                                                                  ring_oscillator ─┘ taps  └──► clk_sw (system clock)
```

Module hierarchy (`pfc_controller` is the top):

| module | kind | role |
|---|---|---|
| `pfc_controller` | structural | the whole controller |
| `windowed_adc` | structural | two delay lines + snapshot/decoder; used twice |
| `delay_line` | structural | chain of programmable and unit cells |
| `prog_delay_cell` | structural | 4 chained flip-flops + 4:1 mux (delay = zb+1 flip-flops) |
| `starved_dff` | behavioural model | flip-flop with delay ∝ 1/supply |
| `snapshot_decoder` | synthesizable | captures the measurement line, outputs signed error |
| `voltage_compensator` | synthesizable | LUT PI, zero-bin control |
| `sigma_delta` | synthesizable | first-order 1-bit modulator |
| `current_compensator` | synthesizable | LUT PID (velocity form) |
| `adc_clk_div` | synthesizable | ÷10 conversion clock for the voltage ADC |
| `segmented_dpwm` | synthesizable | lap counter + 16:1 tap mux, set/reset flops |
| `ring_oscillator` | behavioural model | 16-cell ring, the only clock source |
| `pfc_pkg` | package | widths and the `err_t` error type |

`vdelay.svh` holds the delay task shared by the behavioural models.

## The windowed delay-line ADC

This is the least familiar part and the one that sets the behaviour of both
loops.

### How a race between two delay lines measures a voltage

A flip-flop's clock-to-output delay falls as its supply rises; over the
range used here it is modelled as `t_ff = K / v` (`K_NS_V` = 20 ns·V). Each
ADC has two chains:

* the **reference line**, N+1 cells supplied from `v_ref`;
* the **measurement line**, N+M cells supplied from the measured voltage
  `v_meas`.

A rising edge on the conversion clock enters both chains at once. When the
reference edge leaves cell N, that output is the **strobe**: it clocks a
snapshot register that captures the measurement line. If `v_meas = v_ref`
the measurement edge has also just left cell N; a lower voltage means a
slower line and fewer cells passed, a higher voltage more. The error is

```
e = N - k          k = number of measurement cells passed at the strobe
```

so `e > 0` means the measured voltage is below the reference. When the
reference edge leaves cell N+1 it resets every cell of both lines (a
self-timed pulse, as the last cell clears itself), and the ADC is ready for
the next clock edge. The snapshot register only looks at measurement cells
N-3 … N+4; the decoder counts the ones in those eight bits (which tolerates
a bubble) and outputs `e = 4 - ones`, i.e. a 4-bit signed error saturated to
−4 … +4.

### Programmable cells and the zero-error bin

In the voltage ADC the first N-1 cells of both lines are
`prog_delay_cell`s: four flip-flops in a ripple chain, each clocked by the
previous one, and a 4:1 multiplexer choosing which output leaves the cell.
With select `zb` a cell is `zb+1` flip-flop delays long. Counting in
flip-flop delays, cell j is passed after

```
D_j = j·(zb+1)                         j ≤ N-1
D_j = (N-1)·(zb+1) + (j-N+1)           j ≥ N-1
```

The strobe comes at `D_N·K/v_ref`, and measurement cell j has been passed
when `v_meas ≥ v_ref · D_j / D_N`. Hence:

* the zero bin (e = 0) is `v_ref ≤ v_meas < v_ref·(1 + 1/D_N)`, width
  `v_ref / ((zb+1)(N-1)+1)`; with N = 16 that is 1/16, 1/31, 1/46, 1/61 of
  the reference for zb = 0 … 3 (24, 12, 8.3 and 6.2 V at a 380 V output);
* the bin just below it (e = +1) has the same width;
* bins e ≥ +2 fall in the programmable cells and are `zb+1` times wider;
* bins e ≤ −1 are one flip-flop delay apart.

Raising `zb` shrinks the zero bin. Conversion time is `(D_N+1)·K/v_ref`,
well below the conversion clock period at the defaults (about 0.5 µs
against 50 µs).

In the current ADC (`PROG = 0`) every cell is a single flip-flop, so it is
a uniform window of ±4 levels of about `v_iref/16` each around the floating
reference, converted once per switching period, starting half-way through
the period.

### Supply range

Because delay goes as 1/v, a supply near zero would stall a line. The
analog front end is expected to add an offset to the ADC supplies (the
system testbench adds 1 V to both the sensed current and the floating
reference); the model also clamps the supply at 0.05 V.

## Voltage loop and zero-bin control

`voltage_compensator` runs once per voltage conversion (every 10 switching
periods, `sample_en` from `adc_clk_div`) and computes

```
acc[n] = sat( acc[n-1] + (KP+KI)·e_v[n] − KP·e_v[n-1] )      u = acc >> FRAC
```

with both products read from 16-entry tables built at elaboration. `acc`
has `FRAC = 4` fraction bits below the 8-bit `u`, so the integral gain can
be a fraction of an LSB (`KI = 2` is 1/8 LSB per sample) while the
proportional step stays large (`KP = 640`, 40 LSB per error step). With
`KP = 0` the law is the pure incremental form `u[n] = u[n-1] + a·e_v[n]`.

Inside the zero bin `e_v = 0` and `u` holds, so the twice-line ripple never
reaches the current reference: this is a dead-zone (regulation-band)
controller. `u` is proportional to the power drawn, so it doubles as the
load estimate for the zero bin: `zb = 3 − u[7:6]`, not below `ZB_MIN = 1`.
Light load (small `u`, small ripple) gets the narrowest bin, which avoids
the slow oscillation inside a wide bin that dead-zone controllers show at
light load; near full load the bin is 12 V, above the ripple.

## Floating reference and current loop

`sigma_delta` adds `u` to an 8-bit accumulator every switching period and
outputs the carry, so the bit density is `u/256`. Off chip, that bit
switches a transistor between the scaled line voltage `H2·vg` and a filter
capacitor; the capacitor then follows `(u/256)·H2·vg(t)`, which is the
current reference, already multiplied and already shaped like the line
voltage. Because the current loop keeps the sensed current close to this
voltage, the current ADC only ever sees a small difference, which is why a
±4-level window suffices.

`current_compensator` is a velocity-form PID:

```
d[n] = sat( d[n-1] + (KP+KI+KD)·e_i[n] − (KP+2KD)·e_i[n-1] + KD·e_i[n-2], 0, 240 )
```

again with one 16-entry table per term. The defaults (`KP = 4, KI = 1,
KD = 0`) suit the 1 mH / 200 kHz converter of the testbench; `DMAX = 240`
keeps a minimum off time.

## Segmented-ring DPWM and the system clock

`ring_oscillator` is 16 delay cells closed through one inversion. An edge
runs round the ring rising, then falling, so one oscillation has 32 evenly
spaced edge positions (tap c rising at position c, falling at 16+c).

`segmented_dpwm` makes one switching period out of 8 oscillations:

* a 3-bit **lap counter**, clocked by tap 0, names the current segment;
* a **16:1 tap multiplexer** with a polarity bit selects the fine position:
  `sel = taps[d[3:0]] ^ d[4]`;
* the period starts at the tap-0 rising edge where the lap counter wraps;
  there flop `s` is set to `~r` (gate on) unless `d = 0`;
* when `sel` rises in lap `d[7:5]`, flop `r` copies `s` (gate off).
  For `d[4:0] = 0` that edge is the same tap-0 edge that advances the lap
  counter, so the comparison uses `d[7:5] − 1`;
* `gate = s ^ r`, high for exactly `d` tap delays out of 256.

So the 8-bit resolution costs a 16:1 multiplexer and a 3-bit counter rather
than a 256:1 multiplexer, and nothing runs faster than the ring.
`clk_sw = ~lap[2]` rises at every period start and clocks all synchronous
logic. The duty command is sampled at position 240 (tap-0 falling edge in
the last lap), so a new `d` takes effect at the next period start. With
`TD_PS = 19531` the period is 5.0 µs (200 kHz); the frequency scales with
the cell delay.

### Timing through the controller

| event | when |
|---|---|
| period start, gate on, `clk_sw` rises | tap-0 rising edge, lap 7 → 0 |
| current conversion | starts at mid-period (falling edge of `clk_sw`), strobe ≈ 0.3 µs later |
| `d` updated from `e_i` | next `clk_sw` rising edge |
| `d` sampled by the DPWM | position 240 of that period |
| voltage conversion | every 10th period (`adc_clk`), result used 9 periods later |

## Parameters

| parameter (module) | default | meaning |
|---|---|---|
| `N_V`, `M_V` / `N_I`, `M_I` (`pfc_controller`) | 16, 4 | cells to the strobe / past it, voltage and current ADC |
| `K_NS_V` | 20.0 | flip-flop delay at 1 V supply (ns) |
| `TD_PS` | 19531 | ring cell delay (ps); sets the switching frequency |
| `KP`, `KI`, `FRAC`, `U_INIT`, `ZB_MIN` (`voltage_compensator`) | 640, 2, 4, 64, 1 | voltage-loop gains and limits |
| `KP`, `KI`, `KD`, `DMAX` (`current_compensator`) | 4, 1, 0, 240 | current-loop gains and limit |
| `DIV` (`adc_clk_div`) | 10 | switching periods per voltage conversion |

The 8-bit DPWM, the 4-bit error, the ÷10 voltage conversion rate, the cell
structure and the 200 kHz operating point follow the published design; the
ADC sizes, cell delays, loop gains, the zero-bin policy and the sampling
instants are choices made here.

## Where this differs from the published controller, and how far to trust it

* **Voltage compensator.** The published law is written as a pure
  incremental integrator `u[n] = u[n-1] + a·e_v[n]` but called a PI
  compensator. A pure integrator on the capacitor (itself an integrator)
  limit-cycled between the limits in simulation, so a proportional table on
  `e_v[n] − e_v[n−1]` was added; `KP = 0` restores the printed law.
* **Zero-bin shape.** The published characteristic has the bin next to
  zero narrower than the zero bin. With programmable cells only in the first
  N-1 positions, as described, the bins on either side of zero here are as
  wide as the zero bin and the coarse bins are further out. The zero-bin
  width law (inversely proportional to zb and N-1) does match.
* **Programmable cell taps.** Mux input i is taken as the output of
  flip-flop i+1.
* **Segmented ring.** The internal organisation of the segmented-ring DPWM
  is not published here in detail; the lap-counter + tap-mux scheme above is
  one realisation with the stated properties (8 bits, small multiplexer, no
  external clock). If the command changes, an off edge due after position
  240 may come at 240 in that one period.
* **Load estimate for zb** is taken from `u`; the sigma-delta order (first)
  and its clock (switching frequency), reset behaviour and all widths not
  listed above are choices made here.
* **Current sampling instant.** The current conversion starts at
  mid-period, inside the on-time for the usual duty range. Starting at the
  period start would see the valley current, which is zero in
  discontinuous conduction, and the current loop then loses control at
  light load.
* **Light-load power factor.** The published prototype reaches a power
  factor above 0.98 from 20 % to 100 % load. With the default sizes here it
  is about 0.99 at 50 % and 100 % but about 0.91 at 20 %: one
  current-ADC level (about `v_iref/16`) is then a quarter of the peak
  current, and the current error sits anywhere inside the one-sided zero
  bin `[v_iref, v_iref·(1+1/16))`. A longer current delay line (`N_I`), a
  smaller front-end offset, or trimming the sense gain by half a level
  would be the places to improve it.
* **Analog parts** (delay vs. supply, ring delay) are idealised models: a
  pure 1/v law, no mismatch, no jitter. On silicon the delay line accuracy
  and the ring frequency would need calibration.

Not included: the power stage, rectifier, gate driver, attenuators, the
current-sense amplifier and the floating-reference switch and capacitor.
They appear only as a behavioural plant inside the system testbench.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_starved_dff` | delay = K/vdd at four supplies, reset delay, reset cancelling an edge in flight |
| `tb_prog_delay_cell` | delay of zb+1 flip-flops for each zb at two supplies; reset |
| `tb_delay_line` | rise time of every tap for each zb; reset |
| `tb_snapshot_decoder` | all thermometer codes, a bubble, hold between strobes, reset |
| `tb_windowed_adc` | both ADC forms over a voltage sweep and all zb, against the `D_j` formula above; strobe latency; self-reset |
| `tb_voltage_compensator`, `tb_current_compensator` | 3000 random samples against a reference model, both saturation limits |
| `tb_sigma_delta` | exact ones count over 256 clocks, run length |
| `tb_adc_clk_div` | ÷10 period, duty, one sample enable per period |
| `tb_ring_oscillator` | every tap edge time, period, stop |
| `tb_segmented_dpwm` | period = 256 cell delays; pulse width = d for all 256 values and random ones |
| `tb_pfc_controller` | whole controller at default parameters on a boost PFC model |
| `tb_pfc_load_sweep` | power factor and power balance at 60, 150 and 300 W |

The system test (`tb_pfc_controller`) models a 110 Vrms / 60 Hz line, a
1 mH boost inductor, a 220 µF capacitor and a resistive load at a 380 V
target. It starts from 290 V at 100 W, steps the load to 175 W at 30 ms and
runs to 65 ms of simulated time (about a minute of wall time). It checks the
200 kHz period, one voltage conversion per 10 periods, the output voltage
band after the step (it stays within about 384–397 V), regulation at the
end, and a power factor above 0.95 over the last line cycle (0.985 is
reached). It also counts, and fails if any never happens: error in the
zero bin, both error signs and saturation of each ADC, the duty limit,
sigma-delta activity and a change of zero-bin size.

`tb_pfc_load_sweep` holds 60 W, 150 W and 300 W for 30 ms each, starting
from 385 V, and measures over the last line cycle of each: power factor
about 0.91, 0.99 and 0.99, input power within 15 % of the load plus the
change in stored energy, and the output voltage (371–381 V).

### Running a testbench with Verilator

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    --top-module tb_pfc_controller rtl/pfc_pkg.sv tb/tb_pfc_controller.sv -o Vtb
./obj_dir/Vtb
```

Verilator finds each module in `rtl/` by its file name; only the package is
listed explicitly. `--timing` is required: the behavioural models and the
testbenches use delays. Any other testbench is built the same way with its
own name. The two system-level testbenches take about a minute each.
