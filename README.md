# S-curve acceleration and deceleration for a pulse-driven servo axis

A servo drive in position mode moves its motor one increment per input
pulse, so the pulse *rate* is the motor speed. Starting or stopping such an
axis with a speed step, or with a linear ramp, puts a jump in the
acceleration and shakes the mechanics. This RTL makes the pulse train
follow an **S-curve**: the acceleration itself ramps up and down (bounded
jerk), so speed rises smoothly from rest to the cruise speed, holds, and
falls smoothly back to rest.

At the default settings one move is:

| phase        | time | what happens                                  |
|--------------|------|-----------------------------------------------|
| acceleration | 1 s  | 0 → 20 mm/s, S-shaped                         |
| cruise       | 1 s  | 20 mm/s                                       |
| deceleration | 1 s  | 20 mm/s → 0, mirror image of the acceleration |

The speed is recomputed every 200 µs and turned into pulses at 20 pulses
per µm (400 kHz at cruise). The move covers 40 mm, which is 800 000 pulses.

## The chain

```
            50 MHz clk
                |
  refresh_tick  |  tick every 10000 clocks (200 us)
                v
  s_curve       -> v   speed set-point, um/s, 16 bit
                v
  speed_to_cycle-> freq = 20*v Hz,  cycle = floor(50e6 / freq) clocks
                v
  pwm_module    -> clkout: 50 % duty pulse train, period = cycle clocks
                |
                +--> (off chip) signal isolation board -> servo drive -> motor
```

`s_curve_top` wires these four blocks together. Everything runs on one
clock. The refresh is a one-clock enable, not a derived clock. The move
starts when the active-low reset `rst_n` is released. When it ends, `done`
rises and `clkout` stays low.

## How the speed profile is computed

The profile is built from one counter, `n_c`. It counts up by one per
refresh during acceleration, holds during cruise, and counts down during
deceleration. The speed is a function of `n_c` alone. With
N = `ACCEL_TICKS` refreshes per acceleration and V = `V_MAX`:

```
n_c <= N/2 :  v = 2·V·n_c² / N²             (jerk +J: speed grows with n²)
n_c >  N/2 :  v = V − 2·V·(N − n_c)² / N²   (jerk −J: speed closes in on V)
```

The two halves meet at V/2 when n_c = N/2, and their slopes match there.
This is the point of maximum acceleration. At n_c = N the speed is exactly
V, which is also the value held throughout the cruise. During deceleration
`n_c` runs back from N to 0 through the same two formulas, so the
deceleration is the exact time mirror of the acceleration. At the defaults
(N = 5000, V = 20000 µm/s) the formulas become

```
v = 16·n_c² / 10000                    = n_c² / 625
v = 20000 − (10000 − 2·n_c)² / 2500    = 20000 − (5000 − n_c)² / 625
```

Both divisions are by constants and round down.

**Zero-speed threshold.** The first step of the profile is tiny: 16/10000
µm/s at n_c = 1. Such a speed would need a pulse period far longer than the
refresh interval. For n_c below `PWM_INITIAL_COUNT` (300) the speed is
therefore forced to 0, and the first non-zero speed is 144 µm/s at
n_c = 300 (2880 Hz). The same cut is applied on the way down, so the axis
stops when n_c drops below 300.

**Stages.** The move-time counter `s_count` counts refreshes and gives the
`stage` output (`s_curve_pkg::stage_e`):

| stage        | refreshes (defaults) | n_c          |
|--------------|----------------------|--------------|
| `ST_ACCEL_1` | 0 … 2500             | 0 → 2500     |
| `ST_ACCEL_2` | 2501 … 5000          | → 5000       |
| `ST_CRUISE`  | 5001 … 9999          | 5000         |
| `ST_DECEL_1` | 10000 … 12500        | 5000 → 2500  |
| `ST_DECEL_2` | 12501 … 15000        | → 0          |
| `ST_DONE`    | 15001                | 0            |

That makes 15 002 refreshes with a strobe on `v_valid`. After that, further
refresh strobes are ignored.

## From speed to pulses

**Frequency and period.** `speed_to_cycle` computes f = k·v with k = 20 Hz
per µm/s, and then the pulse period in clocks, floor(F_clk / f). For
example, 20 000 µm/s gives 400 kHz, a 125-clock period. 144 µm/s gives
2880 Hz, a 17 361-clock period. A speed of 0 gives period 0, which means
"stop".

The division is bit-serial: a restoring divider produces one quotient bit
per clock. A new period appears 34 clocks after the speed changes, with
`cycle_valid` high for one clock. A conversion starts whenever the
converter is idle and its input differs from the last speed it converted,
so it always ends on the newest value.

**Pulse generator.** `pwm_module` has three parts:

- a buffer register `compare_reg` that holds the period C;
- a cycle counter `compare_count` that counts every clock;
- a comparator on the two.

When the counter equals C/2, `clkout` goes high. When it equals C, `clkout`
goes low and the counter restarts at 1. In steady state the counter
therefore runs 1…C: `clkout` is low for C/2 clocks and high for C − C/2
clocks. With C = 8, for example, the count runs 1…8 and the output rises
when the count passes 4.

The register takes a new period from `cycle` only at the end of a period,
or at once while it holds 0. Three consequences follow:

- A speed change never cuts a pulse short.
- At low speed, where a period (up to 17 361 clocks) is longer than the
  refresh interval (10 000 clocks), the generator skips the intermediate
  updates. It picks up whatever period is current when its pulse ends.
- When the period becomes 0, the pulse in progress completes and the output
  then stays low.

The first period after a stop is one clock longer, because the counter
starts from 0.

Because the period is rounded down, the pulse rate is very slightly higher
than k·v. Over a full move this gives about 0.13 % more pulses than the
ideal 800 000 (801 034 in simulation).

## Timing summary

| event                                   | latency                          |
|-----------------------------------------|----------------------------------|
| refresh strobe → new `v`, `stage`, `n_c` | 1 clock (registered)            |
| new `v` → new `cycle`, `freq`           | 34 clocks (0 → stop: 1 clock)    |
| new `cycle` → used by pulse generator   | at the end of the current pulse  |
| refresh interval                        | 10 000 clocks (200 µs at 50 MHz) |

An assertion in `s_curve_top` checks that a conversion always finishes
before the next refresh.

## Parameters

`s_curve_top` parameters. The defaults are the numbers of the reference
design.

| parameter           | default    | meaning                                   |
|---------------------|------------|-------------------------------------------|
| `F_CLK_HZ`          | 50 000 000 | system clock                              |
| `REFRESH_US`        | 200        | speed refresh period, µs                  |
| `V_MAX`             | 20 000     | cruise speed, µm/s (16-bit `v`)           |
| `ACCEL_TICKS`       | 5 000      | refreshes per acceleration / deceleration |
| `CRUISE_TICKS`      | 5 000      | refreshes at cruise speed                 |
| `PWM_INITIAL_COUNT` | 300        | n_c below which the speed is forced to 0  |
| `K_HZ_PER_UMPS`     | 20         | pulse Hz per µm/s (pulses per µm)         |

Limits:

- `ACCEL_TICKS` and the profile counters are 16 bits wide.
- `V_MAX` must fit in 16 bits.
- The refresh period must exceed the 34-clock conversion.
- Periods are 32 bits wide.

## Files

| file                     | content                                       |
|--------------------------|-----------------------------------------------|
| `rtl/s_curve_pkg.sv`     | stage enum, speed and period widths           |
| `rtl/refresh_tick.sv`    | 200 µs refresh strobe                         |
| `rtl/s_curve.sv`         | S-curve speed set-point generator             |
| `rtl/speed_to_cycle.sv`  | speed → frequency → period (serial divider)   |
| `rtl/pwm_module.sv`      | 50 % duty variable-period pulse generator     |
| `rtl/s_curve_top.sv`     | the chain above                               |
| `tb/tb_*.sv`             | one self-checking testbench per block         |
| `tb/s_curve_top_checker.sv` | scoreboard shared by the two top-level benches |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_refresh_tick` checks that the strobe comes every 10 000 clocks and is
  one clock wide.
- `tb_s_curve` runs the full 15 002-refresh profile at the default sizes,
  with random gaps between strobes. It compares every `v`, `stage` and
  `n_c` with the per-stage formulas written out in their default-number
  form.
- `tb_speed_to_cycle` checks `freq`, `cycle` and the 34-clock latency for
  the profile's key speeds and 200 random speeds. It also checks the
  speed-change-during-division case.
- `tb_pwm_module` measures the pulse train edge by edge. It checks period
  and duty for C = 3, 8, 10, 125 and 17 361, the counter sequence for
  C = 8, the end-of-period reload, stop and restart.
- `tb_s_curve_top` runs a whole move on a shorter time scale: a 20 µs
  refresh, 100-refresh phases and threshold 6, which keeps the same speed
  values. The scoreboard `s_curve_top_checker` checks:
  - refresh spacing;
  - every set-point and stage;
  - every period word;
  - every pulse period against the one loaded for it;
  - the 125-clock cruise period;
  - the pulse total, against both the integral of the frequency and the
    move length (within 1 %);
  - the final stop.

  It also counts each mechanism and fails if one never occurs: every stage,
  the zero-speed hold, a period update deferred to the end of a pulse, and
  the pulse generator starting and stopping.
- `tb_s_curve_top_full` runs the same checks on the top with every
  parameter at its default. That is the full 3 s move, 150 M clocks, about
  2 minutes in Verilator. It produces 801 034 pulses, 399 920 of them at
  the 125-clock cruise period.

To simulate, for example the reduced end-to-end run:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/s_curve_pkg.sv tb/tb_s_curve_top.sv --top-module tb_s_curve_top -o sim
./obj_dir/sim
```

Use the same command with another `tb/tb_*.sv` file and its module name to
run the other benches.

## Design choices and departures

These points are this design's own decisions, where the reference
description is silent or ambiguous:

- **One clock domain.** The 200 µs speed refresh is an enable produced by
  `refresh_tick`, not a separate refresh clock.
- **`n_c` counts refreshes.** It does not count system clocks. Only this
  reading gives n_c = 5000 after one second.
- **Threshold on the way down.** The zero-speed threshold is applied during
  deceleration as well as acceleration, mirroring the profile.
- **The period word.** The value handed to the pulse generator is a period
  in clocks, floor(F_clk / f), not the frequency itself.
- **When the period changes.** The pulse generator reloads its period at
  the end of each pulse.
- **Reset and start.** All blocks use an asynchronous active-low reset. The
  move starts at reset release and runs once; there is no start input.
- **No direction output.** The drive's direction input is not driven by
  this design.
- **Rounding.** All divisions round down.

Outside the scope of this RTL:

- the signal isolation board, the servo drive and the motor;
- the host processor and PC link;
- the encoder feedback capture that the reference system runs alongside the
  profile. Its signal type and interface are not specified.
