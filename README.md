# Discontinuous five-segment SVPWM generator

This is a space-vector pulse-width modulator for a two-level, three-phase
voltage-source inverter. It works without trigonometry at run time. The
reference vector rotates through six 60-degree sectors. In every sector one
inverter leg is held at a rail for the whole carrier period:

- at the positive rail in sectors I, III and V, where the zero vector is V7;
- at the negative rail in sectors II, IV and VI, where the zero vector is V0.

Only the other two legs switch, twice each per period. The switching sequence
is therefore symmetric with five segments, X-Y-Z-Y-X. There are four
commutations per period, against six for the usual seven-segment continuous
SVPWM, so switching losses fall by about a third at the same carrier
frequency.

Three things keep the logic small:

- **Sector.** Three magnitude comparisons find the sector, not an angle
  calculation.
- **Dwell times.** A pair of linear formulas per sector gives them. Each is
  a sum of V_alpha and V_beta multiplied by fixed constants.
- **Pulses.** Two comparisons against a triangle carrier make them. A table
  indexed by sector routes the results to the legs.

The defaults give a 40 kHz switching frequency and a 50 Hz reference from a
33.33 MHz clock. A 2 us dead time is inserted between the two switches of
each leg.

## Signal chain

```
clk ─► ajust_freq ──carrier_en (clk/26)──────────────────────────┐
            │                                                    ▼
            └─ref_en (clk/1852)─► vbeta_valfa ──V_alpha,V_beta─► svm_generator ─sa,sb,sc─► deadtime_system ─► 6 gates
                                  (counter360 +   │               (triangle, duration_ta,
                                   cos/sin ROMs)  └► find_sector ─► duration_tatb, svm_pattern)
                                                    sector ───────┘
```

| module | role |
|---|---|
| `svpwm_top` | top level; wires the chain above |
| `ajust_freq` | makes the carrier-sample and reference-step enables from the clock |
| `vbeta_valfa` | open-loop reference: a `counter360` addresses two `wave_lut` ROMs (cos gives V_alpha, sin gives V_beta) |
| `find_sector` | finds the sector from three comparisons: two `x_akar` multipliers (±sqrt(3)·V_alpha), two `comp9a` comparators and `compa` (V_beta > 0), then the `csector` truth table |
| `svm_generator` | holds `triangle`, `duration_ta`, `duration_tatb` and `svm_pattern` |
| `deadtime_system` | turns each leg state into an upper/lower gate pair with dead time |
| `svpwm_pkg` | holds the code width, the offset, the fixed-point constants and the `sector_t` enum |

Everything runs in the single `clk` domain. The "divided clocks" are one-cycle
enable pulses. Reset (`rst_n`) is synchronous and active low.

## Number format and scaling

This part is the key to reading the arithmetic.

**Offset codes.** Every analogue quantity is a 9-bit unsigned code:

- V_alpha and V_beta;
- the triangle carrier;
- the two switching thresholds.

In every one of them, code **224 means zero**.

- **Reference.** The reference amplitude is 128 codes, so the sine and
  cosine tables run from 96 to 352.
- **Carrier.** The carrier runs from 224 (valley) to 352 (peak).
- **Thresholds.** T_a and T_a+T_b come out as 224 plus a time. This lets them
  be compared directly with the carrier code.

**Time scale.** The carrier rises over half a switching period, T/2. Its
128-code rise therefore sets the time scale: T = 256 codes. The DC-link
voltage is normalised so that V_dc/T = 1, so V_dc is also 256 codes. The
tables' 128-code amplitude is thus a modulation index of
128 / (256/sqrt(3)) = 0.866, inside the linear range. The largest T_a+T_b
reached is 3/4 x 128 x 2/sqrt(3) = 111 codes, below the 128-code peak, so a
zero vector is always applied.

**Half dwell times.** T_a and T_b are half dwell times. Let the reference be
the sum a·V_k + b·V_k+1 of the sector's two active vectors. Then T_a = 3/4·a
and T_b = 3/4·b, in carrier codes. Each active vector appears twice per
period, once on each flank of the triangle.

**Fixed point.** Products are formed in Q10 fixed point. The constants are
3/4 = 768/1024, sqrt(3)/4 = 443/1024, sqrt(3)/2 = 887/1024 and
sqrt(3) = 1774/1024. Results are rounded to the nearest code and clamped to
0..128.

## Sector identification

With a = V_alpha and b = V_beta, both centred on zero, `find_sector` forms
three bits:

| bit | test |
|---|---|
| c2 | b > 0 |
| c1 | b > sqrt(3)·a |
| c0 | b > −sqrt(3)·a |

| sector | angle | c2 c1 c0 | `sector` output |
|---|---|---|---|
| I   | 0–60°    | 1 0 1 | 1 |
| II  | 60–120°  | 1 1 1 | 2 |
| III | 120–180° | 1 1 0 | 3 |
| IV  | 180–240° | 0 1 0 | 4 |
| V   | 240–300° | 0 0 0 | 5 |
| VI  | 300–360° | 0 0 1 | 6 |

Codes 011 and 100 are impossible: c1 and c0 together mean b > sqrt(3)·|a| ≥ 0,
and both clear means b < 0. They give `SEC_NONE` (0), which makes every
duration zero and every leg low.

The tests are strict, so a vector exactly on a boundary goes to the
following sector. For example, the 0° vector reads 001, which is sector VI.
The origin reads 000, which is sector V.

## Dwell-time formulas

In this table a = V_alpha and b = V_beta, both centred on zero, and r3 is
sqrt(3).

| sector | T_a (`duration_ta`) | T_a+T_b (`duration_tatb`) |
|---|---|---|
| I   | 3/4·a − r3/4·b  | 3/4·a + r3/4·b  |
| II  | 3/4·a + r3/4·b  | r3/2·b          |
| III | r3/2·b          | −3/4·a + r3/4·b |
| IV  | −3/4·a + r3/4·b | −3/4·a − r3/4·b |
| V   | −3/4·a − r3/4·b | −r3/2·b         |
| VI  | −r3/2·b         | 3/4·a − r3/4·b  |

The sum is computed directly. T_b alone is never needed. The T_a+T_b formula
of sector k equals the T_a formula of sector k+1. Both blocks are purely
combinational.

## Switching pattern

`svm_pattern` forms two comparisons:

- ca = (carrier ≥ T_a)
- cab = (carrier ≥ T_a+T_b)

The carrier starts each period at its valley. Over the period the legs
therefore pass through three vectors:

- V_k while the carrier is below T_a;
- V_k+1 while it is between T_a and T_a+T_b;
- the zero vector above T_a+T_b.

Then the sequence reverses. Each step changes one leg.

| sector | vectors (X‑Y‑Z) | a | b | c |
|---|---|---|---|---|
| I   | V1‑V2‑V7 | 1    | ca   | cab  |
| II  | V2‑V3‑V0 | ~ca  | ~cab | 0    |
| III | V3‑V4‑V7 | cab  | 1    | ca   |
| IV  | V4‑V5‑V0 | 0    | ~ca  | ~cab |
| V   | V5‑V6‑V7 | ca   | cab  | 1    |
| VI  | V6‑V1‑V0 | ~cab | 0    | ~ca  |

The vector states (legs a b c) are V1 = 100, V2 = 110, V3 = 010, V4 = 011,
V5 = 001, V6 = 101, V0 = 000 and V7 = 111. A leg state of 1 means the upper
switch is on.

**Sector I example.** Leg a stays at 1. Leg b is low while the carrier is
below T_a, which is half the V1 time. Leg c is high only while the carrier is
above T_a+T_b, which is the centred V7 interval.

The "≥" is chosen so that a zero T_a leaves a leg unswitched rather than
producing a one-sample glitch.

## Timing and resolution

| quantity | value |
|---|---|
| clock | 33.33 MHz |
| carrier sample | every 26 clocks (780 ns) |
| carrier period | 32 samples = 832 clocks, **40.06 kHz** |
| carrier step | 8 codes; 16 distinct levels per half period |
| reference step | every 1852 clocks, one degree |
| reference period | 360 steps = 666,720 clocks, **49.99 Hz** |
| dead time | 67 clocks = 2.01 µs |

Edges can only fall on carrier samples, so the effective PWM resolution is
1/32 of the period. The thresholds have 1-code resolution, but the carrier
moves in 8-code steps.

The reference is not latched at the carrier valley. The thresholds follow
the reference tables, which step about every 2.2 carrier periods, and the
comparison uses whatever the present values are. A table step or sector
change inside a carrier period can therefore make that one period slightly
asymmetric, and at a sector change the clamped leg moves mid-period. The
only state in the generator is the 5-bit carrier phase. A designer who wants
strict regular sampling can register `valpha`, `vbeta` and `sector` when
`carrier_phase` is 0.

Latency:

- The ROM read is registered, so `valpha`/`vbeta` lag `angle` by one cycle.
- `sa`/`sb`/`sc` are combinational from registers.
- The gate outputs are registered one cycle after the state.

## Dead time

`deadtime_system` gives each leg a 7-bit counter.

1. Any change of the leg state turns both gates off on the next clock and
   loads the counter with `DEAD_CYCLES`.
2. When the counter reaches zero, the gate matching the state turns on.
3. A state that flips back before the counter expires restarts it, so a
   pulse shorter than the dead time is dropped entirely.

With 26-clock carrier samples, a one-sample pulse (26 clocks) is shorter than
the 67-clock dead time and does not reach the switches. After reset, both
gates stay off for `DEAD_CYCLES` clocks. An assertion checks that no leg ever
has both gates on.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `CARRIER_DIV` | 26 | clocks per carrier sample |
| `SAMPLES` | 32 | carrier samples per period (even) |
| `REF_DIV` | 1852 | clocks per one-degree reference step |
| `DEAD_CYCLES` | 67 | dead time in clocks |

The code offset (224), the amplitude (128) and the Q10 constants live in
`svpwm_pkg`. `wave_lut` computes its contents at elaboration as
224 + round(128·cos(2πi/360)) or 224 + round(128·sin(2πi/360)).

To change the modulation depth, change `CODE_AMP` for the tables only. The
carrier range must stay 128 codes, because the dwell-time constants assume
T/2 = 128 codes.

## What follows the published design and what is added

**Follows the published design:**

- the block partition;
- the 33.33 MHz clock, the divide-by-26 and the 32 carrier samples;
- the 360-entry, 9-bit tables spanning 96/224/352;
- the triangle running from 224 to 352;
- the three-comparison sector test and its truth table;
- the per-sector T_a and T_a+T_b formulas with V_dc/T = 1;
- the odd/even clamping rule;
- the 2 µs dead time.

**This design's own choices:**

- **Clocking and reset:** single-clock enables instead of divided clocks,
  and the synchronous reset.
- **Reference rate:** the 1852 reference divider.
- **Arithmetic:** the Q10 precision, rounding and clamping.
- **ROM:** the registered ROM read.
- **Comparisons:** "≥" in the carrier comparisons.
- **Leg routing:** the leg assignment in sectors II–VI. It follows from the
  vectors, since only sector I is spelled out.
- **Triangle phase:** the valley at sample 0.
- **Dead time:** the counter-based dead-time scheme.

**Not included:**

- the closed-loop option, which derives V_alpha/V_beta from measured phase
  voltages through an abc-to-αβ transform;
- the board oscillator;
- the inverter and the motor.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. Reference values are computed in the
testbench with real arithmetic (sin, cos, atan2, and vector decomposition
onto the two active vectors), not copied from the RTL.

| testbench | what it checks |
|---|---|
| `tb_ajust_freq` | enable periods of exactly 26 and 1852 clocks, and restart after reset |
| `tb_counter360` | modulo-360 counting with a random enable |
| `tb_wave_lut` | all 360 entries of both tables, and the 96..352 range |
| `tb_vbeta_valfa` | a full revolution of angle and reference codes |
| `tb_find_sector` | every code pair inside the circle, against atan2 (exact boundary points skipped) |
| `tb_duration_ta`, `tb_duration_tatb` | 20,000 random vectors each, against the exact decomposition, within ±1 code |
| `tb_triangle` | sample values, period and valley marker |
| `tb_svm_pattern` | all carrier codes for random thresholds in every sector, against the X‑Y‑Z vector sequence |
| `tb_svm_generator` | 2,000 carrier periods with random references: sample-by-sample states, clamped leg, at most four transitions per period |
| `tb_deadtime_system` | cycle-exact gate model, gap of at least 67 clocks, swallowed short pulses |
| `tb_svpwm_top` | full design at default parameters over one full 50 Hz revolution (about 0.67 M clocks) |
| `tb_svpwm_spectrum` | full design at default parameters: Fourier analysis of the line-to-line states S_a−S_b, S_b−S_c, S_c−S_a over one revolution; fundamental 0.866 V_dc ±2 % (measured 0.859–0.860), phase lead 30° ±2°, harmonics 2–13 below 2 % (measured below 0.8 %) |

`tb_svpwm_top` also counts how often each mechanism occurred, and fails if
any never did:

- all six sectors;
- a leg clamped high, and a leg clamped low;
- five-segment periods;
- exact 67-clock dead-time handovers.

It takes a few seconds. In the comparisons against the exact reference,
samples within one code of a threshold are not compared, because there the
result depends only on rounding.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/svpwm_pkg.sv tb/tb_svpwm_top.sv --top-module tb_svpwm_top
./obj_dir/Vtb_svpwm_top
```

Substitute any other testbench name. The RTL uses only synthesizable
SystemVerilog. The ROM contents come from `$sin`/`$cos` in a constant
function, evaluated at elaboration.

Resource picture: the logic needs about 40 flip-flops and two 360×9 ROMs.
The comparisons and the duration formulas are constant-coefficient
multiply-adds.
