# CMAC learning controller in integer arithmetic

A cerebellar model articulation controller (CMAC) is a small neural network used as
an adaptive controller. It compares a tracking goal with the measured state of a
plant and evaluates a set of overlapping Gaussian receptive fields on the result.
Its response is the sum of the field values weighted by a learned weight memory.
After each response the weights move by a linear function of the error and the
error difference.

This RTL computes one such learning period in hardware without floating point.
Every real number is an integer scaled by one million (six decimal places), so the
datapath needs only integer add, multiply and divide. The exponential in the
Gaussian is evaluated with a short Taylor series, not with a look-up table. At 50 MHz
a learning period takes 28 cycles (0.56 µs).

A second, independent unit computes the area of a circle in the same number format.
It shows the format on a simple problem.

## Number format

| real value | integer carried |
|---|---|
| 1.0 | 1,000,000 |
| -2.5 | -2,500,000 |
| π | 3,141,592 |

The scale `SCALE = 1_000_000` and the type `fx_t` (32-bit signed) live in
`rtl/cmac_pkg.sv`. The rules are:

- **Add and subtract** work directly on the integers.
- **Multiply:** the product carries the scale twice, so it is divided by 10^6 once
  (`fx_mul`).
- **Divide:** the dividend is multiplied by 10^6 first, so the quotient keeps the
  scale.
- **Truncation:** every division truncates toward zero, and anything below 10^-6
  is lost.
- **Overflow:** results that leave the 32-bit word saturate at ±2,147,483,647.
  That is about ±2147.48 in real terms.
- **Intermediate values** are as wide as needed: 64 bits, or 128 bits inside the
  Gaussian.

## A learning period

```
 goal, state ──► error_calc ──► gaussian ×N_R (parallel) ──► gauss_mul_sum ──► weight_update ──► response
                 e, de          b_j = exp(-Σ(s-m)²/2σ²)      y = Σ b_j·w_j      w_j += K1·e + K2·de
                                 s = (e, de)                 (current weights)
```

`cmac_core` chains four units. The `read_ena` pulse of each unit starts the next.

1. **`error_calc`** computes e = goal − state and de = e(t) − e(t−1). The first
   sample after reset has no previous error, so its de is 0.
2. **`gaussian`**: N_R copies (default 5) each evaluate one receptive field on the
   input vector s = (e, de). Field j is centred at `MEAN_LO + j·MEAN_STEP` in both
   dimensions (−2 … 2 by default) and has width `SIGMA` (2.0). The result lies in
   0 … 1,000,000.
3. **`gauss_mul_sum`** forms y = Σ b_j·w_j with one shared multiplier, one field per
   clock. It uses the weights as they stood before this period.
4. **`weight_update`** applies w_j ← w_j + K1_j·e + K2_j·de to each weight, one per
   clock. K1 = 5 and K2 = 3 by default. The weights reset to 0.

The response is registered when the update is finished, and `read_ena` pulses on the
next clock.

| stage | cycles (defaults) |
|---|---|
| error_calc | 2 |
| gaussian (all fields together) | 13 |
| gauss_mul_sum | N_R + 1 = 6 |
| weight_update | N_R + 1 = 6 |
| response register | 1 |
| **total, start → read_ena** | **28** |

Only one period runs at a time. The next goal/state sample normally depends on how
the plant reacted to the last response, so overlapping periods would not help. Inside
a period the fields run in parallel.

## The Gaussian unit

This unit is the most involved part. `gaussian` is three sub-units in series, each
with its own handshake:

**`power_calc`** forms p = Σ_i (s_i − m_i)² / (2σ_i²), one input per clock. The
steps are:

1. The difference is squared and divided by 10^6.
2. σ² is divided by 10^6 and then doubled.
3. The quotient is formed with the dividend pre-scaled by 10^6.

Example: s = 5, m = 2, σ = 2 gives 9/8 = 1.125 (1,125,000). With several inputs the
exponents add, so one exponential gives the product of the per-input Gaussians.
If σ² truncates to zero, p saturates, which means "far outside the field".

**`exp_taylor`** forms e^p = Σ_{n<TERMS} p^n/n!. Each term comes from the previous
one as t_n = t_{n−1}·p / 10^6 / n, truncated at each step, so only one multiplier
and one divider are needed. One term is added per clock.

- **Width:** terms are 128 bits wide, so no term overflows for any 32-bit argument
  with up to 12 terms. The sum saturates to a 64-bit result.
- **Accuracy:** the truncated series under-estimates e^p, and more so for large p.
  For p ≤ 1 the field value is within 0.1 % of the true Gaussian. For p ≫ TERMS the
  value is only roughly right, but the field is then close to zero anyway.

**`reciprocal`** forms e^−p = 10^12 / e^p. The numerator carries the scale twice, so
the quotient keeps it once.

### How many series terms

`TERMS` defaults to 7 because the design description calls for seven terms. Two
reference results from the same description match other term counts exactly, once
the term-by-term truncation above is applied:

| quantity | TERMS = 6 | TERMS = 7 (default) | TERMS = 9 | reference |
|---|---|---|---|---|
| e^2 | 7.266665 | 7.355553 | **7.387298** | 7.387298 |
| Gaussian(5; m 2, σ 2) | **0.325005** | 0.324708 | 0.324654 | 0.325005 |

The testbenches check both reference numbers at their matching term counts. To
follow either, override `TERMS`. Latency grows by one cycle per term.

## Error difference sign

de is e(t) − e(t−1). The reference trace for the error unit is: goal 5 and state 3
give e = 2 and de = 0, then state −1 gives e = 6 and de = −2. This design gives 2/0
and then 6/**4**. Neither sign of a one-step difference gives −2, so this design
keeps the plain definition.

## Handshake convention

All units use the same protocol:

- A one-cycle `start` samples the operands. `start` must not arrive while `busy`
  is high; an assertion checks this in every unit.
- The result register is written on one clock edge.
- `read_ena` pulses for one cycle on the next edge, so a receiver never samples a
  result that is still changing.
- The result then holds until the next `start`.

Reset is asynchronous and active low (`rst_n`) and clears every register.

## Circle area

`circle_area` computes A = π·r² with π = 3,141,592 (π truncated to six places).

- First clock: r² = r·r/10^6.
- Second clock: A = r²·π/10^6.

Radius 5 (5,000,000) gives 78,539,800, which is 78.5398. Radii above about 26.1
saturate. The unit shares only clock and reset with the CMAC.

## Top level

`cmac_top` places `cmac_core` and `circle_area` side by side. The CMAC ports are
clock, `rst_n`, `start`, 32-bit `goal` and `state_in`, 32-bit `response`,
`read_ena` and `busy`. Observation outputs are `error`, `error_diff`, `field[N_R]`
and `weights[N_R]`. The circle unit has the `ca_*` ports.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `SCALE` | 1,000,000 | cmac_pkg | integer per 1.0 |
| `N_IN` | 2 | power_calc, gaussian, cmac_core | inputs per field; cmac_core needs 2 (e, de) |
| `N_R` | 5 | cmac_core, cmac_top, gauss_mul_sum, weight_update | receptive fields / weights |
| `TERMS` | 7 | exp_taylor, gaussian, cmac_core | Taylor terms (2 … 12) |
| `MEAN_LO`, `MEAN_STEP` | −2.0, 1.0 | cmac_core | field centres |
| `SIGMA` | 2.0 | cmac_core | field width |
| `K1`, `K2` | 5.0, 3.0 per weight | weight_update, cmac_core | learning rates |
| `PI_FX` | 3,141,592 | circle_area | π |

Fixed points of the design description are the scale, the 32-bit word, the
Taylor-series method, the update law, K1 = 5 and K2 = 3, and π. This design chose
the rest:

- the number of fields and their centres;
- (e, de) as the controller input;
- one weight per field;
- serial multiply-accumulate;
- saturation;
- the start strobe;
- the reset polarity.

The weight update is not scaled by the field value: each weight receives the same
K1·e + K2·de step (with its own K1_j, K2_j).

## Size

Synthesis at the defaults gives about 4,500 flip-flops. Most of them are the 128-bit
term and sum registers of the five `exp_taylor` units. The large combinational
dividers are about 870 word-level cells. The divisions are done in one clock each,
so at 50 MHz an FPGA implementation may need them pipelined or multicycle-constrained.

## Verification

Each unit has a self-checking testbench in `tb/`. Each one compares against integer
models written independently in the testbench, checks the cycle counts, and ends
with a `TB_RESULT checks=… failures=…` line:

| testbench | what it covers |
|---|---|
| `tb_power_calc` | 1.125 example, two-input sums, zero width, 200 random vectors |
| `tb_exp_taylor` | e^0, e^2 at 7 and 9 terms, negative and huge arguments, accuracy against `$exp` |
| `tb_reciprocal` | exact quotients, the 0.325005 value, saturation, random divisors |
| `tb_gaussian` | example at 6 and 7 terms, centre = 1.0, random fields against a model and against the real Gaussian, latency ≤ 1.44 µs |
| `tb_gauss_mul_sum` | worked sum 6.3, random sums, saturation both ways |
| `tb_error_calc` | the 5/3/−1 trace, random pairs, saturation, latency ≤ 160 ns |
| `tb_weight_update` | 30 → 24 example, per-weight rates, saturation, latency ≤ 240 ns |
| `tb_circle_area` | radius 5 → 78.5398, random radii against a model and real π |
| `tb_cmac_core` | 103 learning periods against the reference model (`tb/cmac_ref_pkg.sv`), 28-cycle latency, ≤ 1.6 µs |
| `tb_cmac_top` | full design at default parameters, described below |

`tb_cmac_top` closes the loop with a first-order plant:
state ← state + (response/50 − state)/2. The goal steps from 0 to 5 and then to −3,
and the tracking error must fall below 2 % of each step within 60 periods. Every
period is checked exactly against the reference model. It also counts that each
mechanism occurred:

- the zero first difference;
- errors of both signs;
- weights rising and falling;
- a goal step;
- circle-area requests running during learning periods.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_cmac_top \
    rtl/cmac_pkg.sv tb/cmac_ref_pkg.sv tb/tb_cmac_top.sv -y rtl -y tb +libext+.sv
./obj_dir/Vtb_cmac_top
```

Replace `tb_cmac_top` with any other testbench name. `-Wno-fatal` is needed because
the testbenches pass 32-bit values to 64-bit check tasks, which lint reports as
width warnings. Every testbench finishes in seconds.
