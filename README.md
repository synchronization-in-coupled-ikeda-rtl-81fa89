# Coupled Ikeda delay systems in single-precision RTL

This design turns an FPGA into a physical instance of a chaotic delay differential
equation, the Ikeda equation

    dx/dt = mu * sin(x(t - tau)) - alpha * x(t)

which models the phase lag of light in a passive optical ring resonator with a long
feedback path. The equation has only one state variable, but because the right-hand side
looks back by `tau`, its state is really a whole function over the last `tau` of time.
That is enough for chaos, and it is also why it is hard to build from analog parts: the
delay itself is the awkward component. In digital logic the delay is just a memory.

The RTL integrates two copies of the equation side by side: a *drive* system `x` and a
*response* system `y`. A coupling term `k(t) * (x - y)` pulls the response (and, in the
two-way mode, the drive too) toward the other system. This lets you watch two chaotic
systems synchronise. The outputs are 16-bit words meant for a stereo audio DAC, so the
attractor and the synchronisation error can be seen on an oscilloscope in X-Y mode.

It follows a published FPGA realization of this experiment (*Synchronization in coupled
Ikeda delay systems: Experimental observations using Field Programmable Gate Arrays*),
which ran on a Cyclone IV E board. The sections below say where this RTL departs from it.

## The equations that are integrated

With the step `dt = 1/1024` and the delay `N = tau/dt = 1024` steps, each Euler step
computes

    x[n+1] = x[n] + dt * ( mu sin x[n-N] - alpha x[n] + b * k[n] * (y[n] - x[n]) )
    y[n+1] = y[n] + dt * ( mu sin y[n-N] - alpha y[n] +     k[n] * (x[n] - y[n]) )

where `b = 0` for one-way (drive → response) coupling and `b = 1` for two-way coupling.
Before time zero both systems hold a constant history equal to their initial value. The
reference value is `x(t <= 0) = 0.1`.

The coupling factor `k` has three run-time modes (`couple_mode_e` in `ikeda_pkg`):

| mode            | k[n]                                                          |
|-----------------|---------------------------------------------------------------|
| `COUPLE_NONE`   | 0: the two systems run free and drift apart                   |
| `COUPLE_SQUARE` | `k1` for steps 0..N-1, `k2` for the next N, and so on (0 and 50) |
| `COUPLE_COS`    | `-alpha + 2 mu |cos y[n-N]|`                                   |

The default constants are the synchronisation set: `mu = 20`, `alpha = 5`, `tau = 1`,
`k1 = 0`, `k2 = 50`. The single-system attractor is usually shown with `mu = 6` and
`alpha = 1`, which are just different parameter values.

There are two optional extensions:

* **Delay-time modulation.** With `dtm_en = 1`, both systems read `x(t - tau(t))` with
  `tau(t) = A |sin t|` instead of a fixed delay. `A` is 1.5 by default; 1.0 is the other
  value of interest.
* **Parameter mismatch.** `MU_R` and `N_R` give the response its own `mu` and its own
  delay. This is used to test how robust synchronisation is.

## Timing of one Euler step

The board clock (50 MHz) is the only clock. `clock_divider` turns it into `tick`, a
one-cycle enable every 64 clocks. That gives 781,250 Euler steps per second, or about
763 units of model time per second. The reference design clocks the delay line and state
register with the divided clock itself. Here the same registers use `tick` as a clock
enable, so there is only one clock domain.

Inside one 64-clock step period, for both systems in lock-step:

| cycle after tick | what happens                                                                 |
|------------------|------------------------------------------------------------------------------|
| 0 (tick edge)    | `x[n]` is written into the delay line; `x[n-N]` is read out (registered)     |
| 1                | `x[n-N]` is converted to 5.27 fixed point and the CORDIC starts              |
| 2 .. 29          | 28 CORDIC micro-rotations, one per clock                                     |
| ~31              | sin and cos are back in single precision; `f`, the coupling term, `dt*(f+c)` and `x + dt*(f+c)` settle through combinational floating-point units |
| ~31 (commit)     | both `ready` flags are high; both state registers load on the same edge       |
| 32 .. 63         | idle                                                                         |

Committing both systems on one edge matters: the two-way update of `x` needs `y[n]`,
not `y[n+1]`. Assertions check that a step always commits before the next tick and
that the CORDIC is never restarted while it is busy. `DIV` must stay above the step
latency of `CORDIC_ITER + 3` clocks (31). Otherwise the step assertion fires.

The top registers one output sample per step on the commit edge. `sample_valid` pulses
in the following cycle. A sample holds `x[n]`, `x[n-N]`, `y[n]`, `y[n-N]`, `x[n]-y[n]`
and the delay `tau_steps` that step `n` used. These are exactly the values the step read,
so plotting `xd_out` against `x_out` gives the delay-embedded attractor directly.

## Number formats

* **Binary32 everywhere in the datapath.** The state, the delayed state, the gains, `dt`
  and `k` are IEEE 754 single-precision words, as in the reference design's 32-bit
  floating-point bus. `fp32_add` and `fp32_mul` are combinational and round to nearest
  even. Subnormals are flushed to zero, which the dynamics never reach: `|x|` stays
  below about `mu/alpha`.
* **5.27 fixed point for the sine.** The sine is computed by a fixed-point CORDIC.
  `fp32_to_fix` converts the delayed state to a signed 32-bit value with 27 fraction
  bits (range ±16). `cordic_sincos` reduces it into [-π, π], folds it into
  [-π/2, π/2], and rotates in a 3.29 format. `fix_to_fp32` brings sin and cos back.
  The error is below 2e-6, and 28 iterations are the source of most of it.
* **16-bit DAC words.** `dac_format` converts a value to 5.27 (truncated toward zero,
  saturating at ±16) and keeps bits 31..16. This gives a signed word with 11 fraction
  bits: 1.0 becomes 0x0800 and -1.0 becomes 0xF800.

## The delay line and the initial history

`delay_line` behaves like a 2048-stage shift register tapped at stage `tap`, but it is
built as a circular buffer. The memory is `DEPTH x 32` bits, with a write pointer and a
read address of `wr_ptr - tap`. It maps onto one block RAM per system with a
read-before-write port. The memory is never cleared. Instead, a saturating count of the
words written since reset masks the output: while fewer than `tap` words exist, the line
returns `init_val`. This realises the constant history `x(t <= 0) = x0` at no cost, and
it stays correct when the tap changes at run time. That is how delay-time modulation
works: `dtm_delay` advances a phase accumulator by `dt` per step (wrapping at 2π),
computes `sin` with a second CORDIC during the step, and presents
`round(A |sin t| / dt)`, clamped to 1..2048, as the tap for the next step.

## The fixed-point co-simulation integrator

The reference work also built a second, simpler version of the single system for
hardware co-simulation, where a host program paces the FPGA and plots the samples.
`ikeda_fx_cosim` reproduces that datapath on its own. It does not use binary32. Every
word is signed fixed point, named `Fix_W_F` (W bits, F of them fraction):

    x[n+1] = x[n] + K * ( 20 * sin(p(x[n-100])) - 5 * x[n] ),   K = 655 / 2^16 = 0.009995

* The state, the products and the sums are `Fix_24_16`. `K` is `dt = 0.01` rounded to
  16 fraction bits, so the 100-step delay is `tau = 1`.
* `p(.)` forms the sine's argument. It takes bits 20..8 of the delayed state
  (`Fix_13_8`), clamps them to ±3.98828125 (±1021/256), and keeps the low 11 bits as a
  `Fix_11_8` phase in radians.
* The sine comes from the same CORDIC as the main design and is truncated to
  `Fix_24_22`.
* Every narrowing truncates toward minus infinity. Every overflow wraps.

One step takes `CORDIC_ITER + 3 = 31` clocks after `tick`, and `step_done` marks it.
Ticks must be at least 32 clocks apart. The ports are `tick`, `x_init` (the reset state
and the history, `Fix_24_16`), `x`, `xd` and `step_done`. The host link itself is not
built. The block is a stand-alone module and is not instantiated in `ikeda_top`.

## Module map

```
ikeda_top                       board clock in, DAC words out
├── clock_divider               /64 step enable (tick) and divided clock
├── dtm_delay                   tau(t) = A|sin t| as a tap   ── cordic_sincos
├── ikeda_sync_pair             drive + response + coupling + error
│   ├── ikeda_dde  (drive)      one Euler-integrated Ikeda system
│   │   ├── delay_line          2048 x 32 circular buffer, tap N
│   │   ├── ikeda_nonlinear     mu sin(xd) - alpha x, cos(xd)
│   │   │   ├── fp32_to_fix, cordic_sincos, fix_to_fp32 (x2)
│   │   │   └── fp32_mul (x2), fp32_add
│   │   └── fp32_add, fp32_mul, fp32_add   (f + c, * dt, + x)
│   ├── ikeda_dde  (response)
│   ├── coupling_unit           square wave / cosine k(t)   ── fp32_mul, fp32_add
│   └── fp32_add x2, fp32_mul x2   (x - y, y - x, k * differences)
└── dac_format x5               binary32 -> 16-bit DAC word
ikeda_pkg                       fp32_t, q5_27_t, constants, coupling enums
ikeda_fx_cosim                  fixed-point single system (stand-alone)
├── delay_line                  128 x 24, tap 100
└── cordic_sincos
```

Top-level ports: `clk`, `rst` (synchronous, active high), `mode`, `dir`, `dtm_en`,
`x_init`/`y_init` (binary32, sampled while `rst` is high). The outputs are `euler_clk`,
`sample_valid`, the binary32 values `x_out`, `xd_out`, `y_out`, `yd_out`, `e_out` and
`k_out`, plus `k_phase`, `tau_steps` and the 16-bit words `dac_x`, `dac_xd`, `dac_y`,
`dac_yd` and `dac_e`. `mode`, `dir` and `dtm_en` may be changed while running. A change
takes effect from the next step, and the testbench switches from free-running to coupled
without a reset.

## Parameters of `ikeda_top`

| parameter | default                  | meaning                                  |
|-----------|--------------------------|------------------------------------------|
| `DIV`     | 64                       | board clocks per Euler step (> 31)       |
| `MU`, `ALPHA` | 20.0, 5.0 (binary32 bit patterns) | equation constants         |
| `DT`      | 1/1024 (`32'h3A80_0000`) | Euler step                               |
| `DEPTH`   | 2048                     | delay-line stages (power of two)         |
| `N`       | 1024                     | delay in steps, `tau/dt`                 |
| `MU_R`, `N_R` | `MU`, `N`            | response mismatch                        |
| `K1`, `K2`| 0.0, 50.0                | square-wave coupling levels              |
| `DTM_AMP` | 1.5 in 5.27 (`201326592`)| modulation amplitude `A`                 |

`dtm_delay` assumes `dt = 2^-DT_LOG2` (10 by default). If you change `DT`, change
`DT_LOG2` with it.

## Simulating

The RTL is SystemVerilog-2017. Packages must come first. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ikeda_top \
    rtl/ikeda_pkg.sv tb/tb_fp_pkg.sv $(ls rtl/*.sv | grep -v ikeda_pkg) \
    tb/tb_ikeda_top.sv -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>` and
has a watchdog. `tb_fp_pkg` holds reference conversions between bit patterns and
`real`, written out from the double-precision encoding so the benches do not rely on
simulator `shortreal` support.

| testbench               | what it establishes |
|-------------------------|---------------------|
| `tb_fp32_add`, `tb_fp32_mul` | bit-exact against a once-rounded double result for random normal operands |
| `tb_cordic_sincos`      | sin/cos within 2e-6 over \|a\| < 16; latency ITER+1 |
| `tb_dac_format`         | DAC word equals the truncated, saturated 5.27 value's upper half |
| `tb_clock_divider`      | one tick per 64 clocks; divided clock duty |
| `tb_delay_line`         | against a record of all writes, for taps 1, 477, 1024, 2048; history after reset |
| `tb_ikeda_nonlinear`    | `f` and `cos` against double precision; latency |
| `tb_coupling_unit`      | square-wave levels and period; cosine formula |
| `tb_ikeda_dde`          | `mu = 6`, `alpha = 1`: every step against the Euler update, delayed value against the recorded history |
| `tb_dtm_delay`          | tap against `round(1.5 |sin t| 1024)` over more than one period |
| `tb_ikeda_sync_pair`    | all four coupling combinations plus free run, every step checked, all coupled runs synchronise |
| `tb_ikeda_top`          | the whole design at its default size: 64-clock sample period, history, every step, DAC words, a run-time mode switch, delay modulation; counts each mechanism |
| `tb_workload_mismatch`  | six pairs with 0-20 % mismatch in `mu`, `tau` or both; prints the drive/response correlation for each coupling |
| `tb_ikeda_fx_cosim`     | fixed-point integrator: every step bit-exact against the same arithmetic rebuilt in the bench (sine within 3 units of 2^-22), delayed value, latency, runs started outside the clamp, a 30 `tau` run staying on a bounded, non-settling attractor |
| `tb_workload_dtm_sync`  | `tau(t) = |sin t|`: free run apart, square-wave and cosine coupling synchronise |

The full-size end-to-end run (`tb_ikeda_top`, about 70,000 Euler steps) takes a few
seconds. With `x0 = 0.1` and `y0 = 0.5`, the free-running systems differ by up to about 6.
One-way cosine coupling brings `|x - y|` to about 1e-6 within 16 `tau`. Two-way and
one-way square-wave coupling bring it below 1e-4. In `tb_workload_mismatch` the
correlation stays above 0.99 for a 20 % `mu` mismatch. It falls to 0.4-0.9 for a 20 %
`tau` mismatch, depending on the coupling.

## Where this RTL departs from the reference design, and what to trust

* **One clock with enables** instead of a divided clock driving the delay line and the
  state flip-flop. The sequence of states is the same.
* **The sine.** The reference design does not say how its sine is built for the
  analog-output version. Its co-simulation version clamps the argument to ±3.988 and uses a
  vendor CORDIC. `ikeda_fx_cosim` keeps that clamp. The main design range-reduces the
  argument instead, so its nonlinearity is the true `sin` for any |x| < 16.
* **Initial conditions are ports**, and the two systems may start apart. The reference
  design starts both systems at 0.1 and relies on analog noise to make them differ.
* **The delay line is a RAM**, not a register chain. The reference compilation reports
  about 70,600 memory bits for the whole two-system design. That is about half of the
  two 2048 x 32 buffers built here, so the original probably stored less per system.
  The depth is kept at the stated 2048 stages.
* **Delay modulation and mismatch** were demonstrated by the reference only in a
  host-assisted co-simulation with fixed-point (24-bit) arithmetic. Here they are
  options of the stand-alone, single-precision design. The modulation's sine is
  generated on the Euler time grid rather than by a separate 1 ms oscillator.
* **The co-simulation integrator** runs one step per `tick`, with the CORDIC inside the
  step. The original streamed one sample per clock through pipeline registers, and
  their exact latencies are not known. Truncation and wrap are assumed to be the
  quantisation rules, and the slice positions are inferred from the word formats.
* **Not included:** the audio-codec interface (serial format and register setup are
  board specific; the 16-bit words are outputs), the FPGA PLL, the host link of the
  co-simulation variant, and the correlation measurement, which is done in simulation
  here.
* **Trust.** Every datapath unit is checked bit-exactly or against double precision.
  The integrated systems are checked step by step against a double-precision Euler
  update computed from the design's own state. Chaotic trajectories cannot be compared
  over long spans, because any rounding difference grows exponentially. What is
  verified is that each step is right and that synchronisation emerges.
