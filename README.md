# Path delay measurement with temperature and voltage correction

A chip that must stay reliable for years can measure its own logic delay in
the field, for example at every power-on, and watch that delay grow as the
transistors age. The catch is that the raw number also moves with the
conditions at the moment of measurement. On a 65 nm test chip the same
circuit measures anywhere between about 5.26 ns and 7.77 ns over 30–80 °C
and 1.05–1.35 V. That 2.4 ns spread swamps any aging signal.

This RTL measures a path delay on chip with logic BIST and a variable test
clock. It reads temperature and voltage from on-chip ring-oscillator sensors
at the same time. It then subtracts a quadratic model of the temperature and
voltage influence:

```
D_corr  = D_meas - (a1*dT + a2*dT^2) - (b1*dV + b2*dV^2)     dT = T - T0, dV = V - V0
D_aging = D_corr - D0
```

`D0` is the delay measured once under controlled conditions `(T0, V0)`, for
example at production test. `D_corr` is the delay the circuit would show at
`(T0, V0)`. `D_aging` is how much the circuit has slowed since then. With the
published coefficients this correction cuts the spread over the whole
30–80 °C / 1.05–1.35 V range to about 0.21 ns. A linear fit (`a2 = b2 = 0`)
only gets it down to about 0.41 ns. The reason is that the voltage
dependence of a BIST-measured delay is curved: the slowest sensitized path
changes with the operating point.

## How one measurement runs

The test controller (`test_ctrl`) runs this sequence:

1. **Start the sensors.** The twelve ring oscillators (4 sensor units × 3)
   start counting over a fixed window. This runs in parallel with the delay
   sweep.
2. **Reference session.** The BIST session runs with `DLYC = 0`, so the
   launch-to-capture interval equals the system clock period. Its MISR
   signature becomes the reference for this measurement.
3. **Sweep.** `DLYC` goes up by one and the same session (same seed, same
   patterns) runs again. Each step makes the interval one buffer delay
   (about 23.6 ps) shorter. The sweep stops at the first session whose
   signature differs from the reference, or after `DLYC = 255` has passed.
4. **Measured delay.** The result is the shortest interval that still passed:

   ```
   D_meas = T_CLK - DLYC_pass * RES        (RES = 23.60 ps by default)
   ```

   If every code passed, `D_meas` is only an upper bound. The `all_pass`
   status bit flags this case.
5. **Temperature and voltage.** When the sensor counts are in, `tv_req` goes
   high. Converting the counts to temperature and voltage is a per-chip
   calibration and is not part of this RTL. Whatever does it returns `T`
   and `V` with `tv_valid`. A tester can also answer with the set point of
   its climate chamber and supply.
6. **Correction.** `tv_correct` computes `D_corr` and `D_aging`. In *init
   mode*, `D_meas` is also stored as the new `D0`.
7. **Record.** A record goes into the test memory, and `done` is raised.

One session takes `NPAT*(CHAIN_LEN+2) + CHAIN_LEN + 1` cycles (2209 at the
defaults). A measurement near 6.1 ns at a 10 ns clock needs about 165
sessions, so roughly 0.37 M cycles.

## The variable test clock generator

`test_clock_gen` drives the system clock `CLK` into two delay paths with the
same structure. Each path has 8 stages. Stage *k* holds a chain of 2^k
buffers and a 2:1 mux, so stage *k* is inserted when bit *k* of the 8-bit
code is set.

- The **controllable path** takes `DLYC` and produces the launch clock
  `TCLK_L`.
- The **uncontrollable path** has all its selects tied to 0 and produces the
  capture clock `TCLK_C`.

Launch happens on a `TCLK_L` edge, and capture on the `TCLK_C` edge of the
following cycle. The interval between them is therefore
`T_CLK - delay(DLYC)`. The mux delays are the same in both paths and cancel.

The stage delays are the SPICE values at 60 °C / 1.20 V:

| stage | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| buffers | 1 | 2 | 4 | 8 | 16 | 32 | 64 | 128 |
| delay [ps] | 20.93 | 46.65 | 92.40 | 187.43 | 378.43 | 758.70 | 1532.25 | 2999.02 |

The 128-buffer stage is laid out separately from the other seven and is a
little faster per buffer. As a result, code `10000000` is *shorter* than
`01111111` (2999.02 ps against 3016 ps). The sweep does not depend on
monotonic steps: it stops at the first failing code. But the resolution
`RES` used to convert the code into picoseconds is an average, so
`D_meas` can be off by up to about 20 ps near code 128. The end-to-end
test allows for this.

This generator is timing, not logic, so `test_clock_gen` and
`var_delay_path` are **behavioural models** (`#` delays, not synthesizable).
They model the clock edges accurately enough to test the rest of the design.
The same applies to `tvs_ro`, the ring-oscillator model. A real chip needs
hand-placed delay cells in their place.

## Pass/fail without a stored golden signature

BIST usually compares against a golden signature computed in advance. Here
the first session of each measurement runs at the full clock period, where
the circuit is assumed to pass, and its signature serves as the reference.
The same pattern sequence is replayed for every code. So any difference
means that some capture flip-flop latched a value before the launched
transition arrived. A consequence: if the circuit already fails at the full
period, the measurement reports nonsense. Check `DLYC_pass` and the
plausibility of `D_meas` against that case.

## The correction arithmetic

| quantity | format | default (reset value of `io_ctrl`) |
|---|---|---|
| delays (`D_meas`, `D0`, `D_corr`, `D_aging`, `T_CLK`, `RES`) | signed Q15.8 ps | `D0` = 6149.10, `T_CLK` = 10000, `RES` = 23.60 |
| temperature `T`, `T0` | signed Q7.4 °C | `T0` = 60 °C |
| voltage `V`, `V0` | unsigned integer mV | `V0` = 1200 mV |
| `a1`, `a2` | signed Q11.20, ps/°C and ps/°C² | 6.768, 0.012 |
| `b1`, `b2` | signed Q11.20, ps/mV and ps/mV² | −7.327, 0.01831 |

`T0`, `V0`, `D0`, `a1`, `a2` and `b2` are the published values for the
65 nm test chip. `b1 = -7.327` is consistent with the published corner
result: a delay of 7678.14 ps measured at (80 °C, 1.05 V) corrects to
6027.01 ps. The correction unit reproduces that corner to within 1 ps. The
published linear fit is `a1 = 6.595`, `b1 = -7.326` with `a2 = b2 = 0`; to
use it, clear `poly_en` (CTRL bit 2) and load those two coefficients.

`tv_correct` is a three-stage pipeline that accepts one input per cycle:

1. It forms `dT`, `dV` and their squares.
2. It computes the four products exactly.
3. It aligns the products to 2^-28 ps, subtracts them, rounds to 2^-8 ps
   and saturates.

The coefficients are fitted for one design, not for one chip. A product
would load them through the register bus. `D0` is per chip and comes from
the init-mode measurement.

## Temperature and voltage sensors

Each of the four sensor units has three ring oscillators with different
sensitivities to temperature and voltage. Comparing their frequencies makes
it possible to solve for both. `tvs_ctrl` clears one counter per oscillator
and enables all oscillators for `TVS_WIN` system clocks (1024 by default).
It then stops them, waits 4 cycles and latches the twelve 16-bit counts.
Each counter is clocked by its own oscillator and is read only after that
oscillator has stopped, so no synchronizer is needed.

`tvs_ro` is a model with a linear period law:
`P = P0 * (1 + KT*(T-60) + KV*(V-1200))`. The three parameter sets used in
`tdm_top` are illustrative. Real values come from the oscillator design and
its calibration, which also supplies the count-to-T/V conversion.

## Register map (`io_ctrl`)

The bus is word addressed with 32-bit data. A write takes one cycle with
`bus_we`. A read is requested with `bus_re`, and `bus_rdata` is valid on the
next cycle.

| addr | name | access | content |
|---|---|---|---|
| 0x000 | CTRL | W | bit0 start (pulse), bit1 init_mode, bit2 poly_en |
| 0x001 | STATUS | R | bit0 busy, bit1 done (sticky until next start), bit2 tv_req, bit3 all codes passed |
| 0x002 | TCLK_PS | RW | system clock period, Q.8 ps: must match the real clock |
| 0x003 | RES_PS | RW | buffer delay, Q.8 ps |
| 0x004–0x006 | T0, V0, D0 | RW | D0 is also loaded by an init-mode measurement |
| 0x007–0x00A | A1, A2, B1, B2 | RW | Q.20 |
| 0x010–0x014 | D_MEAS, D_CORR, D_AGING, DLYC_PASS, MEAS_COUNT | R | last measurement |
| 0x200 + n | memory | R | test-memory word n |

Each measurement writes a 16-word record at `16 * (count mod 16)`:

| word | content |
|---|---|
| 0 | `{init, failed, DLYC_fail[7:0], DLYC_pass[7:0]}` |
| 1 | `D_meas` |
| 2 | `D_corr` |
| 3 | `D_aging` |
| 4 | `{T (Q.4), V (mV)}` |
| 5–10 | the twelve counts, two per word, low half first |

## Module hierarchy

```
tdm_top
├── io_ctrl          register bus, configuration, result read-back
├── test_ctrl        measurement sequencer
├── test_clock_gen   (behavioural) launch / capture clocks
│   └── var_delay_path ×2
├── lbist            shift / launch / capture sequencing
│   ├── lbist_tpg    32-bit LFSR, x^32+x^22+x^2+x+1
│   └── lbist_misr   32-bit MISR, same polynomial
├── tvs_ctrl         oscillator window and counts
│   └── ro_counter ×12
├── tvs_ro ×12       (behavioural) ring oscillators
├── tv_correct       quadratic / linear correction
└── test_mem         256 × 32 record memory
```

`tdm_pkg` holds the number formats, the `corr_cfg_t` configuration struct and
the stage-delay table.

Two parts sit outside `tdm_top`, and their signals are its ports:

- **The circuit under test.** `cut_*` carries its scan chains and clocks.
  The circuit must use `cut_tclk_l` for the cycle marked by `cut_launch_en`,
  and `cut_tclk_c` for shift (`cut_scan_en`) and capture (`cut_capture_en`)
  cycles.
- **The count-to-T/V conversion.** It is reached through `tv_req` and
  `tv_valid`.

`env_temp_mc` and `env_volt_mv` only feed the oscillator models.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/tdm_pkg.sv tb/tb_tdm_top.sv --top-module tb_tdm_top -Mdir obj -o sim
./obj/sim
```

`tb_tdm_top` runs the whole design at its default sizes. The circuit under
test is `tb/cut_scan_model.sv`: 8 × 32 scan flip-flops with one timed
critical path, whose delay follows the quadratic model above with the
published coefficients, plus optional aging. The testbench takes seven
measurements:

- the initial measurement at 60 °C / 1.20 V,
- quadratic-corrected measurements at (80 °C, 1.05 V), (30 °C, 1.35 V) and
  (40 °C, 1.29 V),
- an aged circuit (+150 ps),
- a linear correction,
- a run with a 12 ns clock, where every code passes.

It checks `D_meas`, `D_corr` and `D_aging` against the model. It also checks
that every mechanism (passing and failing sessions, the all-pass sweep,
init and field mode, both correction modes, the sensor handshake, the
record read-back) occurred at least once. It takes about 25 s.

In this model the corrected delays land within about 30 ps of `D0`. That
residual is the quantisation of one buffer step, plus the difference between
the average `RES` and the real stage delays. The aging estimate came out at
152.8 ps for 150 ps injected.

`tb_tdm_grid` repeats the comparison over the whole operating range. It
runs 66 points (30–80 °C in 10 °C steps, 1.05–1.35 V in 30 mV steps), once
with the published linear fit and once with the quadratic fit. It uses 8
patterns per session instead of 64 to keep it to about a minute. Result:

| | spread (max − min) |
|---|---|
| raw `D_meas` | 2549 ps |
| linear correction | 473 ps |
| quadratic correction | 73 ps |

The model delay is exactly quadratic, so the 73 ps left is measurement
error, not correction error. Most of it is the code-128 step described
above: delays measured on either side of code 128 (near 7.0 ns at a 10 ns
clock) carry offsets about 20 ps apart.

The block testbenches (`tb_<module>.sv`) compare each block with a model
written independently in the testbench. `tb_tv_correct`, for example,
evaluates the correction in double precision.

## Where this RTL goes beyond, or differs from, the published design

- The following are all choices of this RTL: the BIST structure (one LFSR
  feeding 8 parallel chains, one MISR), its sizes (8 × 32, 64 patterns), the
  polynomials, and the use of the full-period session as the reference.
  The published chip wraps logic BIST around an OR1200 core with a
  configuration that is not given.
- The measured delay is defined here as the shortest passing interval,
  using the average buffer delay. The real per-code delays are not stored.
  Near code 128 this costs up to about 20 ps.
- The correction runs in hardware on chip. The method itself only defines
  the equations.
- The following are this design's own: the test-memory size and record
  layout, the register map, the sensor window, the counter widths and the
  10 ns default clock.
- The clock-generator model uses the 60 °C / 1.20 V stage delays. The real
  buffer delay varies from about 22.3 ps to 33.8 ps over the operating
  range, and this model has no environment input for it. In silicon, that
  variation is part of what the correction coefficients absorb.
- The oscillator model's sensitivities are illustrative. Converting the
  counts to temperature and voltage is left to the host, through `tv_req`
  and `tv_valid`.

Synthesis notes: `var_delay_path`, `test_clock_gen` and `tvs_ro` are models.
`io_ctrl` takes its reset values as `real` parameters and converts them to
fixed point at elaboration. `tvs_ctrl` contains twelve oscillator clock
domains, cleared asynchronously from the system clock domain and read only
while the oscillators are stopped.
