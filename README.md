# Fixed-point boost converter model for hardware-in-the-loop emulation

This RTL emulates a power-factor-correction (PFC) boost converter in real
time, so that a digital controller can be tested in a closed loop against
the converter model before it meets real power hardware. The model advances
the converter's two state variables, the inductor current `iin` and the
output capacitor voltage `vout`, every 10 ns. One 100 kHz switching period
is therefore 1000 integration steps, and the PWM has the same 10 ns
resolution as the integrator.

The hard part is not the equations. It is the **width of the two state
registers**. Every step adds a very small increment to a large value: about
2·10⁻⁶ A to a current of a few amperes, or a few µV to 400 V. If a register
has too few fraction bits, the increments round away. The model then drifts
from the real converter, and the drift is invisible at any single step. The
register widths `NI` and `NV` are therefore the main parameters of the
design. Each evaluated converter scenario needs some minimum width to keep
its mean error below 2 %. The defaults of 24 and 32 bits are the largest of
those minimums, so they cover every scenario.

## The converter equations

The converter is an ideal boost stage: a source `vg`, an inductor `L`, a
switch `Q`, a diode `D`, a capacitor `C` and a load that draws `iR`. Each
step uses the previous step's state (forward Euler), in one of three modes:

| mode | condition | current update | voltage update |
|---|---|---|---|
| closed | `q = 1` | `iin += dt/L · vg` | `vout -= dt/C · iR` |
| CCM | `q = 0`, `iin > 0` | `iin += dt/L · (vg − vout)` | `vout += dt/C · (iin − iR)` |
| DCM | `q = 0`, `iin ≤ 0` | `iin = 0` | `vout -= dt/C · iR` |

With the switch open, a current that would step below zero is set to zero.
This models the diode, which blocks reverse current, and it is how the model
passes from CCM into DCM. The update cannot be pipelined, because each step
needs the result of the step before. A step therefore takes exactly one
clock cycle. The voltage path (subtract, multiply, round, add) limits the
clock frequency, which falls slowly as `NV` grows. At 10 ns per step the emulation runs in real time with a
100 MHz clock. A faster clock runs faster than real time.

## Number formats and why the widths matter

Both state variables are two's-complement fixed-point numbers. `NI` and `NV`
count magnitude bits, and the sign bit comes on top, so the ports are
`[NI:0]` and `[NV:0]`.

| quantity | integer bits | fraction bits | range | LSB at default width |
|---|---|---|---|---|
| current (`iin`, `ir`) | 3 | `NI − 3` | ±8 A | 2⁻²¹ A ≈ 0.48 µA |
| voltage (`vout`, `vin`) | 10 | `NV − 10` | ±1024 V | 2⁻²² V ≈ 0.24 µV |

A register must hold both the largest value `x` and the smallest increment
`Δx` that matters, with `n` bits left over to resolve that increment:

    width = ceil(log2(x / Δx)) + n

Worked example for L = 5 mH and C = 100 µF:

* **Current.** Ignore the 5 % of the mains half-cycle nearest the zero
  crossing, where `vg` < 25 V. The smallest relevant current increment is
  then 10 ns / 5 mH · 25 V = 5·10⁻⁵ A. With 8 A full scale this needs
  18 + `n` bits.
* **Voltage.** The smallest relevant difference `iin − iR` is about
  0.066 A, which gives 6.6·10⁻⁶ V per step. With 1000 V full scale this
  needs about 28 + `n` bits.

With `n` = 8 this conservative rule gives 26 and 36 bits. Simulating against
a double-precision reference shows that fewer bits are enough: 24 and 32.
Those are the defaults.

The testbench `boost_resolution_tb` shows the effect on this RTL. It runs
scenario 1 with a current-sink load for 140 ms and gives these mean absolute
errors:

| `NI` / `NV` | current error | voltage error |
|---|---|---|
| 24 / 32 | 0.07 % | 0.003 % |
| 20 / 32 | 0.21 % | 0.006 % |
| 19 / 32 | 0.91 % | 0.05 % |
| 18 / 32 | 3.4 % | 0.19 % |
| 17 / 32 | 17 % | 1.1 % |
| 16 / 32 | 27 % | 1.2 % |
| 24 / 28 | 0.83 % | 0.04 % |
| 24 / 24 | 11 % | 0.48 % |
| 24 / 20 | 104 % | 3.3 % |

The current error rises from almost nothing to tens of percent within a few
bits. In every run the current error exceeds the voltage error.

## Arithmetic of one step

`dt/L` and `dt/C` are tiny, so they are not stored as such. At elaboration,
`boost_pkg::coef_shift` and `coef_value` turn each of them into an 18-bit
positive integer coefficient `K` and a shift `s`. Together they map an
operand in one format straight to an increment in the other format's LSBs:

    KL ≈ dt/L · 2^(FI − FV) · 2^sL      increment_i = round(operand_v · KL / 2^sL)
    KC ≈ dt/C · 2^(FV − FI) · 2^sC      increment_v = round(operand_i · KC / 2^sC)

Here `FI` and `FV` are the fraction-bit counts. The shift is chosen so that
`K` fills 17 bits, which keeps the relative error of the coefficient below
2⁻¹⁷. There are exactly two multipliers:

* The inductor multiplier takes `vg` or `vg − vout`.
* The capacitor multiplier takes `−iR` or `iin − iR`.

Each product is rounded half-up to the register LSB, added to the state and
saturated at the ends of the range. A state register never wraps around.
The parameters `L_H`, `C_F` and `DT_S` are `real` values that are used only
at elaboration, so a new converter needs only new parameter values.
`NI`/`NV` may range from 16 to 47, and an elaboration-time assertion checks
this.

## Duty-cycle sequencer and PWM

For open-loop runs, the top level contains a small sequencer:

* `duty_cycle_mem` is a 1000 × 10-bit RAM. It holds one duty word per
  switching period, which is one half mains period at 50 Hz.
* `seq_address` steps the address once per period and wraps after
  `last_addr`.
* `pwm_module` counts steps 0 to 999. It closes the switch while the count
  is below the duty word, so a word `D` closes the switch for exactly `D`
  steps. Values of 1000 and above keep the switch closed for the whole
  period.

Timing, cycle by cycle:

* The RAM reads synchronously and follows the address continuously.
* On the last step of a period (`period_end`), the PWM copies the word read
  for the current address into its shadow register, and the address moves
  to the next word.
* The word at address `a` therefore drives period `a + 1`. The first period
  after reset runs with duty 0, so the switch stays open.
* A new duty value never changes a period that has already started.

The PWM counter and the converter both advance only while `run` is high.

## Top level (`boost_hil_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears the state, the PWM and the address) |
| `run` | in | 1 | take one integration step per cycle |
| `mem_we`, `mem_waddr`, `mem_wdata` | in | 1, 10, 10 | write the duty-cycle sequence |
| `last_addr` | in | 10 | last word of the sequence (999 for a 50 Hz half-cycle) |
| `vin` | in | `NV+1` | rectified input voltage, voltage format |
| `ir` | in | `NI+1` | load current, current format |
| `load`, `iin_load`, `vout_load` | in | 1, `NI+1`, `NV+1` | preset the state (takes priority over `run`) |
| `iin`, `vout` | out | `NI+1`, `NV+1` | state variables, registered |
| `pwm`, `mode` | out | 1, 2 | switch signal; mode of the coming step (`boost_pkg::boost_mode_e`) |
| `duty`, `seq_addr`, `pwm_step`, `period_end`, `seq_wrap` | out | — | sequencer and PWM observation |

Outside the top level, the host supplies `vin` and `ir` every step. The load
type is set by how `ir` follows `vout`:

* current sink: `ir = P/Vo`
* power sink: `ir = P/vout`
* resistor: `ir = vout/R`

The same input path serves in closed loop. There, a controller's PWM would
replace the sequencer.

## Files

* `rtl/boost_pkg.sv`: formats, the mode enum and the coefficient functions.
* `rtl/boost_converter.sv`: the fixed-point integrator.
* `rtl/pwm_module.sv`, `rtl/duty_cycle_mem.sv`, `rtl/seq_address.sv`: the PWM
  and the sequencer.
* `rtl/boost_hil_top.sv`: the top level.
* `tb/boost_tb_pkg.sv`: fixed/real conversion, a double-precision reference
  converter, the three load models and the open-loop duty formula. The duty
  formula is `d = 1 − (vg − L·dig/dt)/Vo`, where `ig` is the sinusoidal
  current that unity power factor calls for, evaluated at mid-period.
* `tb/boost_scenario_run.sv`: runs one configuration and measures its error.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `boost_converter_tb` | one step in each mode against a real-valued update (±1 LSB); the diode clamp; sub-LSB increments lost at 16 bits but kept at 24; saturation without wrap; 20,000 steps against the reference |
| `pwm_module_tb` | closed steps per period equal the duty latched one period earlier, including 0, 1, 999, 1000 and 1023; `period_end` every 1000 steps; hold with `en` low |
| `duty_cycle_mem_tb` | fill, random read-back, one-cycle read latency, partial rewrite, out-of-range write ignored |
| `seq_address_tb` | address against a model counter, wrap at 999 and at 831 |
| `boost_hil_top_tb` | full default configuration over 140 ms (14 million steps) of scenario 1. Exact duty per period and address sequence. Current and voltage error below 2 %. Closed, CCM, DCM, diode clamp, wrap, memory load and preset all observed. |
| `boost_scenarios_tb` | the four converter scenarios below × current/power/resistive load, 140 ms each, at 24/32 bits and at 40/47 bits: the 24/32-bit registers add less than 2 percentage points of error to the 40/47-bit model (see below) |
| `boost_resolution_tb` | the width sweep in the table above: error grows as registers narrow, and current error exceeds voltage error |
| `boost_method2_tb` | derives the conservative widths per scenario from the width rule (8 A and 1000 V maxima, `n` = 8). It runs the model at (26,36), (23,36), (25,34) and (23,38) for 140 ms. These widths add at most 0.01 percentage points of error to a 40/47-bit run, and in scenario 1 they are more accurate than 24/32. |

The four scenarios:

| scenario | L | C | Vin (rms) | Vout | Pout |
|---|---|---|---|---|---|
| 1 | 5 mH | 100 µF | 230 V | 400 V | 300 W |
| 2 | 1 mH | 100 µF | 230 V | 400 V | 300 W |
| 3 | 1 mH | 100 µF | 110 V | 300 V | 150 W |
| 4 | 1 mH | 470 µF | 230 V | 400 V | 300 W |

The mains frequency is assumed to be 50 Hz for all four scenarios.

At 24/32 bits, scenarios 1, 3 and 4 stay within 0.07 %, 0.1 % and 0.6 % of
current error for all three loads. Scenario 2 (1 mH, 100 µF) is different.
The ideal converter has no damping, and it runs without a control loop.
Whether a step clamps the current at zero is decided by the smallest
difference in state, and such a decision is never forgotten. The model
therefore drifts from the double-precision reference by 0.4 % to 13 % of
current error, depending on the load. The 40/47-bit model drifts by the same
amount, and the two widths differ by less than 0.01 percentage points. This
drift is a property of the open-loop test, not of the register widths, so
the scenario test compares the two widths against each other. A closed loop
or circuit losses would damp it.

To run a testbench with plain Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module boost_hil_top_tb rtl/boost_pkg.sv tb/boost_hil_top_tb.sv -o sim
    ./obj_dir/sim

Replace the top module to run another testbench. Run times are a few
seconds. `boost_resolution_tb` runs twelve configurations and takes about
half a minute, as does `boost_method2_tb`. `boost_scenarios_tb` runs 24 configurations and takes about
a minute and a half.

## Design choices beyond the model equations

These points are choices of this implementation:

* The integer/fraction split: 3 integer bits for currents, from the 8 A
  design maximum, and 10 for voltages, from the 1000 V maximum.
* Round-half-up rounding of increments.
* Saturating state registers.
* The diode clamp at zero current.
* The state preset port.
* Reset to zero.
* The 18-bit coefficient width, which matches the 18×18 DSP multipliers of
  the original FPGA target.
* The whole organisation of the sequencer: synchronous RAM, address counter
  advanced by the PWM, latching of the duty word at the end of a period, and
  duty 0 in the first period.
* The duty-sequence formula in the testbench.
* The 50 Hz mains frequency for every scenario.

The real-valued stimulus generators, the reference model and the error
analysis belong to the test environment. They exist only in the testbenches,
not as hardware.

## Limits

* The model is ideal. It has no parasitic resistances, switching losses or
  diode forward voltage.
* Error figures depend on the fixed-point format, the rounding and the
  stimulus. Other formats will give somewhat different numbers for the same
  register widths, though the same trends.
* No FPGA area or timing results are given here. The voltage update is
  expected to set the maximum clock, because it is the longer of the two
  loops and its width grows with `NV`.
