# ANFIS-PID hybrid digital controller for a buck converter

A synchronous buck converter that supplies a processor core (3.3 V in, 1.2 V out) is
usually regulated by a discrete PID. A PID is tuned for one operating point and behaves
differently as the load changes. An ANFIS controller (a Sugeno fuzzy inference system
whose rules come from neural-network training) copes better with changing conditions,
but it is slower in the transient. This design runs both controllers side by side on the
same error samples and combines their outputs in one of five ways, the *hybrids*. The
result goes to a single-bit DAC, either a counter-based DPWM or a second-order
delta-sigma modulator, and that bit drives the converter's gate driver.

The RTL follows the structure, equations and sizes of the thesis "ANFIS-PID Hybrid
Digital Controllers for Buck Converters" (8-bit ADC at 10 MHz, 9-bit modulators on a
100 MHz clock, five hybrids, trailing-edge DPWM, second-order delta-sigma). The thesis
does not publish its trained ANFIS data, its tuned gains or its HDL. The number formats,
the pipeline and the preset knowledge base here are therefore this design's own. The
sections below say which parts are which.

## Control loop

```
            +-----------+   e    +-------------------------------------------+  duty
 ADC code ->|error_adder|------->| hybrid_controller                         |--9b--+
 vref code->| vref - v  |        |  differentiator -> anfis (4 channels) --+ |      |
            +-----------+        |                     | u_anfis  dK[3]    | |      |
                 ^               |                     v            v      | |      |
   adc_sample ---+               |  pid_incremental <- anfis_driven_coeffs | |      |
   (clk / 10)                    |        | u_pid                          | |      |
                                 |  switching_hybrid / arithmetic_hybrid / | |      |
                                 |  driven PID  --mode mux--> u -> duty    | |      |
                                 +-------------------------------------------+      |
                                                                                    |
                       +------+                                                     |
            gate_drive<| mux  |<-- dpwm (512-clock period) <------------------------+
             (to S1/S2 |dac_sel<-- delta_sigma_mod (1 bit per clock) <--------------+
              driver)  +------+
```

Everything runs on one clock, nominally 100 MHz. The ADC is strobed every `ADC_DIV` = 10
clocks (10 MHz). The error is `e = vref_code - adc_code` in ADC LSBs, so a positive
error asks for more duty.

## The five hybrids

`mode` (type `hybrid_mode_t` in `anfis_pid_pkg`) selects the hybrid at run time. The
ANFIS and PID states carry over when the mode changes.

| mode | hybrid | output |
|---|---|---|
| `MODE_SWITCH_I` | Switching Type I | `U_PID` if \|e\| <= dE, else `U_ANFIS` |
| `MODE_SWITCH_II` | Switching Type II | `U_PID` if \|e\| > dE, else `U_ANFIS` |
| `MODE_SUM` | Summing | `U_ANFIS + U_PID` |
| `MODE_PRODUCT` | Product | `U_ANFIS * U_PID` (fixed point, see below) |
| `MODE_DRIVEN` | ANFIS-driven PID | PID with gains `K + dK_ANFIS` for P, I and D |

The switching threshold dE is 10 % of the reference. It is computed from `vref_code` as
`(vref_code * 205) >> 11`, which gives the same integer as `vref_code / 10` for every
8-bit code. Type I gives the ANFIS the transient and the PID the steady state. Type II
does the reverse. At |e| = dE exactly, Type I picks the PID, so the two types are exact
complements.

Every hybrid output is limited to a duty of 0 to 0.8. So are the PID and ANFIS
accumulators. The 0.8 ceiling matches the saturation level in the thesis' duty plots.

There is no separate "plain PID" mode. A PID alone is `MODE_DRIVEN` with the
knowledge-base words of channels 1-3 set to zero.

## ANFIS in hardware

The ANFIS is the hardest part to follow, and its contents are the part the thesis leaves
open. `anfis` evaluates a two-input, first-order Sugeno system in a single clock whenever
a new error sample arrives:

1. **Fuzzification** (`anfis_mf`). Both e and de = e[n] - e[n-1] (`differentiator`)
   have three triangular sets: N, Z and P. The degree of membership follows the
   triangular function `0 | (x-a)/(b-a) | (c-x)/(c-b) | 0`. Comparators pick the segment
   and a constant-divisor scaling gives the slope. Degrees run from 0 to 256, where 256
   means 1.0. A set with `a == b` (or `b == c`) is a shoulder that stays at 1 beyond its
   peak, so large errors are still covered. Defaults, in ADC LSBs:
   - e: N = (-40, -40, 0), Z = (-40, 0, 40), P = (0, 40, 40)
   - de: N = (-20, -20, 0), Z = (-20, 0, 20), P = (0, 20, 20)

   The corners are package constants (`E_A`..`D_C`). Changing them changes the hardware.
2. **Rule strength.** For rule k = 3*i_e + i_de, `w_k = mu_e(i_e) * mu_de(i_de)`. There
   are nine rules.
3. **Normalisation, consequents and summation.** Each rule has, for each output channel,
   a first-order consequent `f = p*e + q*de + r`. The channel output is
   `y = sum(w_k * f_k) / sum(w_k)`. Normalisation is folded into this one divide per
   channel. The divide truncates toward zero.
4. **Four channels** share layers 1-3:
   - Channel 0 is the required change of duty. It is accumulated into `U_ANFIS`, so the
     ANFIS behaves as an incremental controller with a saturating integrator.
   - Channels 1-3 are the gain corrections dKp, dKi and dKd of the driven hybrid. They
     are registered and saturated to 16 bits.

The **knowledge base** (`anfis_kb`) holds 108 signed 16-bit words: 4 channels x 9 rules
x (p, q, r). Word address = `(channel*9 + rule)*3 + coef`, with `coef` 0 = p, 1 = q,
2 = r (`kb_index()` in the package). Reset loads a preset, and the `kb_we/kb_addr/kb_data`
port overwrites single words, one per clock, so offline-trained data can be loaded.

The preset is a hand-made stand-in for training data, not trained data:
- Channel 0: p = 300 for the outer error sets and 150 for Z, q = 1500, r = 0. This is a
  PI law that is stronger for large errors.
- Channels 1-3: r = +2000 / +20 / +1000 for the outer error sets and 0 elsewhere. The
  gains rise while the error is large.

With this preset the loop regulates well. Other trained data will give other dynamics.

The divider and the 9 x 4 consequent multipliers are combinational. At 100 MHz with a
sample only every 10 clocks they can be treated as a multicycle path. A slower-clocked
or time-multiplexed implementation is the obvious change for silicon.

## PID

`pid_incremental` implements the velocity form

    U[n] = U[n-1] + Kp*(e[n]-e[n-1]) + Ki*e[n] + Kd*(e[n] - 2e[n-1] + e[n-2])

where `Ki` already includes the sampling time. The gains are inputs rather than
parameters, because the driven hybrid changes them every sample. Saturating `U` to
[0, 0.8] also stops integral wind-up.

The base gains are the top-level ports `kp`, `ki` and `kd`. The thesis tunes them with
Ziegler-Nichols rules that depend on the converter's ultimate gain and period, and it
gives no numbers. For the converter model in `tb/`, kp = 2000, ki = 400 and kd = 1000
work.

## Number formats

| quantity | format |
|---|---|
| ADC code, reference | 8-bit unsigned |
| error e | 9-bit signed, ADC LSBs |
| de | 10-bit signed |
| U (PID, ANFIS, hybrids) | 28-bit signed, 24 fraction bits: 2^24 = duty 1.0 |
| gains, dK, consequent words | 16-bit signed, 2^-24 duty per LSB (per sample) |
| duty command | 9-bit unsigned = U >> 15 |

The product hybrid multiplies two U values and shifts the 56-bit product right by 24
(floor). The ANFIS output then acts as a gain on the PID output, which is how the thesis
explains the product hybrid.

## Timing

- `adc_sample` is a one-clock strobe every 10 clocks. `adc_data` is taken on that clock.
- `error_adder` registers e one clock later.
- `hybrid_controller` is a three-stage pipeline: ANFIS, then PID, then the hybrid and
  the duty quantiser. The PID stage uses the dK values of the same sample. `duty_valid`
  comes 4 clocks after `adc_sample`. An assertion checks that samples are at least 3
  clocks apart.
- The DPWM takes a new duty at its next period boundary. The delta-sigma modulator
  takes it at once.

## DACs

**`dpwm`** is a 9-bit free-running counter, a comparator and a set/reset flip-flop. It
latches the duty once per period, so there are no runt pulses. The output is high for
exactly `duty` clocks of each 512-clock period, and duty 0 gives no pulse.
- Default (`TRAILING_EDGE = 1`): the pulse starts at counter overflow and ends at the
  compare match. This is the trailing-edge modulator the thesis names.
- `TRAILING_EDGE = 0`: the compare match sets the flip-flop and overflow resets it. This
  is the conventional DPWM drawing, i.e. leading-edge modulation. The compare value is
  then 2^9 - duty, so the width is unchanged.

**`delta_sigma_mod`** centres the 9-bit input (x = din - 256) and feeds the output bit
back as +/-256:
- With `ORDER = 1` it is the conventional loop (difference, accumulator register,
  comparator).
- With `ORDER = 2` (default, as the thesis uses) a second difference-and-accumulate stage
  follows.

The output is the sign of the last register, one bit per clock. The density of ones is
din/512. Both states saturate at +/-8192.

**Switching frequency.** The thesis gives "DPWM frequency 100 MHz" with 9-bit
resolution. This design reads 100 MHz as the counter clock, so the switching period is
512 clocks, about 195 kHz. With the thesis' 1 uH / 2 uF filter, whose resonance is about
113 kHz, that period is far too long: the DPWM closed loop holds the right mean voltage
but with well over 1 V of ripple. The delta-sigma modulator switches at up to the clock
rate and gives a few mV to tens of mV of ripple. The thesis reports only a few mV of ripple
with its DPWM too, so its switching frequency must have been in the MHz range. How its
counter reached that is not stated. To use the DPWM at a useful switching
frequency, lower `N` (fewer duty steps) or raise the clock. Reading 100 MHz as the
switching frequency instead would need a 51.2 GHz counter.

## Measured behaviour

`tb/tb_step_response.sv` starts the converter model from 0 V with every hybrid and both
DACs, at the default parameters and the gains above, with a 0.5 A load. These are this
model's figures, not the thesis' measurements:

| hybrid | DAC | error (mV) | overshoot (%) | rise 10-90 % (us) | settle 2 % (us) | ripple p-p (mV) |
|---|---|---|---|---|---|---|
| Switching I | DSM | 1 | 24.2 | 38.7 | 121 | 7 |
| Switching II | DSM | -4 | 9.4 | 26.5 | none (limit cycle) | 251 |
| Summing | DSM | -2 | 1.8 | 11.6 | 38 | 20 |
| Product | DSM | 0 | 0.9 | 35.3 | 72 | 25 |
| ANFIS-driven | DSM | -2 | 1.0 | 26.5 | 48 | 22 |
| all five | DPWM | +20 to +127 | 73-175 | 0.9-16 | none | 1.8-3.0 V |

Switching Type II keeps a limit cycle around its switching threshold: the two
controllers' integrators disagree each time the output crosses dE. The thesis also
reports Type II as the hybrid with the longest settling time and the largest ripple.

The thesis' rise times are about 1 us and its overshoots 40-50 %. That reflects a much
more aggressive tuning than the gains and preset used here. Its tables are not
reproduced by this model, and nothing in the RTL is calibrated to them.

## What is this design's own

These follow the thesis:
- the structure: error adder, ANFIS and PID in parallel, the five hybrids and their
  equations, the 10 % threshold;
- triangular membership functions and the five-layer Sugeno ANFIS with three extra
  outputs for the driven PID;
- the velocity-form PID;
- the counter DPWM and the delta-sigma modulator;
- the 8-bit / 9-bit / 10 MHz / 100 MHz sizes.

These are this design's own choices:
- all hybrids and both DACs in one design, selected at run time (the thesis built each
  hybrid separately, and took the ANFIS-driven PID only as far as system-level
  simulation, not to HDL);
- the fixed-point formats, the saturation limits and where they apply;
- membership-set corners and shoulders, and the preset knowledge base and its write
  port;
- the second-order modulator topology (the thesis draws only the first-order loop);
- latching the DPWM duty once per period;
- the pipeline and synchronous active-low reset.

Not built:
- the analog parts: power stage, gate driver (including any dead time) and the external
  ADC;
- online (neural-network) training of the ANFIS. The thesis trains offline and so does
  this design: load the results through the knowledge-base port.

## Files

`rtl/`:
- `anfis_pid_pkg.sv`: widths, types, mode enum, membership sets, knowledge-base preset
  and address map.
- `anfis_pid_buck_controller.sv`: top level.
- `error_adder.sv`, `hybrid_controller.sv`: error signal and control core.
- `anfis.sv`, `anfis_mf.sv`, `anfis_kb.sv`, `differentiator.sv`: ANFIS.
- `pid_incremental.sv`, `anfis_driven_coeffs.sv`: PID and its gain adjustment.
- `switching_hybrid.sv`, `arithmetic_hybrid.sv`: hybrids.
- `dpwm.sv`, `delta_sigma_mod.sv`: DACs.

`tb/`:
- `tb_<module>.sv`: a self-checking testbench for each module.
- `tb_anfis_pid_buck_controller.sv`: closed-loop test of the whole design. It covers
  start-up, a load step, an unreachable reference, run-time switching through all
  hybrids, a knowledge-base write and the DPWM.
- `tb_step_response.sv`: the table above.
- `buck_plant_model.sv`: a behavioural converter and ADC model (real arithmetic, Euler
  step of one clock, ADC full scale 2.4 V so 1.2 V = code 128).
- `anfis_ref_pkg.sv`: reference arithmetic for the checks.

Every testbench prints `TB_RESULT checks=N failures=M` and stops.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    rtl/anfis_pid_pkg.sv tb/anfis_ref_pkg.sv -y rtl -y tb +libext+.sv \
    tb/tb_anfis_pid_buck_controller.sv --top-module tb_anfis_pid_buck_controller
./obj_dir/Vtb_anfis_pid_buck_controller
```

Replace the testbench name to run any other. All testbenches finish in seconds.
`tb_anfis_pid_buck_controller` prints the mean output voltage of each phase.
`tb_step_response` prints the table.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). Assertions are concurrent
properties that synthesis ignores.
