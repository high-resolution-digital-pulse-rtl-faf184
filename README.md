# Dyadic digital PWM for a digitally controlled boost converter

A digitally controlled switch-mode supply needs a duty-cycle resolution finer
than its ADC resolution. Otherwise the loop has no duty value that lands the
output exactly in the ADC's zero-error bin, and it hunts between two neighbouring
values forever (a *limit cycle*). A plain counter-based DPWM gets n bits of duty
resolution only from a clock of 2^n times the switching frequency. At
1.17 MHz switching, 9 bits would need a 600 MHz clock.

This design gets the extra bits by **dithering** instead. The duty command is
split in two:

* its upper `N_DPWM` bits drive an ordinary counter DPWM, clocked at
  2^N_DPWM · f_sw (5 bits: 37.5 MHz for 1.17 MHz);
* its lower `M_DDPM` bits drive a *dyadic digital pulse modulator* (DDPM). Once
  per switching period, the DDPM decides whether that period gets one extra
  clock cycle of on-time.

Over 2^M_DDPM periods, exactly `u_L` periods are lengthened, so the average duty
has N_DPWM + M_DDPM bits of resolution. The DDPM orders the lengthened periods
"dyadically", so the dither energy sits at the highest possible sub-harmonics of
f_sw, where the output LC filter suppresses it best. This is the difference from
ordinary sigma-delta or lookup-table dithering.

The same DDPM idea gives a cheap one-bit DAC: a pin toggled in the dyadic
pattern of an M-bit code, followed by an RC filter. The second design in this
repository is such a DAC. Its modulator finds the "first set bit" with word-wide
XOR/shift/add operations (what a microcontroller ALU can do in one pass) instead
of a priority multiplexer. It can be fronted by an optional double-slope
pre-distortion that corrects driver rise/fall imbalance.

Both designs sit side by side in `dpwm_top`. They share only the clock and
reset.

## The DDPM pattern

For an M-bit code m = b[M-1]…b[0] and a free-running M-bit step counter:

* if bit i is the **lowest** set bit of the counter, the output is b[M-1-i];
* if the counter is zero, the output is 0.

So the MSB appears every second step, the next bit every fourth step, and so on
down to b[0], which appears once per 2^M steps. Each pattern of 2^M steps is
therefore high exactly m times, and the highs are spread as evenly as a binary
split allows. Equivalently, the pattern for M bits is built recursively:
Θ_i = [Θ_{i-1}, b[M-i], Θ_{i-1}]. The testbenches use this recursive form as
their reference.

There are two implementations:

* `ddpm_modulator`: counter plus priority multiplexer (the counter's LSB has the
  highest priority). Used inside the DDPWM.
* `ddpm_opt_modulator`: the arithmetic version, using two registers, COUNT and
  COUNT_prev = COUNT − 1.
  1. `thermo = COUNT ^ COUNT_prev` is a run of ones up to the first set bit.
  2. `onehot = (thermo >> 1) + 1` isolates that bit.
  3. The output is `|(onehot & bitreverse(code))`.

  With an M-bit counter, COUNT = 0 would make these steps pick b[0] a second
  time, so the pattern would be high m + b[0] times. With a wider counter,
  as in software, the one-hot falls just above the code at that point and the
  output is 0. **This design forces the output to 0 at COUNT = 0**, which gives
  the same result and exactly m highs per pattern.

## The DDPWM (`ddpwm`, `dpwm_carrier`)

`dpwm_carrier` is a free-running mod-2^N_DPWM counter r. Its `wrap` output is
high in the period's last clock, where r is at its maximum.

`ddpwm` works per switching period:

* On the `wrap` edge it latches the command u into the duty register `u_h`.
* On the same edge it steps the DDPM with code `u_h[M-1:0]`.
* It forms `duty_cyc = u_h[U-1:M] + ddpm_bit` with **one extra bit**, so a
  command of 2^N − 1 plus a DDPM bit gives a 100 % period instead of wrapping
  to 0%.
* It compares `duty_cyc > r` and registers the result.

The gate output `c` is therefore high for exactly `duty_cyc` clocks of each
period, starting one clock after the counter returns to 0. The average duty is
u / 2^(N_DPWM+M_DDPM). The widened adder and the output register are choices of
this design.

## The controller (`pid_compensator`, `ddpwm_controller`)

The loop regulates the output of a synchronous boost converter. The output is
divided (1/9.2), digitised by an external ADC, and compared with a set-point
code. The error e = vref − adc_code (in ADC LSBs) feeds a parallel PID:

```
u[k] = kp·e[k] + I[k] + kd·(e[k] − e[k−1]),     I[k] = I[k−1] + ki·e[k]
```

**Number format (own choice).** kp, ki and kd are signed fixed-point inputs of
`GAIN_W` = 24 bits with `GAIN_FRAC` = 16 fraction bits, in *duty LSBs per ADC
LSB*. ki is the per-sample integral gain Ki·Ts and kd is Kd/Ts.

**Rounding and limits.**

* The sum is rounded to the nearest duty LSB.
* It is then saturated to 0 … 2^U − 1. The `sat_hi` and `sat_lo` flags report
  this.
* The integrator keeps the fraction bits and is clamped to the same range. This
  is the anti-windup, reported on `int_clamped`.

**Latency.** The command appears two clocks after `sample_valid`.

**ADC handshake (own choice).** `ddpwm_controller` raises `adc_start` at the
counter maximum, once per period. It accepts the code with a one-cycle
`adc_valid` strobe. Any conversion time is accepted:

* A result that arrives at least two clocks before the next period boundary
  takes effect in the period after that boundary. A sample taken at the end of
  period k thus acts on period k+2.
* A later result is used one period later.

By default the ADC is started at the end of every period. With
`SAMPLE_DIV` = 2 it is started at the end of every second period, the rate of
a software prototype of this controller. The DDPWM still takes the newest
command every period.

`pwm_d` and `pwm_d_n` are complementary and registered. No dead time is
inserted; the gate driver is expected to add it.

**Why this suppresses limit cycles.** With a 7-bit ADC (LSB 23.4 mV at the
divided node, about 0.22 V at the output) and a 5-bit DPWM, one duty LSB moves
the 13.8 V output by more than one ADC LSB. With 4 DDPM bits added, the duty
step becomes 16× finer, so a duty value exists inside the zero-error bin. The
integrator (together with a small enough gain) then settles there instead of
oscillating.

## The DDPM DAC (`ddpm_predistort`, `ddpm_dac`, `ddpm_opt_modulator`)

**`ddpm_dac`.** Each `tick` (one modulator clock, e.g. 2 MHz) advances the
modulator and registers its bit on `dac_out`. A new code is taken only at a
pattern boundary (`code_load`), so the sample rate is f_tick / 2^M. With the
default M = 8, 2 MHz gives 7812.5 samples/s. An external RC filter averages the
pin to V_DD · m / 2^M.

**`ddpm_predistort`.** This block is combinational. It bends the code with a
one-time calibration factor α, to undo the two-slope error that unequal driver
rise and fall times cause.

Every isolated high pulse carries a little extra (or missing) charge. Below
half scale the highs are isolated, so the output slope is (1+α) LSB per code.
Above half scale the lows are isolated, so the slope is (1−α). The inverse of
that characteristic is:

```
m' = round( m / (1+α) )                  for m <  2^(M-1)·(1+α)
m' = round( (m − 2^M·α) / (1−α) )        otherwise
```

* The two branches meet at the knee.
* A commonly printed form of this correction uses 2^(M-1)·α in the second
  branch. That form jumps by about 2^(M-1)·α codes at the knee, so it is not
  used here.
* Halves round up, and the result is clamped to 2^M − 1 (choices of this
  design).
* α is a signed fraction of `ALPHA_W` = 16 bits with all bits fractional, so
  −0.5 ≤ α < 0.5, and the dividers never see zero.
* α = 0 is the identity.
* The block has two dividers. It is not pipelined because the code changes only
  once per pattern.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_DPWM` | 5 | counter DPWM bits; f_clk = 2^N_DPWM · f_sw (37.5 MHz → 1.17 MHz) |
| `M_DDPM` | 4 | DDPM dither bits of the DDPWM (9-bit duty in total) |
| `N_ADC` | 7 | ADC code width (3 V range, so 23.4 mV/LSB) |
| `GAIN_W`, `GAIN_FRAC` | 24, 16 | PID gain word and its fraction bits (own choice) |
| `SAMPLE_DIV` | 1 | ADC samples once every SAMPLE_DIV switching periods |
| `M_DAC` | 8 | DDPM DAC resolution |
| `ALPHA_W` | 16 | pre-distortion factor width (own choice) |

The reference evaluation also uses N_DPWM from 4 to 7 and N_ADC from 4 to 11. All
of these are parameter settings of the same RTL. `dpwm_pkg` holds the defaults.

## Departures from the source description and open points

* **DPWM modulus.** The counter period is 2^N_DPWM clocks, consistent with
  f_clk = 2^N · f_sw and D = u_h / 2^N. A "mod (2^N − 1)" counter is also
  mentioned in the source; it is not used.
* **Adder width.** The DDPWM adder is N_DPWM+1 bits wide (full-period pulse on
  carry), not N_DPWM.
* **Modulator at COUNT = 0.** The arithmetic DDPM modulator is gated to 0 at
  COUNT = 0 (see above).
* **PID gains.** The gains are runtime ports. The published design values
  (Kp 20, Kd 79, Ki 0.009) have no stated scaling and are **not** used by the
  testbenches. `tb_dpwm_top` and `tb_lco_workload` use an integral-only
  controller with ki = 0.012 duty LSB per ADC LSB (786/65536), which is stable
  with the plant model below. `tb_ripple_sweep` uses all three terms. Its
  gains are chosen for equal normalised loop gains in every configuration.
* **Own choices.** The ADC handshake, the two-clock compensator latency, the
  registered gate outputs and the absence of dead time are all this design's
  choices.
* **Pre-distortion.** The source used it in measurement rather than as part of
  the DAC proper. Here it is an optional block; tie `dac_alpha` to 0 to bypass
  it. Its second branch uses the offset 2^M·α, which keeps the correction
  continuous, instead of the printed 2^(M-1)·α.
* **Not built.** The comparison designs are not built: dither by lookup table,
  sigma-delta DPWM, delay-line DPWM, and the iterative and parallel DDPM
  variants. Neither is the analog part (ADC, power stage, RC filter); the
  testbenches model it behaviourally.

## Verification and how far to trust it

Each block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `tb_dpwm_carrier` | count sequence, wrap position, reset |
| `tb_ddpm_modulator` | every code against the recursive Θ pattern; m highs per pattern |
| `tb_ddpm_opt_modulator` | all 256 codes × all steps against Θ; `last`; exactly m highs |
| `tb_ddpwm` | per-clock gate level against a model; dither and carry periods counted |
| `tb_pid_compensator` | random gains and samples against a 64-bit integer model, incl. saturation and clamp |
| `tb_ddpwm_controller` | ADC model with random conversion times, including late ones; command-to-period mapping; run with `SAMPLE_DIV` = 2 |
| `tb_ddpm_dac` | stream against Θ with random tick gaps; one load per 2^M ticks |
| `tb_ddpm_predistort` | all codes × ~320 values of α against the formula, exact rounding |
| `tb_dpwm_top` | full design at default parameters, closed loop (below) |
| `tb_lco_workload` | limit-cycle and DC-accuracy comparison (below) |
| `tb_ripple_sweep` | ripple and limit cycles over N_DPWM 4..7 × N_ADC 4..11, plain vs DDPWM (below) |
| `tb_dac_workload` | DAC sample rate, static INL and 25 Hz sine SNDR through an RC model, with and without pre-distortion (below) |

The behavioural plant models live in `tb/`:

* `boost_model`: an ideal synchronous boost, Euler-integrated every clock.
* `adc_model`: a floor quantiser with an 8-clock conversion.
* `boost_loop`: a closed-loop harness.
* `ddpm_rc_model`: a pin driver and RC filter for the DAC. Its falling edge can
  be made late to imitate unequal rise and fall times.

The power-stage model includes the inductor and switch resistances (8 mΩ and
24 mΩ). It has no capacitor ESR, switching loss or dead time. The load is
therefore almost the only damping. At the 8 V operating point the LC resonance
(about 56 kHz) has a Q of about 25. That is lighter damping than a real board
has, and it drives most of the limitations listed below.

**`tb_dpwm_top`.** This test runs the full design at its defaults with 8 V in
and 25 Ω:

1. start-up;
2. a 25 → 30 Ω load step;
3. an 8 → 10 V input step;
4. an open-loop phase that drives the compensator into both saturations.

After each disturbance, every ADC sample must sit in the zero-error bin and the
command must be constant. Observed: u = 218 at 8 V and u = 146 at 10 V, with an
output ripple of about 165–185 mV. The test also counts the following events and
requires each to occur at least once:

* dithered and full-period pulses;
* saturation and integrator clamping;
* DAC loads, with a sine input;
* codes changed by the pre-distortion, with α = 0.05.

**`tb_lco_workload`.** This test compares loops built from the same blocks:

* **Limit cycles.** A plain 5-bit DPWM with a 7-bit ADC limit-cycles at 7 V and
  8.5 V input, with up to several volts peak-to-peak. The 9-bit DDPWM holds a
  constant command at 7, 8.5 and 10 V.
* **DC accuracy.** An 11-bit DDPWM (7+4) with a 10-bit ADC is about 5× more
  accurate than a plain 7-bit DPWM with a 6-bit ADC (worst DC error 21 mV vs
  111 mV).
* **Caveat.** At 10 V input the 11-bit loop still moves between neighbouring
  ADC codes. The lightly damped plant model puts the f_sw/16 dither component
  close to the LC resonance there. The test therefore requires only a command
  spread of at most one LSB.

**`tb_ripple_sweep`.** This test runs 64 closed loops at 8 V and 25 Ω, over
every N_DPWM from 4 to 7 and every N_ADC from 4 to 11, each with a plain DPWM
and with the 4-bit-DDPM DDPWM. The PID terms use normalised loop gains of
Kp 0.1, Ki 0.0026 per sample and Kd 0.5 per sample. The test prints the
peak-to-peak ripple table.

The resolution rule for a boost converter free of limit cycles is

```
N_DPWM(total) > N_ADC + B,   B = ceil( log2(Vin·H/V_FS) + log2(1/(1−D)²) )
```

Here H is the sense-divider gain and V_FS the ADC range. At this operating point
(D = 0.42) B = 0. In other words, one duty LSB must move the output by at most
half an ADC LSB. Observed:

* **Plain DPWM.** Every plain loop that meets the rule holds steady at about
  105 mV. 19 of the 22 plain loops whose duty step exceeds the whole ADC step
  limit-cycle, up to 1.4 V peak-to-peak.
* **DDPWM with one bit to spare.** The DDPWM holds steady wherever it meets the
  rule with one bit to spare (N_ADC ≤ N_DPWM + 2), with about 105–365 mV of
  switching ripple. This includes the default 5/7 configuration.
* **DDPWM at the bare rule or a finer ADC.** This case is N_DPWM 4 with N_ADC
  7–10, and N_DPWM 5 with N_ADC 8–11. The ADC then resolves the low-frequency
  part of the dither ripple, and the DDPWM loops limit-cycle too, with
  1–1.9 V peak-to-peak.
* **Overall.** 20 of 32 DDPWM loops are free of limit cycles, against 11 of 32
  plain loops.

The reference evaluation found the DDPWM ripple bounded near 0.5 V across the
whole sweep. Treat the corner at the bare rule as an open point: it may be a
property of the lightly damped model and the chosen gains rather than of the
modulator.

**`tb_dac_workload`.** This test runs the 8-bit DAC at a 2 MHz modulator
clock, which gives 7812.5 samples/s (checked), into 100 kΩ and 1 nF from a 3.3 V
pin. The pin's falling edge is 4 % of a step late.

* **Static linearity.** Without pre-distortion the transfer curve bends by
  exactly the expected 5.1 LSB at mid-scale. Calibrating α from the code-64
  level gives α = 0.040, and the maximum |INL| drops to 0.52 LSB.
* **Sine input.** The input is a 25 Hz sine at 90 % swing. The pre-distorted
  DAC reaches 47.7 dB SNDR (7.6 effective bits) after averaging over each sample
  period. Without averaging it reaches 42.0 dB (6.7 bits); there the residual
  7.8 kHz pattern ripple behind the single-pole filter counts as noise.
* **Without pre-distortion.** It reaches about 35 dB.
* **Reference figures.** A prototype built this way was measured at 45.3 dB
  and 1.6 LSB INL. Those figures include analog effects this model does not
  have.

**Not verified.** The following are not verified:

* timing closure at 37.5 MHz;
* behaviour with the published gain values;
* the DAC's analog accuracy.

## Simulating

Everything is plain SystemVerilog and runs under Verilator 5 with `--timing`.
From the repository root, for example:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/dpwm_pkg.sv \
          tb/tb_dpwm_top.sv --top-module tb_dpwm_top
./obj_dir/Vtb_dpwm_top
```

Substitute any other testbench name. The top test simulates about 10 ms of
converter time and takes a few seconds. The package must come first on the
command line; every other module is found through `-y`. The testbenches print
their progress, and a watchdog ends any run that stalls.

To try another size, override the parameters of `dpwm_top` (or of
`boost_loop` in a testbench). The PID gains are inputs, so re-tuning needs no
rebuild.
