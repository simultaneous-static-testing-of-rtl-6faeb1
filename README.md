# One ramp, two converters: a combined static BIST for an A/D and a D/A converter

Static linearity testing of data converters normally needs many samples and runs the
two converters of a mixed-signal chip one after the other. This design tests both in a
single sweep. One slow analog ramp, together with one binary counter, drives both
tests at the same time:

* the ramp is the **input of the A/D converter**, and the counter gives the ideal
  moment at which each output transition must occur;
* the ramp, held one LSB ahead of the code, is also the **moving ideal level for the D/A
  converter**. The counter's upper bits, shifted by a fixed amount, are the up-counting
  code that the D/A converter is fed.

One pass of the ramp checks offset, gain, INL and DNL of both converters against a
±1/2 LSB limit. The A/D side is fully digital. The D/A side needs two difference
amplifiers, two sample-and-hold circuits and four comparators, which share only two
reference voltages.

The digital part (counter, sequencer, A/D analyzer) is synthesizable SystemVerilog.
The analog part (ramp, amplifiers, switched capacitors, S/H, comparators) is written as
behavioural models using `real` signals, so that the whole BIST can be simulated
together with converter models. Its ports are those of the real circuits.

## The shared time base

Everything is timed in **half-LSB steps of ramp travel**. One LSB is
2 V / 2^8 = 7.8125 mV in every configuration.

* The controller's prescaler makes one *sample tick* every `CLK_PER_SAMPLE` clocks. The
  default is 16, which gives a 200 kHz sample rate from a 3.2 MHz clock.
* The ramp rises by 1/`SPL` LSB per tick. The default `SPL` is 8 samples per LSB.
* The shared counter advances every `SPL/2` ticks, that is once per half LSB.

The counter is loaded with `011` before the ramp starts. Call its three low bits
{R2,R1,R0}:

```
half-LSB step   0    1    2    3    4    5    6    7   ...
{R2,R1}         01   10   10   11   11   00   00   01  ...
R0              1    0    1    0    1    0    1    0   ...
                |<-->|
                offset window (first 1/2 LSB)
```

So {R2,R1} sits on value *v* for one LSB that is centred on the ideal transition of
code *v−1*. For the transition into code *k*, the detector compares the low two bits
of *k+1* with {R2,R1}. Equal bits mean the transition fell within ±1/2 LSB of its ideal
place.

The same counter produces the D/A converter test code. With *h* the number of half-LSB
steps since the ramp start:

```
DIN = (h - 2*D_OFF - 1) / 2        remainder bit DIN_a = first / second half of a code
```

Code *i* is therefore applied while the ramp is between *i*+1/2 and *i*+3/2 LSB above
the D/A converter's bottom. At the middle of that interval the ramp equals
V_ideal(*i*+1). That is the reference the D/A INL check needs.

## A/D converter analyzer (digital)

`transition_detector`
: On each sample tick it compares the code with the previous sample's code. A change
  pulses `tran`. An n-bit count TD starts at 1 and after each transition holds
  *reached code + 1*, which is the code the converter must move to next. A transition
  to any other code is a missing code (or a step back) and raises `missing`.

`adc_inl_detector`
: Three flip-flops.
  * **OUTA_INL** is taken at every transition: (TD1 xor R2) or (TD0 xor R1).
  * **OUTA_F** takes the NAND of D[n−1:2] at the end of the A/D test window. A
    converter whose top code is not all ones in those bits fails the gain /
    final-value check. The two low bits are already covered by the INL check.
  * **OUTA_OI** is set when a run starts. It is cleared when the code becomes 0 while
    {R2,R1} is still 01, that is within the first half LSB. A converter with too
    large an offset, or one that never outputs 0, keeps it high.

`adc_dnl_detector`
: Counts samples between consecutive transitions. A width *w* passes when
  SPL/2 < *w* < 3·SPL/2, which is DNL ∈ (−1/2, +1/2) LSB. The count saturates at
  the upper limit. **OUTA_DNL** takes the result at each transition. A missing code
  also sets it. The first transition of a run has no preceding width and is judged
  only for a missing code.

The results are levels that change only at a transition. `adc_tran` is high in the
clock where they are updated, so an observer can accumulate them, for example with a
sticky OR.

## D/A converter analyzer (analog, behavioural)

The D/A checks are rewritten so that both compare against the same two limits:

```
INL:  1/2 LSB < V_ideal(i+1) - V_real(i)   < 3/2 LSB
DNL:  1/2 LSB < V_real(i)    - V_real(i-1) < 3/2 LSB
```

Both differences are amplified K = 128 times, so 1 LSB becomes 1 V. The amplified
value is then compared with K/2 LSB = 0.5 V and 3K/2 LSB = 1.5 V.

* **INL path**: amplifier 1 forms K·(ramp − DAC output) → S/H → two comparators.
* **DNL path**: two capacitors are cross-switched by φ1/φ2.
  * First half of a code: φ2 is closed, so C2 takes the present output while C1 still
    holds the previous one.
  * Second half: φ1 is closed, so C1 takes the present output for the next code.
  * Amplifier 2 forms K·(C2 − C1) → S/H → two comparators.
* **Sampling**: both S/H sample on the first clock of the second half. At that clock
  the ramp is exactly V_ideal(*i*+1), and C2 − C1 = V(*i*) − V(*i*−1).
  * `dac_strobe` pulses one clock later. While it is high, the four outputs are valid
    for code *i*.
  * **OUTD_INLU / OUTD_DNLU** are high when the held value is above 1.5 V, meaning
    the difference is more than 3/2 LSB.
  * **OUTD_INLL / OUTD_DNLL** are high when it is below 0.5 V, meaning less than
    1/2 LSB.
  * The DNL result of the first code compares against whatever C1 held before the run
    and should be ignored.
* **Divided amplifier**: one amplifier with accurate gain over the whole 2 V range is
  hard to build. Each amplifier is therefore four sub-amplifiers for −1…−0.5, −0.5…0,
  0…0.5 and 0.5…1 V. One of them is selected (φ11…φ14 = `amp_sel[3:0]`) from the
  present D/A code.
* **Auto-zeroed comparators**: during the `AZ_CLKS` clocks before the ramp starts, φ21
  is high and each comparator stores its offset on a capacitor. From then on φ22 is
  high and the stored offset is subtracted.

The models have error parameters, all 0 (ideal) by default, so that their effect on
the test can be studied:

| Model | Parameters |
|---|---|
| divided amplifier | gain and offset per segment |
| DNL hold capacitors | feedthrough step |
| sample and hold | hold error |
| comparator | offset, auto-zero residual |
| ramp | slope error |

## Converter configurations, one RTL

The A/D and D/A ranges need not coincide. Four parameters select the configuration.
`ADC_LOW_LSB` and `DAC_LOW_LSB` are counted in LSB above −1 V:

| Configuration | `N` | `M` | A/D range | D/A range | `ADC_LOW_LSB` | `DAC_LOW_LSB` |
|---|---|---|---|---|---|---|
| equal (default) | 8 | 8 | −1 … 1 V | −1 … 1 V | 0 | 0 |
| D/A inside A/D | 8 | 7 | −1 … 1 V | −0.5 … 0.5 V | 0 | 64 |
| A/D inside D/A | 7 | 8 | −0.5 … 0.5 V | −1 … 1 V | 64 | 0 |
| partial overlap | 7 | 7 | 0 … 1 V | −0.5 … 0.5 V | 128 | 64 |
| partial overlap, mirrored | 7 | 7 | −0.5 … 0.5 V | 0 … 1 V | 64 | 128 |

The partial overlap can be arranged either way round. The D/A range can lie below the
A/D range, as in the fourth row, or above it, as in the fifth. Both use the same RTL.

How the parameters are used:

* The ramp starts at the lower of the two bottoms.
* `A_OFF` and `D_OFF` are each converter's distance from the ramp start.
* The A/D reference is the counter minus 2·`A_OFF`.
* The D/A code uses `D_OFF` as in the formula above.
* The counter width is computed by the package function `cnt_width` so that a run never
  wraps it. It is 10 bits in every configuration above.

A run lasts `AZ_CLKS` + END_H · SPL/2 · CLK_PER_SAMPLE clocks. END_H, in half-LSB steps,
is the larger of 2·A_OFF + 2^(N+1) and 2·D_OFF + 1 + 2^(M+1). At the defaults this is
32,912 clocks, about 10.3 ms at 3.2 MHz. The test that finishes first simply stops
reporting.

## Top level: `adda_bist_top`

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `test_mode` | in | 1: BIST drives both converters; 0: `dac_normal_in` / `adc_normal_vin` pass through |
| `start` | in | one-clock pulse starts a run (ignored unless `test_mode`) |
| `dac_in` [M] / `dac_vout` (real) | out / in | code to the D/A converter, and its output voltage |
| `adc_vin` (real) / `adc_sample` / `adc_code` [N] | out / out / in | A/D input voltage, sampling strobe, code |
| `outa_oi`, `outa_f`, `outa_inl`, `outa_dnl`, `adc_tran` | out | A/D results and their strobe |
| `outd_inlu`, `outd_inll`, `outd_dnlu`, `outd_dnll`, `dac_strobe` | out | D/A results and their strobe |
| `phi1`, `phi2`, `busy`, `test_start`, `test_end` | out | cross-switch phases and run status |

Timing requirements on the converters:

* The A/D converter must present the code for the current ramp level in the clock where
  `adc_sample` is high.
* The D/A output must settle within half an LSB period, which is `SPL/2 ·
  CLK_PER_SAMPLE` clocks.

## What follows the method and what is this design's own

These follow the described method:

* one ramp and one counter shared by both tests;
* the counter start value `011` and its half-LSB rate;
* the three A/D detector flip-flops and their gate functions;
* the one-LSB delay of the D/A test;
* the rewritten INL/DNL inequalities with two references;
* K = 128 with 1.5 V / 0.5 V references;
* the φ1/φ2 cross switching;
* the four-way divided amplifier;
* comparator auto-zeroing;
* the four configurations.

These are choices made here:

* **Samples per LSB.** `SPL = 8` is assumed. Nothing fixes how many samples fall on one
  code.
* **Counter width.** It is sized for the whole run, from both resolutions and the
  offsets, rather than from the D/A resolution alone.
* **Transition count after a skipped code.** The count resynchronises to *code + 1*, so
  a skipped code gives one error and does not shift every later INL comparison.
* **Missing codes** are reported on OUTA_DNL. There is no separate output for them.
* **OUTA_OI** is set at the start of a run, so a converter that never outputs 0 fails.
* **DNL distance counter.** It counts samples and saturates.
* **Sampling instants.** The instant at which the S/H samples and the length and
  placement of the auto-zero phase are this design's choices.
* **Per-configuration adjustment.** Each configuration is handled by parameterised
  offsets, not by rewiring the INL detector's gates.
* **Status outputs.** Result strobes, `busy`, `test_start`, `test_end` and the test-mode
  multiplexer select are additions.
* **Analog blocks** are idealised behaviour with optional error terms, not circuits.
  They have no settling, noise or charge-sharing effects beyond those terms. The
  reference voltages are parameters, not a modelled divider.

## Verification

Each block has a self-checking bench in `tb/`. Every bench prints
`TB_RESULT checks=… failures=…` and has a watchdog.

`tb/bist_env.sv` models the two converters under test:
* A/D transition levels with per-code errors.
* D/A output levels with per-code errors.

It computes the expected flags from the error tables alone, then drives normal mode and
two complete runs:
* The **first run** has scattered INL/DNL errors, a missing code and large D/A steps.
* The **second run** has an offset A/D converter that never reaches its top codes, and a D/A
  converter with a constant offset.

It checks:
* every transition;
* every D/A code;
* the ramp level at every D/A result;
* the final flags;
* the run length in clocks.

Two benches use it:
* `tb_adda_bist_top` runs all five configurations side by side. It fails if any
  mechanism never occurred: a transition, each A/D flag (INL, DNL, missing code,
  offset, final value), each of the four D/A flags, φ1/φ2 switching, and every
  amplifier segment the D/A range covers.
* `tb_adda_bist_full` runs the top at its default parameters.

Simulate with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/bist_pkg.sv \
          tb/tb_adda_bist_top.sv --top-module tb_adda_bist_top
obj_dir/Vtb_adda_bist_top
```

For a unit bench, replace the bench name, for example `tb_adc_inl_detector`. The analog
models use `real` ports and clocked or combinational behaviour without delays. They lint
and simulate, but are not meant for synthesis. Only `shared_counter`, `test_controller`,
`transition_detector`, `adc_inl_detector` and `adc_dnl_detector` are meant for
synthesis.
