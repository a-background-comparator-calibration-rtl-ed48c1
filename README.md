# Flash ADC with background comparator offset calibration

In a CMOS flash ADC the linearity is set mostly by the random input-referred
offsets of its comparators. Making the devices large enough to match well costs
speed and power. This design takes another route. Every comparator gets a small
digital loop that measures the *sign* of its own offset while the converter is
running, and trims the offset step by step towards zero. Conversion never
stops for calibration. The only analog additions are an input chopper and an
offset trim input on each comparator; all the decision logic is digital.

The RTL implements the technique of "A Background Comparator Calibration
Technique for Flash Analog-to-Digital Converters" in its 6-bit design case:
63 comparators, an offset trim step of 1/4 LSB and a peak-detector threshold
of 16. The comparators themselves are analog, so they are behavioural models
here. Everything behind them is synthesizable.

## How a comparator can see the sign of its own offset

Each comparator is a *random-chopping comparator* (`rcc`). A random bit
q[k] (+1 or -1) is drawn for every sample:

* an analog chopper in front of the comparator swaps its two inputs when q = -1;
* an XNOR gate behind it inverts the decision when q = -1.

Without an offset the two inversions cancel and nothing changes. With an
offset V_OS, the effective threshold becomes

    V_t = V_R + q * V_OS

so the threshold jumps between V_R + V_OS and V_R - V_OS from sample to
sample. Inputs that fall between the two levels give a '1' under one sign of q
and a '0' under the other. Count the '1' results seen with q = +1 and subtract
the '1' results seen with q = -1. The sign of that difference is the sign of
the offset. This needs no knowledge of the input's distribution. The input only
has to be uncorrelated with q and to visit the region around V_R. Only the sign
is learnt, not the size.

## The calibration processor

The calibration processor (`cp`) turns that count into a trim code. It is a
discrete-time integrator built from two accumulators and a threshold detector:

| piece | module | rule per clock |
|---|---|---|
| sign multiplier | inside `cp` | U = +1 if d = 1 and q = +1; U = -1 if d = 1 and q = -1; else 0 |
| ACC1 | `acc1` | R <= (S != 0 ? 0 : R) + U |
| bilateral peak detector | `bpd` | S = +1 if R > N_C, S = -1 if R < -N_C, else 0 (combinational) |
| ACC2 | `acc2` | T <= T + S, saturating at the ends of its range |

The comparator offset is V_OS = V_0 + dV * T, where V_0 is the mismatch
offset. The trim code therefore moves one step only after the '1' counts
under the two chopping signs differ by N_C + 1. R never leaves
±(N_C + 1), and S is non-zero for one cycle at a time.

Two parameters set the behaviour, and they trade speed against accuracy:

* **dV**, the trim step. Larger steps converge faster but leave the offset
  jumping in coarse steps.
* **N_C**, the peak-detector threshold. Larger thresholds average out more
  input noise but converge more slowly.

Near convergence the loop behaves like a single pole with time constant
tau = N_C / (dV * D(V_R)), where D(V_R) is the input's probability density at
the reference level. For a uniform input over the full scale V_FS this becomes
tau = N_C * V_FS / dV. With the defaults that is 16 * 64 / (1/4) = 4096
samples.

Once the loop has converged, V_OS wanders at random around zero in steps of
dV. The loop keeps the mean at zero; the spread shrinks as dV goes down or
N_C goes up.

## Windowing with the thermometer edge detector

A stand-alone calibrated comparator (`bcc` with its own output fed back) sees
every input above its reference level. Most of those samples carry no
information about its offset but still add noise to ACC1. In the flash ADC
(`flash_adc`) the calibration input of comparator j is its thermometer
*edge* bit instead:

    De_j = Dc_j AND NOT Dc_(j+1)       (De_63 = Dc_63)

computed by `tced`. Comparator j now learns only from samples in its own
one-LSB window between its threshold and the one above. This raises the
useful fraction of the counts sharply. In simulation the steady-state spread
of the offsets drops from about 0.5 LSB without the window to about 0.12 LSB
with it. The same edge code also feeds the output encoder, so the window
costs no extra gates.

Two effects need care:

* **Non-monotonic thresholds.** While offsets are still above 1/2 LSB, the
  threshold of comparator j+1 can lie below that of comparator j. Then two
  edge bits can be 1 at once, and some comparator's edge bit can never be 1,
  which stops its calibration.
* **Chopping correlation.** If neighbouring comparators used the same chopping
  sequence, a non-monotonic order could stay frozen for good. `chop_rng`
  therefore drives odd and even comparators from two independent sequences.
  This is the minimum that keeps neighbours uncorrelated. Set `NSRC` = 63 to
  give every comparator its own sequence.

The window also limits how far an offset can drift while the input stays away
from that comparator's level: about 1 LSB plus one trim step.

## Output encoder

The edge code goes through a Gray-coded OR encoder (`gray_encoder`) and then
a Gray-to-binary converter (`gray2bin`). A bubble lights two neighbouring
edge bits. Their Gray codes differ in one bit, so the OR of the two decodes to
one of the two neighbouring codes rather than to a far-off value. With no edge
bit set (input below the lowest threshold) the output is code 0.

## Module map and interfaces

```
flash_adc                  top: 6-bit converter
├── chop_rng               chopping sequences q_j (32-bit Galois LFSRs)
├── bcc  x63 (g_cmp[j])    calibrated comparator
│   ├── rcc                comparator model: chopper, offset, XNOR, latch
│   └── cp                 calibration processor
│       ├── acc1, bpd, acc2
├── tced                   edge detector
├── gray_encoder
└── gray2bin
bcc_pkg                    shared constants and types
```

**Analog values.** Voltages are signed 16-bit fixed-point numbers with 8
fractional bits per LSB: 256 = 1 LSB. The input range is ±32 LSB. Reference j
(j = 1..63) sits at (j - 32) LSB, so comparator 32 sits at mid-scale. The
`vos0` input of `flash_adc` stands for the comparators' device mismatch. It
lets a testbench choose the offsets; a real chip has no such pin.

**Timing.** `vin` is sampled on a rising clock edge k. The comparator
decisions are registered at that edge, and `dout` shows the code after edge
k+1. The converter produces one code per clock with a latency of two edges.
Each comparator's q is stored alongside its decision, so the calibration
processor pairs each result with the chopping sign that produced it. The trim
code changes at most one step per peak detection. Reset is asynchronous and
active low; it clears all accumulators and trim codes and reloads the LFSR
seeds.

**Parameters of `flash_adc`.** `N` = 6 bits, `NC` = 16, `DV` = 64 (1/4 LSB),
`TW` = 7-bit trim code (-64..+63 steps, ±16 LSB at the default step),
`NSRC` = 2 chopping sources. For the finest steps, widen `TW` so the trim
range still covers the expected offsets. For example, 1/8 LSB steps need
`TW` = 8 to reach ±8 LSB.

## What the simulations show

All numbers below come from the testbenches in `tb/`, which use fixed seeds.

| setting | result |
|---|---|
| one comparator, dV = 1/2 LSB, N_C = 64, start 5.8 LSB, sine input (`tb_bcc`) | 2.30 LSB after tau = 12868 samples (single-pole estimate 2.13 LSB); below 1 LSB after 18 733 samples; afterwards mean -0.04 LSB, sigma 0.47 LSB |
| 63 comparators, defaults, offsets sigma 2 LSB, sine input (`tb_flash_adc`) | spatial sigma below 0.25 LSB after 16 139 samples, about 0.18 LSB at 20 000 samples; 0.12 LSB and every offset below 0.29 LSB after 10^6 samples |
| same, triangular input | below 0.25 LSB after 11 915 samples (faster, as the input is uniform); 0.13 LSB at the end |
| same, window removed (`cal_d` of each `bcc` tied to its own `dc` in `flash_adc`) | 0.5 LSB at the end: the window matters |
| one comparator, dV = 1/8 LSB, N_C = 32 / dV = 1/2 LSB, N_C = 256 (`tb_sigma_sweep`) | sigma 0.33 / 0.31 LSB, about the 1/3 LSB these settings are meant to reach |
| 63 windowed comparators, dV = 1/2 LSB, N_C = 64 | spatial sigma 0.21 LSB, at most dV/2 = 1/4 LSB as expected for large N_C |
| one comparator, dV = 1/2 LSB, N_C = 64, nearest level 1/8 LSB, 2 x 10^7 samples (`tb_pmf`) | fraction of time at each offset level matches a random-walk calculation of the loop within 0.03 (0.389 vs 0.414 at the most likely level); sigma 0.473 LSB simulated vs 0.464 LSB calculated |
| comparator 32 with +1.5 LSB offset, input held between thresholds 33 and 32 (`tb_nmt`) | with q = +1 the edge bits of 31 and 33 are both set and 32's never is, so its calibration stalls; under a sine input it is reached again and trims to 0.0 LSB |

The full-scale tests also check the converter itself:

* Every code 0..63 comes out right with ideal comparators.
* The latency is exactly two edges.
* After calibration, the output stays within one code of the ideal code.

The tests also count the mechanisms above: trim steps in both directions,
edge words with several bits set, non-thermometer comparator words, and
results withheld by the window.

## Design choices beyond the published scheme

The published scheme leaves the following open; this design settles them as
follows:

* **Number formats and trim range:** fixed point, 7-bit trim code.
  Saturation at the ends of the range is this design's choice.
* **ACC1 after a detection:** the sum restarts from the current sample
  (R = U), not from zero.
* **Peak detector:** written as a full comparison. For a power-of-two N_C,
  synthesis reduces it to a few gates.
* **Random source:** sharing two sequences between odd and even comparators
  follows the published suggestion; making each from a 32-bit LFSR is this
  design's choice (the scheme only asks for sequences uncorrelated with the
  input and between neighbours).
* **Encoder:** Gray-coded OR encoder on the edge code.
* **Latency and reset:** register placement, latency and reset are this
  design's own.
* **Not implemented:**
  * the reference ladder, which is passive;
  * an extra power-on calibration, which is only recommended and never
    specified.
* **Comparator model:** the offset trim is ideal and linear, V_0 + dV * T. A
  real trim circuit reconfigures the comparator's slow section, and its steps
  will not be exactly equal. The model has no noise, hysteresis or
  metastability, and decides in one clock; results obtained with it show the
  behaviour of the digital loop, not of a particular comparator circuit.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` at the end. Build
and run one with plain Verilator, letting it find modules in `rtl/` by name:

```
verilator --binary --timing -y rtl rtl/bcc_pkg.sv tb/tb_flash_adc.sv \
          --top-module tb_flash_adc -Mdir obj_tb
./obj_tb/Vtb_flash_adc
```

Replace `tb_flash_adc` with any other file in `tb/` to run it. There is one
testbench per module: `tb_rcc`, `tb_acc1`, `tb_bpd`, `tb_acc2`, `tb_cp`,
`tb_bcc`, `tb_tced`, `tb_gray_encoder`, `tb_gray2bin` and `tb_chop_rng`.
`tb_sigma_sweep` covers other (dV, N_C) settings, `tb_nmt` reproduces a
non-monotonic threshold order, and `tb_pmf` compares the offset distribution
with the analytic steady-state model (about 10 s). The end-to-end test runs
1.1 million converter samples at the default size in a few seconds.

To try another configuration, override the parameters of `flash_adc`. Its
testbench and `tb_sigma_sweep` show the pattern: instantiate
`flash_adc #(.NC(64), .DV(128))`, drive `vin` with a waveform and `vos0` with
offsets, and read `trim` to follow the effective offsets
`vos0 + DV * trim`.
