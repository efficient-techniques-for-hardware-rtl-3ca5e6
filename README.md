# CMA adaptive antenna: beam-scan start and a pipelined delayed-CMA processor

A four-element array can steer itself toward a wanted signal without
knowing what that signal is. It only needs to know that the signal has a
constant envelope, as phase-modulated signals such as QPSK do. The
constant modulus algorithm (CMA) adjusts the complex element weights `w`.
It works to make the array output `y = w^H x` keep a constant magnitude.
Interference and multipath ripple the envelope, so removing the ripple
suppresses them.

Two problems make CMA awkward in hardware:

1. **Where to start.** CMA can lock onto the interferer if it starts from
   weights that already favour it. Here the array sits behind a four-beam
   phased-array antenna. Each element has a one-bit (±47.7°) phase shifter,
   so four switch patterns give four fixed beams. Before adapting, the
   controller switches through the four beams and reads the RF power
   detector for each. It leaves the strongest beam switched in, then
   starts CMA from fixed initial weights. The scan takes five clocks
   (312.5 ns at 16 MHz).
2. **How to go fast.** CMA has a feedback loop: the output sets the error,
   the error updates the weights, and the weights set the next output. With
   eight multiplications in series, that loop limits the clock. This design
   uses a *delayed* CMA (DCMA): the weight update uses the gradient from
   five samples earlier. The loop can then carry five pipeline registers,
   so the critical path is a single multiplier and one sample enters every
   clock.

Multipliers dominate the area, so the default build replaces them with
*power-of-two* multipliers. Each array input sample is rounded to
sign + one power of two, which turns every product into a shift. The
fixed-point build (`POT=0, BW=10`) uses ordinary two's-complement
multipliers instead.

A second, independent processor is included beside the DCMA path. It is
the floating-point CMA processor of an earlier prototype: one IEEE-754
single-precision multiply-accumulate unit, time-shared across the elements
by a small microprogram.

## System flow (`cma_antenna_top`)

```
 start ─► beam_init_ctrl ──ps_ctrl──► (phase shifters, off chip)
              ▲   pwr (power detector reading)
              │ done
              ▼
        load weights 0.25+j0 ─► adapt
                                  ▲ samples: test RAM playback (src_ram=1)
                                  │          or live ADC words (src_ram=0)
          sample_ram ─► test_ctrl ┘
          adc_re/adc_im/adc_valid ┘
                   ─► pot_encoder ─► dcma_unit ─► y, w
```

- **Start.** A `start` pulse begins the scan. `src_ram` is sampled at the
  same time and chooses the sample source for the run that follows.
- **Scan.** `beam_init_ctrl` applies the four phase patterns in turn, one
  per clock, and keeps the beam with the highest `pwr`. A tie keeps the
  earlier beam. `scan_done` rises six clocks after `start`: five for the
  scan and one to hand over. By then
  `ps_ctrl` holds the winning pattern and `beam_sel` its index.
- **Weight load.** In the next clock the DCMA weights are loaded with
  0.25 + j0. No sample is taken in that clock.
- **Adaptation, RAM mode.** `test_ctrl` reads the 2048-word RAM at one word
  per clock and enables the processor for each word. `run_done` pulses
  2050 clocks after `scan_done`. The weights then hold.
- **Adaptation, live mode.** The processor takes one sample per clock in
  which `adc_valid` is high. Gaps simply stall the pipeline. Adaptation
  continues until the next `start`.

The RAM word is 64 bits: element `i` has I at `[16i+7:16i]` and Q at
`[16i+15:16i+8]`. It is written through `ld_we/ld_addr/ld_data`.

The phase patterns (bit `i` drives element `i+1`, 1 = +47.7°) are:

| beam | 45°  | 135° | 225° | 315° |
|------|------|------|------|------|
| `ps_ctrl` | 0110 | 1100 | 1001 | 0011 |

The antenna, the phase shifters, the detector, the ADCs and DACs, and the
host link are analog or bought-in parts. They are not modelled; their
signals are ports of the top.

## The delayed-CMA pipeline (`dcma_unit`)

The DCMA unit computes:

```
y(k)   = w(k)^H x(k)
w(k+1) = w(k) - 4mu · x(k-5) · y*(k-5) · (|y(k-5)|^2 - sigma^2)
```

with `4mu = 2^-10` and `sigma^2 = 1`. The loop splits into two parts.

**Feed-forward path (`ffp`, 2 stages).** It has one processing module
(`cplx_pm`) per element, followed by a binary adder tree.
- The PM forms `conj(a)·c = (ac+bd) + j(ad−bc)` with four real multipliers.
  A register follows each multiplier, and then come two adders.
- The tree adds the PM outputs, with a single register at its root.
- The full-precision sum is `BI+BW+log2(N)+1` bits wide. It is saturated
  and truncated to the BW-bit weight width.
- The top BO = 8 bits of the result are the array output `y`.

**Error-forward path (`efp`, 3 stages).**
- **Stage 1.** PMs multiply the delayed `x_i` by `conj(y)`. Two 256-entry
  table squarers form `Re(y)^2` and `Im(y)^2`.
- **Stage 2.** It finishes `x_i·y*`, forms `|y|^2 − sigma^2`, and
  saturates both to BW bits.
- **Stage 3.** A real×real product forms the gradient `g_i` for each
  element.

**Weight bank (`weight_bank`).** It subtracts `g >>> 10` from each weight
and saturates the result to Q1.11.

**Timing.** Every register advances only when `en` is high, so all delays
count samples rather than clocks.
- `y` for a sample appears two enabled clocks after the sample enters.
- `y_valid` marks outputs of samples taken since the last weight load.
- A sample's gradient reaches the weights five samples after the sample.
  Updates start only once the pipeline holds post-load samples.
- The input `x` is delayed two samples inside `dcma_unit`, so that it meets
  its own `y` in the error path.

**Number formats.**

| signal | format |
|---|---|
| array input | 8-bit two's complement, Q1.7 (fixed-point build), or sign + one-hot power of two (default build) |
| weights | Q1.11 (`BW=12`, default) or Q1.9 (`BW=10`, fixed-point build) |
| array output `y` | 8-bit Q1.7 |
| `|y|^2`, sigma² | 16 bits, 14 fraction bits (sigma² = 16384) |
| gradient `g` | `2·BW` bits, `2·BW−2` fraction bits |

**Saturation and truncation (`sat_trunc`).** Every narrowing step keeps
the sign and the top fraction bits. It checks the integer bits against
the sign: an overflow is positive with any integer bit set, and an
underflow is negative with any integer bit clear. Either one clamps to
the largest or smallest code. `S1`, `S2` and `S3` are extra scaling
shifts at the three narrowing points. They default to 0.

## Power-of-two arithmetic (`pot_encoder`, `pot_mult`)

`pot_encoder` maps an 8-bit two's-complement sample to 8 bits.
- Bit 7 is the sign.
- One bit `i` of `[6:0]` is set, standing for magnitude `2^-(7-i)`. The
  encoder keeps the leading one of |d|, so magnitudes are rounded down to
  a power of two. −1.0 maps to bit 6 (0.5).
- Zero maps to all-zero.

`pot_mult` multiplies a weight by such a number with a shifter.
- A negative factor inverts the shifted word without adding one. This
  saves an incrementer, at the cost of results one LSB low.
- The power-of-two build then needs 12-bit weights, against 10 in the
  fixed-point build, for the same convergence.
- The multiplier count is 32 (16 in the FFP, 16 in the EFP PMs). The
  error-path real multipliers (two per element) stay fixed-point.

## Floating-point MAC processor (`fp_mac_cma`)

This processor implements the same non-delayed CMA update,
`w ← w − 4mu · e · x · y*`, in IEEE single precision, using
`fp_mul` → `fp_addsub` as one multiply-accumulate unit.

**Per snapshot.**
- A snapshot is latched on `x_valid`.
- Its eight 8-bit samples pass one per clock through `int_to_fp`, which
  reads them as Q1.7. They go into a register file.
- A fixed microprogram of 10N+16 steps runs. Each step multiplies two
  registers and, one clock later, adds the product to the accumulator,
  subtracts it, or starts a new sum. The last step of a sum writes it back
  to a register.
- The program computes `y_re`, `y_im`, `|y|^2 − 1`, `mu·e`, `mu·e·y` and
  the 2N weight updates.
- The multiplier and the adder each have one register stage. A sum that
  needs a freshly written value therefore waits two idle steps.

**Output.** `y` is turned into two 8-bit Q1.7 codes by `fp_to_int`.
`y_valid` pulses 69 clocks after `x_valid`. That is a little more than the
64 clocks per sample left by a 16 MHz clock at 250 kHz sampling.

**Arithmetic choices.**
- Rounding is toward zero.
- Zero exponent fields count as zero.
- Overflow gives infinity.
- NaNs are not handled.

The adder aligns with 26 guard bits and a sticky bit, so its truncated
result equals the truncation of the exact sum.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| top | `N` | 4 | elements |
| top | `BI`, `BO` | 8, 8 | input and output widths |
| top | `BW` | 12 | weight width |
| top | `POT` | 1 | 1 = power-of-two multipliers, 0 = two's-complement multipliers |
| top | `MU_SH` | 10 | `4mu = 2^-MU_SH` |
| top | `DEPTH` | 2048 | test RAM words |
| top | `NB` | 4 | beams |
| top | `PW` | 8 | detector reading width |
| `beam_init_ctrl` | `SETTLE` | 0 | extra clocks per beam before reading the detector |
| `beam_init_ctrl` | `PATTERN` | — | the phase patterns |
| `fp_mac_cma` | `MU` | 2^-10 | step size |
| `fp_mac_cma` | `SIGMA2` | 1.0 | target modulus |
| `fp_mac_cma` | `W_INIT` | 0.25 | initial weight |

For the fixed-point build, set `POT=0, BW=10`.

## Where this design departs from or adds to the source description

These are this design's own choices:
- The initial weights are 0.25 + j0.
- sigma² is 1.0.
- The scaling shifts S1–S3 are 0.
- The squarers are tables indexed by the 8-bit output.
- The power-of-two encoding rounds down.
- The clock-enable handshake, the live/RAM source switch, and the RAM word
  layout are this design's.
- The floating-point processor's register file, microprogram, rounding,
  and special-value handling are this design's.

- The original counts 36 multipliers replaced by power-of-two units. This
  design has 32, in the eight processing modules. The error path's other
  multipliers scale `x·y*` by the error, two per element. Both of their
  operands are fixed-point, so they cannot use the power-of-two form.
- The array-output width is `BI+BW+log2(N)+1` in both builds. The
  power-of-two build could use two bits fewer; the extra bits only
  sign-extend.
- The floating-point processor needs 69 clocks per snapshot. That is a
  little over the 64 clocks available at 250 kHz sampling with a 16 MHz
  clock, so at that rate it must skip some snapshots.

These are not provided:
- The twelve-beam switched-element antenna variant. `NB` and `PATTERN` let
  the scan take more beams, but their element-switch encoding is not
  defined here.
- Gate counts and clock rates have not been measured.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`. Shared testbench code lives in:
- `dcma_model_pkg`: a bit-exact model of the DCMA arithmetic, both builds.
- `array_scenario_pkg`: a four-element array receiving a QPSK signal and
  an interferer 3 dB weaker, with the beam patterns applied.
- `fp_ref_pkg`: truncated single-precision references.

Example with Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/cma_pkg.sv \
  tb/dcma_model_pkg.sv tb/array_scenario_pkg.sv tb/fp_ref_pkg.sv \
  tb/cma_antenna_top_tb.sv --top-module cma_antenna_top_tb
./obj_dir/Vcma_antenna_top_tb
```

`cma_antenna_top_tb` runs the whole design at its default parameters:
1. A scan, then 2048 samples of RAM playback.
2. A second scan, then 2048 live samples with random `adc_valid` gaps.
3. 400 snapshots through the floating-point processor.

It checks every output and weight against the models, checks the cycle
counts, and checks that the envelope error falls. It also counts each
mechanism (scan, each beam, RAM playback, live input with gaps, weight
load, weight update, floating-point snapshot) and fails if any never
happened. `dcma_unit_tb` also runs the fixed-point build (`POT=0, BW=10`)
against the model.
