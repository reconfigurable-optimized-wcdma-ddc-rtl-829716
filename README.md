# WCDMA digital down-converter with polyphase half-band decimation

This is a single-carrier WCDMA digital down-converter (DDC) for a
software-defined radio receiver. It takes real 14-bit samples from an IF ADC
at 61.44 MSPS, which is 16 times the 3.84 Mcps chip rate. A tunable
oscillator moves the wanted carrier to 0 Hz. The signal is then filtered and
decimated by 8 to complex 16-bit I/Q at 7.68 MSPS (2 samples per chip), the
rate a rake or timing-recovery back end expects.

The architecture follows the published design "Reconfigurable Optimized WCDMA
DDC for Software Defined Radios":

- the decimation by 8 is split into three stages of 2;
- the first two stages are equiripple half-band filters;
- the last stage is the root-raised-cosine (RRC) matched filter;
- every stage is built in polyphase form;
- multipliers are shared where the output rate leaves room for it.

That source describes the structure, rates, precisions and filter orders, but
not the RTL. The RTL here, the coefficient values, the oscillator and the
handshake are this implementation's own. Where it departs from the source is
listed at the end.

## Signal path and rates

```
            in_valid                       cos, -sin
adc_in ──┬──────────► DDS (tuning_word) ───────────┐
 14 bit  │                                         ▼
         └──► delay 23 clk ───────────────────► mixer ──► HB1 /2 ──► HB2 /2 ──► RRC /2 ──► i_out, q_out
                                              14-bit I/Q  61.44→30.72 30.72→15.36 15.36→7.68   16 bit
                                                          (requantised to 14 bit between stages)
```

| stage | rate in → out (MSPS) | taps (order) | non-zero symmetric pairs | multipliers per rail | clocks per output |
|---|---|---|---|---|---|
| mixer | 61.44 | – | – | 1 (I) + 1 (Q) | 1 |
| HB1 half-band | 61.44 → 30.72 | 11 (10) | 4 | 4 (parallel) | 2 |
| HB2 half-band | 30.72 → 15.36 | 27 (26) | 8 | 2 (serial) | 4 |
| RRC, roll-off 0.22 | 15.36 → 7.68 | 61 (60) | 31 | 4 (serial) | 8 |

The whole design runs on one clock. That clock is the IF sample clock, and
`in_valid` works as a sample enable. The design does not need it high on
every cycle, but it takes at most one sample per clock. With a 61.44 MHz
clock, every multiplier in the serial stages is busy on every cycle. The
design uses 22 multipliers in all.

## Polyphase decimation

Both decimator engines compute y[m] = Σ h[k]·x[2m−k], and only at the output
rate. A two-way commutator sends the samples to two delay lines:

- the first sample after reset is *phase 0* and goes to the E0 line;
- the next sample goes to the E1 line, and so on, alternating.

E0 therefore holds x[2m], x[2m−2], … and meets the even taps h[0], h[2], …
E1 holds x[2m−1], x[2m−3], … and meets the odd taps. This is the "down-sample
first, then filter with E0(z) and E1(z)" form of a decimate-by-2 filter.
Every phase-0 sample completes one output. The output depends on that sample
and on everything before it.

Two reductions are applied before any multiplication:

- **Symmetric pre-add.** All coefficient sets are linear-phase and of odd
  length. This means tap k and tap N−1−k have the same coefficient and lie in
  the same branch. Their two samples are added first and share one
  multiplication, so 61 taps become 31 products.
- **Zero taps cost nothing.** In a half-band filter every tap at an even
  distance from the centre is zero, except the centre itself. Such taps
  produce no multiplier and no cycle. For both half-band filters the E1
  branch reduces to the centre tap of 0.5.

There are two engines with the same arithmetic and the same interface:

- `ddc_poly_decim2` is fully parallel. After the accepting edge it has a
  multiply register and a sum/round/saturate register, so the output is
  written by the 2nd edge after the phase-0 sample is accepted. HB1 uses it
  because it must produce an output every 2 clocks.
- `ddc_poly_decim2_ser` is partially serial:
  1. When an output is due, the pre-added sums of the non-zero pairs are
     captured in a register bank. The sums are packed tightly, so zero taps
     leave no gaps.
  2. A multiply-accumulate unit with `NMUL` multipliers works through the
     bank one group per clock, taking CYC = ⌈pairs/NMUL⌉ clocks.
  3. The last group is added straight into a result register. A new capture
     can therefore happen on that same edge, and outputs can follow each
     other every CYC clocks.
  4. The output is written CYC+2 edges after the accepting edge.

  Phase-0 samples must arrive at least CYC clocks apart. An assertion
  checks this rule. Inside the DDC the rule holds by construction: HB2 gets
  a sample at most every 2 clocks (CYC 4), and the RRC filter at most every
  4 clocks (CYC 8).

The I and Q rails each have their own engine (`ddc_hb1`, `ddc_hb2`,
`ddc_rrc`). An assertion checks that the two rails stay in step.

## Oscillator and mixer

`ddc_dds` has a 28-bit phase accumulator. The accumulator steps by
`tuning_word` once per accepted sample, so the oscillator frequency is
f0 = tuning_word · 61.44 MHz / 2^28, tunable in steps of 0.229 Hz. The
tuning word can change at any time and applies from the next sample on.

cos and sin are computed by a pipelined CORDIC in rotation mode:

1. The top 24 phase bits are folded into [−π/2, π/2). Angles in the left
   half-plane are rotated by angle − π, and the result is negated.
2. Twenty micro-rotations by ±atan(2^−i) turn the start vector (X0, 0).
   X0 is 0.9999 · 2^22 divided by the CORDIC gain 1.64676.
3. The result is rounded to 18-bit Q1.17, with a peak of 0.9999 · 2^17.

The worst error seen against exact cos/sin is 1 LSB.

The latency of the DDS is `DDS_LAT` = 23 register stages. The top delays each
IF sample by the same 23 cycles, so that sample n meets the oscillator phase
n · tuning_word.

`ddc_mixer` forms I = x·cos and Q = −x·sin, which is x · e^(−jω0n). It has
two registered stages. Each product is rounded by 2^17 and saturated to the
14-bit input precision of HB1.

## Number formats and scaling

- Coefficients are 16-bit signed Q1.15. Every filter has unity DC gain.
- Each filter takes 14-bit samples and returns 16-bit samples. The output is
  round(acc / 2^13), saturated. The two extra bits are fraction bits, so the
  16-bit output is 4× the input level.
- Between filters, `ddc_pkg::requant` takes the 16-bit result back to 14 bits
  (round half up, saturate). Every filter therefore works at the 14-in /
  16-out precision the source gives for it. The price is about 0.5 LSB of
  requantisation noise at 14 bits per stage.
- At the output, a full-scale cosine at f0 + δ gives a complex tone at δ with
  an amplitude of about 2^15/2. The mixer splits the real tone into a wanted
  component and an image component, and the filters remove the image.

## Filter coefficients

The coefficient values are in `ddc_pkg`. They were designed with the methods
and orders the source specifies, then rounded to Q1.15:

- **HB1:** equiripple (Parks–McClellan) half-band, order 10 at 61.44 MHz.
  - Pass band 0–2.34 MHz (1.22 × 3.84 MHz / 2). Stop band 28.38–30.72 MHz.
  - Quantised stop-band attenuation is 114.7 dB; pass-band ripple
    0.00003 dB peak to peak (specified: 0.002 dB).
- **HB2:** the same method, order 26 at 30.72 MHz.
  - Pass band 0–2.34 MHz. Stop band 13.02–15.36 MHz.
  - Quantised stop-band attenuation is 84.3 dB; pass-band ripple
    0.00084 dB peak to peak (specified: 0.001 dB).
- **RRC:** root-raised-cosine at 4 samples per chip, roll-off 0.22,
  order 60.
  - Multiplied by a 50 dB Chebyshev window and normalised to unity DC gain.

In each half-band set, the taps at even distance from the centre are exactly
zero and the centre is exactly 0.5. Using another coefficient set only
requires a new array of odd length with symmetric taps. Set NTAPS/COEFS on
the engines; both engines reject, at elaboration, an array of even length or
with unequal mirror taps.

## Top-level interface (`ddc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock (61.44 MHz nominal) |
| `rst_n` | in | 1 | synchronous, active-low reset |
| `in_valid` | in | 1 | `adc_in` holds a sample |
| `adc_in` | in | 14 | real IF sample, two's complement |
| `tuning_word` | in | 28 | f0 = tuning_word · Fs / 2^28 |
| `out_valid` | out | 1 | one pulse per 8 accepted samples |
| `i_out`, `q_out` | out | 16 | baseband I and Q |

Output m is completed by input sample 8m: the first sample after reset, the
9th, the 17th, and so on. With `in_valid` high on every cycle, output m is
written by the 47th clock edge after the edge that accepted that sample. The
47 edges are made up as follows:

- 22 for the oscillator alignment;
- 2 for the mixer;
- 3 + 1 for HB1 and its requantiser;
- 7 + 1 for HB2 and its requantiser;
- 11 for the RRC filter.

Reset clears every delay line and valid pipeline. The CORDIC datapath is not
reset, because it is qualified by valid.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=… failures=…` and has a watchdog.

- `tb_ddc_poly_decim2` uses a 7-tap set with zero taps and a gain above 1.
  It compares every output bit-exactly with a direct convolution. The test
  covers saturation, random gaps in `in_valid`, the output count and the
  latency.
- `tb_ddc_poly_decim2_ser` runs the RRC set (NMUL 4) and the HB2 set
  (NMUL 3) at the fastest legal rate and then with gaps. Outputs are checked
  bit-exactly, and the latency is CYC+2.
- `tb_ddc_hb1`, `tb_ddc_hb2` and `tb_ddc_rrc` feed random, DC and
  full-scale step inputs, at the rate each stage sees inside the DDC. They
  check both rails bit-exactly against a direct convolution, together with
  unity DC gain, the output count and the latency.
- `tb_ddc_dds` compares cos/sin with real-number cos/sin within 2 LSB, while
  retuning on the fly and with gaps. It checks the latency and covers all
  four quadrants.
- `tb_ddc_mixer` checks I/Q bit-exactly against 64-bit integer products,
  including the one saturating case (−8192 · −131072) and the latency.
- `tb_ddc_top` runs the full design at its default parameters on 20,000
  IF samples. The input has a wanted tone 0.6 MHz above the carrier, an
  adjacent-channel tone 5 MHz above it, and noise. The run has three
  sections:
  - the carrier at 15.36 MHz;
  - retuned on the fly to 10 MHz, with random input gaps;
  - the adjacent channel alone.

  An independent floating-point model uses exact oscillator phase and
  unrounded convolutions. Every output must lie within 16 LSB of it; the
  observed worst case is 4 LSB. The testbench also checks:
  - the rates of all three stages and the 47-edge latency;
  - the wanted level (about 7,700 rms against an expected ≈ 8,000);
  - adjacent-channel rejection of at least 60 dB (72 dB observed);
  - that the retune, the input gaps and every stage actually happened.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/ddc_pkg.sv \
          tb/tb_ddc_top.sv --top-module tb_ddc_top
./obj_dir/Vtb_ddc_top
```

Replace `tb_ddc_top` with the name of any other testbench. The package must
come first on the command line; `-y rtl` finds the modules. Every testbench
finishes in well under a second.

## Where this departs from the source design, and open points

- **Coefficients.** The source does not give its coefficients, so the values
  are this design's own, designed with the methods the source specifies
  (above). The source reports stop-band attenuations of 88.33 dB (HB1),
  102.84 dB (HB2) and 89.25 dB (RRC) for its filters. These coefficients
  give 114.7 dB for HB1 and 84.3 dB for HB2, measured over the half-band
  image bands.
- **Length of the second half-band filter.** The source gives two lengths
  for it: 19 taps in its configuration table, and order 26 in its design
  description. This design uses order 26 (27 taps).
- **Partially serial architecture.** The source names it without detail. The
  split used here is this design's own choice: HB1 parallel, HB2 and RRC
  serial, with NMUL 2 and 4. The source reports 65 hardware multipliers for
  its FPGA build; this design uses 22. Setting NMUL to the pair count (8 for
  HB2, 31 for the RRC filter) makes a stage fully parallel: it can then
  produce one output per clock.
- **Spurious-free range.** The specification asks for an oscillator SFDR of
  up to 115 dB. FFTs of 65,536 `ddc_dds` outputs gave 116–131 dB for every
  tuning word tried, including the periodic worst cases Fs/16 and Fs/128.
  No dithering is applied. The testbenches do not check SFDR. Downstream,
  the mixer's 14-bit output limits the spurious-free range of the signal
  path to that of 14-bit samples, as the specified precisions imply.
- **Interface.** The valid strobe, the synchronous reset, the rounding
  between stages, and the mixer's 14-bit output are choices of this design.
- **Not evaluated.** FPGA figures such as the 145.54 MHz clock, device use
  and power belong to the source's FPGA build. Timing closure of this RTL on
  any target was not evaluated.
- **Outside this design.** The ADC is not part of the RTL. Its samples enter
  at `adc_in`/`in_valid`.

## Files

- `rtl/ddc_pkg.sv`: widths, types, the CORDIC table and the filter
  coefficients, plus the requantiser.
- `rtl/ddc_dds.sv`, `rtl/ddc_mixer.sv`: the oscillator and the mixer.
- `rtl/ddc_poly_decim2.sv`, `rtl/ddc_poly_decim2_ser.sv`: the parallel and
  partially serial decimator engines.
- `rtl/ddc_hb1.sv`, `rtl/ddc_hb2.sv`, `rtl/ddc_rrc.sv`: the complex filter
  stages.
- `rtl/ddc_top.sv`: the complete DDC.
- `tb/tb_*.sv`: one self-checking testbench per module.
