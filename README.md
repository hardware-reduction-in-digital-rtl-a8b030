# Bus-splitting digital delta-sigma modulators

A digital delta-sigma modulator (DDSM) turns a long input word into a short
output word. It pushes the truncation error out of the band of interest by
noise shaping. A third-order error feedback modulator (EFM3) does this with
one adder chain and three error registers, and all of them are as wide as the
input. With a 16- or 20-bit input, that width sets most of the area and power.

This design uses **bus-splitting** to cut that width. The input word is cut
into fields. Only the most significant field goes through a third-order
modulator. The lower fields go through first- and second-order modulators,
which are smaller, and the small output of each is added to the next field
up as a carry. The lower stages leave extra shaped noise at the output. If
the field widths are chosen well, that noise stays below the noise that is
there anyway: the input's own quantization or dither floor at low
frequencies, and the EFM3's steeply rising noise at high frequencies. The
extra noise is then *masked*, and the spectrum looks almost like that of a
full-width EFM3.

The RTL contains three design points side by side in `ddsm_top`:

| channel | purpose | input | structure | output |
|---|---|---|---|---|
| `fn_*` | divider control of a fractional-N synthesizer | 20-bit constant + 1-bit LSB dither | nested 1-2-3 EFM3, fields 7-7-6 | signed 4 bits, -3..4 |
| `dac_*` | oversampling delta-sigma DAC, OSR = 128 | 16-bit sinusoid | nested 1-2-3 EFM3, fields 5-6-5 | signed 4 bits, -3..4 |
| `rq_*` | word-length reduction, OSR = 64 | 16-bit sinusoid | 8-bit LSB field through an EFM2, carry into the 8-bit MSB field | signed 10 bits |

## The error feedback modulator (`efm`)

An l-th order EFM with a W-bit quantizer does the following each sample:

```
v[n] = x[n] + sum_{i=1..l} h_i * q[n-i]      h = taps of H(z) = 1 - (1 - z^-1)^l
y[n] = floor(v[n] / 2^W)                     (upper bits of v)
q[n] = v[n] mod 2^W                          (lower W bits of v, stored)
```

Rearranging gives `2^W Y(z) = X(z) - (1 - z^-1)^l Q(z)`. The input passes
with unity gain. The residue `q`, which is the negative of the quantization
error, leaves through an l-th order high-pass. The taps are
`1` (l = 1), `2, -1` (l = 2) and `3, -3, 1` (l = 3). For l = 1 the EFM is a
plain accumulator whose carry is the output.

Implementation details:

* The residues `q[n-1..n-l]` are the only state. The output is
  combinational in `x`, so EFMs can be chained in one cycle and the chain
  sums exactly.
* An l-th order EFM with FIR noise transfer never overloads an
  (l+1)-bit truncator. For inputs in `[0, 2^W)` the output ranges are
  {0, 1}, {-1..2} and {-3..4}. The default output width is therefore
  `ORDER+1`, and an assertion checks that the quotient always fits.
* The input port is signed and `W+2` bits wide. The stages of a split
  modulator see a W-bit field plus a carry of -1..+3 from below.
* The adder width is `max(XW, W+ORDER+1) + 2`, which holds any input plus
  `|sum h_i q_i| < 2^ORDER * 2^W`.

## Splitting the word (`bs_efm3`)

```
x = X_MSB * 2^(N_ISB+N_LSB) + X_ISB * 2^N_LSB + X_LSB

X_LSB (+ dither) ──► EFM1 (step 2^N_LSB) ──c1 (-1..1)──┐
X_ISB ◄────────────────────────────────────────────────┘ add
X_ISB + c1       ──► EFM2 (step 2^N_ISB) ──c2 (-1..3)──┐
X_MSB ◄────────────────────────────────────────────────┘ add
X_MSB + c2       ──► EFM3 (step 2^N_MSB) ──► y (-3..4) ──► register
```

The output is

```
Y = X/2^N + (1-z^-1)   E1 / 2^N
          + (1-z^-1)^2 E2 / 2^(N_MSB+N_ISB)
          + (1-z^-1)^3 E3 / 2^N_MSB
```

with `E1`, `E2`, `E3` the stage errors, each up to one step of its own
quantizer. The DC value is exact. The running sum of `2^N y - x` stays
bounded, and every testbench checks this.

The same module covers all the architectures that are compared:

| N_MSB / N_ISB / N_LSB | architecture |
|---|---|
| all three > 0 (default 7 / 7 / 6) | nested bus-splitting 1-2-3 EFM3 |
| N_ISB = 0 | bus-splitting 1-3 EFM3 (EFM1 + EFM3) |
| N_LSB = 0 | bus-splitting 2-3 EFM3 (EFM2 + EFM3) |
| N_ISB = N_LSB = 0 | conventional N-bit EFM3 (reference only) |

### Choosing the field widths

The error of each lower stage is shaped by a lower power of `(1 - z^-1)`
than the EFM3's error, so it is larger at low frequencies. At low
frequencies, however, the output spectrum is set by the input's own floor,
which comes from dither or from the quantized signal. The rule is that
each lower-stage term must stay below the EFM3 term where that term meets
the floor.

* **Zeroth-order (white) dither.** The floor is `(1/12)(2^-N)^2`. It meets
  the EFM3 noise at `f0 = fs / (2 pi 2^(N/3))`. Masking at `f0` requires
  `N_MSB + N_ISB > 2N/3` and `N_MSB > N/3`. The smallest widths are
  `N_MSB = ceil(N/3)`, `N_ISB = ceil(2N/3) - N_MSB` and
  `N_LSB = N - N_MSB - N_ISB`. For N = 20 this gives **7-7-6**. The 1-3
  variant uses `N_MSB = ceil(2N/3)`, which gives 14-6.
* **First-order shaped dither.** The floor itself rises as
  `|2 sin(pi f/fs)|^2`. Masking the EFM1 term then needs
  `N_MSB + N_ISB >= N`, so no EFM1 is left. The EFM2 condition at
  `f1 = fs / (2 pi 2^(N/2))` is `N_MSB > N/2`, so the design is a 2-3 EFM3
  with `N_MSB = ceil(N/2)`. For N = 20 this gives **11-9**.
* **Sinusoidal input, oversampled.** The in-band noise terms are
  `N0 = (1/12) 2^-2N / OSR` (the sinusoid's own quantization),
  `N1 = (1/12) 2^-2(N_MSB+N_ISB) pi^2 / (3 OSR^3)`,
  `N2 = (1/12) 2^-2N_MSB pi^4 / (5 OSR^5)` and
  `N3 = (1/12) pi^6 / (7 OSR^7)`. The ENOB loss relative to a conventional
  EFM3 is `(10/6.02) log10(1 + (N1+N2)/(N0+N3))`. Allowing 0.5 bit
  (`N1+N2 <= N0+N3`) and minimising the hardware estimate
  `18 N_LSB + 36 N_ISB + 72 N_MSB + 134` gives **5-6-5** for N = 16 at
  OSR = 128, and 10-6 for the 1-3 variant.

  The OSR itself follows from the same picture. The EFM3 noise density
  `(1/12) |2 sin(pi f/fs)|^6` meets the sinusoid's floor `(1/12) 2^-2N` at
  about `f = fs / (2 pi 2^(N/3))`. Putting that corner at the band edge
  needs `OSR >= pi 2^(N/l)`, which is about 127 for N = 16 and l = 3. Below
  that OSR the EFM3 noise fills the band: at OSR = 32 the ENOB is only
  about 14 bits, with or without splitting.

The field widths are elaboration parameters. A different input length or
dither order only needs new parameter values.

## Dither (`dither_gen`, `dithered_bs_efm3`)

A constant input puts any DDSM into a limit cycle, which shows up as
spurious tones. In a frequency synthesizer these tones fold into the band
through every nonlinearity of the loop. A pseudorandom 1-bit dither `d` in
the LSB breaks the cycles. It is shaped by `V(z) = (1 - z^-1)^R` before it
is added. For a third-order modulator, `R = 0` and `R = 1` both keep the
quantization noise white.

* The bit source is a 23-bit maximal-length LFSR (`x^23 + x^18 + 1`,
  period 2^23 - 1) with the `SEED` parameter as start value.
* For `R = 0` the output is `d[n]`, with values 0 and 1. For `R = 1` it is
  `d[n] - d[n-1]`, with values -1, 0 and 1. Only these two orders are
  built.
* The dither is one LSB wide, so `dithered_bs_efm3` adds it at the input of
  the least significant stage. That gives the same sum as adding it to the
  whole word.
* `dither_en` switches the dither off. This gives the plain, tonal
  modulator.
* With `R = 0` the average output is `(s + 1/2) / 2^N`: the dither adds
  half an LSB of offset.

## Word-length reduction alone (`split_requant`)

This is the simplest use of the idea, with no EFM3 at the end. An N-bit
word is shortened to its upper `N_MSB` bits. Instead of truncating, the
lower `N_LSB` bits go through an l-th order EFM and its carry is added to
the upper field:

```
y = X_MSB + c,   Y = X / 2^N_LSB + (1 - z^-1)^l E / 2^N_LSB
```

The ENOB at the output is about `N + 0.5 log2 OSR` as long as
`(2^(2 N_LSB) / (2l+1)) (pi/OSR)^(2l) << 1`. For a 16-bit sinusoid at
OSR = 64 with an 8/8 split:

* l = 1 loses about three bits, for a predicted ENOB of 16.1.
* l = 2 keeps nearly all of the 19 bits of the original word, for a
  predicted ENOB of 18.95. This is the default.

The carry can take the sum outside the N_MSB-bit range: -1..2 for l = 2.
The output is therefore a signed `N_MSB+2`-bit word.

## Interfaces and timing

All blocks share these conventions:

* One rising-edge clock.
* A synchronous active-low reset `rst_n` that clears all state.
* A sample enable `en`. When `en` is low the block holds all its state and
  its outputs.
* Inputs are unsigned (offset binary). A bipolar two's-complement signal
  is converted by inverting its MSB.
* Outputs are registered and appear one enabled cycle after their input.
  The chain between input and output register is combinational: the three
  EFM adder chains of a 1-2-3 modulator are in series.

`ddsm_top` ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `fn_en`, `fn_s`, `fn_dither_en` | in | 1, 20, 1 | fractional-N channel: enable, input word, dither on |
| `fn_y` | out | 4 | signed -3..4, added to the integer division ratio |
| `fn_y_lsb`, `fn_y_isb` | out | 2, 3 | carries out of EFM1 and EFM2 (monitor) |
| `dac_en`, `dac_x` | in | 1, 16 | DAC channel: enable, oversampled input word |
| `dac_y` | out | 4 | signed -3..4, eight levels for a multibit DAC |
| `dac_y_lsb`, `dac_y_isb` | out | 2, 3 | carries out of EFM1 and EFM2 (monitor) |
| `rq_en`, `rq_x` | in | 1, 16 | word-length reducer: enable, input word |
| `rq_y` | out | 10 | signed `X_MSB + carry` |

Bit 1 of `fn_y_lsb` and `dac_y_lsb` is always 0 at the default settings,
because EFM1 gets no negative input without first-order dither. The port
keeps two bits so that it also fits the `R = 1` configuration.

After synthesis, the whole top is 67 word-level cells, 50 flip-flop bits
and 101 bits of small register arrays (the EFM residues). It needs no
memories and no multipliers. The constant tap weights reduce to shifts and
adds.

## Hardware cost

`bs_efm3` was mapped to simple two-input gates and multiplexers with a
generic open-source flow (no standard-cell library, no timing constraints).
Each configuration is compared with the conventional EFM3 of the same
input width:

| configuration | gates | flip-flops | gates, relative |
|---|---|---|---|
| conventional 20-bit EFM3 | 887 | 64 | 100 % |
| 14-6 1-3 | 706 | 54 | 80 % |
| 11-9 2-3 | 677 | 58 | 76 % |
| 7-7-6 1-2-3 (`fn_*`) | 526 | 50 | 59 % |
| conventional 16-bit EFM3 | 699 | 52 | 100 % |
| 10-6 1-3 | 516 | 42 | 74 % |
| 5-6-5 1-2-3 (`dac_*`) | 395 | 41 | 57 % |

These figures follow the area estimates that motivate the method. A
standard-cell implementation of the 16-bit case is quoted at 72.5 % for
the 10-6 design and 61.7 % for the 5-6-5 design; the dithered 7-7-6 design
is quoted at 64 %. The flip-flop count hardly changes. The saving is in the
adders: their total width falls from 3 x N bits to roughly
`N_LSB + 2 N_ISB + 3 N_MSB` bits.

## Verification

Every testbench checks itself and ends with a
`TB_RESULT checks=<n> failures=<n>` line.

| testbench | what it shows |
|---|---|
| `tb_efm` | EFM1, EFM2 (6-bit) and EFM3 (20-bit) against a reference of the recursion, including carry-extended inputs; output ranges; bounded DC error |
| `tb_bs_efm3` | 7-7-6, 14-6, 11-9 and conventional 20-bit, bit-exact against a model of the chain; every carry value; random enable |
| `tb_dither_gen` | LFSR sequence and both shapings bit-exact; hold on `en` low; ones density; shaped dither has no DC |
| `tb_dithered_bs_efm3` | 7-7-6/R=0 and 11-9/R=1 bit-exact with dither on and off; an undithered half-scale input falls into a short limit cycle, a dithered one does not |
| `tb_split_requant` | orders 1-3, bit-exact; bounded DC error |
| `tb_ddsm_top` | all three channels at default parameters, bit-exact, 60 000 samples; counts each mechanism and fails if one never occurs: dither on/off, every carry value, output extremes -3 and 4, held samples |
| `tb_dac_enob` | 2^20-sample Hann-windowed in-band DFT, full-scale sinusoid, OSR 128 |
| `tb_dac_osr32` | the same measurement at OSR 32, where the EFM3 noise dominates the band |
| `tb_fn_spectrum` | 2^18-sample band powers of the dithered modulators against a conventional 20-bit EFM3 |
| `tb_requant_enob` | ENOB of the word-length reducer, OSR 64 |

Measured with these testbenches:

| design | measured | predicted by the noise model |
|---|---|---|
| conventional 16-bit EFM3, OSR 128 | 19.41 bits | 19.41 |
| 10-6 bus-splitting 1-3 EFM3 | 19.00 bits | 19.02 |
| 5-6-5 nested 1-2-3 EFM3 (`dac_*`) | 19.10 bits (loss 0.31) | 19.14 (loss 0.27) |
| conventional 16-bit EFM3, OSR 32 | 13.99 bits | 13.96 |
| 5-6-5 nested 1-2-3 EFM3, OSR 32 | 13.86 bits | 13.96 |
| 8/8 reducer, l = 1, OSR 64 | 16.03 bits | 16.13 |
| 8/8 reducer, l = 2 (`rq_*`) | 18.85 bits | 18.95 |

Dithered modulators against a conventional dithered 20-bit EFM3:

| design | low band (below the corner) | band from the corner to 4x the corner |
|---|---|---|
| 7-7-6, R = 0 (`fn_*`) | +0.23 dB | +0.63 dB |
| 14-6, R = 0 | +0.14 dB | +0.64 dB |
| 11-9, R = 1 | +1.09 dB | -1.64 dB |
| 5-9-6, R = 0 (breaks `N_MSB > N/3`) | | +3.23 dB |

The 11-9 bands contain only 39 and 123 DFT bins, so their spread is larger.
That testbench allows 2 dB for this design and 1 dB for the others. The
5-9-6 row is a negative control: with `N_MSB` below N/3, the EFM2 noise
shows through, as the rule predicts.

## Simulating

Each testbench is a top module with no ports. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ddsm_pkg.sv tb/tb_ddsm_top.sv --top-module tb_ddsm_top -o sim
./obj_dir/sim
```

Replace `tb_ddsm_top` with any other testbench name. The unit and top
testbenches and `tb_dac_osr32` finish in about a second. `tb_fn_spectrum` takes about
20 s and `tb_dac_enob` about 2 minutes, most of it spent in the DFTs.
Shorten their records (`NS`) to speed them up.

## Departures and choices

* **Stage wiring.** The wiring of the stages is inferred from the output
  equation. Each lower stage's output is added to the next field up, and
  the steps are `2^N_LSB`, `2^N_ISB` and `2^N_MSB`.
* **Conventions.** The following are this design's own choices: the
  widths of the internal carries and input ports, the offset-binary input
  coding, the clock enables, the synchronous reset, the single output
  register, and the monitor ports.
* **Dither source.** The dither only has to be a pseudorandom 1-bit
  sequence; the 23-bit LFSR is one choice. The area figures that motivate
  the design leave the dither hardware out.
* **Dither shaping.** `V(z) = (1 - z^-1)^R` is a high-pass for R = 1,
  although it is sometimes loosely called a low-pass. The RTL implements
  the formula.
* **Word-length reducer output.** It is kept two bits wider than
  `N_MSB` so that no carry can wrap.
* **Not built.** The remaining blocks of an oversampling DAC are the
  interpolation filter in front of the modulator and the multibit DAC
  (with dynamic element matching) and analog low-pass filter behind it.
  These are outside this RTL because they are not specified in enough
  detail to build.
* **Parameter sets, not top-level defaults.** The 1-3 and 2-3 variants and
  the conventional EFM3 are reached through parameters of `bs_efm3`
  (`N_ISB = 0`, `N_LSB = 0`). They are not instantiated in `ddsm_top`.

## Files

* `rtl/ddsm_pkg.sv`: tap weights of `1 - (1 - z^-1)^l` and width helpers
* `rtl/efm.sv`: l-th order EFM
* `rtl/bs_efm3.sv`: bus-splitting EFM3 (1-2-3, 1-3, 2-3, conventional)
* `rtl/dither_gen.sv`: LFSR dither with `(1 - z^-1)^R` shaping
* `rtl/dithered_bs_efm3.sv`: dither generator plus bus-splitting EFM3
* `rtl/split_requant.sv`: word-length reduction by bus-splitting alone
* `rtl/ddsm_top.sv`: the three channels side by side
* `tb/`: the testbenches listed above
