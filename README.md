# 32-point radix-2 FFT with Urdhva Tiryakbhyam (Vedic) multipliers

This is a fully parallel 32-point Fast Fourier Transform. Every twiddle-factor
multiplication goes through an 8x8 multiplier built on the Urdhva Tiryakbhyam
("vertically and crosswise") method of Vedic arithmetic. That method forms all
the bit products of one output column at once and adds them together with the
carry from the column before. This keeps the partial-product generation
parallel, which shortens the critical path compared with a sequential
multiplier such as radix-2 Booth.

The transform is a radix-2 decimation-in-frequency (DIF) FFT. It computes

    X(k) = sum_{n=0}^{31} x(n) * exp(-j*2*pi*n*k/32),   k = 0..31

scaled by 1/32. Samples go in in natural order and results come out in
bit-reversed order. A whole 32-sample frame is accepted every clock, and its
transform appears on registered outputs one clock later.

## Dataflow: five stages of butterfly blocks

```
x(0..31) ─► [32-pt block] ─► [16-pt]x2 ─► [8-pt]x4 ─► [4-pt]x8 ─► [2-pt]x16 ─► register ─► X in bit-reversed order
            16 butterflies   8 each       4 each      2 each      1 each
```

Stage `s` (0..4) is made of `2**s` butterfly blocks of `M = 32 >> s` points.
Block `b` of a stage owns positions `b*M .. b*M+M-1`. Inside an M-point block,
butterfly `k` (`k = 0 .. M/2-1`) pairs positions `k` and `k+M/2`. It writes
the sum to position `k` and the twiddled difference to position `k+M/2`,
with twiddle factor `W_M^k = exp(-j*2*pi*k/M)`. The two halves of a block's
output feed the two half-size blocks of the next stage. After the last stage,
position `p` holds `X(bitrev5(p))`:

| position p | 0 | 1  | 2 | 3  | 4 | 5  | 6  | 7  | 8 | ... | 31 |
|------------|---|----|---|----|---|----|----|----|---|-----|----|
| holds X(k) | 0 | 16 | 8 | 24 | 4 | 20 | 12 | 28 | 2 | ... | 31 |

The design delivers this order unchanged. A consumer that wants natural order
reads `out_data[bitrev5(k)]` for bin `k`. `fft_pkg::bitrev` computes the index.

In all there are 5 × 16 = 80 butterflies and 320 Vedic multipliers, all
combinational between the input pins and the output register.

## The butterfly and its number formats

Each butterfly computes

    f = (a + b) / 2
    g = ((a - b) / 2) * W_M^k

Halving in every stage is this design's choice. It keeps every value in 8 bits
through all five stages, and is why the output is `X(k)/32`. The halving is an
arithmetic shift right, so it rounds toward minus infinity.

**Samples** (`fft_pkg::cplx_t`) have 8-bit two's-complement real and
imaginary parts. The 8-bit width matches the 8x8 Vedic multiplier;
`fft_pkg::DATA_W` sets it.

**Twiddles** (`fft_pkg::twiddle_t`) use sign-magnitude: each part is a sign
bit plus an 8-bit magnitude with 7 fraction bits. So 1.0 is 128 and is exact.
Sign-magnitude suits the Vedic multiplier, which is unsigned, and the
magnitude of any 8-bit sample (at most 128) also fits its 8-bit operands.
Twiddles are not stored in a table. Each butterfly computes its own at
elaboration time from

    re_mag = round(|cos(2*pi*k/M)| * 128),  re_neg = cos(2*pi*k/M) < 0
    im_mag = round(|sin(2*pi*k/M)| * 128),  im_neg = -sin(2*pi*k/M) < 0

**Complex product** (`cplx_mult_vedic`) uses four real products,
`re = xr*wr - xi*wi` and `im = xr*wi + xi*wr`. For each product, the sample
magnitude and the twiddle magnitude go into a `vedic_mult`, and the result is
negated when the signs differ. The two products of each part are added at full
precision. The sum is then rounded half-up to drop the 7 fraction bits, and
saturated to 8 bits.

**Saturation** needs an input sample whose complex magnitude is close to or
above 127. The halved sum and difference never have a larger modulus than the
larger input modulus. Only twiddle rounding can push a value slightly higher:
for example, 91/128 at 45 degrees gives |W| = 1.005. In the end-to-end test,
200 random frames with `|x(n)| <= 127` never saturated. When saturation does
happen, `out_sat` is set for that frame.

**Accuracy**: for frames within that range, the end-to-end test sees at most
about 2.1 LSB between the output and the exact `DFT/32`. This error comes from
the per-stage truncation and the 7-bit twiddles.

## The Vedic multiplier

`vedic_mult` is an unsigned `WIDTH x WIDTH` multiplier (default 8). For column
`k = 0 .. 2*WIDTH-2` it adds every crosswise bit product `a[i] & b[j]` with
`i + j = k`, plus the carry coming out of column `k-1`:

    column 0 :  a0b0                                   -> p0
    column 1 :  a1b0 + a0b1 + carry                    -> p1, carry
    column 2 :  a2b0 + a1b1 + a0b2 + carry             -> p2, carry
    ...
    column 7 :  a7b0 + a6b1 + ... + a0b7 + carry       -> p7, carry
    ...
    column 14:  a7b7 + carry                           -> p14, carry -> p15

Bit 0 of a column sum is the product bit, and the rest is that column's carry.
The classic formulation breaks each carry into single bits that feed later
columns. Passing the carry on as one number adds the same weights, so the
product is the same. The loop in `always_comb` unrolls into the 15 column
adders; the last carry becomes bit 15. Changing `WIDTH` gives the same
structure for any operand size.

## Interface of the top, `fft32_vedic`

| port        | dir | type            | meaning |
|-------------|-----|-----------------|---------|
| `clk`       | in  | logic           | clock |
| `rst_n`     | in  | logic           | synchronous, active-low reset; clears `out_valid`, `out_sat`, `out_data` |
| `in_valid`  | in  | logic           | `in_data` carries a frame this clock |
| `in_data`   | in  | `cplx_t [32]`   | `x(0)..x(31)`, natural order |
| `out_valid` | out | logic           | a new result is on `out_data` (exactly one clock after `in_valid`) |
| `out_data`  | out | `cplx_t [32]`   | `X(k)/32` in bit-reversed position order |
| `out_sat`   | out | logic           | a butterfly saturated while this result was computed |

While `in_valid` is low, the outputs hold the last result. The parameter `N`
(default 32, a power of two) sets the number of points; the stage count is
`log2(N)`.

Timing: the critical path runs from `in_data` through five butterflies, each
with one 8x8 Vedic multiplier and an adder tree. The output register and the
reset are this design's choices.

## Files

| file | contents |
|------|----------|
| `rtl/fft_pkg.sv` | widths, `cplx_t`, `twiddle_t`, twiddle and bit-reversal functions |
| `rtl/vedic_mult.sv` | Urdhva Tiryakbhyam unsigned multiplier |
| `rtl/cplx_mult_vedic.sv` | complex twiddle product with four Vedic multipliers, rounding, saturation |
| `rtl/dif_butterfly.sv` | radix-2 DIF butterfly with halving |
| `rtl/bfly_block.sv` | M-point butterfly block (M/2 butterflies) |
| `rtl/fft32_vedic.sv` | the five-stage FFT and output register (top) |
| `tb/fft_ref_pkg.sv` | reference models: bit-exact integer FFT and floating-point DFT |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs.

- `tb_vedic_mult` checks all 65,536 operand pairs against `a*b`. It also
  checks 20,000 random pairs (plus extremes) on a 16x16 instance.
- `tb_cplx_mult_vedic` checks every 32-point twiddle with the extreme sample
  values and random samples, against an integer model, including the
  saturation flag.
- `tb_dif_butterfly` covers five twiddles (`W_2^0`, `W_8^1`, `W_8^2`,
  `W_32^5`, `W_32^12`). Results are checked bit-exactly, and against
  floating-point math within 1.5 LSB.
- `tb_bfly_block` checks a 32-point block and a 4-point block position by
  position.
- `tb_fft32_vedic` runs the top at its default size. It sends an impulse, a
  constant, complex tones, 200 random frames and saturating frames, some
  back to back and some with gaps, plus a reset while a frame is in flight.
  Every output is checked bit-exactly against the integer reference FFT, and
  against the floating-point DFT/32 within 3 LSB. It also checks the
  one-clock latency and that outputs hold while idle. It counts each of those
  situations and fails if any one never occurred.

The reference models do not use the design's package or modules. The
integer model uses ordinary `*` products.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/tb_fft32_vedic.sv --top-module tb_fft32_vedic
./obj_dir/Vtb_fft32_vedic
```

Building the full FFT takes about a minute of C++ compilation. The simulation
itself takes seconds.

## Where this design departs from, or adds to, the source description

- **Butterfly form.** The source calls its butterfly DIF, and its stage order
  (32-point block first, bit-reversed output) is DIF. But the formula it prints
  for the lower output, `X1 - W*X2`, is the decimation-in-time form.
  This design uses the DIF form `g = (X1 - X2)*W`, the only one that computes
  the DFT with this stage order.
- **Output order.** The output is plain 5-bit bit-reversed order, as the source
  text states. The output labels drawn in its block diagram
  (`x(0), x(16), x(4), x(20), x(8), ...`) differ from that after the second
  entry, and were not followed.
- **Multiplier columns.** The multiplier applies the column rule (`i + j = k`)
  uniformly to all 15 columns and returns the full 16-bit product, including
  the carry out of the last column as bit 15.
- **Choices where the source is silent:** the 8-bit data width, the twiddle
  format, per-stage halving, rounding and saturation, sign-magnitude use of
  the unsigned multiplier, four-multiplier complex product, the output
  register, reset, the valid handshake and the `out_sat` flag.
- **Not included:** the radix-2 Booth multiplier, which serves only as the
  point of comparison for delay. FPGA delay figures for the Vedic version are
  quoted in the source, from 8.9 ns to 24.9 ns depending on the device family.
  They cannot be reproduced by simulation, and this RTL has not been put
  through FPGA timing.
