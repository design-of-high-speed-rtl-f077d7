# 8-point single-precision FFT on a Karatsuba / Urdhva-Tiryagbhyam multiplier

An FFT is mostly multiplications, so this design builds its arithmetic on a
fast significand multiplier. It is a fully combinational 8-point FFT on
complex IEEE-754 single-precision (binary32) samples. Every real
multiplication in it is done by a floating-point multiplier, and the core of
that multiplier is a hybrid integer multiplier:

* **Karatsuba splitting** at the wide levels. A W-bit product becomes three
  W/2-bit products plus shifts and adds, instead of four.
* **Urdhva-Tiryagbhyam** ("vertically and crosswise", a Vedic-mathematics
  method) at the 8-bit leaves. It forms the product column by column.

The idea behind the hybrid is that each method is good where the other is
weak. The column method is small and fast for short operands, but its
columns ripple into each other, so its delay grows with the width. Karatsuba
removes multiplications at the wide levels, but costs adders that do not pay
off at small widths.

The design follows the structure of S. S. Kerur and M. Kunnur, *Design of
High Speed FFT using Urdhva-Tiryagbhyam Algorithm and Karatsuba Algorithm*.
Where that description stops, for example at the FFT network, the adder,
rounding and special values, the choices made here are listed under
[Departures and own choices](#departures-and-own-choices).

## Structure

```
fft8                      8-point radix-2 DIT FFT, 3 stages x 4 butterflies
└─ butterfly (x12)        x = a + w*b, y = a - w*b
   ├─ complex_mul         4 x fp_mul, 1 x fp_add (sub), 1 x fp_add
   │  └─ fp_mul (x4)      binary32 multiplier
   │     ├─ fp_sign_calc        sign = s1 XOR s2
   │     ├─ fp_exponent_adder   e1 + e2, then - 127 by ripple-borrow subtractor
   │     ├─ karatsuba_mul       32x32 significand multiplier (recursive)
   │     │  └─ ... └─ urdhva_mul (9 leaves of 8x8)
   │     └─ fp_normalizer       1-place normalization, pack, truncate
   └─ fp_add (x4)         binary32 adder/subtractor
```

In total the design has 12 butterflies, 48 floating-point multipliers,
72 floating-point adders and 432 Urdhva-Tiryagbhyam 8×8 leaves. Shared types
are in `fft_pkg`:

* `fp32_t` is a binary32 word.
* `cplx_t` is a packed `{re, im}` pair of `fp32_t`.
* `twiddle8(k)` returns W8^k for k = 0..3.

## The significand multiplier

This is the part that needs the most explanation.

### Karatsuba level (`karatsuba_mul`, W = 32, LEAF = 8)

The operands are split into halves of H = ⌈W/2⌉ bits: a = a1·2^H + a0, and
b likewise. Then:

```
z2 = a1*b1         z0 = a0*b0         m = (a1 + a0)*(b1 + b0)
p  = z2*2^(2H) + (m - z2 - z0)*2^H + z0
```

The sums a1 + a0 and b1 + b0 are H+1 bits wide, which would break the
"every leaf is 8 bits" structure. So each sum is written as c·2^H + r, where
c is its carry bit and r its low H bits. The middle product is then assembled
from the H×H product r_a·r_b and three conditional shifted additions:

```
m = r_a*r_b + c_a*r_b*2^H + c_b*r_a*2^H + c_a*c_b*2^(2H)
```

All three half-size products instantiate `karatsuba_mul` again with W = H.
The recursion stops when W ≤ LEAF, where an `urdhva_mul` is placed.

The binary32 significand is 24 bits (the hidden one plus 23 fraction bits).
`fp_mul` zero-extends it to 32 bits, so the split goes 32 → 16 → 8 and every
leaf is exactly 8×8. That gives 9 leaves per multiplier. The top 16 of the
64 product bits are always zero and are ignored.

### Urdhva-Tiryagbhyam leaf (`urdhva_mul`, N = 8)

Product column k, for k = 0 … 14, is the sum of all crosswise bit products
a[i]·b[k−i] plus the carry word coming from column k−1. The low bit of that
sum is product bit k, and the rest is carried into column k+1. The last
carry is product bit 15. This gives 15 column adders, 14 of which ripple a
carry into the next. That chain is why the leaf is kept at 8 bits.

## Floating-point multiplier (`fp_mul`)

For operands (−1)^s1·1.f1·2^(e1−127) and (−1)^s2·1.f2·2^(e2−127):

1. **Sign:** s1 XOR s2.
2. **Exponent:** (e1 + e2), then 127 is subtracted by a ripple-borrow
   subtractor. The result is 10-bit signed, so out-of-range values stay
   visible.
3. **Significand:** 1.f1 × 1.f2 by `karatsuba_mul`. The result is a 48-bit
   value in [1, 4), in 2.46 fixed point.
4. **Normalization:** a product ≥ 2 (bit 47 set) moves the binary point one
   place left and adds 1 to the exponent. Then the hidden one is dropped and
   the next 23 bits are kept, so the result is **truncated** (rounded toward
   zero).

Exceptions are handled as follows:

* An operand with a zero exponent field is treated as zero, so subnormals
  are flushed. This matters because the twiddles contain 0.
* A result exponent ≥ 255 gives a signed infinity.
* A result exponent ≤ 0 gives a signed zero.
* Infinity and NaN operands get no special treatment.

## Floating-point adder (`fp_add`)

`r = a ± b`, where `sub` selects subtraction. It works in five steps:

1. Whichever operand has the larger magnitude goes first.
2. The smaller significand is aligned into a 27-bit field: 24 bits plus
   guard, round and sticky. Everything shifted out is ORed into the sticky
   bit.
3. The two are added or subtracted according to the effective signs.
4. The result is renormalized. A carry-out shifts it one place right. After
   a cancellation, a leading-zero count shifts it left.
5. The result is truncated.

Keeping the sticky bit is what makes truncation exact for subtraction. For
example, 1 − 2^-32 correctly gives the largest float below 1.

Special values work as follows:

* Exact cancellation gives +0.
* The sum of two zeros keeps the sign only if both are negative.
* Overflow and underflow are treated as in the multiplier.

## FFT network (`fft8`)

The network computes X(k) = Σ x(n)·W8^(nk), with W8 = e^(−j2π/8), unscaled.
It uses radix-2 decimation in time:

* The inputs are taken in bit-reversed order: x0 x4 x2 x6 x1 x5 x3 x7.
* In stage s (s = 0, 1, 2), a butterfly pairs samples 2^s apart.
* The butterfly at offset j within its group uses the twiddle
  W8^(j·4/2^s).

| stage | pair distance | twiddles used |
|-------|---------------|---------------|
| 0     | 1             | W^0 |
| 1     | 2             | W^0, W^2 |
| 2     | 4             | W^0, W^1, W^2, W^3 |

The twiddle constants are 1, (√2/2)(1 − j), −j and −(√2/2)(1 + j), where
√2/2 is the binary32 value 0x3F3504F3. Every butterfly uses a full complex
multiplier, even for the trivial twiddles 1 and −j. This keeps all 48 real
products on the same multiplier.

The design has no clock, registers or reset. The outputs settle one
combinational delay after the inputs change. Three rounded operations lie
between an input and an output in each stage. Because every operation
truncates, results are biased slightly toward zero. On random data, the
error against a double-precision DFT stays below 2^-18 of the sum of the
input magnitudes.

## Departures and own choices

The following follow the source description:

* single precision;
* the 8-point transform;
* the sign XOR;
* the exponent addition with a ripple-borrow bias subtraction;
* one-place normalization;
* Karatsuba splitting down to 8-bit Urdhva-Tiryagbhyam leaves, with a
  shift-and-add recombination.

The following are this design's own choices:

* radix-2 DIT ordering and the butterfly's internal form;
* the four-multiplier complex product;
* the whole floating-point adder;
* truncation as the rounding mode (no rounding step is described);
* treatment of zeros, subnormals, overflow and underflow, with no
  infinity/NaN handling;
* zero-extension of the 24-bit significand to 32 bits;
* the carry handling of the Karatsuba middle product;
* a purely combinational implementation with no scaling.

For reference, the published implementation on a Virtex-5 (XC5VLX330, FF1760 package, speed grade -2)
reports the following, measured on the authors' FPGA flow and not
reproduced here:

| FFT built on | overall delay | slices | power |
|--------------|---------------|--------|-------|
| Karatsuba / Urdhva-Tiryagbhyam multiplier | 177.663 ns | 38823 | 57.53 mW |
| Booth multiplier | 180.338 ns | 39295 | 73.97 mW |

The Booth-multiplier version is only a comparison point and is not included.

Lint notes:

* Verilator's lint reports the recursive instances' outputs in
  `karatsuba_mul` as undriven. This comes from how it lints a
  self-instantiating module; the same code simulates with every product bit
  correct.
* The flags `shifted`, `overflow`, `underflow`, `carry_out` and `cancel` are
  kept as internal signals for observation and drive nothing, so they show
  up as unused.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `urdhva_mul_tb` | all 65536 8×8 products |
| `karatsuba_mul_tb` | 32×32 products: corners and 20000 random pairs |
| `fp_sign_calc_tb` | all four sign combinations |
| `fp_exponent_adder_tb` | all 65536 exponent pairs against e1 + e2 − 127 |
| `fp_normalizer_tb` | random products and exponents against a real-valued reference, including overflow, underflow and zero |
| `fp_mul_tb` | bit-exact against the exact double-precision product truncated to binary32 |
| `fp_add_tb` | bit-exact against a double-precision reference, including cancellation, sticky-only cases, zeros and overflow |
| `complex_mul_tb`, `butterfly_tb` | bit-exact against compositions of the reference operations |
| `fft8_tb` | end-to-end at full size (see below) |

`fft8_tb` checks three things:

* directed transforms with exact answers: an impulse, a constant and a
  single tone;
* 3000+ random vectors, bit for bit against a reference model of the DIT
  network;
* the direct DFT in double precision, within tolerance.

`fft8_tb` also counts, across all butterflies, how often each of these
occurred:

* multiplier normalization shift;
* multiplier overflow and underflow;
* adder carry-out and cancellation;
* adder overflow.

It fails if any of them never happened.

The shared reference arithmetic is `tb/fp_ref_pkg.sv`. A binary32 product
is exact in double precision, and so is a sum whose exponents differ by at
most 28. Beyond that difference, a truncated sum can be derived directly.

To simulate with Verilator 5, for example the full FFT:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fft_pkg.sv tb/fp_ref_pkg.sv tb/fft8_tb.sv --top-module fft8_tb
./obj_dir/Vfft8_tb
```

Replace `fft8_tb` with any other testbench name to run that one. The
packages must come first on the command line.

## Changing the design

* `karatsuba_mul` takes any width `W` and leaf width `LEAF`. The widths need
  not be powers of two: halves are rounded up and the excess bits are zero.
* `urdhva_mul` takes any `N`.
* `fft8` is fixed at N = 8, because `fft_pkg::twiddle8` holds only the
  eighth roots of unity. A larger transform needs a larger twiddle table and
  nothing else in the network generator.
* Rounding is in two places: `fp_normalizer` (multiplier) and the packing
  step at the end of `fp_add`.
