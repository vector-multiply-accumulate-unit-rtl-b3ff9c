# Unified posit / IEEE-754 vector multiply-accumulate unit

This is a 32-bit floating-point multiply-accumulate (MAC) unit for
*transprecision* work: code that changes number format and precision from
one operation to the next. The same datapath handles posits and IEEE-754
floats. Each operation picks:

- the format and posit exponent size of each operand and of the result;
- the element width: one 32-bit, two 16-bit or four 8-bit numbers per 32-bit
  word, or a single 8/16-bit scalar.

All elements go through one 6-stage pipeline and share a 128-bit accumulator,
the *quire*.

The main idea is to decode every number, posit or IEEE, into the same fields:

- a sign;
- a two's complement scale factor (the power of two);
- a fraction with a hidden bit.

From there on the arithmetic does not care where the numbers came from. The
result is encoded back into whatever format was asked for. A dot product can
therefore mix formats, for example posit8 inputs accumulated into an FP16
result.

## Operations and control

| signal | width | meaning |
|---|---|---|
| `op` | 3 | `000` Va·Vb+Vc, `001` Va·Vb−Vc, `010` Va·Vb, `100` acc += Va·Vb, `101` acc −= Va·Vb |
| `pre` | 2 | `0x` 32-bit, `10` 16-bit, `11` 8-bit elements |
| `vec` | 1 | 1 = scalar mode: one 8/16-bit element in the low bits of each operand, computed with the full 128-bit quire |
| `fmt` | 4 | bit 3 Va, bit 2 Vb, bit 1 Vc, bit 0 Vr; 1 = IEEE-754, 0 = posit |
| `es` | 12 | posit exponent size, 3 bits each: [11:9] Va, [8:6] Vb, [5:3] Vc, [2:0] Vr. 8-bit posits use only the low 2 bits (es ≤ 3) |

Plain addition and subtraction are `op` 000/001 with Vb = 1.

The IEEE formats are:

- FP32;
- FP16;
- an 8-bit float with 1 sign bit, 4 exponent bits, 3 fraction bits and bias 7.

All three have subnormals, infinities and NaNs.

The outputs are:

- `vr`, the result vector;
- four IEEE status flags: `flag_nv` (invalid), `flag_of` (overflow),
  `flag_uf` (underflow) and `flag_nx` (inexact).

Each flag is a 4-bit vector. An element owns 4/NE bits of it, where NE is the
number of elements, and its flag is copied into all of those bits. For a
posit result every flag is 0.

### Timing

- The unit accepts one operation per clock (`in_valid`).
- The result appears exactly 6 cycles later with `out_valid`.
- There is no back-pressure and no stall.
- An accumulating operation may follow the previous one on the next clock.
  The accumulator is read and written inside the same stage, so a
  back-to-back dot product needs no bypass.
- After reset the accumulator holds +0. Every valid operation loads its
  result into it, so a new dot product starts with a plain Va·Vb+Vc.

## The vector data layout

All internal vectors keep the element boundaries of the input word, scaled to
the width of each field:

| field | 1x32 | 2x16 | 4x8 |
|---|---|---|---|
| sign and each flag (4 bits) | 4 copies | 2 copies per element | 1 bit per element |
| scale factor (32 bits) | 32-bit lane | 16-bit lanes | 8-bit lanes |
| fraction (32 bits) | `00 1.fff…` | same per 16-bit lane | same per 8-bit lane |
| product (64 bits) | 64-bit lane | 32-bit lanes | 16-bit lanes |
| quire (128 bits) | 128-bit lane | 64-bit lanes | 32-bit lanes |

The fraction lane has two zero pad bits, then the hidden bit, then the
fraction, left aligned. The pad bits make room for the product and for the
carry of a Booth multiplier, so no carry ever leaves its element.

Vector building blocks use one of three layout modes:

- `vec_adder`: a carry chain cut at element boundaries.
- `vec_lshift` and `vec_rshift`: barrel shifters with one shift amount per
  element. The right shifter is arithmetic and returns a sticky bit per
  element.
- `vec_lzc`: a leading-zero counter built as a tree of 4-bit counters.
- `vec_mult`: a 4x4 array of 8x8 radix-4 Booth multipliers (`booth8`).
  - 4x8 mode uses only the diagonal units.
  - 2x16 mode uses the two 2x2 diagonal blocks.
  - 1x32 mode uses all sixteen.

## Pipeline

```
 Va Vb Vc
   |  |  |
 [1 Decode]      posit / IEEE decoders, chosen per operand by fmt
   |
 [2 Multiply]    sign XOR, scale factor add, Booth fraction product,
   |             product normalised to 1.x, special-value flags
 [3 Quire Scale] product and Vc -> two's complement reduced quire
   |             with a quire scale factor; operation sign applied
 [4 Quire Acc.]  choose Vc or accumulator, align, add, overflow -> NaR,
   |             accumulator register
 [5 Normalize]   |quire| -> leading-zero count -> left shift -> sign,
   |             scale factor, fraction, sticky
 [6 Encode]      posit (RNE, saturation) or IEEE (RNE, subnormals, flags)
   |
   Vr, flags
```

### Decode

- **Posit decoder.** For each element it takes the absolute value and finds
  the run length of the regime. It then removes the regime and splits off `es`
  exponent bits. The scale factor is `k·2^es + e`.
- **IEEE decoder.** It unbiases the exponent. A subnormal uses exponent 1 and
  a hidden bit of 0. It flags zero, infinity, quiet NaN and signalling NaN.
- **Merging.** A quiet NaN is merged into the posit NaR flag, so later stages
  treat the two alike.

### Multiply

- The fraction product of two `1.x` numbers lies in [1, 4).
- If the product lies in [2, 4), the scale factor sum gets +1 through the
  carry-in of the segmented scale-factor adder.
- Otherwise the product is shifted left by one.

Special values follow IEEE priority: sNaN > qNaN/NaR > ∞ > 0. 0·∞ raises the
internal *signalling* flag, which later becomes the invalid flag.

### The reduced quire and its scale factor (the subtle part)

A posit-standard quire for 32-bit posits would be 512 bits wide. This unit
uses 128 bits, split into lanes of 128/NE bits. Each lane holds, from the top:

- 8 bits of sign and carry guard;
- F integer bits;
- F fraction bits.

F is 60, 28 or 12 for 1, 2 or 4 elements. The lane's value is
`q · 2^(sfq − F)`. Here `sfq` is a separate *quire scale factor* that travels
with the lane.

Converting a product or Vc with scale factor `sf` into this form works as
follows:

| case | shift | `sfq` |
|---|---|---|
| `sf < 0` | none (the fraction already sits under the binary point) | `sf` |
| `0 ≤ sf ≤ max_int` | left by `sf` | 0 |
| `sf > max_int` | left by `max_int` | `sf − max_int` |

`max_int` is F − 1, so a saturated value still fits the integer field.

In the accumulate stage:

1. The operand with the smaller `sfq` is shifted right by the difference.
   The shift is arithmetic and keeps a sticky bit.
2. The two lanes are added.
3. The result takes the larger `sfq`.
4. A zero operand never counts as the larger one.

The quire therefore adds exactly while every term's bits fall inside its
window of F integer and F fraction bits. That holds, for example, for 8-bit
posits up to es = 2 and 16-bit posits up to es = 1 in scalar mode, where the
whole dynamic range fits in 60+60 bits.

Outside that window the quire slides to a coarser scale and drops low bits
into the sticky bit. Accuracy then falls gradually, with no hard failure.

A lane whose two's complement sum overflows becomes NaR (NaN for an IEEE
result). With the 7-bit carry guard, this happens after at least 2^7
accumulations of maximum-size terms.

The operation's sign is applied when the quire value is formed:

- `001` negates Vc;
- `101` negates the product.

An exact-zero result gets its sign by IEEE rules:

- For `010` it is the product's sign, so −0·5 = −0.
- Otherwise the result is −0 only when both terms are negative zeros, so
  −0·5 + 0 = +0.
- ∞ − ∞ is invalid.

### Normalize

1. The stage takes the magnitude of each lane.
2. A vector leading-zero count feeds a vector left shift, which moves the
   leading one to the top of the lane.
3. The fraction keeps the top element-width bits. The rest becomes the
   sticky bit.
4. The scale factor is `sfq + (lane − 1 − F) − zero count`, saturated to the
   lane width.

### Encode

- **Posit encoder.** It builds regime, exponent and fraction as one bit
  string, then rounds to nearest, ties to even, using guard and sticky bits.
  A result never rounds to zero or NaR: it saturates to ±maxpos or ±minpos.
  Any IEEE special value becomes NaR.
- **IEEE encoder.** It adds the bias and rounds to nearest even.
  - A rounding carry can turn the value into the next binade, or into ∞ with
    overflow and inexact.
  - Subnormals are rounded at their own position.
  - Underflow is flagged when the result is inexact and tiny *after*
    rounding.
  - A NaN result is the canonical quiet NaN: sign 0, exponent all ones,
    fraction MSB set.

## Files

| file | contents |
|---|---|
| `rtl/vmac_pkg.sv` | layout enum, operation codes, stage structs, lane helper functions |
| `rtl/vmac.sv` | top level, six register stages |
| `rtl/decode_stage.sv`, `posit_decode.sv`, `ieee_decode.sv` | stage 1 |
| `rtl/multiply_stage.sv`, `vec_mult.sv`, `booth8.sv`, `vec_adder.sv` | stage 2 |
| `rtl/quire_scale.sv` | stage 3 |
| `rtl/quire_accumulate.sv`, `vec_rshift.sv` | stage 4 |
| `rtl/normalize_stage.sv`, `vec_lzc.sv`, `vec_lshift.sv` | stage 5 |
| `rtl/encode_stage.sv`, `posit_encode.sv`, `ieee_encode.sv` | stage 6 |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/vmac_ref_pkg.sv` | real-number reference: posit and IEEE value decode, posit rounding (binary search over codes), IEEE rounding with flags |
| `tb/tb_enc_common.svh` | shared stimulus for the encoder testbenches |

## Verification

Each testbench compares the module with values it computes on its own, from
real arithmetic in `vmac_ref_pkg`. Each one ends by printing
`TB_RESULT checks=N failures=M`. A watchdog ends a run that hangs.

**End to end: `tb_vmac`.** It runs the top at its default size and streams
operations back to back, with random bubbles. It checks every result, every
flag and the 6-cycle latency. It covers:

- random FMA, FMS and MUL operations in every layout, both formats,
  mixed-format operands and several exponent sizes;
- random dot products using the accumulate and accumulate-subtract
  operations;
- directed cases:
  - FP16 overflow;
  - FP16 and FP8 underflow and subnormals;
  - quire scale-factor saturation (2^40 · 2^30 + 2^69 in FP32);
  - posit maxpos/minpos saturation;
  - NaR and NaN propagation;
  - sNaN, 0·∞ and ∞−∞ giving invalid;
  - an IEEE infinity in a posit result;
  - signed zeros;
  - a quire lane overflowing to NaR after 256 accumulations.

The testbench counts each of these mechanisms. One that never occurred counts
as a failure.

Operands in the random tests come from ranges where the exact result fits a
double and the quire, so the expected value is exact. Rounding is then tested
only in the final encoding, which the encoder testbenches cover with random
fractions and sticky bits.

To run one testbench with plain Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/vmac_pkg.sv tb/vmac_ref_pkg.sv \
  $(ls rtl/*.sv | grep -v vmac_pkg) tb/tb_vmac.sv --top-module tb_vmac
./obj_dir/Vtb_vmac
```

## Where this RTL departs from the architecture it implements

- **Booth products.** Each Booth unit resolves its partial products into a
  binary product. The enabled products are summed with an ordinary adder
  tree, not carry-save compression and a Wallace tree. The function is the
  same; the speed and area are not.
- **Vector shifters and posit regime count.** These are written per element,
  with their own loops. The original shares shifter stages between lanes with
  OR-combined shift amounts, and counts the regime with the vector
  leading-zero counter. The behaviour is the same.
- **Sticky bit in alignment.** Bits dropped while aligning the smaller quire
  operand feed the final rounding as a sticky bit. They are not used to
  correct the sum. When a large alignment is followed by cancellation, the
  last-place rounding can therefore differ from exact rounding.
- **Choices the architecture leaves open:**
  - `max_int` = F − 1;
  - the polarity of `fmt` (1 = IEEE);
  - the 8-bit float layout (1-4-3, bias 7);
  - the accumulator loading and reset rule;
  - the valid handshake;
  - the bit pattern of the canonical NaN;
  - flags reported per element.
- **Timing closure.** There is no timing or area optimisation. The original
  reaches 667 MHz in a 28 nm process and 76 MHz on a Virtex-7 FPGA. This RTL
  has the same stage split but has not been timed. Generic synthesis with
  yosys gives 1,370 flip-flop bits: 1,186 of pipeline state and the 184-bit
  accumulator.
