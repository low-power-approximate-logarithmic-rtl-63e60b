# LESF: a low-error approximate logarithmic squarer

This RTL squares an unsigned integer (16 bits by default) or an IEEE 754
half-precision number approximately, using only a leading-one detector,
a few multiplexers, one inverter/half-adder chain and a shifter. It has no
multiplier. It is meant for DSP datapaths whose inputs are noisy anyway,
such as power or envelope detection, where a few percent of error per
sample costs little.

Classic logarithmic squarers (Mitchell's method) always underestimate, so
their errors pile up in sums and filters. The Low-Error Squaring Function
(LESF) is tuned so that its error changes sign across the input range. Over
all 16-bit operands, about half the results come out high and half come out
low, and the errors largely cancel after filtering.

## The approximation

Write the operand as `N = 2^k (1 + x)` with `0 <= x < 1`. Here `k` is the
position of the leading one and `x` is the bits below it, read as a
fraction. Then

    log2(N^2) = 2k + 1 + log2(0.5 + x + 0.5 x^2)
              ~ 2k + 2x + Rc,           Rc = 5/128 = 0.0390625

A least-squares line through the log term has slope 1.975. The slope is
rounded to 2, which is a one-place shift. The offset `Rc` is then the
constant that gives the lowest mean relative error; it lies in
[0.035, 0.040], and 5/128 is a cheap point in that range. With
`y = 2x + Rc`, which is below 3, the antilogarithm uses `2^t ~ 1 + t` on the
fractional part:

    N^2 ~ 2^(2k)   (1 + y)        y < 1
          2^(2k+1) (1 + (y-1))    1 <= y < 2
          2^(2k+2) (1 + (y-2))    2 <= y < 3

In words: the result's leading one sits at bit `E = 2k + floor(y)`, and the
fraction bits of `y` follow it.

## Integer datapath (`lesf_int`)

The datapath is purely combinational. The output follows the input with no
clock and no latency. The stages are:

1. **Leading-one detector** (`lesf_lod`). A prefix OR runs down from the
   MSB and leaves a one-hot vector `2^k`.
2. **One-hot encoder** (`lesf_pe`). This gives `k` (4 bits for n = 16). The
   input is already one-hot, so each output bit is just the OR of the
   one-hot bits whose index has that bit set. No priority logic is needed.
   An assertion flags an input that is not one-hot.
3. **XOR and multiplexer bank** (`lesf_muxbank`). XOR with `2^k` clears the
   leading one. Because `2^k` is one-hot, this is a subtraction with no
   carry chain. A k-selected shift then left-aligns the remaining `k` bits
   into the (n-1)-bit field `R_x` and fills the low end with zeros. The MSB
   of `R_x` has weight 1/2. Example: `I = 0x0009` gives `k = 3` and
   `R_x = 001000000000000b`.
4. **Constant adder** (`lesf_const_adder`). This computes `R_y = 2 R_x + Rc`.
   It is the stage that most needs care; see the next section.
5. **Exponent adder and left shift** (`lesf_shifter`). This computes
   `E = 2k + R_y[n:n-1]` and shifts the n-bit mantissa `1.frac(y)` so that
   its leading one lands on bit `E` of the 2n-bit output. Three cases occur:
   - `E < n-1`: some low fraction bits fall off the bottom and are dropped
     (truncation).
   - `E = n-1`: the fraction fits exactly.
   - `E > n-1`: the bits below the fraction are filled with zeros.

### The constant adder

`2 R_x` is `R_x` moved one place up. It is n bits wide: one integer bit,
then n-1 fraction bits with a zero LSB. `R_y` has two integer bits, because
y can reach about 2.04, and the same n-1 fraction bits. `Rc = 0.0000101b`
has ones at weights 2^-5 and 2^-7, so most of a full adder is wasted.
Counting fraction positions from the binary point:

| position (weight)           | logic                                      |
|-----------------------------|--------------------------------------------|
| below 2^-7                  | wire: `R_y` bit = `2R_x` bit               |
| 2^-7 (lowest '1' of Rc)     | inverter; its carry out is the input bit   |
| 2^-6                        | half adder with that carry                 |
| 2^-5 (second '1' of Rc)     | `sum = ~a ^ c`, `carry = a \| c`           |
| 2^-4 ... 2^0                | half-adder chain                           |
| 2^1                         | final carry                                |

So for n = 16 the adder has eight wires, one inverter, one three-input bit
and six half adders. The module is written for any constant
(`C_NUM / 2^C_FRAC`). It derives this structure at elaboration from where
the constant has ones, so changing `Rc` needs no other edit.

Be careful at the position of the second '1'. There the bit adds
`a + 1 + c`, which carries out when either `a` or `c` is set. A plain half
adder on the inverted bit, `(~a) & c`, looks similar but loses a carry
whenever `a = 1, c = 0`.
That variant gives a wrong `y` for half of all fraction values.

### Range limits (design choices)

- The output is 2n bits, the width an exact n-bit square needs.
- The approximation overshoots at the very top of the range. When
  `k = n-1` and `y >= 2` (16-bit inputs 64896..65535), `E` reaches `2n`,
  and the 2n-bit output cannot hold the result. The output then saturates
  to all ones and `sat_o` goes high. The true square there is at most
  2% below 2^32, so saturation loses little accuracy.
- `I = 0` gives 0.

## Floating-point variant (`lesf_fp`)

For a normal binary16 number `A = 2^(e-15) (1 + m)`, the exponent field
already holds `k` and the mantissa holds `x`. The detector, encoder, XOR
and multiplexer bank drop out. The mantissa goes through the same constant
adder (with 10 fraction bits), and the result is:

    exponent = 2e - 15 + floor(y),  mantissa = frac(y),  sign = 0

The handling of special values is this design's own choice:

| operand or result                            | output          | flag    |
|----------------------------------------------|-----------------|---------|
| +/-0                                         | +0              | none    |
| subnormal operand                            | +0              | `unf_o` |
| result exponent <= 0                         | +0              | `unf_o` |
| result exponent >= 31                        | +infinity       | `ovf_o` |
| infinity                                     | +infinity       | none    |
| NaN                                          | quiet NaN 0x7E00 | none   |

The operand's sign bit is ignored, and the result's sign bit is always 0.
`EXP_W` and `MAN_W` are parameters; `MAN_W` must be at least 7 so that
`Rc` fits.

## Top level (`lesf_top`)

`lesf_top` puts the integer squarer (`N_W`, default 16) and the binary16
squarer side by side. They share nothing.

| port        | dir | width | meaning                           |
|-------------|-----|-------|-----------------------------------|
| `int_i`     | in  | N_W   | unsigned operand                  |
| `int_sq_o`  | out | 2 N_W | approximate square                |
| `int_sat_o` | out | 1     | result saturated to all ones      |
| `fp_i`      | in  | 16    | binary16 operand (`lesf_pkg::fp16_t`) |
| `fp_sq_o`   | out | 16    | binary16 approximate square       |
| `fp_ovf_o`  | out | 1     | overflow to +infinity             |
| `fp_unf_o`  | out | 1     | nonzero result flushed to +0      |

`lesf_pkg` holds `Rc` (`RC_NUM = 5`, `RC_FRAC_BITS = 7`) and the `fp16_t`
struct.

## Accuracy

These figures come from simulation of this RTL, exhaustive where stated:

- **16-bit integer, all operands.** The mean relative error distance is
  0.0292. The average signed error is -1.53e7. 31 267 results are high and
  34 264 are low. The largest relative error is about 8.8%; it occurs just
  below `x = 0.5`, where `y` crosses 1. For comparison, the same datapath
  with `Rc = 0` (Mitchell's method) has a mean relative error of 0.0383, and all of its
  errors are low.
- **binary16, all normal in-range results.** The largest relative error is
  8.75%, the same curve.
- **Square-law AM detector.** A 1 kHz carrier, sampled at 10 kHz and
  amplitude-modulated by ±1% with a 50 Hz square wave, is squared and then
  low-pass filtered by a 49-tap FIR at 150 Hz. The Euclidean distance of
  the recovered message from the exactly squared one is 0.018 with the
  LESF and 0.056 with a Mitchell squarer. The LESF result correlates with
  the exact one at 0.99999.

## Departures and open points

- The bit positions of `Rc` and the carry at its second '1' are set so
  that the stage computes exactly `2 R_x + 5/128`. This reproduces the
  intended accuracy (mean relative error about 0.03). Placing the two ones
  one position higher, which gives 10/128, raises it to 0.035.
- Both squarers are combinational. `R_k`, `R_x` and `R_y` are named
  signals, not flip-flops. If a pipeline is needed, the natural cuts are
  after `lesf_muxbank` and after `lesf_const_adder`.
- The structures of the leading-one detector (prefix OR) and the encoder
  (OR tree) are the simplest ones that do the job. Any equivalent detector
  can be used instead.
- Saturation, the zero case and all floating-point special values are
  choices of this design (see above).
- Only the LESF itself is implemented. The reference squarers used for
  comparison exist only as software models inside
  `tb_lesf_square_law.sv`. The detector's FIR filter also lives only in
  that testbench.

## Files

| file | contents |
|------|----------|
| `rtl/lesf_pkg.sv` | `Rc`, binary16 field widths, `fp16_t` |
| `rtl/lesf_lod.sv` | leading-one detector |
| `rtl/lesf_pe.sv` | one-hot to binary encoder |
| `rtl/lesf_muxbank.sv` | XOR and left alignment of the fraction |
| `rtl/lesf_const_adder.sv` | `2x + Rc` constant adder |
| `rtl/lesf_shifter.sv` | exponent adder, placement, saturation |
| `rtl/lesf_int.sv` | integer squarer |
| `rtl/lesf_fp.sv` | floating-point squarer |
| `rtl/lesf_top.sv` | both squarers side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_lesf_square_law.sv` | AM square-law detector run |

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog if something hangs. The integer, floating-point and top
testbenches sweep all 65 536 operands against expected values computed in
real arithmetic from the equations above. The top-level testbench also
counts each mechanism: the three ranges of y, the three placement cases,
saturation, errors of both signs, and the floating-point overflow,
underflow, zero/subnormal, infinity and NaN paths. It fails if any of them
never occurs. Each run takes well under a second.

## Simulating

The simulator is Verilator 5. The package goes first, and `-y rtl` lets
Verilator find the submodules:

    verilator --binary --timing --assert -Wall -Wno-fatal -y rtl \
        rtl/lesf_pkg.sv tb/tb_lesf_top.sv --top-module tb_lesf_top -o sim
    ./obj_dir/sim

Replace `tb_lesf_top` with any other testbench name. To lint the RTL alone:

    verilator --lint-only -Wall -y rtl rtl/lesf_pkg.sv rtl/lesf_top.sv

## Changing it

- **Integer width.** Set `N_W` on `lesf_int` or `lesf_top`. It must be at
  least 8, so that the fraction can hold `Rc`. `tb_lesf_int` also runs
  n = 8.
- **The constant.** Change `RC_NUM` and `RC_FRAC_BITS` in `lesf_pkg`, or
  override `C_NUM` and `C_FRAC` on `lesf_const_adder`. The adder's
  structure follows automatically. The testbenches' expected values use
  5/128 and would need the same change.
- **Other float formats.** Set `EXP_W` and `MAN_W` on `lesf_fp`. The
  testbench is written for binary16.

Lint reports three unused bits that are intentional: the operand sign in
`lesf_fp`, bit n-1 of the aligned fraction in `lesf_muxbank` (always zero,
because the leading one was cleared), and the shifted-out low bits in
`lesf_shifter`.
