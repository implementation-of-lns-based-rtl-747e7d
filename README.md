# Operand-decomposition logarithmic multiplier

An approximate unsigned multiplier that replaces the partial-product array of
an exact multiplier with logarithms, an addition and an antilogarithm
(Mitchell's algorithm), and that splits the operands first to cut Mitchell's
error. For 8-bit operands the product 140 x 37 = 5180 comes out as 5172
(0.15 % low), where Mitchell's algorithm on its own gives 5120 (1.16 % low).

The whole unit is combinational: no clock, no reset, no handshake. The result
is valid one propagation delay after the operands change.

## The idea

### Mitchell's algorithm

Write an operand as `v = 2^k * (1 + f)` with `0 <= f < 1`. The characteristic
`k` is the position of the leading 1, and `f` is the bits below it read as a
binary fraction. Mitchell approximates `log2(v)` by `k + f`, which is exact at
powers of two and a straight line in between. Then

    a * b ~ antilog( (k1 + f1) + (k2 + f2) )

- If `f1 + f2 < 1`, the product is `2^(k1+k2) * (1 + f1 + f2)`.
- If `f1 + f2 >= 1`, it is `2^(k1+k2+1) * (f1 + f2)`.

The error is never positive: the result is at or below the exact product. It
grows with the number of 1 bits below the leading one, and reaches 11.1 % in
the worst case.

### Operand decomposition

X and Y are replaced by four operands:

    A = X | Y     B = X & Y     C = ~X & Y     D = X & ~Y
    X * Y = A * B + C * D          (exact identity)

B, C and D have fewer 1 bits than X and Y, and C and D never share one. The
mantissas fed to the two Mitchell multipliers are therefore smaller, and so is
their error. Often one of the four operands is zero, which makes that partial
product exact.

Over all 65 025 non-zero 8-bit operand pairs, the mean relative error is
2.03 %. Mitchell's algorithm applied directly to X and Y gives 3.79 %. The
worst case stays 11.1 %. It occurs for instance at X = Y, where C = D = 0 and
A = B = X, so the decomposition gains nothing.

| X   | Y   | exact | Mitchell alone | this design | error   |
|-----|-----|-------|----------------|-------------|---------|
| 140 | 37  | 5180  | 5120           | 5172        | 0.15 %  |
| 117 | 157 | 18369 | 17280          | 18080       | 1.57 %  |
| 203 | 183 | 37149 | 33280          | 36864       | 0.77 %  |

## Structure

    x, y --> operand_decomposition --A,B--> mitchell_multiplier --op1--+
                                    \                                  +--> ripple_carry_adder --> op
                                     --C,D--> mitchell_multiplier --op2-+

    mitchell_multiplier(a, b):
      logarithm(a) -> ka, fa      logarithm(b) -> kb, fb
      fa + fb             (N-1 bits)   -> fsum, carry
      ka + kb + carry     (KW bits)    -> k12 (KW+1 bits)
      antilogarithm(k12, fsum)         -> product
      zero_detector(a, b, product)     -> p   (0 if a or b is 0)

    logarithm(v):
      leading_one_detector -> one-hot mark of the top 1
      priority_encoder     -> k
      shift = ~k           (= N-1-k, since N is a power of two)
      barrel_shifter_left(v, shift) -> leading 1 in bit N-1; the bits below are f

| module                  | role |
|-------------------------|------|
| `od_pkg`                | default width `OD_N = 8`; power-of-two helper |
| `od_multiplier`         | top: decomposition, two Mitchell units, final adder |
| `operand_decomposition` | A, B, C, D from X, Y |
| `mitchell_multiplier`   | one Mitchell product |
| `logarithm`             | characteristic and mantissa of one operand |
| `leading_one_detector`  | one-hot leading-one mark (prefix OR) |
| `priority_encoder`      | one-hot to binary index |
| `barrel_shifter_left`   | log-depth left shifter, zeros shifted in |
| `antilogarithm`         | places `{1, fsum}` at bit position `k12` |
| `zero_detector`         | masks the product when an operand is 0 |
| `ripple_carry_adder`    | adder chained from `half_adder` / `full_adder` cells |

## The details that matter

**Mantissa carry.** In the logarithm domain, the mantissa adder and the
characteristic adder together form one fixed-point adder. The carry out of the
(N-1)-bit mantissa sum is the carry input of the characteristic sum. The
antilogarithm always prepends a 1 to the mantissa sum and shifts by `k12`.
Without a carry this gives `2^k (1 + f1 + f2)`. With a carry, `k12` is one
higher and the mantissa sum is `f1 + f2 - 1`, so `{1, fsum}` is worth
`f1 + f2`, and the result is Mitchell's `2^(k+1) (f1 + f2)`. No separate
correction logic is needed. This is the reading that reproduces the error
figures in the table above. If the carry were dropped, 117 x 157 would be off
by 4.8 %.

**Mantissa alignment and truncation.** Mantissas are always N-1 bits wide and
left-aligned. For example, 33 = 0b00100001 has k = 5 and mantissa 0000100.
When `k12 < N-1`, the antilogarithm drops the mantissa bits that fall below
the binary point, so each partial product is a floor.

**Widths.** For N-bit operands, `k` has `KW = log2(N)` bits and `k12` has
KW+1 bits. The largest value of `k12` is 2N-1, reached with a carry. The
antilogarithm shifts inside a 3N-1 bit field and keeps bits [3N-2 : N-1]. The
partial products are 2N bits wide and `op` is 2N+1 bits wide, as in the
reference 8-bit design (`op[16:0]`). Since each Mitchell product is at most
its exact product, `op <= X*Y < 2^(2N)`, so `op[2N]` is always 0.

**Zero.** The logarithm of 0 comes out as k = 0, f = 0, i.e. the value 1. The
zero detector after each antilogarithm forces that partial product to 0 when
either of its operands is 0. This happens often: B = 0 whenever X and Y share
no 1 bit, and C or D is 0 whenever one operand's 1 bits cover the other's.

## Parameters

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `N`  | all datapath modules | 8 (`od_pkg::OD_N`) | operand width. It must be a power of two, because the shift count is `~k`. This is checked at elaboration. |
| `KW` | logarithm, antilogarithm, mitchell_multiplier, priority_encoder | `$clog2(N)` | characteristic width |
| `W`, `SW` | barrel_shifter_left | 8, `$clog2(W)` | data width, shift-amount width |
| `W`, `USE_CIN` | ripple_carry_adder | 8, 1 | width. With `USE_CIN = 0`, bit 0 is a half adder and `ci` is ignored. |

## Where this departs from, or adds to, the method as published

- The method is specified for 8-bit operands by example. Here N is a
  parameter, and the testbenches also run Mitchell units and logarithms at
  N = 16.
- The method says "leading 1 in the top position goes straight to the
  shifter, otherwise encoder and inverter decide the shift". Here the
  detector, encoder, inverter and shifter path is used for every input. A
  leading 1 in the top bit gives a shift of zero, so no bypass is built.
- The method lists the decomposition once as `a = x & y, b = x | y` and
  elsewhere as `A = X | Y, B = X & Y`. The second form is used. The product
  is the same either way.
- These are this design's choices, because the method does not fix them:
  the adder architecture (ripple carry), the one-hot detector feeding an OR
  encoder, the barrel shifter used in the antilogarithm, the truncation of
  the fraction bits, and the purely combinational timing.
- The top brings out `op1` and `op2` next to `op`, for observation. The
  zero-detector flags stay internal.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference values come from
integer models in `tb/tb_ref_pkg.sv`, not from the RTL. Example with plain
Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/od_pkg.sv tb/tb_ref_pkg.sv tb/tb_od_multiplier.sv \
        --top-module tb_od_multiplier
    ./obj_dir/Vtb_od_multiplier

`tb_od_multiplier` runs the top at its default width. It checks:

- the 140 x 37 example, bit for bit;
- the three table rows, with the error in hundredths of a percent, truncated;
- all 65 536 operand pairs against the integer model.

It also counts the zero detector firing in each half, mantissa carries in each
half, and operands with the top bit set, and it fails if any of these never
happens. It prints the error statistics quoted above and runs in well under a
second. `tb_od_multiplier_n16` builds the top with `N = 16` and checks random pairs,
pairs with no common 1 bit, and equal pairs. The other testbenches cover each
block exhaustively at 8 bits, or at random at 16 bits.
