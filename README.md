# Binary64 fused multiply-add, round toward zero

This unit computes `W = B*C + A` (or `B*C - A`) on IEEE 754 double-precision
operands and rounds **once**. The product is never rounded on its own: it is
kept exact, in carry-save form, and added to the aligned addend. Only the final
sum is cut to 53 significant bits. The one rounding mode is round toward zero
(truncation). Rounding therefore never adds anything, and no carry can run
back into the exponent after normalization.

The organization is the textbook fused multiply-add. The exponent path runs
beside the significand path:

```
  Ec Eb Ea                      Ma              Mb      Mc
     |                           |               |       |
 shift distance /  ---- d ---> right shifter   Booth multiplier (53x53)
 exponent                        |  + sticky     |sum    |carry
     | max(Ea, Eb+Ec)            +-------> 3:2 carry-save adder <--+
     |                                  |sum       |carry
     |                 +----------------+----------+---------------+
     |                 v                v                          v
     |        leading-zero        carry-propagate            sticky calculation
     |        anticipator (LZA)   adder (sign, magnitude)    (zero flags)
     |                 |                |                          |
     |                 +----> normalizer                           |
     v                          |shift            |value           |
 exponent update <--------------+                 v                |
     |                                   round toward zero <-------+
     Ew                                          |
                                                 Mw  -> special values -> register
```

All of it is one combinational stage followed by one output register.

## Where the addend goes: one right shift in a 161-bit field

The hardest part of an FMA is lining up the addend with the product. The
product's exponent is `Eb+Ec-bias`. The addend can be far above it, far below
it, or anywhere in between. Shifting in both directions would need two shifters.
This design uses the usual trick instead. The addend significand starts
`p+3 = 56` places above the product's most significant bit, and is only ever
shifted **right**.

Field layout, with bit 161 at the top. The adder is 163 bits wide: a sign bit
at 162, the field at bits 161..1, and a sticky position at bit 0.

```
 162   161 ........ 109   108 107   106 ............... 1    0
 sign  addend (53 bits,   gap       product Mb*Mc (106)      sticky
       unshifted)
```

- `d = Eb + Ec - 1023 - Ea + 56`, clamped to `[0, 161]`.
- The exponent of bit 161 is `e_ref = max(Ea, Eb + Ec - 1023 + 56)`. This is
  the "max(Ea, Eb+Ec)" of the algorithm, written for biased exponents and this
  layout.
- When `d` would be negative, the addend is more than 55 places above the
  product. The addend stays at the top, and the product stays at bits 106..1.
  It then sits even higher than it should, but still less than a quarter of an
  addend ULP. For truncation only two facts about such a term matter: its sign,
  and that it is non-zero and smaller than a quarter ULP. Both survive, so the
  result is still exact.
- When `d` exceeds 108, addend bits fall below the field. They are ORed into
  the sticky position, which counts as half a unit of bit 1. This is safe here
  because the product then fills the top of the field, so truncation happens
  at least 50 places higher.
- A zero product forces `d = 0`, so a zero product can never shift a non-zero
  addend out of the field.

Subnormal operands have their exponent set to 1 and no implied one, as usual.
For an effective subtraction (the signs of `A` and `B*C` differ), the shifter
outputs the one's complement of field and sticky. The missing `+1` enters as
the carry-in of the final adder.

## The product stays in carry-save form

`booth_mult` encodes `Mc` as 27 radix-4 Booth digits in {-2..+2}. Each digit
picks 0, Mb or 2·Mb. A negative digit uses the inverted multiple, and the
missing `+1`s are collected in one extra row. The 28 rows are reduced by a tree
of 3:2 carry-save adders (28→20→14→10→7→5→4→3→2). The tree is built from
`csa32`, a row of `full_adder` cells. Each full adder is two half adders plus
an OR gate.

The two output vectors satisfy `sum + carry = Mb*Mc` only **modulo 2^W**. That
is why, in the top level, the tree is as wide as the adder (162 bits, shifted
up one place to 163). The whole addition is then consistent modulo 2^163, and
the true sum fits in 163 signed bits. Then:
`csa32` merges product-sum, product-carry and the aligned addend into two
vectors, and the adder, the LZA and the sticky logic all work from that pair.

## Sign and magnitude

`cpa` adds the two vectors plus the carry-in. It is a chain of `full_adder`
cells, with a full adder at every bit, the LSB included. The LSB cell's carry
input takes the `+1` of the two's complement. A faster carry network can
replace the ripple chain behind the same ports. On an effective subtraction a
negative result means `|A| > |B*C|`. The adder then negates it, and the result
takes A's sign; otherwise it takes the product's sign. An exact zero sum is +0,
unless both terms are zeros of the same sign. This is the IEEE rule for round
toward zero.

## Leading-zero anticipation and the two-step normalizer

The LZA predicts how far to shift from the two carry-save vectors, while the
adder is still working. Each bit position is classed as T (propagate), G
(generate) or Z (kill). The indicator comes from the exact relations between
neighbouring sum bits. With `c_i` the carry into position i:

| class of position i | sum bit i differs from bit i+1 when |
|---|---|
| T | position i+1 is not T (the carry does not matter) |
| G | `T(i+1) == c_i` |
| Z | `T(i+1) != c_i` |

The carry is guessed from position i-1 alone: 1 after a G, 0 otherwise.
The carry-in is folded in as an extra position below bit 0. The first marked
position is then within **one place either way** of the true leading one of
`|sum|`, for positive and negative sums alike. This was checked exhaustively
for 8-bit operands and by random test at 18 bits.

`normalizer` shifts left by `count - 1`, then by 0..3 more places, which it
picks from the top bits of the shifted value. Both steps are limited to
`e_ref - 1`. A result that would need more stays subnormal, with top bit 0 and
exponent field 0. An assertion checks that the coarse shift never pushes a one
out of the field. `exp_update` gives `Ew = e_ref - shift`, or 0 for subnormal
and zero results.

## Sticky without the carry chain

The truncation point is known only after normalization. So `sticky_calc`
produces `zlow[k]` for every k, meaning "the low k bits of the sum are zero".
It works directly from the carry-save pair, using the zero-detection identity.
The low k bits of `x + y + cin` are all zero exactly when, at every position
`i < k`, `x_i ^ y_i` equals `x_{i-1} | y_{i-1}` (or `cin` at position 0). The
same bits are zero in the negated sum. The round stage picks
`zlow[109 - shift]`, and that flag is the inexact flag.

## Rounding, overflow, flags, special values

`round_rtz` keeps the top 53 bits of the normalized value and sets the flags:

- **Overflow.** The exponent is 2047 or more. The result saturates to the
  largest finite number with the result's sign, and overflow and inexact are
  set.
- **Underflow.** The result is subnormal or zero, and inexact. With truncation,
  tininess before and after rounding agree.

`fma_special` handles the special operands:

- **Any NaN operand:** the result is the default quiet NaN
  `0x7FF8000000000000`. NaN payloads are not propagated. A signalling NaN
  raises invalid.
- **Invalid operations:** `inf*0` and `inf - inf` give the default NaN and
  raise invalid. `inf*0` with a quiet-NaN addend does not raise invalid.
- **Infinite product or addend:** the result is that infinity.

Zeros and finite values go through the datapath.

## Interface and timing (`fma_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_i`, `rst_ni` | in | 1 | clock; active-low asynchronous reset of the output register |
| `in_valid_i` | in | 1 | operation presented this cycle |
| `sub_i` | in | 1 | 0: `B*C + A`, 1: `B*C - A` (the addend sign is flipped) |
| `a_i`, `b_i`, `c_i` | in | 64 | binary64 addend A, multiplicands B and C (`fp64_t`) |
| `out_valid_o` | out | 1 | result valid, exactly one clock after `in_valid_i` |
| `res_o` | out | 64 | result W |
| `flags_o` | out | 4 | `{invalid, overflow, underflow, inexact}` |

Latency is one clock and throughput is one operation per clock. There is no
back-pressure. The result and flags hold their value while `in_valid_i` is
low. After synthesis the unit is about 20.5k word-level cells and 69
flip-flops.

## What comes from the original description and what does not

Taken from the description of the unit:

- binary64 operands;
- `W = A + B*C` with the multiplicand significands going to the multiplier and
  the addend to a right shifter;
- the block set and connections of the diagram above;
- Booth encoding and carry-save adders, with full adders made of two half
  adders and an OR gate;
- an LZA built on T/G/Z classes that handles leading zeros and leading ones;
- sticky by ORing shifted-out bits;
- a carry-in at the adder's LSB;
- round toward zero as the only rounding mode;
- subtraction of the addend.

This design's own choices:

- the 161-bit field and the `p+3` offset;
- the Booth radix (4) and the tree shape;
- the LZA indicator equation and the 0..3 fine correction;
- zero detection from carry-save form;
- the zero-product shortcut;
- the IEEE details of flags, NaNs and signed zeros;
- the single output register and the `sub_i` port.

Not built:

- **Error-recovery circuit.** It is claimed for the unit, but its function and
  interface are not given.
- **The "configurable" aspect of the architecture.** It is not defined. The
  format constants are parameters in `fma_pkg`, but the modules have only been
  checked at binary64.
- **Other IEEE rounding modes.**

## Files

- `rtl/fma_pkg.sv`: format constants, `fp64_t`, the unpacked-operand struct,
  the flags struct.
- `rtl/fma_top.sv`: the unit.
- `rtl/fp_unpack.sv`, `shift_dist_exp.sv`, `align_shifter.sv`,
  `booth_mult.sv`, `csa32.sv`, `full_adder.sv`, `cpa.sv`, `lza.sv`, `lzc.sv`,
  `sticky_calc.sv`, `normalizer.sv`, `exp_update.sv`, `round_rtz.sv`,
  `fma_special.sv`: the blocks of the diagram.
- `tb/<module>_tb.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/fma_ref_pkg.sv`: exact reference model for the end-to-end test.

## Verification

`tb/fma_top_tb.sv` runs 300,000 operations through the unit at its default
(binary64) size, one per clock. Each result and flag set is compared with
`fma_ref_pkg`, an exact model. That model places both terms in a 4400-bit
integer and truncates the exact sum; it shares no code with the RTL.

The stimulus mixes:

- raw random bit patterns;
- nearby exponents;
- near-cancelling `A ≈ -B*C`;
- subnormals;
- huge exponents;
- special values;
- the subtract mode.

The bench checks the one-clock latency on every cycle. It counts how often each
mechanism occurs: effective subtraction, negative sum, addend above the
product, addend shifted out, alignment sticky, LZA correction, massive
cancellation, subnormal result, overflow, invalid, infinity, exact zero,
inexact and subtract. A mechanism that never occurs is a failure. All 300,000
operations match. The run takes a few seconds.

The block testbenches check each module against values computed in the bench:

- exhaustive for the full adder and for the special-value classes;
- random for the others;
- the multiplier at its full 53-bit size;
- the multiplier, in a 6-bit instance, on the worked example
  `101110 x 010011 = 001101101010`, then exhaustively;
- the LZA on the worked example `000010110001111000 + 000001000011111010`
  (leading one in the fifth position), and on random and near-cancelling
  pairs, where the prediction must be within one place.

Run a testbench with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    --top-module fma_top_tb rtl/fma_pkg.sv tb/fma_ref_pkg.sv tb/fma_top_tb.sv
./obj_dir/Vfma_top_tb
```

Replace `fma_top_tb` with any other `<module>_tb`. `tb/fma_ref_pkg.sv` is only
needed by `fma_top_tb`. `fma_top_tb` reads a few internal signals of the unit
by hierarchical name to count the mechanisms. If you rename those signals, the
counters must follow.
