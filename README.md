# Inexact floating-point adder and four-term dot product

Floating-point addition is costly in logic, mostly in the parts that exist only for
exactness: a comparator and swap network that orders the operands, a long carry chain
across the whole significand, and a rounder at the end. Many workloads, such as image and
signal processing, tolerate small errors in the least significant bits. This design
removes or simplifies each of those parts:

* **No operand swap.** The exponent subtractor's borrow and the OR of its difference
  bits steer the operands through multiplexers. No magnitude comparator is needed.
* **Lower-part-OR significand adder (LOA).** The 12 least significant significand bits
  are OR-ed instead of added. Only the upper 12 bits (the 11 most significant stored
  mantissa bits plus the hidden one) go through a real adder. The single carry allowed
  out of the lower part is `a[11] & b[11]`.
* **Short alignment shifter.** A 4-stage shifter aligns by 0 to 15 positions only.
* **No rounder.** Every shift simply drops the bits that fall off.

The adder (`ifpa`) is then used three times, with four multipliers, in a unit that
computes the four-term dot product `Z = AB ± CD ± EF ± GH`. That unit (`dot4_unit`) is
the top of the design.

All logic is combinational. There is no clock, no reset and no handshake. A result is
valid one propagation delay after the inputs change. Registers, if needed, go around the
instance.

## Number format

Operands are IEEE 754 single precision in layout: a sign bit, an 8-bit exponent with
bias 127, and 23 stored mantissa bits. The type is `ifpa_pkg::fp32_t`, a packed struct
`{sign, exp, mant}` that is bit-compatible with a 32-bit float. Special values are
simplified:

* An exponent field of 0 means zero, whatever the mantissa. Subnormals are read as zero.
* Every other exponent code, including 255, is treated as an ordinary normalized number.
  Infinities and NaNs are neither recognised nor produced.
* If a result's exponent would reach 255, the result saturates to the largest finite
  magnitude, `±0x7F7FFFFF`, keeping its sign.
* If a result's exponent would drop to 0 or below, the result is flushed to `+0`.
  An exact cancellation also gives `+0`.

## The adder datapath (`ifpa`)

```
 a.exp ─┐                    ┌──────────────┐
 b.exp ─┴─> exp_subtractor ──┤ borrow       │
            (b.exp - a.exp)  │ diff_nz (OR) ├─> operand_mux ──big_sig──────────────┐
                             │ shamt[3:0]   │        │                             v
                             │ too_far      │        └─small_sig─> align_shifter ─> loa_adder ─> negate? ─> normalizer ─> sum
                             └──────────────┘                     (0..15, flush)   (add/sub)   (sub only)
```

1. **`exp_subtractor`** computes `exp_b - exp_a` in one 9-bit subtraction.
   * The borrow is 1 exactly when A has the larger exponent.
   * `diff_nz`, the OR of the eight difference bits, says whether the exponents differ.
   * A conditional two's complement gives `|exp_a - exp_b|`. Its four LSBs are the
     shift distance.
   * `too_far` is set when any higher bit of that magnitude is set, meaning a difference
     of 16 or more.
2. **`operand_mux`** replaces the swap unit. The select is `{diff_nz, borrow}`.
   * If the exponents are equal, A goes to the adder and B goes to the shifter, which
     leaves B unshifted.
   * Otherwise the operand with the larger exponent goes to the adder and the other one
     to the shifter.
   * A 2-to-1 multiplexer on the borrow picks the larger exponent.
   * The mux never compares significands. With equal exponents, B's significand may
     therefore be the larger one (see step 4).
3. **`align_shifter`** is a right shifter made of four rows of 2-to-1 multiplexers, which
   shift by 1, 2, 4 and 8 positions. When `too_far` is set, the output is forced to zero.
   This costs little. After a shift of 16 or more, every surviving bit would land in the
   OR-ed lower part or below it.
4. **`loa_adder`** combines the larger-exponent significand with the aligned one.
   * **Like signs:** it adds.
     * Upper 12 bits: `a_hi + b_hi + (a[11] & b[11])`, computed exactly.
     * Lower 12 bits: `a_lo | b_lo`.
     * The top output bit is the carry out.
   * **Unlike signs:** it subtracts.
     * Upper 12 bits: `a_hi - b_hi - (~a[11] & b[11])`, computed exactly.
     * Lower 12 bits: `a_lo & ~b_lo`.
     * The top output bit is the borrow out, which is the sign of the difference.

   A negative difference can only occur when the exponents are equal. It is negated
   (two's complement) and the result sign is flipped.
5. **`normalizer`** brings the significand back to the `1.xxx` form.
   * **Carry out set:** shift right by one and increment the exponent.
   * **Leading zeros** (only after a subtraction): a priority encoder counts them, a left
     shifter removes them, and the count is subtracted from the exponent.
   * **Exponent out of range:** saturate or flush to zero as described above.
   * No rounding is done.

`ifpa` also outputs an `add_flags_t` struct that reports which path each addition took.
The fields are:

* `exp_equal`: the exponents were equal.
* `too_far`: the smaller operand was dropped.
* `eff_sub`: the operands had unlike signs, so the significands were subtracted.
* `neg_fix`: a negative difference was negated.
* `ovf_shift`: the normalizer shifted right.
* `lz_shift`: the normalizer shifted left.
* `saturated`: the result saturated.
* `zero`: the result is zero.

These flags are for observation and testing. Nothing inside the adder depends on them.

### How inexact it is

For operands of like sign, there are four sources of error:

* The OR in the lower part loses `a_lo & b_lo` (at most `2^12` units of the last place).
* The bits shifted out are dropped.
* An operand 16 or more binades smaller is dropped entirely.
* The normalizer truncates.

The relative error against the exact sum therefore stays below about `2^-10`. The
testbench checks that bound on 20,000 random additions. For a sum, this means roughly the
top 10 to 11 significant bits are correct.

The subtract mode has an absolute error of the same size, about `2^12` units in the last
place of the larger operand. When the two operands nearly cancel, that error becomes
large relative to the small result. `x - x` is exactly zero, because the lower part gives
`x_lo & ~x_lo = 0`.

## Four-term dot product (`dot4_unit`)

* Four `fp_multiplier` instances form AB, CD, EF and GH.
* Each of `sub_cd`, `sub_ef` and `sub_gh` flips the sign of its product when set.
* Three `ifpa` instances sum the terms in a balanced tree:
  `s0 = AB ± CD`, `s1 = ±EF ± GH`, then `Z = s0 + s1`.

The multiplier is the plainest one that fits: a 24×24-bit significand product, exponent
sum minus bias, and a one-position normalization. It truncates, like the adder. It also
saturates and flushes to zero by the same rules as the adder.

Ports beyond the operands and `z`:

* `add_flags[2:0]`: the flags of the three adders. Index 0 is `s0`, index 1 is `s1`,
  index 2 is the final sum.
* `mul_sat[3:0]`: per-product saturation, in the order AB, CD, EF, GH.
* `mul_zero[3:0]`: per-product zero flags, same order.

## What is specified and what is chosen here

Taken from the design description:

* Single-precision operands.
* The exponent subtractor with its borrow convention. The borrow is 0 when A's exponent
  is the smaller one.
* The OR-reduced difference used as a multiplexer select.
* Multiplexers in place of the swap.
* A 4-stage shifter with a 4-bit select and a reach of 15.
* The LOA adder with 12 OR-ed LSBs and an AND-generated carry from bit 11.
* The missing rounder.
* Overflow correction of the exponent, and saturation.
* The dot-product formula built from multipliers and the inexact adder.

Chosen here, where the description is silent, ambiguous or only gives a figure:

* **Signed operands and the LOA subtract mode.** The adder is described for unsigned
  magnitudes only, but the dot product needs differences. The subtract rule above is
  this design's own, and so is the negation step.
* **The OR-ed part is 12 bits wide.** The description's detailed passage says 12, a
  summary line says 11. `ifpa_pkg::LOA_LOWER` sets the width.
* **The shifter uses 2-to-1 multiplexer rows,** one row per select bit. It is 24 bits
  wide, because the hidden bit travels with the mantissa.
* **Differences of 16 or more drop the smaller operand.**
* **The normalizer uses a leading-zero priority encoder and a left shifter.**
* **Saturation goes to the largest finite value,** not to an all-ones exponent, because
  an all-ones exponent would read as infinity in IEEE 754.
* **Special values are simplified:** flush to zero, and no infinities or NaNs.
* **The multiplier's internals.** The description only names the multiply function.
* **The balanced adder tree** in the dot product.
* **No pipeline registers.** No latency or clock is specified.

## Files

| File | Contents |
|---|---|
| `rtl/ifpa_pkg.sv` | widths (`EXP_W`, `MANT_W`, `SIG_W`, `LOA_LOWER`, `SHAMT_W`), `fp32_t`, `add_flags_t` |
| `rtl/exp_subtractor.sv` | exponent difference, borrow, OR-reduced select, shift distance |
| `rtl/operand_mux.sv` | operand steering in place of a swap |
| `rtl/align_shifter.sv` | 4-stage 0..15 right shifter with flush |
| `rtl/loa_adder.sv` | lower-part-OR significand adder/subtractor |
| `rtl/normalizer.sv` | overflow / leading-zero normalization, saturation, flush |
| `rtl/ifpa.sv` | the inexact adder |
| `rtl/fp_multiplier.sv` | truncating single-precision multiplier |
| `rtl/dot4_unit.sv` | top: `Z = AB ± CD ± EF ± GH` |
| `tb/ifpa_ref_pkg.sv` | integer reference models of adder, multiplier and dot product; real conversion |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench compares the block, bit for bit, with values computed in a separate way:
integer arithmetic, loops instead of encoders, and 64-bit intermediates. The
floating-point tests also check the results against exact real arithmetic.

* `tb_exp_subtractor` is exhaustive over all 65,536 exponent pairs.
* `tb_ifpa` runs directed and random cases. Examples of the directed cases are `1+1`, a
  gap of 24 binades, `x-x`, `1-1.5` and saturation.
* `tb_dot4_unit` runs directed sums such as `1+1+1+1 = 4`, `1-1+1-1 = 0` and
  `2·3-1 = 5`, plus 20,000 random vectors over all sign combinations. It counts every
  mechanism (each subtract select, equal exponents, dropped operand, subtraction,
  negative-difference fix, both normalization shifts, saturation in adders and
  multipliers, zero results). It fails if any mechanism never occurred.

`ifpa` also holds a deferred assertion. It states that a negative significand difference
happens only with equal exponents, which is the property that makes the
comparator-free operand steering safe. Run with `--assert` to check it.

Each testbench prints `TB_RESULT checks=N failures=M`. A watchdog ends it if it hangs.

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --top-module tb_dot4_unit -y rtl -y tb \
    rtl/ifpa_pkg.sv tb/ifpa_ref_pkg.sv tb/tb_dot4_unit.sv
./obj_dir/Vtb_dot4_unit
```

Replace `dot4_unit` with any other module name to run that module's testbench. Each run
takes well under a second.

## Changing it

* **Width of the OR-ed part.** This is `LOA_LOWER` in `ifpa_pkg`, and it is the main
  accuracy/cost knob. If you change it, also change the `12`/`'hFFF` constants in
  `tb/ifpa_ref_pkg.sv` and `tb/tb_loa_adder.sv`.
* **Shifter reach.** This is `SHAMT_W`.
* **Other formats,** such as half or double precision. The sub-blocks take their widths
  as parameters, but `fp32_t` fixes the operand layout. Change `EXP_W`, `MANT_W` and
  `BIAS` in the package together.
