// ifpa: inexact single-precision floating-point adder.
//
// Computes a + b approximately, in one combinational path:
//   1. exp_subtractor forms eB - eA: its borrow tells which exponent is
//      larger, the OR of its bits whether they differ, and the magnitude's
//      four LSBs the alignment distance (a larger distance drops the
//      smaller operand, whose bits would all fall in the OR-ed lower part
//      or below it anyway);
//   2. operand_mux steers the larger-exponent significand to the adder and
//      the other to align_shifter, replacing a comparator-and-swap unit;
//   3. loa_adder adds the significands exactly in their upper 12 bits and
//      by OR gates in the lower 12; when the signs differ it subtracts;
//   4. a negative difference (possible only with equal exponents) is
//      negated and the sign flipped;
//   5. normalizer fixes overflow or leading zeros and saturates; there is
//      no rounding stage.
// Exponent field 0 is read as zero; all other codes as normalized numbers.
// flags reports which of these paths the addition took.
//
// The pipeline of steps 1-3 and 5, the multiplexer operand selection, the
// 15-bit shifter, the LOA split and the missing rounder follow the adder's
// description; signed operands (step 4 and the subtract mode) are this
// design's own extension for use in the dot product.
module ifpa
  import ifpa_pkg::*;
(
  input  fp32_t      a,
  input  fp32_t      b,
  output fp32_t      sum,
  output add_flags_t flags
);

  logic [SIG_W-1:0] sig_a, sig_b, big_sig, small_sig, aligned;
  logic             borrow, diff_nz, too_far, big_sign, small_sign, eff_sub, neg;
  logic [EXP_W-1:0] diff_mag, big_exp;
  logic [SHAMT_W-1:0] shamt;
  logic [SIG_W:0]   raw, mag;
  logic             ovf_shift, lz_shift, saturated, zero;

  // Hidden bit; a zero exponent field means the value zero.
  assign sig_a = (a.exp != '0) ? {1'b1, a.mant} : '0;
  assign sig_b = (b.exp != '0) ? {1'b1, b.mant} : '0;

  exp_subtractor u_exp_sub (
    .exp_a(a.exp), .exp_b(b.exp),
    .borrow, .diff_nz, .diff_mag, .shamt, .too_far
  );

  operand_mux u_op_mux (
    .sig_a, .sig_b, .sign_a(a.sign), .sign_b(b.sign),
    .exp_a(a.exp), .exp_b(b.exp), .borrow, .diff_nz,
    .big_sig, .small_sig, .big_sign, .small_sign, .big_exp
  );

  align_shifter u_shift (
    .data_in(small_sig), .shamt, .flush(too_far), .data_out(aligned)
  );

  assign eff_sub = big_sign ^ small_sign;

  loa_adder u_loa (
    .a(big_sig), .b(aligned), .sub(eff_sub), .sum(raw)
  );

  assign neg = eff_sub & raw[SIG_W];

  // The larger-exponent operand carries the hidden one and the other is
  // shifted at least one place, so only equal exponents can go negative.
  always_comb begin
    a_neg_equal_exp: assert final (!(neg && diff_nz))
      else $error("ifpa: negative difference with unequal exponents");
  end
  assign mag = neg ? (~raw + 1'b1) : raw;

  normalizer u_norm (
    .mag, .exp_in(big_exp), .sign_in(big_sign ^ neg),
    .result(sum), .ovf_shift, .lz_shift, .saturated, .zero
  );

  always_comb begin
    flags.exp_equal = ~diff_nz;
    flags.too_far   = too_far;
    flags.eff_sub   = eff_sub;
    flags.neg_fix   = neg;
    flags.ovf_shift = ovf_shift;
    flags.lz_shift  = lz_shift;
    flags.saturated = saturated;
    flags.zero      = zero;
  end

endmodule
