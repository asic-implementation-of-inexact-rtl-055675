// dot4_unit: four-term floating-point dot product Z = AB +/- CD +/- EF +/- GH.
//
// Eight single-precision inputs are multiplied pairwise by four
// fp_multiplier instances. The products are summed by three inexact
// adders (ifpa) arranged as a two-level tree:
//     s0 = AB +/- CD,   s1 = (+/-EF) + (+/-GH),   Z = s0 + s1
// Each sub_* input, when set, negates its term by flipping the product's
// sign bit, so every combination of sum and difference is available. No
// value is rounded anywhere: each multiplier truncates and each adder uses
// the lower-part-OR significand adder.
//
// Purely combinational: Z is valid one combinational delay after the
// inputs. The per-adder path flags and per-multiplier saturation flags are
// brought out for observation. The formula, the multiply-then-add
// structure and the use of the inexact adder follow the design; the
// balanced tree and the sign-flip negation are this design's own choices.
module dot4_unit
  import ifpa_pkg::*;
(
  input  fp32_t            a, b, c, d, e, f, g, h,
  input  logic             sub_cd,     // 1: subtract CD
  input  logic             sub_ef,     // 1: subtract EF
  input  logic             sub_gh,     // 1: subtract GH
  output fp32_t            z,
  output add_flags_t [2:0] add_flags,  // [0]: s0, [1]: s1, [2]: final sum
  output logic       [3:0] mul_sat,    // multiplier saturated, per product
  output logic       [3:0] mul_zero    // product is zero, per product
);

  fp32_t      p_ab, p_cd, p_ef, p_gh;
  fp32_t      t_cd, t_ef, t_gh;
  fp32_t      s0, s1;

  fp_multiplier u_mul_ab (.a(a), .b(b), .p(p_ab), .saturated(mul_sat[0]), .zero(mul_zero[0]));
  fp_multiplier u_mul_cd (.a(c), .b(d), .p(p_cd), .saturated(mul_sat[1]), .zero(mul_zero[1]));
  fp_multiplier u_mul_ef (.a(e), .b(f), .p(p_ef), .saturated(mul_sat[2]), .zero(mul_zero[2]));
  fp_multiplier u_mul_gh (.a(g), .b(h), .p(p_gh), .saturated(mul_sat[3]), .zero(mul_zero[3]));

  always_comb begin
    t_cd      = p_cd;
    t_ef      = p_ef;
    t_gh      = p_gh;
    t_cd.sign = p_cd.sign ^ sub_cd;
    t_ef.sign = p_ef.sign ^ sub_ef;
    t_gh.sign = p_gh.sign ^ sub_gh;
  end

  ifpa u_add0 (.a(p_ab), .b(t_cd), .sum(s0), .flags(add_flags[0]));
  ifpa u_add1 (.a(t_ef), .b(t_gh), .sum(s1), .flags(add_flags[1]));
  ifpa u_add2 (.a(s0),   .b(s1),   .sum(z),  .flags(add_flags[2]));

endmodule
