// fp_multiplier: single-precision multiplier feeding the dot-product adders.
//
// Multiplies the two 24-bit significands (hidden bit included) into a
// 48-bit product, adds the exponents and removes one bias. A product of
// 2.0 or more is shifted right by one with the exponent incremented. The
// product is truncated to 23 stored bits; like the adder, the multiplier
// has no rounder. Zero operands (exponent field 0) give +0 with the
// product sign, an exponent at or below 0 flushes to zero and an exponent
// of 255 or more saturates to the largest finite magnitude.
//
// Purely combinational. The dot product's use of a multiplier is from the
// design; its internals here are the plainest multiplier that does the job.
module fp_multiplier
  import ifpa_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t p,
  output logic  saturated,
  output logic  zero
);

  logic [SIG_W-1:0]   sig_a, sig_b;
  logic [2*SIG_W-1:0] prod;
  logic [EXP_W+1:0]   exp_sum;   // signed, two guard bits
  logic [MANT_W-1:0]  mant;
  logic               a_zero, b_zero;

  always_comb begin
    a_zero  = (a.exp == '0);
    b_zero  = (b.exp == '0);
    sig_a   = {1'b1, a.mant};
    sig_b   = {1'b1, b.mant};
    prod    = sig_a * sig_b;
    exp_sum = {2'b00, a.exp} + {2'b00, b.exp} - (EXP_W+2)'(BIAS);
    if (prod[2*SIG_W-1]) begin
      mant    = prod[2*SIG_W-2 -: MANT_W];
      exp_sum = exp_sum + 1'b1;
    end else begin
      mant    = prod[2*SIG_W-3 -: MANT_W];
    end

    p         = '0;
    p.sign    = a.sign ^ b.sign;
    saturated = 1'b0;
    zero      = 1'b0;
    if (a_zero || b_zero || exp_sum[EXP_W+1] || exp_sum[EXP_W:0] == '0) begin
      zero   = 1'b1;
      p.exp  = '0;
      p.mant = '0;
      p.sign = 1'b0;
    end else if (exp_sum[EXP_W:0] >= (EXP_W+1)'({EXP_W{1'b1}})) begin
      saturated = 1'b1;
      p.exp     = EXP_MAX;
      p.mant    = MANT_MAX;
    end else begin
      p.exp  = exp_sum[EXP_W-1:0];
      p.mant = mant;
    end
  end

endmodule
