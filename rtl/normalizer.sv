// normalizer: brings the significand sum back to the 1.xxx form.
//
// Input is an unsigned magnitude of SIG_W+1 bits whose top bit is the
// adder's carry out, with the exponent of the larger operand and the
// result sign. Three cases:
//   * top bit set: the sum overflowed; shift right by one and add one to
//     the exponent (the dropped bit is lost, there is no rounder);
//   * leading zeros below the hidden position (after a subtraction): a
//     leading-zero detector (priority encoder) gives the count, a left
//     shifter removes them and the count is subtracted from the exponent;
//   * zero magnitude: the result is +0.
// If the exponent would reach 2**EXP_W-1 the result saturates to the
// largest finite magnitude with the result sign. If it would drop to 0 or
// below the result is flushed to +0 (no subnormals).
//
// Purely combinational. Overflow handling, saturation and the absence of a
// rounder follow the adder's description; the leading-zero path, the
// saturation value (largest finite number rather than an all-ones
// exponent) and flush-to-zero are this design's own choices.
module normalizer
  import ifpa_pkg::*;
(
  input  logic [SIG_W:0]   mag,
  input  logic [EXP_W-1:0] exp_in,
  input  logic             sign_in,
  output fp32_t            result,
  output logic             ovf_shift,
  output logic             lz_shift,
  output logic             saturated,
  output logic             zero
);

  localparam int unsigned LZ_W = $clog2(SIG_W + 1);

  logic [LZ_W-1:0]  lz;
  logic [SIG_W-1:0] shifted;
  logic [EXP_W+1:0] exp_tmp;   // two extra bits: sign and overflow

  // Leading-zero count of mag[SIG_W-1:0]; only used when mag[SIG_W] is 0.
  always_comb begin
    lz = LZ_W'(SIG_W);
    for (int i = 0; i < SIG_W; i++) begin
      if (mag[i]) lz = LZ_W'(SIG_W - 1 - i);
    end
  end

  always_comb begin
    ovf_shift = mag[SIG_W];
    zero      = (mag == '0);
    lz_shift  = !ovf_shift && !zero && (lz != '0);
    if (ovf_shift) begin
      shifted = mag[SIG_W:1];
      exp_tmp = {2'b00, exp_in} + 1'b1;
    end else begin
      shifted = mag[SIG_W-1:0] << lz;
      exp_tmp = {2'b00, exp_in} - {{(EXP_W+2-LZ_W){1'b0}}, lz};
    end
    saturated = 1'b0;
    result    = '0;
    if (zero) begin
      result = '0;
    end else if (exp_tmp[EXP_W+1] || exp_tmp[EXP_W:0] == '0) begin
      zero   = 1'b1;   // underflow: flush to +0
      result = '0;
    end else if (exp_tmp[EXP_W:0] >= (EXP_W+1)'({EXP_W{1'b1}})) begin
      saturated   = 1'b1;
      result.sign = sign_in;
      result.exp  = EXP_MAX;
      result.mant = MANT_MAX;
    end else begin
      result.sign = sign_in;
      result.exp  = exp_tmp[EXP_W-1:0];
      result.mant = shifted[MANT_W-1:0];
    end
  end

endmodule
