// ifpa_pkg: shared types and constants of the inexact floating-point adder
// and the four-term dot-product unit built from it.
//
// Numbers are IEEE 754 single precision in layout (1 sign bit, 8 exponent
// bits with bias 127, 23 stored mantissa bits and a hidden leading one).
// The datapath handles only zero and normalized values: an exponent field
// of 0 is read as zero, and no infinities or NaNs are produced. The adder
// saturates to the largest finite magnitude instead. The single-precision
// format and the 12-bit OR-ed lower part follow the adder's description;
// the handling of special values is this design's own choice.
package ifpa_pkg;

  localparam int unsigned EXP_W     = 8;             // exponent field width
  localparam int unsigned MANT_W    = 23;            // stored mantissa width
  localparam int unsigned SIG_W     = MANT_W + 1;    // significand with hidden one
  localparam int unsigned LOA_LOWER = 12;            // mantissa LSBs added by OR gates
  localparam int unsigned SHAMT_W   = 4;             // alignment shift select bits (0..15)
  localparam int unsigned BIAS      = 127;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [MANT_W-1:0] mant;
  } fp32_t;

  // Which data-dependent path an addition took (for observation and test).
  typedef struct packed {
    logic exp_equal;   // exponents equal: no alignment shift
    logic too_far;     // exponent difference above 15: smaller operand dropped
    logic eff_sub;     // operand signs differ: magnitudes subtracted
    logic neg_fix;     // subtraction went negative and was negated
    logic ovf_shift;   // sum overflowed: shifted right, exponent + 1
    logic lz_shift;    // leading zeros removed by a left shift
    logic saturated;   // exponent overflow: clamped to largest magnitude
    logic zero;        // result is zero (exact cancel or underflow)
  } add_flags_t;

  // Largest finite magnitude, returned on exponent overflow.
  localparam logic [EXP_W-1:0]  EXP_MAX  = {{(EXP_W-1){1'b1}}, 1'b0};
  localparam logic [MANT_W-1:0] MANT_MAX = {MANT_W{1'b1}};

endpackage
