// exp_subtractor: exponent comparison stage of the inexact adder.
//
// Subtracts exponent A from exponent B in one EXP_W-bit subtractor. The
// borrow output is 1 when A's exponent is the larger one and 0 otherwise,
// which is the borrow of the B - A subtraction. The raw difference is
// OR-reduced into a single "exponents differ" control (diff_nz) that, with
// the borrow, selects the operand multiplexers. The magnitude |eA - eB| is
// formed from the raw difference by a conditional two's complement; its
// SHAMT_W least significant bits drive the alignment shifter, and any
// higher bit set (too_far) means the smaller operand lies entirely below the
// shifter's 15-bit reach and is dropped.
//
// Purely combinational. The B - A orientation, the borrow meaning and the
// OR reduction follow the adder's description; the conditional negation
// and the too_far flag are this design's own.
module exp_subtractor #(
  parameter int unsigned EXP_W   = ifpa_pkg::EXP_W,
  parameter int unsigned SHAMT_W = ifpa_pkg::SHAMT_W
) (
  input  logic [EXP_W-1:0]   exp_a,
  input  logic [EXP_W-1:0]   exp_b,
  output logic               borrow,    // 1: exp_a > exp_b
  output logic               diff_nz,   // OR of the difference bits
  output logic [EXP_W-1:0]   diff_mag,  // |exp_a - exp_b|
  output logic [SHAMT_W-1:0] shamt,     // alignment shift, 0..2**SHAMT_W-1
  output logic               too_far    // |exp_a - exp_b| >= 2**SHAMT_W
);

  logic [EXP_W:0] diff_raw;

  always_comb begin
    diff_raw = {1'b0, exp_b} - {1'b0, exp_a};
    borrow   = diff_raw[EXP_W];
    diff_nz  = |diff_raw[EXP_W-1:0];
    diff_mag = borrow ? (~diff_raw[EXP_W-1:0] + 1'b1) : diff_raw[EXP_W-1:0];
    shamt    = diff_mag[SHAMT_W-1:0];
    too_far  = |diff_mag[EXP_W-1:SHAMT_W];
  end

endmodule
