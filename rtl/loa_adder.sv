// loa_adder: lower-part-OR (LOA) approximate significand adder/subtractor.
//
// The W-bit operands are split at LOWER: the LOWER least significant bits
// are not added but OR-ed bit by bit, so no carry chain exists there. The
// upper W-LOWER bits go through an exact adder whose carry-in is the AND
// of the two operands' top lower-part bits (a[LOWER-1] & b[LOWER-1]), the
// one carry the lower part is allowed to produce. With the defaults (24-bit
// significand, 12-bit lower part) the 11 most significant stored mantissa
// bits plus the hidden bit are added exactly and the 12 LSBs by OR gates.
//
// When sub is set the block computes a - b in the same spirit: the lower
// part is a & ~b (each bit subtracted without borrow), the upper part is an
// exact subtractor whose borrow-in is ~a[LOWER-1] & b[LOWER-1], and the top
// result bit is the borrow out, i.e. the sign of the (two's complement)
// difference. For addition the top bit is the carry out.
//
// Purely combinational. Addition follows the adder's description exactly;
// the subtract mode is this design's own extension, needed because the
// dot product subtracts terms.
module loa_adder #(
  parameter int unsigned W     = ifpa_pkg::SIG_W,
  parameter int unsigned LOWER = ifpa_pkg::LOA_LOWER
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W:0]   sum    // {carry/borrow, upper sum, lower OR}
);

  localparam int unsigned UPPER = W - LOWER;

  logic [UPPER:0]   hi;
  logic [LOWER-1:0] lo;
  logic             cin;

  always_comb begin
    if (!sub) begin
      cin = a[LOWER-1] & b[LOWER-1];
      lo  = a[LOWER-1:0] | b[LOWER-1:0];
      hi  = {1'b0, a[W-1:LOWER]} + {1'b0, b[W-1:LOWER]} + {{UPPER{1'b0}}, cin};
    end else begin
      cin = ~a[LOWER-1] & b[LOWER-1];
      lo  = a[LOWER-1:0] & ~b[LOWER-1:0];
      hi  = {1'b0, a[W-1:LOWER]} - {1'b0, b[W-1:LOWER]} - {{UPPER{1'b0}}, cin};
    end
    sum = {hi, lo};
  end

endmodule
