// operand_mux: multiplexers that take the place of a mantissa swap unit.
//
// Instead of comparing and swapping the two operands, the adder steers them
// with multiplexers whose select is the pair {diff_nz, borrow} from the
// exponent subtractor:
//   {0,x}  exponents equal  -> A goes to the adder, B to the shifter (no shift)
//   {1,0}  B's exponent larger -> B to the adder, A to the shifter
//   {1,1}  A's exponent larger -> A to the adder, B to the shifter
// Each output is a 4-to-1 multiplexer over the significands (with hidden
// bit) and signs; the result exponent is picked by a 2-to-1 multiplexer on
// the borrow alone. No magnitude comparison is made: with equal exponents
// the difference may come out negative and is fixed after the adder.
//
// Purely combinational. The use of 2x1 and 4x1 multiplexers driven by the
// borrow and the OR-reduced difference follows the adder's description; the
// exact select coding is this design's own.
module operand_mux #(
  parameter int unsigned EXP_W = ifpa_pkg::EXP_W,
  parameter int unsigned SIG_W = ifpa_pkg::SIG_W
) (
  input  logic [SIG_W-1:0] sig_a,
  input  logic [SIG_W-1:0] sig_b,
  input  logic             sign_a,
  input  logic             sign_b,
  input  logic [EXP_W-1:0] exp_a,
  input  logic [EXP_W-1:0] exp_b,
  input  logic             borrow,
  input  logic             diff_nz,
  output logic [SIG_W-1:0] big_sig,    // to the mantissa adder directly
  output logic [SIG_W-1:0] small_sig,  // to the alignment shifter
  output logic             big_sign,
  output logic             small_sign,
  output logic [EXP_W-1:0] big_exp     // exponent of the result before normalization
);

  always_comb begin
    unique case ({diff_nz, borrow})
      2'b10: begin
        big_sig    = sig_b;
        small_sig  = sig_a;
        big_sign   = sign_b;
        small_sign = sign_a;
      end
      default: begin  // 2'b00, 2'b11 (and the unreachable 2'b01)
        big_sig    = sig_a;
        small_sig  = sig_b;
        big_sign   = sign_a;
        small_sign = sign_b;
      end
    endcase
    big_exp = borrow ? exp_a : exp_b;
  end

endmodule
