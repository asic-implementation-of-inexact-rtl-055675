// align_shifter: logarithmic right shifter that aligns the smaller operand.
//
// Four stages of 2-to-1 multiplexers, one row of W multiplexers per stage,
// shift the significand right by 1, 2, 4 and 8 bit positions when the
// matching bit of the 4-bit select is set, so any shift from 0 to 15 is
// possible. Bits shifted out at the bottom are dropped (no guard, round or
// sticky bits, since the adder does not round). When flush is set the
// exponent difference exceeds the shifter's reach and the output is zero.
//
// Purely combinational. The 4-bit select taken from the low bits of the
// exponent difference, the four stages and the 15-bit range follow the
// adder's description; the multiplexer type per stage and the flush input
// are this design's own reading.
module align_shifter #(
  parameter int unsigned W       = ifpa_pkg::SIG_W,
  parameter int unsigned SHAMT_W = ifpa_pkg::SHAMT_W
) (
  input  logic [W-1:0]       data_in,
  input  logic [SHAMT_W-1:0] shamt,
  input  logic               flush,
  output logic [W-1:0]       data_out
);

  logic [W-1:0] stage [SHAMT_W+1];

  assign stage[0] = data_in;

  for (genvar s = 0; s < SHAMT_W; s++) begin : g_stage
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i + (1 << s) < W) begin : g_mux
        assign stage[s+1][i] = shamt[s] ? stage[s][i + (1 << s)] : stage[s][i];
      end else begin : g_fill
        assign stage[s+1][i] = shamt[s] ? 1'b0 : stage[s][i];
      end
    end
  end

  assign data_out = flush ? '0 : stage[SHAMT_W];

endmodule
