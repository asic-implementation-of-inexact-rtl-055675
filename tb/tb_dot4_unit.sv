// tb_dot4_unit: end-to-end test of the four-term dot product
// Z = AB +/- CD +/- EF +/- GH at the design's default sizes.
// Random vectors in every sign combination are compared bit for bit with
// the reference model (same multiply-then-add tree, inexact adders), and
// all-positive cases are also compared with the exact real dot product
// (relative error below 2**-8). It counts how often each mechanism of the
// datapath occurred (each subtract select, equal exponents, out-of-reach
// alignment, effective subtraction, negative-difference fix, overflow
// shift, leading-zero shift, adder and multiplier saturation, zero
// results) and fails if any never did.
module tb_dot4_unit;
  import ifpa_pkg::*;
  import ifpa_ref_pkg::*;
  logic             clk = 1'b0;
  fp32_t            a, b, c, d, e, f, g, h, z;
  logic             sub_cd, sub_ef, sub_gh;
  add_flags_t [2:0] add_flags;
  logic       [3:0] mul_sat, mul_zero;
  int checks = 0, failures = 0;
  int cnt [16];
  string names [16] = '{"sub_cd", "sub_ef", "sub_gh", "exp_equal", "too_far", "eff_sub",
                        "neg_fix", "ovf_shift", "lz_shift", "add_saturated", "add_zero",
                        "mul_saturated", "mul_zero", "all_add", "unused0", "unused1"};

  dot4_unit dut (.a, .b, .c, .d, .e, .f, .g, .h, .sub_cd, .sub_ef, .sub_gh,
                 .z, .add_flags, .mul_sat, .mul_zero);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] v [8], input bit [2:0] sub);
    logic [31:0] expv;
    real ex, err;
    {a, b, c, d, e, f, g, h} = {v[0], v[1], v[2], v[3], v[4], v[5], v[6], v[7]};
    {sub_gh, sub_ef, sub_cd} = sub;
    #1;
    expv = ref_dot4(v, sub);
    checks++;
    if (z !== expv) begin
      failures++;
      if (failures < 10) $display("mismatch sub=%b: got %h expected %h", sub, z, expv);
    end
    if (sub == 3'b000 && !(|mul_sat) && !add_flags[2].saturated && expv != 0 &&
        !v[0][31] && !v[1][31] && !v[2][31] && !v[3][31] &&
        !v[4][31] && !v[5][31] && !v[6][31] && !v[7][31]) begin
      ex  = to_real(v[0]) * to_real(v[1]) + to_real(v[2]) * to_real(v[3]) +
            to_real(v[4]) * to_real(v[5]) + to_real(v[6]) * to_real(v[7]);
      err = (to_real(z) - ex) / ex;
      if (err < 0.0) err = -err;
      checks++;
      if (err > 2.0 ** -8) begin
        failures++;
        $display("error too large: %e vs %e", to_real(z), ex);
      end
    end
    cnt[0] += int'(sub_cd);
    cnt[1] += int'(sub_ef);
    cnt[2] += int'(sub_gh);
    for (int k = 0; k < 3; k++) begin
      cnt[3]  += int'(add_flags[k].exp_equal);
      cnt[4]  += int'(add_flags[k].too_far);
      cnt[5]  += int'(add_flags[k].eff_sub);
      cnt[6]  += int'(add_flags[k].neg_fix);
      cnt[7]  += int'(add_flags[k].ovf_shift);
      cnt[8]  += int'(add_flags[k].lz_shift);
      cnt[9]  += int'(add_flags[k].saturated);
      cnt[10] += int'(add_flags[k].zero);
    end
    cnt[11] += $countones(mul_sat);
    cnt[12] += $countones(mul_zero);
    cnt[13]++;
    @(posedge clk);
  endtask

  initial begin
    logic [31:0] v [8];
    // 1*1 + 1*1 + 1*1 + 1*1 = 4
    for (int i = 0; i < 8; i++) v[i] = 32'h3F800000;
    apply(v, 3'b000);
    checks++;
    if (z !== 32'h40800000) begin
      failures++;
      $display("1+1+1+1 gave %h", z);
    end
    // 1 - 1 + 1 - 1 = 0
    apply(v, 3'b101);
    checks++;
    if (z !== 32'h00000000) begin
      failures++;
      $display("1-1+1-1 gave %h", z);
    end
    // 2*3 - 1*1 + 0 - 0 = 5
    v = '{32'h40000000, 32'h40400000, 32'h3F800000, 32'h3F800000,
          32'h00000000, 32'h3F800000, 32'h00000000, 32'h3F800000};
    apply(v, 3'b001);
    checks++;
    if (z !== 32'h40A00000) begin
      failures++;
      $display("2*3-1 gave %h", z);
    end
    // huge products: saturation
    for (int i = 0; i < 8; i++) v[i] = 32'h7E000000;
    apply(v, 3'b000);
    for (int n = 0; n < 20000; n++) begin
      int lo, hi;
      case (n % 4)
        0: begin lo = 120; hi = 134; end     // close magnitudes
        1: begin lo = 100; hi = 154; end     // wide spread
        2: begin lo = 60;  hi = 194; end     // saturation / underflow corners
        default: begin lo = 126; hi = 128; end
      endcase
      for (int i = 0; i < 8; i++) v[i] = rand_fp(lo, hi);
      if (n % 16 == 3) v[4] = 32'h00000000;
      if (n % 8 == 1) for (int i = 0; i < 8; i++) v[i][31] = 1'b0;
      apply(v, (n % 8 == 1) ? 3'b000 : 3'($urandom));
    end
    for (int k = 0; k < 13; k++) begin
      $display("%-14s %0d", names[k], cnt[k]);
      checks++;
      if (cnt[k] == 0) begin
        failures++;
        $display("mechanism %s never occurred", names[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
