// tb_ifpa: the inexact adder against the integer reference model and
// against exact real arithmetic.
// Directed cases hit each path (equal exponents, large exponent gap,
// overflow, cancellation, saturation, negative difference); random cases
// cover the rest. Every result must equal the reference bit for bit, and
// for additions of like signs the relative error against the exact sum
// must stay below 2**-10 (the OR-ed lower part is 12 bits wide).
module tb_ifpa;
  import ifpa_pkg::*;
  import ifpa_ref_pkg::*;
  logic       clk = 1'b0;
  fp32_t      a, b, sum;
  add_flags_t flags;
  int checks = 0, failures = 0;
  int n_eq = 0, n_far = 0, n_sub = 0, n_neg = 0, n_ovf = 0, n_lz = 0, n_sat = 0, n_zero = 0;

  ifpa dut (.a, .b, .sum, .flags);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] expv;
    real ex, got, err;
    a = x;
    b = y;
    #1;
    expv = ref_add(x, y);
    checks++;
    if (sum !== expv) begin
      failures++;
      if (failures < 10) $display("mismatch %h + %h: got %h expected %h", x, y, sum, expv);
    end
    if (x[31] == y[31] && !flags.saturated && expv != 0) begin
      ex  = to_real(x) + to_real(y);
      got = to_real(sum);
      err = (got - ex) / ex;
      if (err < 0.0) err = -err;
      checks++;
      if (err > 2.0 ** -10) begin
        failures++;
        $display("error too large %h + %h: %e vs %e", x, y, got, ex);
      end
    end
    n_eq   += int'(flags.exp_equal);
    n_far  += int'(flags.too_far);
    n_sub  += int'(flags.eff_sub);
    n_neg  += int'(flags.neg_fix);
    n_ovf  += int'(flags.ovf_shift);
    n_lz   += int'(flags.lz_shift);
    n_sat  += int'(flags.saturated);
    n_zero += int'(flags.zero);
    @(posedge clk);
  endtask

  initial begin
    apply(32'h3F800000, 32'h3F800000);   // 1 + 1 = 2 (overflow shift)
    apply(32'h40400000, 32'h3F800000);   // 3 + 1
    apply(32'h3F800000, 32'h4B800000);   // 1 + 2**24: gap 24, dropped
    apply(32'h3FC00000, 32'hBFC00000);   // x - x = 0
    apply(32'h3F800000, 32'hBFC00000);   // 1 - 1.5: negative, fixed
    apply(32'h7F7FFFFF, 32'h7F7FFFFF);   // saturation
    apply(32'h00000000, 32'h3F800000);   // 0 + 1
    apply(32'h3F800001, 32'hBF800000);   // cancellation, long left shift
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] x, y;
      int e;
      x = rand_fp(1, 254);
      e = int'(x[30:23]) + int'($urandom % 41) - 20;
      if (e < 1) e = 1;
      if (e > 254) e = 254;
      y = rand_fp(e, e);
      if (n % 5 == 0) y[30:23] = x[30:23];
      if (n % 11 == 0) y[30:23] = 8'(254 - $urandom % 3);
      apply(x, y);
    end
    $display("eq=%0d far=%0d sub=%0d neg=%0d ovf=%0d lz=%0d sat=%0d zero=%0d",
             n_eq, n_far, n_sub, n_neg, n_ovf, n_lz, n_sat, n_zero);
    checks++;
    if (n_eq == 0 || n_far == 0 || n_sub == 0 || n_neg == 0 || n_ovf == 0 || n_lz == 0 ||
        n_sat == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
