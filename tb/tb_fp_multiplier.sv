// tb_fp_multiplier: the truncating multiplier against the integer model
// and against exact real products (relative error below 2**-22).
module tb_fp_multiplier;
  import ifpa_pkg::*;
  import ifpa_ref_pkg::*;
  logic  clk = 1'b0;
  fp32_t a, b, p;
  logic  saturated, zero;
  int checks = 0, failures = 0, n_sat = 0, n_zero = 0;

  fp_multiplier dut (.a, .b, .p, .saturated, .zero);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expv;
    real ex, err;
    for (int n = 0; n < 10000; n++) begin
      case (n % 5)
        0: begin a = rand_fp(1, 254); b = rand_fp(1, 254); end
        1: begin a = rand_fp(100, 154); b = 32'h00000000; end
        default: begin a = rand_fp(90, 164); b = rand_fp(90, 164); end
      endcase
      #1;
      expv = ref_mul(a, b);
      checks++;
      if (p !== expv) begin
        failures++;
        if (failures < 10) $display("mismatch %h * %h: got %h expected %h", a, b, p, expv);
      end
      if (!saturated && !zero) begin
        ex  = to_real(a) * to_real(b);
        err = (to_real(p) - ex) / ex;
        if (err < 0.0) err = -err;
        checks++;
        if (err > 2.0 ** -22) begin
          failures++;
          $display("error too large %h * %h", a, b);
        end
      end
      n_sat  += int'(saturated);
      n_zero += int'(zero);
      @(posedge clk);
    end
    $display("saturated=%0d zero=%0d", n_sat, n_zero);
    checks++;
    if (n_sat == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
