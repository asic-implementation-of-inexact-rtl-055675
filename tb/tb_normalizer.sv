// tb_normalizer: normalization against an integer loop model.
// Magnitudes are drawn with a random leading-one position (including the
// overflow bit and zero) and exponents near both ends of the range, so the
// right shift, every left-shift distance, saturation, underflow and zero
// are all exercised and counted.
module tb_normalizer;
  import ifpa_pkg::*;
  import ifpa_ref_pkg::*;
  logic        clk = 1'b0;
  logic [24:0] mag;
  logic [7:0]  exp_in;
  logic        sign_in;
  fp32_t       result;
  logic        ovf_shift, lz_shift, saturated, zero;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_lz = 0, n_sat = 0, n_zero = 0;

  normalizer dut (.mag, .exp_in, .sign_in, .result, .ovf_shift, .lz_shift, .saturated, .zero);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint r, e;
    logic [31:0] expv;
    int top;
    for (int n = 0; n < 6000; n++) begin
      top     = int'($urandom % 26);          // 25 = zero magnitude
      mag     = (top == 25) ? 25'd0 : ((25'd1 << top) | (25'($urandom) & ((25'd1 << top) - 1)));
      case (n % 4)
        0: exp_in = 8'($urandom % 30);
        1: exp_in = 8'(230 + $urandom % 26);
        default: exp_in = 8'($urandom);
      endcase
      sign_in = 1'($urandom);
      #1;
      r = longint'(mag);
      e = longint'(exp_in);
      if (r == 0) expv = 32'd0;
      else begin
        if (r >= (longint'(1) << 24)) begin r = r >> 1; e++; end
        while (r < (longint'(1) << 23)) begin r = r << 1; e--; end
        expv = pack(sign_in, e, r);
      end
      checks++;
      if (result !== expv) begin
        failures++;
        if (failures < 10)
          $display("mismatch mag=%h exp=%0d s=%b got=%h exp=%h", mag, exp_in, sign_in, result, expv);
      end
      n_ovf  += int'(ovf_shift);
      n_lz   += int'(lz_shift);
      n_sat  += int'(saturated);
      n_zero += int'(zero);
      @(posedge clk);
    end
    $display("ovf_shift=%0d lz_shift=%0d saturated=%0d zero=%0d", n_ovf, n_lz, n_sat, n_zero);
    checks++;
    if (n_ovf == 0 || n_lz == 0 || n_sat == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
