// tb_operand_mux: checks the operand steering that replaces the swap unit.
// For random operands and every exponent relation (A larger, B larger,
// equal) the larger-exponent operand must reach the adder input and the
// other the shifter input; the result exponent must be the larger one.
module tb_operand_mux;
  logic        clk = 1'b0;
  logic [23:0] sig_a, sig_b, big_sig, small_sig;
  logic        sign_a, sign_b, big_sign, small_sign, borrow, diff_nz;
  logic [7:0]  exp_a, exp_b, big_exp;
  int checks = 0, failures = 0;

  operand_mux dut (.sig_a, .sig_b, .sign_a, .sign_b, .exp_a, .exp_b, .borrow, .diff_nz,
                   .big_sig, .small_sig, .big_sign, .small_sign, .big_exp);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit a_big;
    for (int n = 0; n < 3000; n++) begin
      sig_a  = 24'($urandom);
      sig_b  = 24'($urandom);
      sign_a = 1'($urandom);
      sign_b = 1'($urandom);
      exp_a  = 8'($urandom);
      exp_b  = (n % 3 == 0) ? exp_a : 8'($urandom);
      // control signals as the exponent subtractor defines them
      borrow  = (exp_a > exp_b);
      diff_nz = (exp_a != exp_b);
      a_big   = (exp_a >= exp_b);
      #1;
      checks++;
      if (big_sig !== (a_big ? sig_a : sig_b) || small_sig !== (a_big ? sig_b : sig_a) ||
          big_sign !== (a_big ? sign_a : sign_b) || small_sign !== (a_big ? sign_b : sign_a) ||
          big_exp !== (a_big ? exp_a : exp_b)) begin
        failures++;
        if (failures < 10)
          $display("mismatch ea=%0d eb=%0d big=%h small=%h bexp=%0d", exp_a, exp_b,
                   big_sig, small_sig, big_exp);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
