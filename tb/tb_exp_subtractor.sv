// tb_exp_subtractor: exhaustive check of the exponent subtractor.
// Every pair of 8-bit exponents is applied; borrow, the OR-reduced
// difference, the magnitude, the shift select and the out-of-reach flag
// are compared with values computed from integer arithmetic.
module tb_exp_subtractor;
  logic       clk = 1'b0;
  logic [7:0] exp_a, exp_b, diff_mag;
  logic       borrow, diff_nz, too_far;
  logic [3:0] shamt;
  int checks = 0, failures = 0;

  exp_subtractor dut (.exp_a, .exp_b, .borrow, .diff_nz, .diff_mag, .shamt, .too_far);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        exp_a = 8'(i);
        exp_b = 8'(j);
        #1;
        d = (i > j) ? i - j : j - i;
        checks++;
        if (borrow !== (i > j) || diff_nz !== (i != j) || diff_mag !== 8'(d) ||
            shamt !== 4'(d) || too_far !== (d > 15)) begin
          failures++;
          if (failures < 10)
            $display("mismatch a=%0d b=%0d: borrow=%b nz=%b mag=%0d sh=%0d far=%b",
                     i, j, borrow, diff_nz, diff_mag, shamt, too_far);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
