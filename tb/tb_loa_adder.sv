// tb_loa_adder: lower-part-OR adder against its defining arithmetic.
// Add mode: upper 12 bits summed with carry-in a[11]&b[11], lower 12 bits
// OR-ed; the result must also stay within 2**12 of the exact sum. Sub
// mode: upper part subtracted with borrow-in ~a[11]&b[11], lower bits
// a&~b; the result must stay within 2**12 of the exact difference.
module tb_loa_adder;
  logic        clk = 1'b0;
  logic [23:0] a, b;
  logic        sub;
  logic [24:0] sum;
  int checks = 0, failures = 0;

  loa_adder dut (.a, .b, .sub, .sum);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint hi, lo, r, exact, got, la, lb, c;
    for (int n = 0; n < 5000; n++) begin
      a   = 24'($urandom);
      b   = (n % 7 == 0) ? a : 24'($urandom);
      sub = 1'(n & 1);
      if (sub && a < b) {a, b} = {b, a};   // keep the difference non-negative
      #1;
      la = longint'(a);
      lb = longint'(b);
      if (!sub) begin
        c     = (la >> 11) & (lb >> 11) & 1;
        hi    = (la >> 12) + (lb >> 12) + c;
        lo    = (la | lb) & 'hFFF;
        exact = la + lb;
      end else begin
        c     = (~la >> 11) & (lb >> 11) & 1;
        hi    = (la >> 12) - (lb >> 12) - c;
        lo    = la & ~lb & 'hFFF;
        exact = la - lb;
      end
      r   = hi * 4096 + lo;
      got = sub ? longint'($signed(sum)) : longint'(sum);
      checks++;
      if (got != r || got - exact > 4096 || exact - got > 4096) begin
        failures++;
        if (failures < 10)
          $display("mismatch a=%h b=%h sub=%b sum=%h exp=%h exact=%h", a, b, sub, sum, r, exact);
      end
      @(posedge clk);
    end
    // a negative difference must show as a set top bit
    a = 24'h800000; b = 24'hC00000; sub = 1'b1;
    #1;
    checks++;
    if (sum !== 25'h1C00000) begin
      failures++;
      $display("negative difference wrong: %h", sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
