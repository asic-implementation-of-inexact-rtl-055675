// tb_align_shifter: every shift distance 0..15 with random data, plus the
// flush input, compared with a plain integer right shift.
module tb_align_shifter;
  logic        clk = 1'b0;
  logic [23:0] data_in, data_out;
  logic [3:0]  shamt;
  logic        flush;
  int checks = 0, failures = 0;

  align_shifter dut (.data_in, .shamt, .flush, .data_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] exp_out;
    for (int n = 0; n < 200; n++) begin
      for (int s = 0; s < 16; s++) begin
        data_in = (n == 0) ? 24'hFFFFFF : 24'($urandom);
        shamt   = 4'(s);
        flush   = (n % 10 == 9);
        #1;
        exp_out = flush ? 24'd0 : (data_in >> s);
        checks++;
        if (data_out !== exp_out) begin
          failures++;
          if (failures < 10)
            $display("mismatch in=%h sh=%0d flush=%b out=%h exp=%h", data_in, s, flush,
                     data_out, exp_out);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
