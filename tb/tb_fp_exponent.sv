// tb_fp_exponent: exhaustive check of the tentative exponent ea + eb - 127
// over all 65536 pairs of 8-bit biased exponents.
module tb_fp_exponent;

  logic [7:0]        ea, eb;
  logic signed [9:0] exp_tent;
  int                checks = 0, failures = 0;

  fp_exponent dut (.ea(ea), .eb(eb), .exp_tent(exp_tent));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        ea = 8'(x);
        eb = 8'(y);
        #1;
        checks++;
        if (int'(exp_tent) != x + y - 127) begin
          failures++;
          $display("FAIL %0d + %0d - 127 gave %0d", x, y, exp_tent);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
