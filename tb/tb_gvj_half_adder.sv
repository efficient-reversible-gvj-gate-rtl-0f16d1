// tb_gvj_half_adder: exhaustive check of the GVJ half adder.
//
// For each of the four input pairs, {carry, sum} must equal a + b and the
// garbage output must be the GVJ gate's P output with C = 0, i.e. not b.
module tb_gvj_half_adder;

  logic a, b, sum, carry, garbage;
  int   checks = 0, failures = 0;

  gvj_half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry), .garbage(garbage));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (2'({carry, sum}) != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b carry=%b sum=%b", a, b, carry, sum);
      end
      checks++;
      if (garbage !== !b) begin
        failures++;
        $display("FAIL a=%b b=%b garbage=%b", a, b, garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
