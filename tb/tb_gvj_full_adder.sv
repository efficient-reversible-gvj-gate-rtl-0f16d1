// tb_gvj_full_adder: exhaustive check of the GVJ full adder.
//
// For all eight input patterns {cout, sum} must equal a + b + cin, and the
// two garbage outputs must be b xnor cin (GVJ gate P) and cin (Feynman gate
// pass-through of the carry-in).
module tb_gvj_full_adder;

  logic a, b, cin, sum, cout, garbage_p, garbage_f;
  int   checks = 0, failures = 0;

  gvj_full_adder dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout),
    .garbage_p(garbage_p), .garbage_f(garbage_f)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if (2'({cout, sum}) != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b cout=%b sum=%b", a, b, cin, cout, sum);
      end
      checks++;
      if (garbage_p !== (b == cin) || garbage_f !== cin) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b garbage=%b%b", a, b, cin, garbage_p, garbage_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
