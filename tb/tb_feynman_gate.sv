// tb_feynman_gate: exhaustive check of the Feynman gate (P = A, Q = A xor B).
module tb_feynman_gate;

  logic a, b, p, q;
  int   checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

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
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL ab=%02b pq=%b%b", 2'(i), p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
