// tb_gvj_gate: exhaustive check of the GVJ gate against its truth table.
//
// All eight input patterns are applied; P, Q and R are compared with the
// gate's truth table written out as constants. The testbench also checks that
// the gate is reversible: the eight output patterns must all differ.
module tb_gvj_gate;

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;

  gvj_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // Expected {P,Q,R} indexed by {A,B,C}.
  localparam logic [2:0] TRUTH [8] = '{3'b100, 3'b000, 3'b001, 3'b111,
                                       3'b101, 3'b011, 3'b010, 3'b110};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== TRUTH[i]) begin
        failures++;
        $display("FAIL abc=%03b pqr=%03b expected %03b", 3'(i), {p, q, r}, TRUTH[i]);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %03b repeated: gate not reversible", {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
