// tb_gvj_cpa: exhaustive check of the GVJ carry propagate adder at its
// default width of 8 bits.
//
// First the worked example 10101010 + 01010101 = 11111111 (no carries, so
// every partial sum bit is 1 and the Feynman garbage is all 0). Then all 65536 operand pairs: {cout, sum} must
// equal a + b, and the 15 garbage bits must match what the gates produce for
// the carries of a reference ripple computed here bit by bit:
// garbage_p[i] = b[i] xnor carry_in[i], garbage_f[i-1] = carry_in[i].
module tb_gvj_cpa;

  localparam int W = 8;

  logic [W-1:0] a, b, sum, garbage_p;
  logic [W-2:0] garbage_f;
  logic         cout;
  int           checks = 0, failures = 0;

  gvj_cpa dut (
    .a(a), .b(b), .sum(sum), .cout(cout),
    .garbage_p(garbage_p), .garbage_f(garbage_f)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pair(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0]   carry;
    logic [W-1:0] exp_gp;
    logic [W-2:0] exp_gf;
    a = x;
    b = y;
    #1;
    carry[0] = 1'b0;
    for (int i = 0; i < W; i++) begin
      carry[i+1] = (x[i] & y[i]) | (x[i] & carry[i]) | (y[i] & carry[i]);
      exp_gp[i]  = ~(y[i] ^ carry[i]);
      if (i > 0) exp_gf[i-1] = carry[i];
    end
    checks++;
    if ({cout, sum} != (W+1)'(int'(x) + int'(y))) begin
      failures++;
      $display("FAIL %0d + %0d gave cout=%b sum=%0d", x, y, cout, sum);
    end
    checks++;
    if (garbage_p != exp_gp || garbage_f != exp_gf) begin
      failures++;
      $display("FAIL %0d + %0d garbage %b %b expected %b %b",
               x, y, garbage_p, garbage_f, exp_gp, exp_gf);
    end
  endtask

  initial begin
    check_pair(8'b1010_1010, 8'b0101_0101);
    checks++;
    if (sum != 8'b1111_1111 || garbage_f != 7'b000_0000) begin
      failures++;
      $display("FAIL worked example gave %b, garbage %b", sum, garbage_f);
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        check_pair(8'(x), 8'(y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
