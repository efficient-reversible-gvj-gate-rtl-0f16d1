// tb_wallace_mult: check of the 24x24 GVJ Wallace tree multiplier.
//
// Applies the operand pair 0xAAAAAA x 0xFFFFFF (alternating bits times all
// ones), the corner cases 0, 1 and all ones, and 20000 random pairs, and
// compares the 48-bit product with the simulator's own 64-bit multiplication.
module tb_wallace_mult;

  localparam int W = 24;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] product;
  int             checks = 0, failures = 0;

  wallace_mult dut (.a(a), .b(b), .product(product));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pair(input logic [W-1:0] x, input logic [W-1:0] y);
    longint unsigned expected;
    a = x;
    b = y;
    #1;
    expected = longint'(x) * longint'(y);
    checks++;
    if (64'(product) != expected) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h", x, y, product, expected);
    end
  endtask

  initial begin
    check_pair(24'hAAAAAA, 24'hFFFFFF);
    check_pair('0, '0);
    check_pair('1, '1);
    check_pair('1, 24'd1);
    check_pair(24'h800000, 24'h800000);
    for (int i = 0; i < 20000; i++)
      check_pair(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
