// tb_fp_norm_round: check of normalization and rounding.
//
// Two instances see the same inputs: one rounds to nearest even (default),
// one truncates (ROUND_NEAREST_EVEN = 0). Inputs are products of random
// 24-bit significands, random 48-bit values in [2^46, 2^48), exact ties
// (kept bit odd and even, directed and random), all-ones fractions that
// carry out of the significand, and exact products with nothing to round. Each
// result is compared with a reference computed here from whole-number
// arithmetic on the discarded remainder. The testbench counts how often a
// normalization shift, a round up, a tie and a round carry happened and
// fails if any of them never did.
module tb_fp_norm_round;

  logic [47:0]       prod;
  logic signed [9:0] exp_tent;
  logic [22:0]       man_n, man_t;
  logic signed [9:0] exp_n, exp_t;
  logic              shift_n, up_n, carry_n, shift_t, up_t, carry_t;
  int                checks = 0, failures = 0;
  int                n_shift = 0, n_up = 0, n_tie = 0, n_carry = 0;

  fp_norm_round dut_rne (
    .prod(prod), .exp_tent(exp_tent), .man(man_n), .exp_out(exp_n),
    .norm_shift(shift_n), .round_up(up_n), .round_carry(carry_n)
  );

  fp_norm_round #(.ROUND_NEAREST_EVEN(1'b0)) dut_trunc (
    .prod(prod), .exp_tent(exp_tent), .man(man_t), .exp_out(exp_t),
    .norm_shift(shift_t), .round_up(up_t), .round_carry(carry_t)
  );

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: returns {exponent, fraction} for one rounding mode.
  function automatic logic [32:0] reference(input logic [47:0] p, input int e,
                                            input bit rne, output bit tie);
    int unsigned     sh;
    longint unsigned sig, rem, half;
    int              ex;
    bit              up;
    sh   = p[47] ? 24 : 23;
    sig  = longint'(p) >> sh;
    rem  = longint'(p) & ((64'd1 << sh) - 1);
    half = 64'd1 << (sh - 1);
    tie  = (rem == half);
    up   = rne && (rem > half || (rem == half && sig[0]));
    sig  = sig + longint'(up);
    ex   = e + (p[47] ? 1 : 0);
    if (sig[24]) begin
      sig = sig >> 1;
      ex++;
    end
    return {10'(ex), sig[22:0]};
  endfunction

  task automatic apply(input logic [47:0] p, input int e);
    logic [32:0] exp_rne, exp_trn;
    bit          tie, tie_t;
    prod     = p;
    exp_tent = 10'(e);
    #1;
    exp_rne = reference(p, e, 1'b1, tie);
    exp_trn = reference(p, e, 1'b0, tie_t);
    checks++;
    if ({exp_n, man_n} != exp_rne) begin
      failures++;
      $display("FAIL rne prod=%h exp=%0d got %0d/%h expected %0d/%h",
               p, e, exp_n, man_n, signed'(exp_rne[32:23]), exp_rne[22:0]);
    end
    checks++;
    if ({exp_t, man_t} != exp_trn) begin
      failures++;
      $display("FAIL trunc prod=%h exp=%0d got %0d/%h expected %0d/%h",
               p, e, exp_t, man_t, signed'(exp_trn[32:23]), exp_trn[22:0]);
    end
    checks++;
    if (up_t || carry_t) begin
      failures++;
      $display("FAIL trunc rounded up for prod=%h", p);
    end
    if (shift_n) n_shift++;
    if (up_n) n_up++;
    if (tie) n_tie++;
    if (carry_n) n_carry++;
  endtask

  initial begin
    logic [23:0] x, y;
    // Ties: guard bit set, nothing below it; odd and even kept bit.
    apply({2'b01, 23'h000001, 1'b1, 22'h0}, 10);      // odd, no shift: up
    apply({2'b01, 23'h000002, 1'b1, 22'h0}, 10);      // even, no shift: stays
    apply({1'b1, 23'h000001, 1'b1, 23'h0}, 10);       // odd, shift: up
    apply({1'b1, 23'h000002, 1'b1, 23'h0}, 10);       // even, shift: stays
    // Carries out of the significand.
    apply(48'h7FFF_FFFF_FFFF, 100);
    apply(48'hFFFF_FFFF_FFFF, 100);
    apply(48'hFFFF_FF80_0000, -5);
    // Exact: 1.0 x 1.0 and 1.5 x 1.5.
    apply(48'h4000_0000_0000, 0);
    apply(48'h9000_0000_0000, 254);
    for (int i = 0; i < 20000; i++) begin
      x = {1'b1, 23'($urandom)};
      y = {1'b1, 23'($urandom)};
      apply(48'(longint'(x) * longint'(y)), int'($urandom_range(0, 500)) - 130);
      apply({1'b0, 1'b1, 46'({$urandom, $urandom})}, int'($urandom_range(0, 500)) - 130);
      apply({1'b1, 47'({$urandom, $urandom})}, int'($urandom_range(0, 500)) - 130);
    end
    // Random exact ties, with and without the normalization shift.
    for (int i = 0; i < 1000; i++) begin
      apply({2'b01, 23'($urandom), 1'b1, 22'h0}, int'($urandom_range(0, 300)));
      apply({1'b1, 23'($urandom), 1'b1, 23'h0}, int'($urandom_range(0, 300)));
    end
    checks++;
    if (n_shift == 0 || n_up == 0 || n_tie == 0 || n_carry == 0) begin
      failures++;
      $display("FAIL a mechanism never happened: shift=%0d up=%0d tie=%0d carry=%0d",
               n_shift, n_up, n_tie, n_carry);
    end
    $display("normalize shifts=%0d round ups=%0d ties=%0d round carries=%0d",
             n_shift, n_up, n_tie, n_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
