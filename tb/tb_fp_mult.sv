// tb_fp_mult: end-to-end check of the single precision GVJ multiplier.
//
// The multiplier runs at its default parameters (24x24 Wallace tree, round
// to nearest even). Every result is compared with a reference model written
// here from whole-number arithmetic: the 48-bit significand product from the
// simulator's own multiplication, normalization, round to nearest even, and
// the same special-value rules as the design (zero/subnormal operands count
// as zero, NaN or 0 x inf gives 0x7FC00000, overflow gives infinity,
// underflow flushes to zero). Normal results are also checked against the
// simulator's double precision product of the operands (exact for single
// precision inputs): the error must be at most half a unit in the last place.
//
// Stimulus: directed cases (1.0 x 1.0, the worked example
// 0x40A14280 x 0x59D1402A = 0x5B03CFB6, a round carry with
// 0x3FFFFFFE x 0x3F800001 = 2.0, overflow, underflow, zeros, subnormals,
// infinities, NaNs) and 30000 random pairs, biased so that
// every special class occurs. The testbench counts how often each mechanism
// happened (normalization shift, round up, round carry, overflow, underflow,
// zero operand, infinity, NaN, negative result) and fails if any never did.
module tb_fp_mult;

  logic [31:0] a, b, c;
  int          checks = 0, failures = 0;
  int          n_shift = 0, n_up = 0, n_carry = 0, n_ovf = 0, n_unf = 0;
  int          n_zero = 0, n_inf = 0, n_nan = 0, n_neg = 0, n_normal = 0;

  fp_mult dut (.a(a), .b(b), .c(c));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] reference(input logic [31:0] x, input logic [31:0] y);
    logic            sx, sy, s;
    int              ex, ey, e;
    longint unsigned mx, my, p, sig, rem, half;
    int unsigned     sh;
    bit              x_zero, y_zero, x_inf, y_inf, x_nan, y_nan;
    sx = x[31];  ex = int'(x[30:23]);  mx = longint'(x[22:0]);
    sy = y[31];  ey = int'(y[30:23]);  my = longint'(y[22:0]);
    s  = sx ^ sy;
    x_zero = (ex == 0);
    y_zero = (ey == 0);
    x_inf  = (ex == 255) && (mx == 0);
    y_inf  = (ey == 255) && (my == 0);
    x_nan  = (ex == 255) && (mx != 0);
    y_nan  = (ey == 255) && (my != 0);
    if (x_nan || y_nan || (x_inf && y_zero) || (y_inf && x_zero)) return 32'h7FC0_0000;
    if (x_inf || y_inf) return {s, 8'hFF, 23'h0};
    if (x_zero || y_zero) return {s, 31'h0};
    p    = ((64'd1 << 23) | mx) * ((64'd1 << 23) | my);
    sh   = p[47] ? 24 : 23;
    e    = ex + ey - 127 + (p[47] ? 1 : 0);
    sig  = p >> sh;
    rem  = p & ((64'd1 << sh) - 1);
    half = 64'd1 << (sh - 1);
    if (rem > half || (rem == half && sig[0])) sig++;
    if (sig[24]) begin
      sig = sig >> 1;
      e++;
    end
    if (e >= 255) return {s, 8'hFF, 23'h0};
    if (e <= 0) return {s, 31'h0};
    return {s, 8'(e), sig[22:0]};
  endfunction

  // Value of a normal single precision word, decoded field by field.
  function automatic real to_real(input logic [31:0] v);
    real m;
    int  e;
    m = 1.0 + real'(v[22:0]) / 8388608.0;
    e = int'(v[30:23]) - 127;
    for (int i = 0; i < e; i++) m = m * 2.0;
    for (int i = 0; i > e; i--) m = m * 0.5;
    return v[31] ? -m : m;
  endfunction

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] expected;
    real         r, rc, err;
    a = x;
    b = y;
    #1;
    expected = reference(x, y);
    checks++;
    if (c !== expected) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h", x, y, c, expected);
    end
    // Independent check of normal results against the real product.
    if (c[30:23] != 8'h00 && c[30:23] != 8'hFF) begin
      r   = to_real(x) * to_real(y);
      rc  = to_real(c);
      err = (rc > r) ? rc - r : r - rc;
      checks++;
      if (err > ((rc < 0.0) ? -rc : rc) * 5.9604644775390625e-8) begin
        failures++;
        $display("FAIL %h * %h = %h is off the real product %e", x, y, c, r);
      end
      n_normal++;
    end
    // Mechanism counts, from the design's own internal signals.
    if (dut.zero_in && !dut.invalid && !dut.inf_in) n_zero++;
    else if (!dut.invalid && !dut.inf_in) begin
      if (dut.norm_shift) n_shift++;
      if (dut.round_up) n_up++;
      if (dut.round_carry) n_carry++;
      if (dut.overflow) n_ovf++;
      if (dut.underflow) n_unf++;
    end
    if (dut.inf_in && !dut.invalid) n_inf++;
    if (dut.invalid) n_nan++;
    if (c[31]) n_neg++;
  endtask

  function automatic logic [31:0] random_operand();
    logic [31:0] v;
    int unsigned k;
    v = $urandom;
    k = $urandom_range(0, 31);
    case (k)
      0: v[30:23] = 8'h00;                                  // zero or subnormal
      1: v[30:0]  = 31'h0;                                  // exact zero
      2: v[30:0]  = {8'hFF, 23'h0};                         // infinity
      3: v[30:23] = 8'hFF;                                  // NaN (or inf)
      4, 5, 6, 7, 8, 9, 10, 11:
         v[30:23] = 8'($urandom_range(100, 154));           // near 1.0
      default: ;
    endcase
    return v;
  endfunction

  initial begin
    apply(32'h3F80_0000, 32'h3F80_0000);                    // 1.0 x 1.0
    apply(32'h40A1_4280, 32'h59D1_402A);                    // worked example
    checks++;
    if (c !== 32'h5B03_CFB6) begin
      failures++;
      $display("FAIL worked example gave %h", c);
    end
    apply(32'h3FFF_FFFE, 32'h3F80_0001);                    // rounds to 2.0
    apply(32'hC000_0000, 32'h3FC0_0000);                    // -2 x 1.5 = -3
    apply(32'h7F00_0000, 32'h4000_0000);                    // overflow
    apply(32'h0080_0000, 32'h3F00_0000);                    // underflow
    apply(32'h0000_0000, 32'h4040_0000);                    // zero
    apply(32'h8000_0001, 32'h4040_0000);                    // subnormal
    apply(32'h7F80_0000, 32'hC000_0000);                    // -inf
    apply(32'h7F80_0000, 32'h0000_0000);                    // inf x 0 = NaN
    apply(32'h7FC0_1234, 32'h3F80_0000);                    // NaN in
    for (int i = 0; i < 30000; i++)
      apply(random_operand(), random_operand());
    checks++;
    if (n_shift == 0 || n_up == 0 || n_carry == 0 || n_ovf == 0 || n_unf == 0 ||
        n_zero == 0 || n_inf == 0 || n_nan == 0 || n_neg == 0 || n_normal == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("normal=%0d shift=%0d round_up=%0d round_carry=%0d overflow=%0d underflow=%0d",
             n_normal, n_shift, n_up, n_carry, n_ovf, n_unf);
    $display("zero_operand=%0d infinity=%0d nan=%0d negative=%0d",
             n_zero, n_inf, n_nan, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
