// fp_mult: IEEE 754 single precision floating point multiplier whose adders
// are all built from reversible GVJ gates.
//
// c = a * b, combinationally, in five steps:
//   1. exponent: fp_exponent adds the biased exponents and removes one bias;
//   2. sign: the xor of the two sign bits;
//   3. mantissa: wallace_mult multiplies the 24-bit significands (hidden 1
//      restored) in a Wallace tree of GVJ full adders and a GVJ ripple adder;
//   4./5. fp_norm_round normalizes the 48-bit product and rounds it to 23
//      fraction bits (round to nearest even by default, or truncation).
// Steps 1 to 5 and the 24x24 Wallace tree follow the source design. The
// handling of special operands and out-of-range results is this design's
// own, since the steps above cover only normal numbers:
//   - an exponent field of 0 (zero or subnormal) counts as zero;
//   - NaN operands and 0 x infinity give the quiet NaN 0x7FC00000;
//   - infinity times a nonzero number gives a signed infinity;
//   - a rounded exponent of 255 or more gives a signed infinity (overflow);
//   - a rounded exponent of 0 or less gives a signed zero (underflow, flush
//     to zero; no subnormal results).
// No clock: the result is valid one combinational delay after the inputs.
module fp_mult
  import gvj_pkg::*;
#(
  parameter bit ROUND_NEAREST_EVEN = 1'b1
) (
  input  logic [FP_W-1:0] a,
  input  logic [FP_W-1:0] b,
  output logic [FP_W-1:0] c
);

  fp32_t fa, fb, fc;

  assign fa = fp32_t'(a);
  assign fb = fp32_t'(b);

  // Operand classes.
  logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;

  assign a_zero = (fa.exp == '0);
  assign b_zero = (fb.exp == '0);
  assign a_inf  = (fa.exp == EXP_MAX) && (fa.man == '0);
  assign b_inf  = (fb.exp == EXP_MAX) && (fb.man == '0);
  assign a_nan  = (fa.exp == EXP_MAX) && (fa.man != '0);
  assign b_nan  = (fb.exp == EXP_MAX) && (fb.man != '0);

  // Step 1: tentative exponent.
  logic signed [XEXP_W-1:0] exp_tent;

  fp_exponent u_exp (
    .ea       (fa.exp),
    .eb       (fb.exp),
    .exp_tent (exp_tent)
  );

  // Step 2: sign.
  logic sign;

  assign sign = fa.sign ^ fb.sign;

  // Step 3: significand product.
  logic [PROD_W-1:0] prod;

  wallace_mult #(.A_W(SIG_W), .B_W(SIG_W)) u_mant (
    .a       ({1'b1, fa.man}),
    .b       ({1'b1, fb.man}),
    .product (prod)
  );

  // Steps 4 and 5: normalize and round.
  logic [MAN_W-1:0]         man;
  logic signed [XEXP_W-1:0] exp_out;
  logic                     norm_shift, round_up, round_carry;

  fp_norm_round #(.ROUND_NEAREST_EVEN(ROUND_NEAREST_EVEN)) u_norm (
    .prod        (prod),
    .exp_tent    (exp_tent),
    .man         (man),
    .exp_out     (exp_out),
    .norm_shift  (norm_shift),
    .round_up    (round_up),
    .round_carry (round_carry)
  );

  // Result selection.
  logic invalid, inf_in, zero_in, overflow, underflow;

  assign invalid   = a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero);
  assign inf_in    = a_inf || b_inf;
  assign zero_in   = a_zero || b_zero;
  assign overflow  = (exp_out >= XEXP_W'(signed'({1'b0, EXP_MAX})));
  assign underflow = (exp_out <= 0);

  always_comb begin
    if (invalid) begin
      fc = fp32_t'(QNAN);
    end else if (inf_in || (!zero_in && overflow)) begin
      fc = '{sign: sign, exp: EXP_MAX, man: '0};
    end else if (zero_in || underflow) begin
      fc = '{sign: sign, exp: '0, man: '0};
    end else begin
      fc = '{sign: sign, exp: exp_out[EXP_W-1:0], man: man};
    end
  end

  assign c = FP_W'(fc);

endmodule
