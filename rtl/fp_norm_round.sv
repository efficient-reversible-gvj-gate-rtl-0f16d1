// fp_norm_round: normalization and rounding of a significand product.
//
// prod is the 48-bit product of two 24-bit significands (each 1.xxx), so it
// lies in [1, 4) with the binary point below bit 46. Step 4: if bit 47 is
// set the product is shifted right by one and the exponent incremented
// (norm_shift), otherwise bit 46 is the leading 1. Step 5: the 23 fraction
// bits below the leading 1 are kept. With ROUND_NEAREST_EVEN = 1 (default)
// the discarded bits are rounded to nearest, ties to even: the guard bit
// (first discarded bit) and the sticky bit (OR of the rest) decide round_up,
// and a GVJ ripple adder adds it to the 24-bit significand. If that carries
// out of the significand (1.11...1 + ulp = 10.0...0) the fraction becomes 0
// and the exponent is incremented once more (round_carry). With
// ROUND_NEAREST_EVEN = 0 the discarded bits are truncated. A second GVJ
// ripple adder applies both exponent increments. The rounding mode, the use
// of GVJ adders for the increments and the flag outputs are choices of this
// design. Purely combinational.
module fp_norm_round
  import gvj_pkg::*;
#(
  parameter bit ROUND_NEAREST_EVEN = 1'b1
) (
  input  logic [PROD_W-1:0]        prod,
  input  logic signed [XEXP_W-1:0] exp_tent,
  output logic [MAN_W-1:0]         man,
  output logic signed [XEXP_W-1:0] exp_out,
  output logic                     norm_shift,
  output logic                     round_up,
  output logic                     round_carry
);

  logic [SIG_W-1:0] sig_trunc;
  logic             guard, sticky;
  logic [SIG_W-1:0] sig_rounded;
  logic [SIG_W-1:0] unused_gp24;
  logic [SIG_W-2:0] unused_gf24;

  assign norm_shift = prod[PROD_W-1];

  always_comb begin
    if (norm_shift) begin
      sig_trunc = prod[PROD_W-1 -: SIG_W];
      guard     = prod[PROD_W-1-SIG_W];
      sticky    = |prod[PROD_W-2-SIG_W:0];
    end else begin
      sig_trunc = prod[PROD_W-2 -: SIG_W];
      guard     = prod[PROD_W-2-SIG_W];
      sticky    = |prod[PROD_W-3-SIG_W:0];
    end
  end

  assign round_up = ROUND_NEAREST_EVEN && guard && (sticky || sig_trunc[0]);

  gvj_cpa #(.WIDTH(SIG_W)) u_round (
    .a         (sig_trunc),
    .b         (SIG_W'(round_up)),
    .sum       (sig_rounded),
    .cout      (round_carry),
    .garbage_p (unused_gp24),
    .garbage_f (unused_gf24)
  );

  // After a carry out sig_rounded is 0, which is the right fraction for 1.0.
  assign man = sig_rounded[MAN_W-1:0];

  logic [XEXP_W-1:0] exp_bits;
  logic              unused_cout10;
  logic [XEXP_W-1:0] unused_gp10;
  logic [XEXP_W-2:0] unused_gf10;

  gvj_cpa #(.WIDTH(XEXP_W)) u_exp_inc (
    .a         (exp_tent),
    .b         ({{(XEXP_W-2){1'b0}}, norm_shift & round_carry, norm_shift ^ round_carry}),
    .sum       (exp_bits),
    .cout      (unused_cout10),
    .garbage_p (unused_gp10),
    .garbage_f (unused_gf10)
  );

  assign exp_out = signed'(exp_bits);

endmodule
