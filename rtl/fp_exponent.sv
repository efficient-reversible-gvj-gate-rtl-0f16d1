// fp_exponent: tentative exponent of a floating point product.
//
// Computes exp_tent = ea + eb - 127 (step 1 of the multiplication: the two
// biased exponents are added and one bias removed). An 8-bit GVJ carry
// propagate adder forms ea + eb with its carry out (9 bits); a 10-bit GVJ
// carry propagate adder then adds the two's complement of the bias. The
// result is a 10-bit two's complement number in [-127, 383], so both
// underflow (<= 0) and overflow (>= 255) remain visible to later stages.
// Using GVJ ripple adders and the 10-bit signed width are choices of this
// design. Purely combinational.
module fp_exponent
  import gvj_pkg::*;
(
  input  logic [EXP_W-1:0]         ea,
  input  logic [EXP_W-1:0]         eb,
  output logic signed [XEXP_W-1:0] exp_tent
);

  localparam logic [XEXP_W-1:0] NEG_BIAS = XEXP_W'(-BIAS);

  logic [EXP_W-1:0]  esum;
  logic              ecarry;
  logic [EXP_W-1:0]  unused_gp8;
  logic [EXP_W-2:0]  unused_gf8;
  logic              unused_cout10;
  logic [XEXP_W-1:0] unused_gp10;
  logic [XEXP_W-2:0] unused_gf10;
  logic [XEXP_W-1:0] exp_bits;

  gvj_cpa #(.WIDTH(EXP_W)) u_add (
    .a         (ea),
    .b         (eb),
    .sum       (esum),
    .cout      (ecarry),
    .garbage_p (unused_gp8),
    .garbage_f (unused_gf8)
  );

  gvj_cpa #(.WIDTH(XEXP_W)) u_unbias (
    .a         ({1'b0, ecarry, esum}),
    .b         (NEG_BIAS),
    .sum       (exp_bits),
    .cout      (unused_cout10),
    .garbage_p (unused_gp10),
    .garbage_f (unused_gf10)
  );

  assign exp_tent = signed'(exp_bits);

endmodule
