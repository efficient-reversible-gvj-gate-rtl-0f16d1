// gvj_pkg: shared constants and types of the GVJ floating point multiplier.
//
// Holds the IEEE 754 single precision field layout (1 sign bit, 8 exponent
// bits, 23 fraction bits, bias 127), a packed struct that splits a 32-bit word
// into those fields, and the widths used between the exponent, mantissa and
// rounding stages. The field layout is the standard single precision format;
// the 10-bit signed width of the internal exponent and the quiet NaN pattern
// are choices of this design.
package gvj_pkg;

  localparam int unsigned FP_W     = 32;
  localparam int unsigned EXP_W    = 8;
  localparam int unsigned MAN_W    = 23;
  localparam int unsigned SIG_W    = MAN_W + 1;     // significand with hidden 1
  localparam int unsigned PROD_W   = 2 * SIG_W;     // 48-bit significand product
  localparam int unsigned XEXP_W   = EXP_W + 2;     // signed internal exponent
  localparam int unsigned BIAS     = 127;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;

  // Canonical quiet NaN returned for invalid products (0 x inf, NaN operand).
  localparam logic [FP_W-1:0] QNAN = 32'h7FC0_0000;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp32_t;

endpackage
