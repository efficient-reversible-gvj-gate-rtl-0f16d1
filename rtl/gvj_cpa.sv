// gvj_cpa: WIDTH-bit carry propagate (ripple carry) adder of GVJ adders.
//
// Bit 0 has no carry-in, so it is a GVJ half adder; bits 1..WIDTH-1 are GVJ
// full adders whose carry-in is the carry-out of the bit below. The sum is
// sum = a + b modulo 2^WIDTH and cout is the carry out of the top bit.
// Garbage outputs: garbage_p collects the P output of every GVJ gate (WIDTH
// bits) and garbage_f the Feynman pass-through output of every full adder,
// a copy of its carry-in (WIDTH-1 bits): 2*WIDTH-1 garbage bits in all, 15
// for the 8-bit adder.
// The 8-bit default, the half adder in bit 0 and the garbage count follow the
// source design; the cout port is an addition of this design, used by the
// exponent logic. Purely combinational, delay grows linearly with WIDTH.
module gvj_cpa #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic [WIDTH-1:0] garbage_p,
  output logic [WIDTH-2:0] garbage_f
);

  logic [WIDTH:1] carry;   // carry[i] enters bit i; bit 0 has none

  gvj_half_adder u_ha0 (
    .a       (a[0]),
    .b       (b[0]),
    .sum     (sum[0]),
    .carry   (carry[1]),
    .garbage (garbage_p[0])
  );

  for (genvar i = 1; i < WIDTH; i++) begin : g_fa
    gvj_full_adder u_fa (
      .a         (a[i]),
      .b         (b[i]),
      .cin       (carry[i]),
      .sum       (sum[i]),
      .cout      (carry[i+1]),
      .garbage_p (garbage_p[i]),
      .garbage_f (garbage_f[i-1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
