// gvj_half_adder: a half adder made of a single GVJ gate.
//
// The third gate input is the constant 0. Output R is then the sum a xor b,
// output Q the carry a and b, and output P (= not b) the one garbage output.
// Purely combinational.
module gvj_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry,
  output logic garbage
);

  gvj_gate u_gvj (
    .a (a),
    .b (b),
    .c (1'b0),
    .p (garbage),
    .q (carry),
    .r (sum)
  );

endmodule
