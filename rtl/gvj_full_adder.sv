// gvj_full_adder: a full adder made of one GVJ gate and one Feynman gate.
//
// The GVJ gate takes a, b and the carry-in cin. Its Q output is the carry-out
// majority(a, b, cin) and its R output the partial sum a xor b. A Feynman gate
// with cin on its control input and the partial sum on its target input gives
// the sum bit. Two garbage outputs remain: the GVJ gate's P (b xnor cin) and
// the Feynman gate's pass-through copy of cin. The gate structure follows the
// source design; which Feynman input takes cin is this design's reading, the
// one under which the 7 Feynman garbage bits of the 8-bit adder are all 0 for
// 10101010 + 01010101. Purely combinational; the carry path is one gate deep,
// the sum path two.
module gvj_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout,
  output logic garbage_p,
  output logic garbage_f
);

  logic psum;

  gvj_gate u_gvj (
    .a (a),
    .b (b),
    .c (cin),
    .p (garbage_p),
    .q (cout),
    .r (psum)
  );

  feynman_gate u_fey (
    .a (cin),
    .b (psum),
    .p (garbage_f),
    .q (sum)
  );

endmodule
