// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
// P passes A through; Q = A xor B. In the GVJ full adder it combines the
// partial sum of the GVJ gate with the carry-in to form the sum bit; its P
// output is then garbage. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule
