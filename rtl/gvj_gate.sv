// gvj_gate: the 3x3 reversible GVJ gate.
//
// Three inputs map one-to-one onto three outputs, so no input pattern is
// lost. The outputs follow the gate's truth table:
//   P = B xnor C        Q = majority(A, B, C)        R = A xor B
// With C = 0, R is the half-adder sum and Q the carry of A + B; with C as a
// carry-in, Q is the full-adder carry and R the partial sum A xor B, to be
// finished with a Feynman gate. P is then a garbage output.
// Purely combinational, no clock.
module gvj_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = ~(b ^ c);
  assign q = (a & b) | (b & c) | (a & c);
  assign r = a ^ b;

endmodule
