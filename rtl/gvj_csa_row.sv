// gvj_csa_row: one carry-save (3:2) row of GVJ full adders.
//
// Reduces three WIDTH-bit rows x, y and z to two rows with the same sum
// modulo 2^WIDTH: a GVJ full adder per bit column gives a sum bit and a carry
// bit; the carries are shifted one column left to form the second row and the
// carry out of the top column is dropped (the caller's rows are wide enough
// for their total, so it is always 0). The garbage outputs of the gates are
// left unused. This is the reduction step of the Wallace tree. Purely
// combinational, one full adder deep.
module gvj_csa_row #(
  parameter int unsigned WIDTH = 48
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] sum_row,
  output logic [WIDTH-1:0] carry_row
);

  logic [WIDTH-1:0] col_carry;

  for (genvar i = 0; i < WIDTH; i++) begin : g_col
    logic unused_p, unused_f;
    gvj_full_adder u_fa (
      .a         (x[i]),
      .b         (y[i]),
      .cin       (z[i]),
      .sum       (sum_row[i]),
      .cout      (col_carry[i]),
      .garbage_p (unused_p),
      .garbage_f (unused_f)
    );
  end

  assign carry_row = {col_carry[WIDTH-2:0], 1'b0};

endmodule
