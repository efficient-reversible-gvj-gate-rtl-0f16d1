// wallace_mult: unsigned A_W x B_W Wallace tree multiplier of GVJ adders.
//
// The B_W partial products (a AND b[i], shifted left i places) are reduced
// level by level: at each level the rows are taken in groups of three and
// each group goes through a gvj_csa_row (a row of GVJ full adders), which
// turns it into a sum row and a carry row; rows left over when the count is
// not a multiple of three pass to the next level unchanged. So n rows become
// 2*floor(n/3) + n mod 3, and 24 rows need 7 levels (24, 16, 11, 8, 6, 4, 3,
// 2). The last two rows are added by a GVJ carry propagate adder (gvj_cpa).
// The 24x24 default and the use of a Wallace tree of GVJ adders follow the
// source design; grouping whole rows at each level, rather than reducing bit
// column by bit column, is this design's choice. Purely combinational.
module wallace_mult #(
  parameter int unsigned A_W = 24,
  parameter int unsigned B_W = 24
) (
  input  logic [A_W-1:0]     a,
  input  logic [B_W-1:0]     b,
  output logic [A_W+B_W-1:0] product
);

  localparam int unsigned PW = A_W + B_W;

  // Rows left after one 3:2 level.
  function automatic int unsigned next_rows(int unsigned n);
    return (n / 3) * 2 + (n % 3);
  endfunction

  // Rows present at level lvl (level 0 holds the partial products).
  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned n = B_W;
    for (int unsigned i = 0; i < lvl; i++) n = next_rows(n);
    return n;
  endfunction

  // Levels needed to get down to two rows.
  function automatic int unsigned num_levels();
    int unsigned n = B_W;
    int unsigned l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned NLEV = num_levels();
  localparam int unsigned NMAX = (B_W > 2) ? B_W : 2;

  // Partial products.
  logic [PW-1:0] pp [NMAX];

  for (genvar i = 0; i < NMAX; i++) begin : g_pp
    if (i < B_W) begin : g_row
      assign pp[i] = PW'(a & {A_W{b[i]}}) << i;
    end else begin : g_zero
      assign pp[i] = '0;
    end
  end

  // Reduction levels; g_lvl[l].nxt holds the rows left after level l.
  for (genvar l = 0; l < NLEV; l++) begin : g_lvl
    localparam int unsigned NR = rows_at(l);
    localparam int unsigned NG = NR / 3;
    localparam int unsigned NN = next_rows(NR);

    logic [PW-1:0] cur [NMAX];
    logic [PW-1:0] nxt [NMAX];

    if (l == 0) begin : g_first
      assign cur = pp;
    end else begin : g_next
      assign cur = g_lvl[l-1].nxt;
    end

    for (genvar g = 0; g < NG; g++) begin : g_csa
      gvj_csa_row #(.WIDTH(PW)) u_csa (
        .x         (cur[3*g]),
        .y         (cur[3*g+1]),
        .z         (cur[3*g+2]),
        .sum_row   (nxt[2*g]),
        .carry_row (nxt[2*g+1])
      );
    end
    for (genvar r = 3 * NG; r < NR; r++) begin : g_pass
      assign nxt[2*NG + r - 3*NG] = cur[r];
    end
    for (genvar r = NN; r < NMAX; r++) begin : g_unused
      assign nxt[r] = '0;
    end
  end

  logic [PW-1:0] last_x, last_y;

  if (NLEV == 0) begin : g_norows
    assign last_x = pp[0];
    assign last_y = pp[1];
  end else begin : g_rows
    assign last_x = g_lvl[NLEV-1].nxt[0];
    assign last_y = g_lvl[NLEV-1].nxt[1];
  end

  // Final carry propagate addition of the two remaining rows.
  logic              unused_cout;
  logic [PW-1:0]     unused_gp;
  logic [PW-2:0]     unused_gf;

  gvj_cpa #(.WIDTH(PW)) u_cpa (
    .a         (last_x),
    .b         (last_y),
    .sum       (product),
    .cout      (unused_cout),
    .garbage_p (unused_gp),
    .garbage_f (unused_gf)
  );

endmodule
