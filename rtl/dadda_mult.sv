// dadda_mult: flat N x N unsigned Dadda multiplier, ending in two rows.
//
// Generates the N x N partial products (pp_gen), sorts them into the 2N
// columns of equal weight (column c holds a[c-j] & b[j] for every valid j, in
// increasing j), and compresses the columns to two rows with dadda_reduce. The
// outputs are those two rows, row_sum and row_carry, with
// row_sum + row_carry = a * b; the final addition is left to the level above, as
// the hierarchical multiplier passes sum and carry rows upwards.
//
// With N = 8 this is the leaf block of the 32 x 32 multiplier (4 stages, 35 full
// and 7 half adders). With N = 32 it is the flat 32 x 32 Dadda tree on its own
// (8 stages, 899 full and 31 half adders). Purely combinational.
module dadda_mult
  import dadda_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] row_sum,
  output logic [2*N-1:0] row_carry
);
  logic [N-1:0][N-1:0] pp;
  logic [N-1:0]        cols [2*N];

  pp_gen #(.N(N)) u_pp (
    .a (a),
    .b (b),
    .pp(pp)
  );

  for (genvar c = 0; c < 2*N; c++) begin : g_col
    localparam int JLO = (c > int'(N) - 1) ? c - int'(N) + 1 : 0;
    localparam int JHI = (c < int'(N) - 1) ? c : int'(N) - 1;
    always_comb begin
      cols[c] = '0;
      for (int j = JLO; j <= JHI; j++) cols[c][j-JLO] = pp[c-j][j];
    end
  end

  dadda_reduce #(
    .N      (N),
    .PROFILE(PROF_PP)
  ) u_reduce (
    .col_in   (cols),
    .row_sum  (row_sum),
    .row_carry(row_carry)
  );

endmodule
