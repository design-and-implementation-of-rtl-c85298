// dadda_join: builds the sum and carry rows of an N x N product from four
// (N/2) x (N/2) products.
//
// Splitting a = {aH, aL} and b = {bH, bL} into halves gives
//   a * b = aL*bL + (aL*bH + aH*bL) * 2^(N/2) + aH*bH * 2^N.
// Each of the four sub-products arrives as its own sum and carry rows (index 0:
// aL*bL, 1: aL*bH, 2: aH*bL, 3: aH*bH). The eight rows are placed at their
// offsets, giving columns of up to six bits, and dadda_reduce compresses them to
// two rows again (three stages: heights 4, 3, 2). row_sum + row_carry equals
// the weighted sum of the inputs modulo 2^(2N), which is a * b when the inputs
// come from real sub-products.
//
// In the multiplier this is the 16 x 16 level (fed by 8 x 8 blocks) and the
// 32 x 32 level (fed by 16 x 16 levels). Purely combinational.
module dadda_join
  import dadda_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [3:0][N-1:0] sub_sum,    // sum rows of the four sub-products
  input  logic [3:0][N-1:0] sub_carry,  // carry rows of the four sub-products
  output logic [2*N-1:0]    row_sum,
  output logic [2*N-1:0]    row_carry
);
  localparam int M = N / 2;
  localparam int H = max_height(PROF_JOIN, N);

  // Offset of each sub-product inside the N x N product.
  localparam int OFF [4] = '{0, M, M, N};

  logic [H-1:0] cols [2*N];

  for (genvar c = 0; c < 2*N; c++) begin : g_col
    always_comb begin
      int r;
      r = 0;
      cols[c] = '0;
      for (int q = 0; q < 4; q++) begin
        if (c >= OFF[q] && c < OFF[q] + int'(N)) begin
          cols[c][r]   = sub_sum[q][c-OFF[q]];
          cols[c][r+1] = sub_carry[q][c-OFF[q]];
          r += 2;
        end
      end
    end
  end

  dadda_reduce #(
    .N      (N),
    .PROFILE(PROF_JOIN)
  ) u_reduce (
    .col_in   (cols),
    .row_sum  (row_sum),
    .row_carry(row_carry)
  );

endmodule
