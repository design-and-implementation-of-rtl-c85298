// pp_gen: partial-product generation, the first step of the multiplier.
//
// Multiplies every bit of the multiplicand a with every bit of the multiplier b
// (a two-input AND), giving the N x N matrix pp[i][j] = a[i] & b[j] whose bit
// has weight 2^(i+j). Unsigned operands. Purely combinational.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp   // pp[i][j] = a[i] & b[j]
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      assign pp[i][j] = a[i] & b[j];
    end
  end
endmodule
