// dadda_reduce: Dadda column compression of a bit matrix down to two rows.
//
// The matrix arrives column by column: col_in[c] holds the bits of weight 2^c,
// packed from bit 0 upwards; only the first dadda_pkg::init_height(PROFILE, N, c)
// bits of a column belong to the matrix, the others are ignored. The stages
// computed by dadda_pkg::schedule() follow one another, one dadda_stage each,
// and each lowers every column to the next height of Dadda's sequence with full
// adders, (3,2) counters, and half adders, (2,2) counters. After the last stage no column
// holds more than two bits; they leave as row_sum and row_carry, and
// row_sum + row_carry equals the weighted sum of the input bits modulo 2^(2N).
//
// Carries out of the top column are dropped. In this design the matrix always
// holds a product, or the pieces of one, smaller than 2^(2N); every counter keeps
// the weighted sum exactly, so a dropped carry is always zero.
//
// Purely combinational. NUM_STAGES, NUM_FA and NUM_HA report the size of the
// tree that was built: for the 32 x 32 partial-product matrix they come to 8
// stages, 899 full adders (N^2-4N+3) and 31 half adders (N-1), as the source
// states. The reduction rule follows the source; the bit order inside a column
// is this design's own.
module dadda_reduce
  import dadda_pkg::*;
#(
  parameter int unsigned N       = 8,        // the matrix is 2N columns wide
  parameter profile_e    PROFILE = PROF_PP   // shape of the input matrix
) (
  input  logic [max_height(PROFILE, N)-1:0] col_in [2*N],
  output logic [2*N-1:0]                    row_sum,
  output logic [2*N-1:0]                    row_carry
);
  localparam int W = 2 * N;
  localparam int H = max_height(PROFILE, N);

  localparam int NUM_STAGES = num_stages(H);
  localparam int NUM_FA     = count_total(PROFILE, N, TAB_FA);
  localparam int NUM_HA     = count_total(PROFILE, N, TAB_HA);

  localparam table_t HT = schedule(PROFILE, N, TAB_HEIGHT);

  logic [H-1:0] masked [W];

  for (genvar c = 0; c < W; c++) begin : g_in
    localparam int HIN = int'(HT[0][c]);
    always_comb begin
      masked[c] = '0;
      for (int r = 0; r < HIN; r++) masked[c][r] = col_in[c][r];
    end
  end

  // Stage s reads the matrix left by stage s-1; each stage has its own signals.
  for (genvar s = 0; s < NUM_STAGES; s++) begin : g_stage
    logic [H-1:0] col_out [W];
    if (s == 0) begin : g_first
      dadda_stage #(.N(N), .PROFILE(PROFILE), .STAGE(s)) u_stage (
        .col_in (masked),
        .col_out(col_out)
      );
    end else begin : g_next
      dadda_stage #(.N(N), .PROFILE(PROFILE), .STAGE(s)) u_stage (
        .col_in (g_stage[s-1].col_out),
        .col_out(col_out)
      );
    end
  end

  for (genvar c = 0; c < W; c++) begin : g_out
    if (NUM_STAGES == 0) begin : g_none
      assign row_sum[c]   = masked[c][0];
      assign row_carry[c] = masked[c][1];
    end else begin : g_last
      assign row_sum[c]   = g_stage[NUM_STAGES-1].col_out[c][0];
      assign row_carry[c] = g_stage[NUM_STAGES-1].col_out[c][1];
    end
  end

endmodule
