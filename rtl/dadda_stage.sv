// dadda_stage: one stage of the Dadda column compression.
//
// Applies stage STAGE of dadda_pkg::schedule(PROFILE, N) to the matrix col_in
// (column c holds its bits from bit 0 upwards, only the scheduled height being
// used). Each column feeds its lowest bits into the full adders and then the
// half adders assigned to it. The column handed to the next stage holds, in this
// order, the sums of those full adders, the sums of the half adders, the bits
// that passed through, and the carries of the counters of the column below; this
// is col_out, the input of stage STAGE+1. Unused bits of col_out are zero. A
// STAGE beyond the last one passes the matrix through unchanged.
//
// A carry out of the top column is dropped; see dadda_reduce for why it is
// always zero here. Purely combinational. The bit ordering inside a column is
// this design's own choice.
module dadda_stage
  import dadda_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter profile_e    PROFILE = PROF_PP,
  parameter int unsigned STAGE   = 0
) (
  input  logic [max_height(PROFILE, N)-1:0] col_in [2*N],
  output logic [max_height(PROFILE, N)-1:0] col_out [2*N]
);
  localparam int W = 2 * N;
  localparam int H = max_height(PROFILE, N);
  localparam int S = num_stages(H);

  localparam table_t HT = schedule(PROFILE, N, TAB_HEIGHT);
  localparam table_t FA = schedule(PROFILE, N, TAB_FA);
  localparam table_t HA = schedule(PROFILE, N, TAB_HA);

  logic [H-1:0] sums [W];   // counter sums, full adders first
  logic [H-1:0] cy   [W];   // counter carries, full adders first

  for (genvar c = 0; c < W; c++) begin : g_col
    localparam int NF    = (STAGE < S) ? int'(FA[STAGE][c]) : 0;
    localparam int NH    = (STAGE < S) ? int'(HA[STAGE][c]) : 0;
    localparam int HIN   = int'(HT[STAGE][c]);
    localparam int NPASS = HIN - 3*NF - 2*NH;
    localparam int CB    = (c == 0) ? 0 : c - 1;
    localparam int CIN   = (c == 0 || STAGE >= S) ? 0 : int'(FA[STAGE][CB]) + int'(HA[STAGE][CB]);

    for (genvar k = 0; k < NF; k++) begin : g_fa
      full_adder u_fa (
        .a   (col_in[c][3*k]),
        .b   (col_in[c][3*k+1]),
        .cin (col_in[c][3*k+2]),
        .sum (sums[c][k]),
        .cout(cy[c][k])
      );
    end
    for (genvar k = 0; k < NH; k++) begin : g_ha
      half_adder u_ha (
        .a   (col_in[c][3*NF+2*k]),
        .b   (col_in[c][3*NF+2*k+1]),
        .sum (sums[c][NF+k]),
        .cout(cy[c][NF+k])
      );
    end
    for (genvar k = NF + NH; k < H; k++) begin : g_idle
      assign sums[c][k] = 1'b0;
      assign cy[c][k]   = 1'b0;
    end

    always_comb begin
      col_out[c] = '0;
      for (int k = 0; k < NF + NH; k++) col_out[c][k]             = sums[c][k];
      for (int k = 0; k < NPASS; k++)   col_out[c][NF+NH+k]       = col_in[c][3*NF+2*NH+k];
      for (int k = 0; k < CIN; k++)     col_out[c][NF+NH+NPASS+k] = cy[CB][k];
    end
  end

endmodule
