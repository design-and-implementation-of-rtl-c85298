// systolic_dadda32: pipelined 32 x 32 unsigned Dadda multiplier built from 8 x 8
// Dadda blocks.
//
// The product is formed in four steps, one per pipeline stage:
//   1. a and b are cut into four L-bit digits (L = N/4, 8 for N = 32). Sixteen
//      flat L x L Dadda multipliers (dadda_mult) form every digit product
//      a[i]*b[j], each ending in a sum row and a carry row.
//   2. Four dadda_join blocks combine them into the four (N/2) x (N/2) half
//      products aP*bQ (P, Q = low or high half), again as sum and carry rows.
//   3. One dadda_join block combines those into the sum and carry rows of a*b.
//   4. A carry-select adder adds the two rows into the 2N-bit product.
// With PIPELINED = 1 a register (pipe_reg) closes every step, so an operand pair
// accepted with in_valid on a rising edge appears on product, with out_valid, on
// the fourth rising edge after it; a new pair may enter on every cycle and there
// is no back-pressure. With PIPELINED = 0 the multiplier is a single
// combinational path and product follows a and b directly.
//
// Reset is active low and synchronous; it clears every pipeline register.
//
// The hierarchy 8 x 8 -> 16 x 16 -> 32 x 32 -> adder with multiplexers follows the
// source's flow of operations. The pipeline registers between the steps, the
// valid bit and the reset are this design's reading of "systolic"; the source
// does not place registers.
module systolic_dadda32 #(
  parameter int unsigned N         = 32,   // operand width, a multiple of 4
  parameter bit          PIPELINED = 1'b1  // 1: a register after every step
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           out_valid,
  output logic [2*N-1:0] product
);
  localparam int unsigned L = N / 4;   // leaf block width
  localparam int unsigned M = N / 2;   // middle block width

  // ---------------- step 1: sixteen L x L Dadda blocks ----------------
  logic [15:0][2*L-1:0] leaf_sum, leaf_carry;

  for (genvar i = 0; i < 4; i++) begin : g_leaf_a
    for (genvar j = 0; j < 4; j++) begin : g_leaf_b
      dadda_mult #(.N(L)) u_leaf (
        .a        (a[i*L +: L]),
        .b        (b[j*L +: L]),
        .row_sum  (leaf_sum[i*4+j]),
        .row_carry(leaf_carry[i*4+j])
      );
    end
  end

  logic                 v1;
  logic [15:0][2*L-1:0] leaf_sum_q, leaf_carry_q;

  pipe_reg #(.W(2 * 16 * 2 * L), .EN(PIPELINED)) u_reg1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_data  ({leaf_sum, leaf_carry}),
    .out_valid(v1),
    .out_data ({leaf_sum_q, leaf_carry_q})
  );

  // ---------------- step 2: four (N/2) x (N/2) joins ----------------
  logic [3:0][2*M-1:0] mid_sum, mid_carry;

  for (genvar p = 0; p < 2; p++) begin : g_mid_a
    for (genvar q = 0; q < 2; q++) begin : g_mid_b
      // Sub-products in dadda_join order: aL*bL, aL*bH, aH*bL, aH*bH, where
      // aL/aH are digits 2p/2p+1 of a and bL/bH digits 2q/2q+1 of b.
      localparam int LL = (2*p)   * 4 + (2*q);
      localparam int LH = (2*p)   * 4 + (2*q+1);
      localparam int HL = (2*p+1) * 4 + (2*q);
      localparam int HH = (2*p+1) * 4 + (2*q+1);
      dadda_join #(.N(M)) u_mid (
        .sub_sum  ({leaf_sum_q[HH],   leaf_sum_q[HL],   leaf_sum_q[LH],   leaf_sum_q[LL]}),
        .sub_carry({leaf_carry_q[HH], leaf_carry_q[HL], leaf_carry_q[LH], leaf_carry_q[LL]}),
        .row_sum  (mid_sum[p*2+q]),
        .row_carry(mid_carry[p*2+q])
      );
    end
  end

  logic                v2;
  logic [3:0][2*M-1:0] mid_sum_q, mid_carry_q;

  pipe_reg #(.W(2 * 4 * 2 * M), .EN(PIPELINED)) u_reg2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v1),
    .in_data  ({mid_sum, mid_carry}),
    .out_valid(v2),
    .out_data ({mid_sum_q, mid_carry_q})
  );

  // ---------------- step 3: the N x N join ----------------
  logic [2*N-1:0] top_sum, top_carry;

  dadda_join #(.N(N)) u_top (
    .sub_sum  (mid_sum_q),     // index p*2+q is already aL*bL, aL*bH, aH*bL, aH*bH
    .sub_carry(mid_carry_q),
    .row_sum  (top_sum),
    .row_carry(top_carry)
  );

  logic           v3;
  logic [2*N-1:0] top_sum_q, top_carry_q;

  pipe_reg #(.W(2 * 2 * N), .EN(PIPELINED)) u_reg3 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v2),
    .in_data  ({top_sum, top_carry}),
    .out_valid(v3),
    .out_data ({top_sum_q, top_carry_q})
  );

  // ---------------- step 4: carry-select adder ----------------
  localparam int unsigned BLOCK = 8;

  // csa_sel, the carry into each adder section, drives nothing here; it is kept
  // as a named signal so that a testbench can watch the multiplexers.
  logic [2*N-1:0]           sum;
  logic                     csa_cout;
  logic [2*N/BLOCK-1:0]     csa_sel;

  carry_select_adder #(.W(2 * N), .BLOCK(BLOCK)) u_csa (
    .a   (top_sum_q),
    .b   (top_carry_q),
    .cin (1'b0),
    .sum (sum),
    .cout(csa_cout),
    .sel (csa_sel)
  );

  pipe_reg #(.W(2 * N), .EN(PIPELINED)) u_reg4 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v3),
    .in_data  (sum),
    .out_valid(out_valid),
    .out_data (product)
  );

  // The two rows always add up to a product below 2^(2N): no carry may leave
  // the adder.
  always_ff @(posedge clk) begin
    if (rst_n && v3) assert (csa_cout == 1'b0)
      else $error("systolic_dadda32: carry out of the final adder");
  end

endmodule
