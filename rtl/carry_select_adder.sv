// carry_select_adder: the final adder that turns the two rows into the product.
//
// The W-bit operands are cut into sections of BLOCK bits. The lowest section is
// a ripple-carry adder fed by cin. Every other section holds two ripple-carry
// adders that work in parallel, one assuming a carry-in of 0 and one assuming 1;
// when the real carry from the section below is known, a multiplexer selects the
// matching sum and carry-out. sel[k] is the carry that selected section k's
// result (sel[0] is cin). Purely combinational.
//
// The source names a carry-select adder with multiplexers as the final adder but
// gives no section size; uniform 8-bit sections are this design's choice.
module carry_select_adder #(
  parameter int unsigned W     = 64,
  parameter int unsigned BLOCK = 8
) (
  input  logic [W-1:0]         a,
  input  logic [W-1:0]         b,
  input  logic                 cin,
  output logic [W-1:0]         sum,
  output logic                 cout,
  output logic [W/BLOCK-1:0]   sel    // carry into each section
);
  localparam int NB = W / BLOCK;

  logic [NB:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_sec
    localparam int LO = k * BLOCK;
    if (k == 0) begin : g_first
      ripple_carry_adder #(.W(BLOCK)) u_rca (
        .a   (a[LO +: BLOCK]),
        .b   (b[LO +: BLOCK]),
        .cin (c[0]),
        .sum (sum[LO +: BLOCK]),
        .cout(c[1])
      );
    end else begin : g_sel
      logic [BLOCK-1:0] s0, s1;
      logic             c0, c1;
      ripple_carry_adder #(.W(BLOCK)) u_rca0 (
        .a   (a[LO +: BLOCK]),
        .b   (b[LO +: BLOCK]),
        .cin (1'b0),
        .sum (s0),
        .cout(c0)
      );
      ripple_carry_adder #(.W(BLOCK)) u_rca1 (
        .a   (a[LO +: BLOCK]),
        .b   (b[LO +: BLOCK]),
        .cin (1'b1),
        .sum (s1),
        .cout(c1)
      );
      assign sum[LO +: BLOCK] = c[k] ? s1 : s0;
      assign c[k+1]           = c[k] ? c1 : c0;
    end
  end

  assign cout = c[NB];
  assign sel  = c[NB-1:0];

  initial begin
    assert (W % BLOCK == 0)
      else $error("carry_select_adder: W (%0d) must be a multiple of BLOCK (%0d)", W, BLOCK);
  end
endmodule
