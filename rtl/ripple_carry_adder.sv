// ripple_carry_adder: W-bit adder made of a chain of full adders.
//
// Bit i adds a[i], b[i] and the carry of bit i-1; the carry ripples from bit 0
// to cout. Purely combinational. It is the building block of each section of
// carry_select_adder.
module ripple_carry_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end
  assign cout = c[W];
endmodule
