// half_adder: the (2,2) counter of the Dadda reduction.
//
// Takes two bits of one column and returns a sum bit, which stays in the
// column, and a carry bit for the next more significant column. Dadda's rule
// places one wherever a column is exactly one bit taller than the stage allows.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b;
  assign cout = a & b;
endmodule
