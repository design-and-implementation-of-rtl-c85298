// full_adder: the (3,2) counter of the Dadda reduction.
//
// Takes three bits of one column and returns their count as a sum bit, which
// stays in the column, and a carry bit, which moves to the next more
// significant column. Purely combinational. Used both in the reduction tree and,
// chained, in the ripple-carry blocks of the final carry-select adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (cin & (a ^ b));
endmodule
