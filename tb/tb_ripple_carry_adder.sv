// tb_ripple_carry_adder: checks the 8-bit ripple-carry adder, the section of
// the carry-select adder, for every pair of operands and both carry-in values.
module tb_ripple_carry_adder;
  localparam int W = 8;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks   = 0;
  int failures = 0;

  ripple_carry_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(s), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a   = W'(x);
          b   = W'(y);
          cin = 1'(c);
          #1;
          checks++;
          if ({cout, s} != 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d", x, y, c, {cout, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
