// tb_carry_select_adder: checks the 64-bit carry-select adder (8-bit sections).
//
// Random and carry-chain corner operands with both carry-in values. The sum and
// carry-out must equal a + b + cin, and sel[k], the carry that chose section k's
// result, must equal the carry out of the bits below section k. Counts how often
// a section took its carry-in-one result, so the multiplexers are seen choosing
// both ways.
module tb_carry_select_adder;
  localparam int W = 64;
  localparam int B = 8;
  logic [W-1:0]   a, b, s;
  logic           cin, cout;
  logic [W/B-1:0] sel;
  int checks    = 0;
  int failures  = 0;
  int sel_one   = 0;
  int sel_zero  = 0;

  carry_select_adder #(.W(W), .BLOCK(B)) dut (
    .a(a), .b(b), .cin(cin), .sum(s), .cout(cout), .sel(sel)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W:0]   full;
    logic [W:0]   low;
    #1;
    full = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, s} != full) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h", a, b, cin, cout, s);
    end
    for (int k = 1; k < W / B; k++) begin
      low = (W+1)'(a & (((W+1)'(1) << (k*B)) - 1)) + (W+1)'(b & (((W+1)'(1) << (k*B)) - 1)) + (W+1)'(cin);
      checks++;
      if (sel[k] != low[k*B]) begin
        failures++;
        $display("FAIL sel[%0d] = %b for %h + %h", k, sel[k], a, b);
      end
      if (sel[k]) sel_one++;
      else        sel_zero++;
    end
  endtask

  initial begin
    a = '1; b = 64'h1; cin = 0; check();
    a = '1; b = '0;    cin = 1; check();
    a = '1; b = '1;    cin = 1; check();
    a = '0; b = '0;    cin = 0; check();
    for (int t = 0; t < 3000; t++) begin
      a   = {$urandom, $urandom};
      b   = {$urandom, $urandom};
      cin = 1'($urandom);
      if (t % 5 == 0) b = ~a;   // long carry chains
      check();
    end
    checks++;
    if (sel_one == 0 || sel_zero == 0) begin
      failures++;
      $display("FAIL the multiplexers did not choose both ways (%0d, %0d)", sel_one, sel_zero);
    end
    $display("carry-in-one chosen %0d times, carry-in-zero %0d times", sel_one, sel_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
