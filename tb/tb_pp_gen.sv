// tb_pp_gen: checks every partial-product bit of an 8 x 8 generator.
//
// Random and corner operands; each pp[i][j] must equal bit i of a times bit j
// of b, and the weighted sum of all partial products must equal a * b.
module tb_pp_gen;
  localparam int N = 8;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  int checks   = 0;
  int failures = 0;

  pp_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned acc;
    acc = 0;
    #1;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (pp[i][j] != (a[i] & b[j])) begin
          failures++;
          $display("FAIL a=%h b=%h pp[%0d][%0d]=%b", a, b, i, j, pp[i][j]);
        end
        acc += longint'(pp[i][j]) << (i + j);
      end
    checks++;
    if (acc != longint'(a) * longint'(b)) begin
      failures++;
      $display("FAIL a=%h b=%h weighted sum %0d", a, b, acc);
    end
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = 8'h01; b = 8'h80; check();
    for (int t = 0; t < 300; t++) begin
      a = N'($urandom);
      b = N'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
