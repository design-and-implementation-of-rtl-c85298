// tb_systolic_dadda32_comb: the 32 x 32 multiplier built without pipeline
// registers (PIPELINED = 0).
//
// The product must follow the operands combinationally, with out_valid equal
// to in_valid. Corner and random operands are compared with a 64-bit reference
// multiplication.
module tb_systolic_dadda32_comb;
  localparam int N = 32;
  logic           clk = 0;
  logic           rst_n = 1;
  logic           in_valid;
  logic [N-1:0]   a, b;
  logic           out_valid;
  logic [2*N-1:0] product;
  int checks   = 0;
  int failures = 0;

  systolic_dadda32 #(.N(N), .PIPELINED(1'b0)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .product(product)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] x, logic [N-1:0] y);
    a = x;
    b = y;
    in_valid = 1'($urandom);
    #1;
    checks++;
    if (product != 64'(x) * 64'(y) || out_valid != in_valid) begin
      failures++;
      $display("FAIL %h * %h = %h (valid %b)", x, y, product, out_valid);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, 32'h1);
    check(32'h8000_0000, '1);
    for (int i = 0; i < N; i++) check(N'(1) << i, '1);
    for (int t = 0; t < 5000; t++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
