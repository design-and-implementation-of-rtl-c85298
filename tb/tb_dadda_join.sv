// tb_dadda_join: checks the combination of four half-size products.
//
// N = 16. In the first part the four sub-products come from real 8 x 8
// multiplications (given as product and zero, or split at random into two rows
// whose sum is the product) and the result must be a * b. In the second part the
// eight input rows are arbitrary and the result must equal their weighted sum,
// at offsets 0, 8, 8 and 16, modulo 2^32.
module tb_dadda_join;
  localparam int N = 16;
  logic [3:0][N-1:0] ss, sc;
  logic [2*N-1:0]    rs, rc;
  int checks   = 0;
  int failures = 0;

  dadda_join #(.N(N)) dut (.sub_sum(ss), .sub_carry(sc), .row_sum(rs), .row_carry(rc));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]   al, ah, bl, bh;
    logic [15:0]  p [4];
    logic [15:0]  part;
    logic [63:0]  want;
    for (int t = 0; t < 2000; t++) begin
      {ah, al} = 16'($urandom);
      {bh, bl} = 16'($urandom);
      if (t == 0) {ah, al, bh, bl} = '1;
      p[0] = 16'(al) * 16'(bl);
      p[1] = 16'(al) * 16'(bh);
      p[2] = 16'(ah) * 16'(bl);
      p[3] = 16'(ah) * 16'(bh);
      for (int q = 0; q < 4; q++) begin
        part  = (t % 2 == 0) ? 16'h0 : 16'($urandom) & p[q];
        ss[q] = p[q] - part;
        sc[q] = part;
      end
      #1;
      checks++;
      if (32'(rs + rc) != 32'({ah, al}) * 32'({bh, bl})) begin
        failures++;
        $display("FAIL product %h * %h: rows %h + %h", {ah, al}, {bh, bl}, rs, rc);
      end
    end
    for (int t = 0; t < 2000; t++) begin
      for (int q = 0; q < 4; q++) begin
        ss[q] = 16'($urandom);
        sc[q] = 16'($urandom);
      end
      want = 64'(ss[0]) + 64'(sc[0])
           + ((64'(ss[1]) + 64'(sc[1]) + 64'(ss[2]) + 64'(sc[2])) << 8)
           + ((64'(ss[3]) + 64'(sc[3])) << 16);
      #1;
      checks++;
      if (32'(rs + rc) != want[31:0]) begin
        failures++;
        $display("FAIL rows: got %h, expected %h", 32'(rs + rc), want[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
