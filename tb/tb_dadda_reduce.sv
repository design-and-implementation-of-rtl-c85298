// tb_dadda_reduce: checks complete Dadda reductions of three matrix shapes.
//
// Shapes: the 8 x 8 and 32 x 32 partial-product parallelograms and the join
// shape of a 16 x 16 product. Each is filled with random bits (only inside the
// shape) and row_sum + row_carry must equal the weighted sum of the bits modulo
// 2^(2N). The size of each tree is checked against Dadda's figures: 4 and 8
// stages, N^2-4N+3 full adders and N-1 half adders for the parallelograms, and
// 3 stages (6 -> 4 -> 3 -> 2 rows) for the join shape.
module tb_dadda_reduce;
  import dadda_pkg::*;

  logic [7:0]  c8  [16];
  logic [15:0] s8, y8;
  logic [31:0] c32 [64];
  logic [63:0] s32, y32;
  logic [5:0]  cj  [32];
  logic [31:0] sj, yj;
  int checks   = 0;
  int failures = 0;

  dadda_reduce #(.N(8),  .PROFILE(PROF_PP))   dut8  (.col_in(c8),  .row_sum(s8),  .row_carry(y8));
  dadda_reduce #(.N(32), .PROFILE(PROF_PP))   dut32 (.col_in(c32), .row_sum(s32), .row_carry(y32));
  dadda_reduce #(.N(16), .PROFILE(PROF_JOIN)) dutj  (.col_in(cj),  .row_sum(sj),  .row_carry(yj));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_int(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s = %0d, expected %0d", what, got, want);
    end
  endtask

  function automatic int pp_h(int n, int c);
    return (c < 2*n-1) ? ((c + 1 < 2*n-1-c) ? c + 1 : 2*n-1-c) : 0;
  endfunction

  function automatic int join_h(int n, int c);
    return 2 * (int'(c < n) + 2 * int'(c >= n/2 && c < 3*n/2) + int'(c >= n));
  endfunction

  initial begin
    logic [127:0] w8, w32, wj;
    expect_int("8x8 stages",  dut8.NUM_STAGES, 4);
    expect_int("8x8 FA",      dut8.NUM_FA, 8*8 - 4*8 + 3);
    expect_int("8x8 HA",      dut8.NUM_HA, 8 - 1);
    expect_int("32x32 stages", dut32.NUM_STAGES, 8);
    expect_int("32x32 FA",    dut32.NUM_FA, 32*32 - 4*32 + 3);
    expect_int("32x32 HA",    dut32.NUM_HA, 32 - 1);
    expect_int("join stages", dutj.NUM_STAGES, 3);
    for (int t = 0; t < 300; t++) begin
      w8 = '0; w32 = '0; wj = '0;
      // Bits outside the shape are random as well: the block must ignore them.
      for (int c = 0; c < 16; c++) begin
        c8[c] = 8'($urandom);
        for (int r = 0; r < pp_h(8, c); r++) w8 += 128'(c8[c][r]) << c;
      end
      for (int c = 0; c < 64; c++) begin
        c32[c] = (t % 3 == 0) ? '1 : $urandom;
        for (int r = 0; r < pp_h(32, c); r++) w32 += 128'(c32[c][r]) << c;
      end
      for (int c = 0; c < 32; c++) begin
        cj[c] = 6'($urandom);
        for (int r = 0; r < join_h(16, c); r++) wj += 128'(cj[c][r]) << c;
      end
      #1;
      checks++;
      if (16'(s8 + y8) != w8[15:0]) begin
        failures++;
        $display("FAIL 8x8: %h + %h != %h", s8, y8, w8[15:0]);
      end
      checks++;
      if (64'(s32 + y32) != w32[63:0]) begin
        failures++;
        $display("FAIL 32x32: %h + %h != %h", s32, y32, w32[63:0]);
      end
      checks++;
      if (32'(sj + yj) != wj[31:0]) begin
        failures++;
        $display("FAIL join: %h + %h != %h", sj, yj, wj[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
