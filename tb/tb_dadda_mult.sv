// tb_dadda_mult: checks the flat Dadda multiplier at 8 x 8 and 32 x 32.
//
// The 8 x 8 block, the leaf of the hierarchical multiplier, is checked for all
// 65536 operand pairs; the flat 32 x 32 tree with corner values and random
// operands. In every case row_sum + row_carry must equal a * b.
module tb_dadda_mult;
  logic [7:0]  a8, b8;
  logic [15:0] s8, y8;
  logic [31:0] a32, b32;
  logic [63:0] s32, y32;
  int checks   = 0;
  int failures = 0;

  dadda_mult #(.N(8))  dut8  (.a(a8),  .b(b8),  .row_sum(s8),  .row_carry(y8));
  dadda_mult #(.N(32)) dut32 (.a(a32), .b(b32), .row_sum(s32), .row_carry(y32));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(logic [31:0] x, logic [31:0] y);
    a32 = x;
    b32 = y;
    #1;
    checks++;
    if (64'(s32 + y32) != 64'(x) * 64'(y)) begin
      failures++;
      $display("FAIL 32x32 %h * %h: rows %h + %h", x, y, s32, y32);
    end
  endtask

  initial begin
    a32 = '0;
    b32 = '0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x);
        b8 = 8'(y);
        #1;
        checks++;
        if (16'(s8 + y8) != 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d * %0d: rows %h + %h", x, y, s8, y8);
        end
      end
    check32('0, '0);
    check32('1, '1);
    check32('1, 32'h1);
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'hAAAA_AAAA, 32'h5555_5555);
    for (int t = 0; t < 3000; t++) check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
