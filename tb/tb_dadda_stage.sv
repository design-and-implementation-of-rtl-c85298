// tb_dadda_stage: checks single stages of the Dadda reduction.
//
// Drives random matrices into stage 0 of the 8 x 8 partial-product shape (6 rows
// allowed afterwards) and stage 1 of the join shape of a 16 x 16 product
// (3 rows allowed afterwards). For each it checks that the weighted sum of the
// bits is unchanged and that no column of the output is taller than the stage's
// target height.
module tb_dadda_stage;
  import dadda_pkg::*;

  localparam int NA = 8;
  localparam int HA_ = max_height(PROF_PP, NA);    // 8
  localparam int NB = 16;
  localparam int HB = max_height(PROF_JOIN, NB);   // 6
  // Column heights the join shape has after its first stage: the shape the
  // second stage expects at its input.
  localparam table_t HTJ = schedule(PROF_JOIN, NB, TAB_HEIGHT);

  logic [HA_-1:0] ina [2*NA];
  logic [HA_-1:0] outa [2*NA];
  logic [HB-1:0]  inb [2*NB];
  logic [HB-1:0]  outb [2*NB];
  int checks   = 0;
  int failures = 0;

  dadda_stage #(.N(NA), .PROFILE(PROF_PP),   .STAGE(0)) dut_a (.col_in(ina), .col_out(outa));
  dadda_stage #(.N(NB), .PROFILE(PROF_JOIN), .STAGE(1)) dut_b (.col_in(inb), .col_out(outb));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] win, wout;
    for (int t = 0; t < 400; t++) begin
      // ---- stage 0 of the 8 x 8 parallelogram ----
      win = '0;
      for (int c = 0; c < 2*NA; c++) begin
        int h;
        h = (c < 2*NA-1) ? ((c + 1 < 2*NA-1-c) ? c + 1 : 2*NA-1-c) : 0;
        ina[c] = '0;
        for (int r = 0; r < h; r++) begin
          ina[c][r] = 1'($urandom);
          win += 128'(ina[c][r]) << c;
        end
      end
      // ---- stage 1 of the join shape: input columns at most 4 high ----
      for (int c = 0; c < 2*NB; c++) begin
        inb[c] = '0;
        for (int r = 0; r < int'(HTJ[1][c]); r++)
          inb[c][r] = 1'($urandom);
      end
      #1;
      wout = '0;
      for (int c = 0; c < 2*NA; c++)
        for (int r = 0; r < HA_; r++) begin
          wout += 128'(outa[c][r]) << c;
          if (r >= 6 && outa[c][r]) begin
            failures++;
            $display("FAIL 8x8 stage 0: column %0d holds bit %0d", c, r);
          end
        end
      checks++;
      if (win[15:0] != wout[15:0]) begin
        failures++;
        $display("FAIL 8x8 stage 0: weighted sum %h -> %h", win, wout);
      end
      win = '0;
      wout = '0;
      for (int c = 0; c < 2*NB; c++)
        for (int r = 0; r < HB; r++) begin
          win  += 128'(inb[c][r]) << c;
          wout += 128'(outb[c][r]) << c;
          if (r >= 3 && outb[c][r]) begin
            failures++;
            $display("FAIL join stage 1: column %0d holds bit %0d", c, r);
          end
        end
      checks++;
      if (win[31:0] != wout[31:0]) begin
        failures++;
        $display("FAIL join stage 1: weighted sum %h -> %h", win, wout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
