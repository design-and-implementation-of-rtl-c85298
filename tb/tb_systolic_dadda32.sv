// tb_systolic_dadda32: end-to-end test of the pipelined 32 x 32 multiplier at
// its default parameters.
//
// Streams operand pairs through the multiplier and compares every product with
// a 64-bit reference multiplication. It checks that each result leaves exactly
// four cycles after its operands entered and that results keep their order.
// The stream mixes corner operands (zero, all ones, single bits) with random
// ones and goes through these situations, each counted and required at least
// once:
//   back_to_back  a new pair on every cycle, the pipeline full (four in flight)
//   bubble        an idle cycle between pairs
//   flush         a reset while pairs are in flight, which must discard them
//   csa_select    a section of the final carry-select adder taking its
//                 carry-in-one result (the multiplexer choosing the upper path)
module tb_systolic_dadda32;
  localparam int N       = 32;
  localparam int LATENCY = 4;

  logic           clk = 0;
  logic           rst_n;
  logic           in_valid;
  logic [N-1:0]   a, b;
  logic           out_valid;
  logic [2*N-1:0] product;

  systolic_dadda32 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .product(product)
  );

  typedef struct {
    logic [2*N-1:0] want;
    int             cycle;
  } expect_t;

  expect_t exp_q[$];
  int checks   = 0;
  int failures = 0;
  int cycle    = 0;
  int in_flight_max = 0;
  int n_back_to_back = 0;
  int n_bubble = 0;
  int n_flush  = 0;
  int n_csa_select = 0;
  int results  = 0;
  logic prev_in_valid = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: sample on the rising edge what the multiplier shows.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      results++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL cycle %0d: unexpected result %h", cycle, product);
      end else begin
        if (product != exp_q[0].want) begin
          failures++;
          $display("FAIL cycle %0d: product %h, expected %h", cycle, product, exp_q[0].want);
        end
        checks++;
        if (cycle - exp_q[0].cycle != LATENCY) begin
          failures++;
          $display("FAIL result after %0d cycles, expected %0d", cycle - exp_q[0].cycle, LATENCY);
        end
        void'(exp_q.pop_front());
      end
    end
    if (rst_n && dut.v3 && dut.csa_sel[7:1] != '0) n_csa_select++;
    if (rst_n && in_valid) begin
      exp_q.push_back('{want: 64'(a) * 64'(b), cycle: cycle});
      if (prev_in_valid) n_back_to_back++;
    end
    if (rst_n && !in_valid && prev_in_valid) n_bubble++;
    prev_in_valid <= rst_n && in_valid;
    if (exp_q.size() > in_flight_max) in_flight_max = exp_q.size();
  end

  task automatic drive(logic v, logic [N-1:0] x, logic [N-1:0] y);
    in_valid <= v;
    a        <= x;
    b        <= y;
    @(posedge clk);
  endtask

  function automatic logic [N-1:0] operand(int t);
    case (t % 8)
      0: return '0;
      1: return '1;
      2: return N'(1) << ($urandom % N);
      3: return ~(N'(1) << ($urandom % N));
      default: return $urandom;
    endcase
  endfunction

  initial begin
    rst_n    = 0;
    in_valid = 0;
    a = '0;
    b = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Corner operands, back to back.
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) drive(1, operand(i), operand(j));
    // Random stream with bubbles.
    for (int t = 0; t < 3000; t++) drive(($urandom % 4) != 0, $urandom, $urandom);
    // Reset while pairs are in flight: they must disappear.
    drive(1, $urandom, $urandom);
    drive(1, $urandom, $urandom);
    rst_n    <= 0;
    in_valid <= 0;
    @(posedge clk);
    exp_q.delete();
    n_flush++;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin
      failures++;
      $display("FAIL out_valid still set after reset");
    end
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 200; t++) drive(1, $urandom, $urandom);
    drive(0, '0, '0);
    repeat (LATENCY + 2) @(posedge clk);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", exp_q.size());
    end
    checks++;
    if (in_flight_max < LATENCY || n_back_to_back == 0) begin
      failures++;
      $display("FAIL pipeline never full (max in flight %0d)", in_flight_max);
    end
    checks++;
    if (n_bubble == 0) begin failures++; $display("FAIL no bubble"); end
    checks++;
    if (n_flush == 0) begin failures++; $display("FAIL no flush"); end
    checks++;
    if (n_csa_select == 0) begin failures++; $display("FAIL carry-select never chose carry-in one"); end
    $display("results=%0d back_to_back=%0d bubble=%0d flush=%0d csa_select=%0d max_in_flight=%0d",
             results, n_back_to_back, n_bubble, n_flush, n_csa_select, in_flight_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
