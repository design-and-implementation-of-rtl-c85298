// tb_pipe_reg: checks the registered and the pass-through pipeline stage.
//
// With EN = 1 the output must equal the input of the previous clock cycle and
// reset must clear valid and data; with EN = 0 the output must follow the input
// at once.
module tb_pipe_reg;
  localparam int W = 16;
  logic         clk = 0;
  logic         rst_n;
  logic         iv;
  logic [W-1:0] id;
  logic         ov1, ov0;
  logic [W-1:0] od1, od0;
  logic         prev_v;
  logic [W-1:0] prev_d;
  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  pipe_reg #(.W(W), .EN(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .in_valid(iv), .in_data(id),
                                     .out_valid(ov1), .out_data(od1));
  pipe_reg #(.W(W), .EN(1'b0)) dut0 (.clk(clk), .rst_n(rst_n), .in_valid(iv), .in_data(id),
                                     .out_valid(ov0), .out_data(od0));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    rst_n = 0;
    iv = 1;
    id = 16'hBEEF;
    @(posedge clk);
    @(posedge clk);
    #1;
    checks++;
    if (ov1 !== 1'b0 || od1 !== '0) begin
      failures++;
      $display("FAIL reset did not clear the register");
    end
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      prev_v = iv;
      prev_d = id;
      @(posedge clk);
      #1;
      checks++;
      if (ov1 != prev_v || (prev_v && od1 != prev_d)) begin
        failures++;
        $display("FAIL registered stage: %b %h, expected %b %h", ov1, od1, prev_v, prev_d);
      end
      iv = 1'($urandom);
      id = W'($urandom);
      #1;
      checks++;
      if (ov0 != iv || od0 != id) begin
        failures++;
        $display("FAIL pass-through stage");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
