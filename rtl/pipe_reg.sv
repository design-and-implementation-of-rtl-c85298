// pipe_reg: one pipeline register of the systolic multiplier, with a valid bit.
//
// When EN is 1, data and valid are captured on every rising clock edge and
// cleared by the active-low synchronous reset; the stage adds one cycle of
// latency. When EN is 0 the stage is a plain wire and the multiplier is fully
// combinational. There is no stall: a new operand pair may enter on every cycle.
module pipe_reg #(
  parameter int unsigned W  = 8,
  parameter bit          EN = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  if (EN) begin : g_reg
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        out_data  <= '0;
      end else begin
        out_valid <= in_valid;
        out_data  <= in_data;
      end
    end
  end else begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end
endmodule
