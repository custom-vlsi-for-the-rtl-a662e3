// Special multiplier of the compositing pipeline.
//
// Multiplies two 8-bit fractions in which 0x00 is 0.0 and 0xFF is 1.0, so
// that 0xFF * x == x exactly: y = round(a * b / 255). The division by 255 is
// done without a divider as (p + 128 + ((p + 128) >> 8)) >> 8 with p = a * b,
// which is exact rounding for all 8-bit inputs.
//
// Timing: the result appears STAGES clock cycles after the operands
// (STAGES >= 1). The product is registered in the first stage, the scaling
// is done in front of the second register, and any further stages only
// delay the result. The block's name and its place in the pipeline are the
// chip's; the arithmetic that makes it "special" and the stage count are
// this design's own choice.
module special_multiplier #(
  parameter int unsigned STAGES = 2
) (
  input  logic       clk,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] y
);

  logic [15:0] prod_q;
  logic [16:0] t;
  logic [7:0]  scaled;

  always_ff @(posedge clk) prod_q <= a * b;

  always_comb begin
    t      = {1'b0, prod_q} + 17'd128;
    scaled = 8'((t + (t >> 8)) >> 8);
  end

  if (STAGES <= 1) begin : g_one
    assign y = scaled;
  end else begin : g_more
    logic [7:0] pipe_q [STAGES-1];
    always_ff @(posedge clk) begin
      pipe_q[0] <= scaled;
      for (int s = 1; s < int'(STAGES) - 1; s++) pipe_q[s] <= pipe_q[s-1];
    end
    assign y = pipe_q[STAGES-2];
  end

endmodule
