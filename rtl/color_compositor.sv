// Colour compositor: one pixel, one channel (the chip repeats it 12 times,
// 4 pixels x 3 channels).
//
// Composites an incoming sprite pixel under the colour already in the
// buffer (front-to-back, premultiplied colour):
//   normal:              C = B + B_BETA * A
//   cursor pixel:        C = NOT(B)     (cursor_mode and A_ALPHA == 0x01)
// A is the sprite colour, A_ALPHA its coverage, B the stored colour and
// B_BETA the stored transparency (1 - alpha, 0xFF = fully transparent).
// The product uses the special multiplier (0xFF = 1.0). The sum saturates at
// 0xFF; the chip's text does not say what the adder does on overflow, so the
// saturation is this design's choice.
//
// Timing: fully pipelined, one pixel per clock, latency STAGES cycles from
// the inputs to C and cursor_en. The comparator/AND gate, the inverter and
// their N-stage pipeline registers follow the chip's diagram; cursor_en is
// brought out so the beta compositor of the same pixel can use it.
module color_compositor #(
  parameter int unsigned STAGES = 2
) (
  input  logic       clk,
  input  logic [7:0] a,            // incoming sprite colour
  input  logic [7:0] a_alpha,      // incoming coverage
  input  logic       cursor_mode,  // this access may draw a cursor
  input  logic [7:0] b,            // stored colour
  input  logic [7:0] b_beta,       // stored transparency
  output logic [7:0] c,            // colour to write back
  output logic       cursor_en     // pixel was a cursor pixel (delayed)
);

  logic [7:0] prod;
  logic [7:0] b_d;
  logic [8:0] sum;
  logic [7:0] sum_sat;
  logic [7:0] b_inv_d;
  logic       cursor_hit;

  assign cursor_hit = cursor_mode && (a_alpha == 8'h01);

  special_multiplier #(.STAGES(STAGES)) u_mul (
    .clk, .a(b_beta), .b(a), .y(prod)
  );

  // Stored colour travels alongside the multiplier to the adder.
  pipe_delay #(.WIDTH(8), .STAGES(STAGES)) u_bdly (.clk, .d(b), .q(b_d));
  pipe_delay #(.WIDTH(8), .STAGES(STAGES)) u_idly (.clk, .d(~b), .q(b_inv_d));
  pipe_delay #(.WIDTH(1), .STAGES(STAGES)) u_cdly (.clk, .d(cursor_hit), .q(cursor_en));

  always_comb begin
    sum     = {1'b0, b_d} + {1'b0, prod};
    sum_sat = sum[8] ? 8'hFF : sum[7:0];
    c       = cursor_en ? b_inv_d : sum_sat;
  end

endmodule
