// Beta compositor: one pixel (the chip repeats it 4 times).
//
// Updates the stored transparency of a pixel:
//   normal:        C_BETA = B_BETA' * (1 - A_ALPHA)
//   cursor pixel:  C_BETA = B_BETA'              (stored alpha unaltered)
// where B_BETA' is the stored beta if the buffer word's pixel-valid bit is
// set and 0xFF (fully transparent, nothing drawn yet) if it is not. 1 - alpha
// is the bitwise inverse of the 8-bit alpha, as in the chip's diagram.
//
// Timing: latency STAGES cycles, like the colour compositor. cursor_en comes
// from the colour compositor of the same pixel and is therefore already
// delayed by STAGES cycles; the bypass path is delayed by the same amount so
// that both inputs of the output multiplexer belong to the same pixel (the
// diagram does not draw this register, it is needed for alignment).
module beta_compositor #(
  parameter int unsigned STAGES = 2
) (
  input  logic       clk,
  input  logic       cursor_en,    // from the colour compositor, delayed
  input  logic       pixel_valid,  // buffer word already holds pixels
  input  logic [7:0] a_alpha,
  input  logic [7:0] b_beta,
  output logic [7:0] c_beta
);

  logic [7:0] beta_in;
  logic [7:0] beta_d;
  logic [7:0] prod;

  assign beta_in = pixel_valid ? b_beta : 8'hFF;

  special_multiplier #(.STAGES(STAGES)) u_mul (
    .clk, .a(beta_in), .b(~a_alpha), .y(prod)
  );

  pipe_delay #(.WIDTH(8), .STAGES(STAGES)) u_bdly (.clk, .d(beta_in), .q(beta_d));

  assign c_beta = cursor_en ? beta_d : prod;

endmodule
