// Compositing engine: four pixels x three channels per clock.
//
// Each clock the sprite engine may hand over a 1x4 pixel group: four 24-bit
// RGB pixels, four 8-bit coverages (alpha) and a cursor-mode flag, all for
// one buffer address. The address goes to the read ports of the colour and
// beta buffers (see address_control); one cycle later the stored colours,
// betas and pixel-valid flag arrive here, together with the sprite data
// delayed by one register. Twelve colour compositors (4 pixels x R, G, B)
// and four beta compositors then compute, STAGES cycles later, the new
// colours and betas, which address_control writes back to the same address.
// The structure (12 colour compositors, 4 beta compositors, buffer
// multiplexer, cursor enable from the colour compositor of each pixel to its
// beta compositor) follows the chip's compositing engine diagram. The
// red-channel compositor of each pixel supplies that pixel's cursor enable.
//
// Timing: at 1 group per clock the compositing rate is 4 pixels per clock.
// Data presented in cycle t is written back at the edge ending cycle
// t + 1 + STAGES. Read-after-write hazards are not resolved here: a group
// must not be composited into an address that was composited within the
// previous STAGES + 1 cycles (the sprite engine orders its output so).
module compositing_engine
  import cdac_pkg::*;
#(
  parameter int unsigned STAGES = 2
) (
  input  logic      clk,
  // sprite engine side, cycle t
  input  rgb_word_t sp_rgb,
  input  word_t     sp_alpha,
  input  logic      sp_cursor_mode,
  // buffer selects from address_control (cycle t+1 and t+1+STAGES)
  input  logic      rd_sel,
  input  logic      wr_sel,
  input  logic      wb_valid,
  // colour buffers M and N
  input  rgb_word_t buf_m_in,
  input  logic      pv_m_in,
  output rgb_word_t buf_m_out,
  output logic      pv_m_out,
  input  rgb_word_t buf_n_in,
  input  logic      pv_n_in,
  output rgb_word_t buf_n_out,
  output logic      pv_n_out,
  // beta buffer
  input  word_t     beta_in,
  output word_t     beta_out,
  // count of cursor pixels written back this cycle (observability)
  output logic [2:0] cursor_pixels
);

  rgb_word_t a_q;
  word_t     alpha_q;
  logic      cmode_q;

  always_ff @(posedge clk) begin
    a_q     <= sp_rgb;
    alpha_q <= sp_alpha;
    cmode_q <= sp_cursor_mode;
  end

  rgb_word_t b, c;
  logic      pixel_valid;
  word_t     b_beta;
  logic [PIX_PER_WORD-1:0] cur_r, cur_g, cur_b;

  buffer_mux u_bmux (
    .rd_sel, .wr_sel, .wb_valid,
    .c, .b, .pixel_valid,
    .buf_m_in, .pv_m_in, .buf_m_out, .pv_m_out,
    .buf_n_in, .pv_n_in, .buf_n_out, .pv_n_out
  );

  // The colour compositors see the beta the beta compositor would use:
  // a word without pixel-valid is fully transparent.
  always_comb begin
    for (int p = 0; p < int'(PIX_PER_WORD); p++)
      b_beta[p] = pixel_valid ? beta_in[p] : 8'hFF;
  end

  for (genvar p = 0; p < PIX_PER_WORD; p++) begin : g_pix
    color_compositor #(.STAGES(STAGES)) u_r (
      .clk, .a(a_q.r[p]), .a_alpha(alpha_q[p]), .cursor_mode(cmode_q),
      .b(b.r[p]), .b_beta(b_beta[p]), .c(c.r[p]), .cursor_en(cur_r[p])
    );
    color_compositor #(.STAGES(STAGES)) u_g (
      .clk, .a(a_q.g[p]), .a_alpha(alpha_q[p]), .cursor_mode(cmode_q),
      .b(b.g[p]), .b_beta(b_beta[p]), .c(c.g[p]), .cursor_en(cur_g[p])
    );
    color_compositor #(.STAGES(STAGES)) u_b (
      .clk, .a(a_q.b[p]), .a_alpha(alpha_q[p]), .cursor_mode(cmode_q),
      .b(b.b[p]), .b_beta(b_beta[p]), .c(c.b[p]), .cursor_en(cur_b[p])
    );
    beta_compositor #(.STAGES(STAGES)) u_beta (
      .clk, .cursor_en(cur_r[p]), .pixel_valid,
      .a_alpha(alpha_q[p]), .b_beta(beta_in[p]), .c_beta(beta_out[p])
    );
  end

  always_comb begin
    cursor_pixels = '0;
    for (int p = 0; p < int'(PIX_PER_WORD); p++)
      cursor_pixels = cursor_pixels + 3'(cur_r[p]);
  end

endmodule
