// Compositing DAC (C-DAC): the display end of a multimedia accelerator.
//
// A sprite engine renders the screen in bands of 32 scanlines and hands
// the C-DAC four pixels per clock, each with a coverage (alpha). The C-DAC
// composites them front to back into a band buffer (colour plus a
// transparency "beta" per pixel) while the previous band, in a second
// buffer, is scanned out through colour look-up tables and DACs to the
// monitor. The two colour buffers swap at each band boundary.
//
//   sprite engine --> compositing_engine <--> colour buffer M / N, beta buffer
//                                               |  (ping-pong, address_control)
//   crt_controller --> display_addr_gen --> display_mux --> 3 x color_lut
//                                                        --> 3 x video_dac
//   media bus <--> media_bus_if (control register, LUT loading)
//
// Interface: one clock clk for the whole core; the display advances on
// clocks with pix_ce high (the pixel clock generator is outside this RTL).
// The sprite port takes one 1x4 group (address {J, I}, 4 x RGB, 4 x alpha,
// cursor mode) per clock while sp_ready is high; see compositing_engine for
// the rule on revisiting an address. band_swap pulses when the display has
// finished a band; from then on comp_sel names the buffer for the next band.
// Video leaves as three analog levels plus HSync, VSync and the stereo eye
// flag, aligned with each other; the LUT output codes and blank are
// brought out as well.
//
// Timing: raster position to DAC input takes 4 clocks, DAC output one
// more; sync outputs are delayed to match. Compositing latency is
// 1 + STAGES clocks.
module cdac_top
  import cdac_pkg::*;
#(
  parameter int unsigned STAGES = 2   // compositor pipeline depth
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_ce,
  // sprite engine
  input  logic        sp_valid,
  input  addr_t       sp_addr,
  input  rgb_word_t   sp_rgb,
  input  word_t       sp_alpha,
  input  logic        sp_cursor_mode,
  output logic        sp_ready,
  output logic        band_swap,
  output logic        comp_sel,
  // media bus
  input  logic        mb_frame,
  input  logic        mb_wr,
  input  logic        mb_irdy,
  input  logic [15:0] mb_ad_in,
  output logic [15:0] mb_ad_out,
  output logic        mb_ad_oe,
  output logic        mb_trdy,
  output logic        mb_devsel,
  // video
  output logic [7:0]  dac_code_r,
  output logic [7:0]  dac_code_g,
  output logic [7:0]  dac_code_b,
  output logic        dac_blank,
  output real         vid_r,
  output real         vid_g,
  output real         vid_b,
  output logic        hsync,
  output logic        vsync,
  output logic        stereo_eye
);

  localparam int unsigned DISP_LAT = 4;   // raster position -> DAC input

  // ---- control -------------------------------------------------------------
  logic       display_en, stereo;
  logic [2:0] lut_we;
  logic [7:0] lut_addr, lut_wdata;
  logic [7:0] lut_rdata [3];

  // ---- raster and display addressing --------------------------------------
  logic [10:0] hcount, vcount;
  logic        active, hs_raw, vs_raw, frame_end;
  logic        disp_rd, disp_clear, eye_raw;
  addr_t       disp_addr;
  logic [1:0]  disp_pix;

  crt_controller u_crt (
    .clk, .rst_n, .pix_ce,
    .hcount, .vcount, .active, .hsync(hs_raw), .vsync(vs_raw), .frame_end
  );

  display_addr_gen u_dag (
    .clk, .rst_n, .pix_ce, .stereo, .hcount, .vcount, .active,
    .rd(disp_rd), .addr(disp_addr), .pix(disp_pix), .clear(disp_clear),
    .eye(eye_raw), .band_swap
  );

  // ---- address control ----------------------------------------------------
  logic  disp_sel, rd_sel, wr_sel, wb_valid;
  logic  m_wr, n_wr, beta_wr;
  addr_t m_wr_addr, m_rd_addr, n_wr_addr, n_rd_addr, beta_wr_addr, beta_rd_addr;

  address_control #(.STAGES(STAGES)) u_actl (
    .clk, .rst_n,
    .comp_valid(sp_valid), .comp_addr(sp_addr), .comp_ready(sp_ready),
    .disp_rd, .disp_addr, .disp_clear, .band_swap,
    .comp_sel, .disp_sel, .rd_sel, .wr_sel, .wb_valid,
    .m_wr, .m_wr_addr, .m_rd_addr,
    .n_wr, .n_wr_addr, .n_rd_addr,
    .beta_wr, .beta_wr_addr, .beta_rd_addr
  );

  // ---- buffers -------------------------------------------------------------
  rgb_word_t m_wdata, m_rdata, n_wdata, n_rdata;
  logic      m_wpv, m_rpv, n_wpv, n_rpv;
  word_t     beta_wdata, beta_rdata;

  color_buffer u_buf_m (
    .clk, .wr(m_wr), .wr_addr(m_wr_addr), .wr_rgb(m_wdata), .wr_pv(m_wpv),
    .rd_addr(m_rd_addr), .rd_rgb(m_rdata), .rd_pv(m_rpv)
  );
  color_buffer u_buf_n (
    .clk, .wr(n_wr), .wr_addr(n_wr_addr), .wr_rgb(n_wdata), .wr_pv(n_wpv),
    .rd_addr(n_rd_addr), .rd_rgb(n_rdata), .rd_pv(n_rpv)
  );
  beta_buffer u_beta (
    .clk, .wr(beta_wr), .wr_addr(beta_wr_addr), .wr_alpha(beta_wdata),
    .rd_addr(beta_rd_addr), .rd_alpha(beta_rdata)
  );

  // ---- compositing ----------------------------------------------------------
  logic [2:0] cursor_pixels;

  compositing_engine #(.STAGES(STAGES)) u_eng (
    .clk,
    .sp_rgb, .sp_alpha, .sp_cursor_mode,
    .rd_sel, .wr_sel, .wb_valid,
    .buf_m_in(m_rdata), .pv_m_in(m_rpv), .buf_m_out(m_wdata), .pv_m_out(m_wpv),
    .buf_n_in(n_rdata), .pv_n_in(n_rpv), .buf_n_out(n_wdata), .pv_n_out(n_wpv),
    .beta_in(beta_rdata), .beta_out(beta_wdata),
    .cursor_pixels
  );

  // ---- display path -------------------------------------------------------
  logic [7:0] pix_r, pix_g, pix_b;

  display_mux u_dmux (
    .clk, .rd(disp_rd), .pix(disp_pix), .disp_sel,
    .buf_m(m_rdata), .pv_m(m_rpv), .buf_n(n_rdata), .pv_n(n_rpv),
    .r_out(pix_r), .g_out(pix_g), .b_out(pix_b)
  );

  color_lut u_lut_r (
    .clk, .pix_in(pix_r), .pix_out(dac_code_r),
    .we(lut_we[0]), .bus_addr(lut_addr), .bus_wdata(lut_wdata), .bus_rdata(lut_rdata[0])
  );
  color_lut u_lut_g (
    .clk, .pix_in(pix_g), .pix_out(dac_code_g),
    .we(lut_we[1]), .bus_addr(lut_addr), .bus_wdata(lut_wdata), .bus_rdata(lut_rdata[1])
  );
  color_lut u_lut_b (
    .clk, .pix_in(pix_b), .pix_out(dac_code_b),
    .we(lut_we[2]), .bus_addr(lut_addr), .bus_wdata(lut_wdata), .bus_rdata(lut_rdata[2])
  );

  // Sync and blank follow the pixel through the display pipeline.
  // The eye flag leaves display_addr_gen registered, one clock later
  // than the raw syncs.
  logic [2:0] sync_at_dac;   // {eye, vsync, hsync} at the DAC input
  logic       active_at_dac;

  pipe_delay #(.WIDTH(3), .STAGES(DISP_LAT)) u_sdly (
    .clk, .d({vs_raw, hs_raw, active}), .q({sync_at_dac[1:0], active_at_dac})
  );
  pipe_delay #(.WIDTH(1), .STAGES(DISP_LAT - 1)) u_edly (
    .clk, .d(eye_raw), .q(sync_at_dac[2])
  );

  assign dac_blank = !(active_at_dac && display_en);

  video_dac u_dac_r (.clk, .code(dac_code_r), .blank(dac_blank), .vout(vid_r));
  video_dac u_dac_g (.clk, .code(dac_code_g), .blank(dac_blank), .vout(vid_g));
  video_dac u_dac_b (.clk, .code(dac_code_b), .blank(dac_blank), .vout(vid_b));

  always_ff @(posedge clk) {stereo_eye, vsync, hsync} <= sync_at_dac;

  // ---- media bus ----------------------------------------------------------
  media_bus_if u_mbus (
    .clk, .rst_n,
    .frame(mb_frame), .wr(mb_wr), .irdy(mb_irdy), .ad_in(mb_ad_in),
    .ad_out(mb_ad_out), .ad_oe(mb_ad_oe), .trdy(mb_trdy), .devsel(mb_devsel),
    .display_en, .stereo, .comp_sel, .init_busy(!sp_ready),
    .lut_we, .lut_addr, .lut_wdata, .lut_rdata
  );

endmodule
