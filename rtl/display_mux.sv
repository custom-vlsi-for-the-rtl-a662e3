// Display multiplexer: picks the display buffer's read data and serialises
// the four pixels of a word into one 24-bit pixel per pixel clock.
//
// Inputs arrive one cycle after the read address (the buffers' read
// latency): the RGB words and pixel-valid flags of both colour buffers,
// disp_sel (1 = buffer N is displayed), pix (pixel in the word) and rd
// (an active pixel was read), the last two delayed by one register here to
// line up with the data. Output pixel (registered) is the selected pixel,
// or black when the pixel is outside the active area or its word has never
// been composited in this band (pixel valid clear).
//
// Timing: pixel_out is valid two cycles after the read address was
// presented. Selection of the displayed buffer is the chip's MUX; the
// blanking of invalid words is this design's choice.
module display_mux
  import cdac_pkg::*;
(
  input  logic       clk,
  input  logic       rd,
  input  logic [1:0] pix,
  input  logic       disp_sel,
  input  rgb_word_t  buf_m,
  input  logic       pv_m,
  input  rgb_word_t  buf_n,
  input  logic       pv_n,
  output logic [7:0] r_out,
  output logic [7:0] g_out,
  output logic [7:0] b_out
);

  logic       rd_q;
  logic [1:0] pix_q;
  rgb_word_t  w;
  logic       pv;

  always_ff @(posedge clk) begin
    rd_q  <= rd;
    pix_q <= pix;
  end

  always_comb begin
    w  = disp_sel ? buf_n : buf_m;
    pv = disp_sel ? pv_n : pv_m;
  end

  always_ff @(posedge clk) begin
    if (rd_q && pv) begin
      r_out <= w.r[pix_q];
      g_out <= w.g[pix_q];
      b_out <= w.b[pix_q];
    end else begin
      r_out <= '0;
      g_out <= '0;
      b_out <= '0;
    end
  end

endmodule
