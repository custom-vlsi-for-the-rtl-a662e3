// Display address generator.
//
// Turns the raster position of the CRT controller into a read address of
// the display buffer: a row (line in the 32-line band, J) and a line pixel
// count (LPC, the pixel in the 1344-pixel buffer line). The word address
// is {J, LPC/4}; LPC mod 4 selects the pixel in the word.
//
// Normal mode: LPC = raster pixel, J = raster line mod 32; the band ends
// every 32 lines.
// Line sequential stereo mode: the sprite engine draws the left eye's image
// in the left half of the buffer (LPC from 0) and the right eye's image in
// the right half (LPC from 672). Each buffer row is shown on two raster
// lines, left eye on the even line and right eye on the odd one; each of the
// 672 pixels of a half is shown on two pixel clocks to fill the line. The
// band thus ends every 64 raster lines and eye tells the glasses which
// image is on screen.
//
// Outputs, registered (one cycle after the raster position): rd (an active
// pixel is read), addr, pix (pixel in the word), clear (last read of this
// word in this band: the display buffer may empty it), eye, and band_swap
// (one-cycle pulse after the last active pixel of a band).
//
// The two halves and the 672 offset are the chip's; the line pairing, pixel
// doubling and the swap rule are this design's reading of the stereo mode.
module display_addr_gen
  import cdac_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_ce,
  input  logic        stereo,
  input  logic [10:0] hcount,
  input  logic [10:0] vcount,
  input  logic        active,
  output logic        rd,
  output addr_t       addr,
  output logic [1:0]  pix,
  output logic        clear,
  output logic        eye,
  output logic        band_swap
);

  logic [10:0]    lpc;      // line pixel count
  logic [J_W-1:0] row;
  logic           last_pix, last_line, last_of_word;

  always_comb begin
    if (stereo) begin
      lpc          = (vcount[0] ? 11'(STEREO_OFFSET) : 11'd0) + {1'b0, hcount[10:1]};
      row          = vcount[J_W:1];
      last_line    = &vcount[J_W:0];
      last_of_word = (lpc[1:0] == 2'd3) && hcount[0];
    end else begin
      lpc          = hcount;
      row          = vcount[J_W-1:0];
      last_line    = &vcount[J_W-1:0];
      last_of_word = lpc[1:0] == 2'd3;
    end
    last_pix = int'(hcount) == LINE_PIXELS - 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd        <= 1'b0;
      addr      <= '0;
      pix       <= '0;
      clear     <= 1'b0;
      eye       <= 1'b0;
      band_swap <= 1'b0;
    end else begin
      rd        <= pix_ce && active;
      addr      <= {row, 9'(lpc >> 2)};
      pix       <= lpc[1:0];
      clear     <= pix_ce && active && last_of_word;
      eye       <= stereo && vcount[0];
      band_swap <= pix_ce && active && last_pix && last_line;
    end
  end

endmodule
