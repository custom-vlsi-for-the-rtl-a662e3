// Shared constants and types of the compositing DAC.
//
// The compositing buffer holds a band of 32 scanlines of 1344 pixels. One
// buffer word carries one 8-bit channel of four horizontally adjacent pixels
// (a 1x4 pixel group), so a scanline is 336 words and a band 10752 words.
// A buffer address is 14 bits: bits 8:0 (I) select the word within the line,
// bits 13:9 (J) select the line. These numbers are the chip's; the CRT
// blanking intervals below are this design's own choice (the visible size,
// 1344x1024 at 75 Hz from a 135 MHz pixel clock, is the chip's).
package cdac_pkg;

  localparam int unsigned PIX_PER_WORD   = 4;     // 1x4 pixel group per address
  localparam int unsigned LINE_PIXELS    = 1344;  // pixels per scanline
  localparam int unsigned BAND_LINES     = 32;    // scanlines per buffer band
  localparam int unsigned WORDS_PER_LINE = LINE_PIXELS / PIX_PER_WORD;   // 336
  localparam int unsigned BUF_WORDS      = WORDS_PER_LINE * BAND_LINES;  // 10752
  localparam int unsigned ADDR_W         = 14;    // {J[4:0], I[8:0]}
  localparam int unsigned I_W            = 9;
  localparam int unsigned J_W            = 5;
  localparam int unsigned STEREO_OFFSET  = 672;   // right eye starts here

  // CRT timing (active area is the chip's, blanking is assumed:
  // totals 1688 x 1066 give 75 Hz at 135 MHz).
  localparam int unsigned H_ACTIVE = 1344;
  localparam int unsigned H_FP     = 16;
  localparam int unsigned H_SYNC   = 144;
  localparam int unsigned H_BP     = 184;
  localparam int unsigned V_ACTIVE = 1024;
  localparam int unsigned V_FP     = 1;
  localparam int unsigned V_SYNC   = 3;
  localparam int unsigned V_BP     = 38;

  typedef logic [7:0]        chan_t;   // one 8-bit colour channel or alpha
  typedef logic [ADDR_W-1:0] addr_t;

  // One channel of a four-pixel group, pixel 0 in bits 7:0.
  typedef logic [PIX_PER_WORD-1:0][7:0] word_t;

  typedef struct packed {
    word_t r;
    word_t g;
    word_t b;
  } rgb_word_t;

  // Split of a buffer address into line (J) and word-in-line (I).
  function automatic logic [J_W-1:0] addr_j(addr_t a);
    return a[ADDR_W-1:I_W];
  endfunction

  function automatic logic [I_W-1:0] addr_i(addr_t a);
    return a[I_W-1:0];
  endfunction

endpackage
