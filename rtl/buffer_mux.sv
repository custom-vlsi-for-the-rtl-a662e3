// Buffer multiplexer of the compositing engine (colour channels and pixel
// valid together).
//
// The two colour buffers M and N swap roles every band: one is composited
// while the other is displayed. On the compositor's side this block
//   - returns the stored colour B and the pixel-valid flag of the buffer
//     being composited (selected by rd_sel, the buffer select that belonged
//     to the read now returning data). A word whose pixel-valid flag is
//     clear holds nothing yet, so its colour reads as 0;
//   - steers the new colour C and a set pixel-valid flag to the write data
//     of that buffer (selected by wr_sel, the buffer select that belonged to
//     the access now being written back, when wb_valid is high). All other
//     write data is zero with pixel-valid clear, which is what the display side and
//     the reset sweep write to empty a word.
// Select 0 is buffer M, 1 is buffer N. Purely combinational. Routing follows
// the chip's compositing engine diagram; the zeroing of invalid words is
// this design's choice (the diagram routes pixel valid only to the beta
// compositors).
module buffer_mux
  import cdac_pkg::*;
(
  input  logic      rd_sel,
  input  logic      wr_sel,
  input  logic      wb_valid,   // a compositor write-back happens now
  // compositor side
  input  rgb_word_t c,          // C(7:0) of the 12 colour compositors
  output rgb_word_t b,          // B(7:0) to the 12 colour compositors
  output logic      pixel_valid,
  // buffer M
  input  rgb_word_t buf_m_in,   // BufMI
  input  logic      pv_m_in,    // PVMI
  output rgb_word_t buf_m_out,  // BufMO
  output logic      pv_m_out,   // PVMO
  // buffer N
  input  rgb_word_t buf_n_in,   // BufNI
  input  logic      pv_n_in,    // PVNI
  output rgb_word_t buf_n_out,  // BufNO
  output logic      pv_n_out    // PVNO
);

  always_comb begin
    pixel_valid = rd_sel ? pv_n_in : pv_m_in;
    b           = pixel_valid ? (rd_sel ? buf_n_in : buf_m_in) : '0;

    buf_m_out = (wb_valid && !wr_sel) ? c : '0;
    pv_m_out  = wb_valid && !wr_sel;
    buf_n_out = (wb_valid && wr_sel) ? c : '0;
    pv_n_out  = wb_valid && wr_sel;
  end

endmodule
