// One colour buffer of the ping-pong pair (the chip has two, M and N).
//
// Three 10752 x 32-bit dual-ported arrays hold the red, green and blue
// channels of a band of 32 scanlines, four 8-bit pixels per word, and a
// 10752 x 1-bit array holds a pixel-valid flag per four-pixel word. All four
// arrays share one write port (WR, WR_ADDR) and one read port (RD_ADDR), so
// a whole four-pixel RGB group with its valid flag is written or read at
// once. The arrangement follows the chip's colour buffer diagram.
//
// Timing: write at the clock edge with wr high; read data one cycle after
// rd_addr (see scan_ram).
module color_buffer
  import cdac_pkg::*;
(
  input  logic      clk,
  input  logic      wr,
  input  addr_t     wr_addr,
  input  rgb_word_t wr_rgb,   // WR_RED / WR_GREEN / WR_BLUE
  input  logic      wr_pv,    // WR_PV
  input  addr_t     rd_addr,
  output rgb_word_t rd_rgb,   // RD_RED / RD_GREEN / RD_BLUE
  output logic      rd_pv     // RD_PV
);

  scan_ram #(.WIDTH(32)) u_red (
    .clk, .wr, .wr_addr, .wr_data(wr_rgb.r), .rd_addr, .rd_data(rd_rgb.r)
  );
  scan_ram #(.WIDTH(32)) u_green (
    .clk, .wr, .wr_addr, .wr_data(wr_rgb.g), .rd_addr, .rd_data(rd_rgb.g)
  );
  scan_ram #(.WIDTH(32)) u_blue (
    .clk, .wr, .wr_addr, .wr_data(wr_rgb.b), .rd_addr, .rd_data(rd_rgb.b)
  );
  scan_ram #(.WIDTH(1)) u_pv (
    .clk, .wr, .wr_addr, .wr_data(wr_pv), .rd_addr, .rd_data(rd_pv)
  );

endmodule
