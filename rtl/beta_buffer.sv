// Beta buffer: one 10752 x 32-bit dual-ported array holding the
// transparency (beta = 1 - alpha) of four pixels per word, 8 bits each,
// pixel 0 in bits 7:0. It is single-buffered and used only by the
// compositor's read-modify-write: the read port fetches B_BETA, the write
// port stores C_BETA. Words whose colour-buffer pixel-valid flag is clear
// are treated as fully transparent by the beta compositor, so the array
// needs no clearing between bands. Ports follow the chip's beta buffer
// diagram; the address is {J, I} as in the colour buffers.
//
// Timing: write at the clock edge with wr high; synchronous read, data one
// cycle after rd_addr; a read of the word written in the same cycle returns
// the old contents.
module beta_buffer
  import cdac_pkg::*;
(
  input  logic  clk,
  input  logic  wr,
  input  addr_t wr_addr,
  input  word_t wr_alpha,   // WR_ALPHA(31:0): beta of four pixels
  input  addr_t rd_addr,
  output word_t rd_alpha    // RD_ALPHA(31:0)
);

  word_t mem [BUF_WORDS];

  logic wr_ok, rd_ok;
  int unsigned wr_idx, rd_idx;

  always_comb begin
    wr_ok  = int'(addr_i(wr_addr)) < WORDS_PER_LINE;
    rd_ok  = int'(addr_i(rd_addr)) < WORDS_PER_LINE;
    wr_idx = int'(addr_j(wr_addr)) * WORDS_PER_LINE + int'(addr_i(wr_addr));
    rd_idx = int'(addr_j(rd_addr)) * WORDS_PER_LINE + int'(addr_i(rd_addr));
  end

  always_ff @(posedge clk) begin
    if (wr && wr_ok) mem[wr_idx] <= wr_alpha;
    rd_alpha <= rd_ok ? mem[rd_idx] : '0;
  end

endmodule
