// Dual-ported scanline RAM array: one write port and one read port, each
// with its own address, as in the chip's buffer arrays.
//
// The array holds BAND_LINES lines of WORDS_PER_LINE words (10752 words by
// default). The 14-bit port address is {J, I}: J (bits 13:9) is the line and
// I (bits 8:0) the word in the line; the row decoder maps it to J*336 + I.
// Addresses with I beyond the line are ignored on write and read as 0.
//
// Timing: writes take effect at the clock edge where wr is high. Reads are
// synchronous: rd_data shows the word at rd_addr one cycle later. A read of
// the word being written in the same cycle returns the old contents.
// The chip's arrays are full-custom SRAM with self refresh; this is a
// behaviourally equivalent, synthesizable array.
module scan_ram
  import cdac_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             wr,
  input  addr_t            wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  addr_t            rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [BUF_WORDS];

  function automatic int unsigned row_index(addr_t a);
    return int'(addr_j(a)) * WORDS_PER_LINE + int'(addr_i(a));
  endfunction

  function automatic logic in_range(addr_t a);
    return int'(addr_i(a)) < WORDS_PER_LINE;
  endfunction

  always_ff @(posedge clk) begin
    if (wr && in_range(wr_addr)) mem[row_index(wr_addr)] <= wr_data;
    rd_data <= in_range(rd_addr) ? mem[row_index(rd_addr)] : '0;
  end

endmodule
