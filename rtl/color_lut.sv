// Colour look-up table: 256 x 8 bits, one per channel (the chip has three,
// loaded by the media DSP over the media bus).
//
// The pixel port maps an 8-bit channel value to the 8-bit DAC code, one
// per clock, result registered (latency 1). The bus port writes an entry
// when we is high and reads one back (bus_rdata, latency 1). Reset does not
// clear the table; it must be loaded before use. Size and loading path are
// the chip's; the port timing is this design's choice.
module color_lut (
  input  logic       clk,
  // pixel path
  input  logic [7:0] pix_in,
  output logic [7:0] pix_out,
  // media bus path
  input  logic       we,
  input  logic [7:0] bus_addr,
  input  logic [7:0] bus_wdata,
  output logic [7:0] bus_rdata
);

  logic [7:0] table_q [256];

  always_ff @(posedge clk) begin
    if (we) table_q[bus_addr] <= bus_wdata;
    pix_out   <= table_q[pix_in];
    bus_rdata <= table_q[bus_addr];
  end

endmodule
