// Behavioural model of one 8-bit video DAC channel (the chip integrates
// three 135 MHz current-output DACs; this is not synthesizable logic but a
// model of the analog output for simulation).
//
// On each rising clock edge the code is latched and the output level
// changes to code / 255 * FULL_SCALE volts, or to 0 V (blanking level) when
// blank is high. FULL_SCALE defaults to 0.7 V into a doubly terminated
// 75-ohm load, a common video level; the chip's level is not given.
module video_dac #(
  parameter real FULL_SCALE = 0.7
) (
  input  logic       clk,
  input  logic [7:0] code,
  input  logic       blank,
  output real        vout
);

  real level;

  always_ff @(posedge clk) begin
    level <= blank ? 0.0 : FULL_SCALE * real'(code) / 255.0;
  end

  assign vout = level;

endmodule
