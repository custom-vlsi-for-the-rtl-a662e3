// CRT controller: raster timing for the 1344 x 1024 display.
//
// A horizontal counter runs over H_ACTIVE + H_FP + H_SYNC + H_BP pixel
// clocks and a vertical counter over V_ACTIVE + V_FP + V_SYNC + V_BP lines;
// both advance only when pix_ce is high (one pixel per enabled clock).
// Outputs are the counters, the active-video flag and positive HSync /
// VSync pulses, all valid in the same cycle as the counters. frame_end
// pulses on the last pixel clock of a frame.
//
// The active size is the chip's; the blanking intervals are this design's
// choice: with the defaults the totals are 1688 x 1066, which gives 75 Hz
// from a 135 MHz pixel clock.
module crt_controller
  import cdac_pkg::*;
#(
  parameter int unsigned HACT = H_ACTIVE,
  parameter int unsigned HFP  = H_FP,
  parameter int unsigned HSW  = H_SYNC,
  parameter int unsigned HBP  = H_BP,
  parameter int unsigned VACT = V_ACTIVE,
  parameter int unsigned VFP  = V_FP,
  parameter int unsigned VSW  = V_SYNC,
  parameter int unsigned VBP  = V_BP
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_ce,
  output logic [10:0] hcount,
  output logic [10:0] vcount,
  output logic        active,
  output logic        hsync,
  output logic        vsync,
  output logic        frame_end
);

  localparam int unsigned HTOT = HACT + HFP + HSW + HBP;
  localparam int unsigned VTOT = VACT + VFP + VSW + VBP;

  logic h_last, v_last;
  assign h_last = int'(hcount) == HTOT - 1;
  assign v_last = int'(vcount) == VTOT - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_ce) begin
      if (h_last) begin
        hcount <= '0;
        vcount <= v_last ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  always_comb begin
    active    = (int'(hcount) < HACT) && (int'(vcount) < VACT);
    hsync     = (int'(hcount) >= HACT + HFP) && (int'(hcount) < HACT + HFP + HSW);
    vsync     = (int'(vcount) >= VACT + VFP) && (int'(vcount) < VACT + VFP + VSW);
    frame_end = pix_ce && h_last && v_last;
  end

endmodule
