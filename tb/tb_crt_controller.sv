// Testbench of crt_controller at its default (full) timing with pix_ce high
// on two clocks of three: over one whole frame it measures line length,
// active pixels and lines, HSync and VSync pulse widths and positions, and
// the frame length, and compares them with 1688 x 1066 totals,
// 1344 x 1024 active, 144-pixel HSync starting 16 pixels after the active
// area and a 3-line VSync starting 1 line after it.
module tb_crt_controller;
  logic clk = 0, rst_n = 0, pix_ce = 0;
  logic [10:0] hcount, vcount;
  logic active, hsync, vsync, frame_end;
  int checks = 0, failures = 0;

  crt_controller dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1688 * 1066 * 3 / 2 * 2 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int pix, act, hs_len, hs_start, line_act, lines_act, vs_lines, vs_start, lines, max_h;
    int cyc;
    logic prev_hs;
    @(negedge clk) rst_n = 1;
    pix = 0; act = 0; hs_len = 0; hs_start = -1; lines = 0; lines_act = 0; vs_lines = 0;
    vs_start = -1; max_h = 0; cyc = 0;
    // one frame of enabled pixels
    while (pix < 1688 * 1066) begin
      pix_ce = (cyc % 3) != 2;
      cyc++;
      #1;
      if (pix_ce) begin
        if (hcount == 0) begin
          line_act = 0;
        end
        if (active) begin act++; line_act++; end
        if (vcount == 0) begin
          if (hsync) begin hs_len++; if (hs_start < 0) hs_start = int'(hcount); end
        end
        if (hcount == 0 && vsync) begin vs_lines++; if (vs_start < 0) vs_start = int'(vcount); end
        if (int'(hcount) > max_h) max_h = int'(hcount);
        if (hcount == 1687) begin
          lines++;
          if (line_act > 0) begin lines_act++; chk(line_act, 1344, "active pixels per line"); end
        end
        if (pix == 1688 * 1066 - 1) chk(int'(frame_end), 1, "frame_end on last pixel");
        else if (frame_end) chk(0, 1, "frame_end early");
        pix++;
      end else begin
        if (frame_end) chk(0, 1, "frame_end without pix_ce");
      end
      @(negedge clk);
    end
    chk(max_h + 1, 1688, "line length");
    chk(lines, 1066, "lines per frame");
    chk(lines_act, 1024, "active lines");
    chk(act, 1344 * 1024, "active pixels per frame");
    chk(hs_len, 144, "HSync width");
    chk(hs_start, 1344 + 16, "HSync start");
    chk(vs_lines, 3, "VSync lines");
    chk(vs_start, 1024 + 1, "VSync start");
    chk(int'(hcount), 0, "wrapped to pixel 0");
    chk(int'(vcount), 0, "wrapped to line 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
