// Testbench of display_addr_gen: drives raster positions directly and
// checks, one cycle later, the word address {J, LPC/4}, the pixel in the
// word, the clear flag on the last read of each word, the eye flag and the
// band_swap pulse, in normal mode (J = line mod 32, swap after line 31) and
// in line sequential stereo mode (J = (line/2) mod 32, LPC from 0 on even
// lines and from 672 on odd lines with each pixel shown twice, swap after
// line 63). Also checks that nothing is read outside the active area or
// without pix_ce.
module tb_display_addr_gen;
  import cdac_pkg::*;
  logic clk = 0, rst_n = 0, pix_ce, stereo, active;
  logic [10:0] hcount, vcount;
  logic rd, clear, eye, band_swap;
  addr_t addr;
  logic [1:0] pix;
  int checks = 0, failures = 0, swaps = 0;

  display_addr_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int h, int v, bit st, bit ce, bit act);
    int lpc, j; bit clr, sw;
    hcount = 11'(h); vcount = 11'(v); stereo = st; pix_ce = ce; active = act;
    @(negedge clk);
    if (st) begin
      lpc = (v % 2 ? 672 : 0) + h / 2;
      j = (v / 2) % 32;
      clr = (lpc % 4 == 3) && (h % 2 == 1);
      sw = (h == 1343) && (v % 64 == 63);
    end else begin
      lpc = h; j = v % 32;
      clr = lpc % 4 == 3;
      sw = (h == 1343) && (v % 32 == 31);
    end
    checks++;
    if (rd !== (ce && act)) failures++;
    else if (ce && act) begin
      if (addr !== {5'(j), 9'(lpc / 4)} || pix !== 2'(lpc % 4) || clear !== clr ||
          band_swap !== sw || eye !== (st && v % 2 == 1)) begin
        failures++;
        if (failures < 8) $display("FAIL h=%0d v=%0d st=%0d: addr %h pix %0d clr %0d sw %0d", h, v, st, addr, pix, clear, band_swap);
      end
      if (band_swap) swaps++;
    end else if (clear || band_swap) failures++;
  endtask

  initial begin
    hcount = 0; vcount = 0; stereo = 0; pix_ce = 0; active = 0;
    @(negedge clk) rst_n = 1;
    for (int st = 0; st < 2; st++)
      for (int v = 28; v < 70; v++)
        for (int h = 0; h < 1344; h += (h < 8 || h > 1335 || v % 8 == 0) ? 1 : 37)
          step(h, v, st[0], 1'b1, 1'b1);
    step(5, 3, 0, 1'b0, 1'b1);
    step(5, 3, 0, 1'b1, 1'b0);
    checks++;
    if (swaps != 2 + 1) failures++;   // normal: lines 31 and 63; stereo: line 63
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
