// Workload testbench: sustained compositing of a whole band at full rate.
//
// After reset and LUT loading (identity tables) the testbench waits for the
// first band swap and then composites three complete layers over every
// word of the band now being built: 3 x 10752 = 32256 four-pixel groups,
// one per clock without a gap (4 pixels per clock, the chip's compositing
// rate), layer by layer so that no address repeats inside the compositor
// pipeline. Layer 0 (front) and layer 1 are translucent with random
// coverage, layer 2 is opaque. It checks that the port accepted a group on
// every clock, that the whole job finished inside one band period
// (32 lines x 1688 clocks), and then that every one of the 43008 pixels of
// that band, when it is displayed, matches the compositing equations
// evaluated here, with no empty words left.
module tb_band_fill_workload;
  import cdac_pkg::*;

  localparam int HT = 1688, VT = 1066, FRAME = HT * VT;
  localparam int GROUPS = 3 * int'(BUF_WORDS);

  logic clk = 0, rst_n = 0, pix_ce = 1;
  logic sp_valid = 0, sp_cursor_mode = 0, sp_ready, band_swap, comp_sel;
  addr_t sp_addr = '0;
  rgb_word_t sp_rgb = '0;
  word_t sp_alpha = '0;
  logic mb_frame = 0, mb_wr = 0, mb_irdy = 0, mb_ad_oe, mb_trdy, mb_devsel;
  logic [15:0] mb_ad_in = 0, mb_ad_out;
  logic [7:0] dac_code_r, dac_code_g, dac_code_b;
  logic dac_blank, hsync, vsync, stereo_eye;
  real vid_r, vid_g, vid_b;

  cdac_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (4 * 32 * HT + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed { logic [7:0] r, g, b; } px_t;
  px_t        img  [BAND_LINES][LINE_PIXELS];
  logic [7:0] beta [BAND_LINES][LINE_PIXELS];

  function automatic int rmul(int x, int y);
    return (2 * x * y + 255) / 510;
  endfunction
  function automatic logic [7:0] sat(int s);
    return s > 255 ? 8'hFF : 8'(s);
  endfunction

  int cyc = -1;   // raster position = cyc + 1
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic bus_write(logic [15:0] a, logic [15:0] d [$]);
    mb_frame = 1; mb_wr = 1; mb_ad_in = a; mb_irdy = 0;
    @(negedge clk);
    for (int k = 0; k < d.size(); k++) begin
      mb_frame = (k != d.size() - 1); mb_irdy = 1; mb_ad_in = d[k];
      #1;
      while (!mb_trdy) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    mb_frame = 0; mb_irdy = 0;
  endtask

  initial begin
    logic [15:0] d [$];
    int start_cyc, end_cyc, swap_cyc, accepted, band_first_line, shown, empty;
    repeat (3) @(negedge clk);
    rst_n = 1;
    d = {};
    for (int k = 0; k < 256; k++) d.push_back(16'(k));
    for (int c = 1; c <= 3; c++) bus_write(16'h0100 * c, d);
    bus_write(16'h0000, '{16'h0001});
    wait (sp_ready);
    // wait for the first band swap: a new, empty build buffer
    @(negedge clk);
    while (!band_swap) @(negedge clk);
    swap_cyc = cyc;
    @(negedge clk);
    start_cyc = cyc; accepted = 0;
    for (int l = 0; l < 3; l++)
      for (int k = 0; k < int'(BUF_WORDS); k++) begin
        int j, i; rgb_word_t c; word_t al;
        j = k / int'(WORDS_PER_LINE); i = k % int'(WORDS_PER_LINE);
        c = {$urandom(), $urandom(), $urandom()};
        al = (l == 2) ? 32'hFFFF_FFFF : $urandom();
        // premultiplied colour: channel <= coverage
        for (int p = 0; p < 4; p++) begin
          c.r[p] = 8'(rmul(c.r[p], al[p])); c.g[p] = 8'(rmul(c.g[p], al[p]));
          c.b[p] = 8'(rmul(c.b[p], al[p]));
        end
        sp_valid = 1; sp_addr = {5'(j), 9'(i)}; sp_rgb = c; sp_alpha = al;
        for (int p = 0; p < 4; p++) begin
          int x, bb; px_t b;
          x = i * 4 + p;
          b  = (l == 0) ? '0 : img[j][x];
          bb = (l == 0) ? 255 : int'(beta[j][x]);
          img[j][x].r = sat(int'(b.r) + rmul(bb, int'(c.r[p])));
          img[j][x].g = sat(int'(b.g) + rmul(bb, int'(c.g[p])));
          img[j][x].b = sat(int'(b.b) + rmul(bb, int'(c.b[p])));
          beta[j][x]  = 8'(rmul(bb, 255 - int'(al[p])));
        end
        if (sp_ready && !band_swap) accepted++;
        @(negedge clk);
      end
    sp_valid = 0;
    end_cyc = cyc;
    chk(accepted == GROUPS, $sformatf("groups accepted %0d of %0d", accepted, GROUPS));
    chk(end_cyc - start_cyc == GROUPS, $sformatf("%0d groups took %0d clocks", GROUPS, end_cyc - start_cyc));
    chk(end_cyc - swap_cyc + 4 < 32 * HT, $sformatf("finished %0d clocks after the swap, band period %0d", end_cyc - swap_cyc, 32 * HT));
    $display("composited %0d pixels in %0d clocks (%0d pixels per clock), band period %0d clocks",
             4 * GROUPS, end_cyc - start_cyc, 4 * GROUPS / (end_cyc - start_cyc), 32 * HT);
    // the band goes on screen after the next swap
    while (!band_swap) @(negedge clk);
    band_first_line = ((cyc + 1) % FRAME) / HT + 1;
    shown = 0; empty = 0;
    while (shown < 32 * 1344) begin
      int p, h, v;
      @(negedge clk);
      p = (cyc - 3) % FRAME; h = p % HT; v = p / HT;
      if (h < 1344 && v >= band_first_line && v < band_first_line + 32) begin
        px_t e;
        e = img[v - band_first_line][h];
        if ({dac_code_r, dac_code_g, dac_code_b} == 24'h0) empty++;
        chk(!dac_blank && {dac_code_r, dac_code_g, dac_code_b} == e,
            $sformatf("pixel h=%0d v=%0d got %h%h%h exp %h", h, v, dac_code_r, dac_code_g, dac_code_b, e));
        shown++;
      end
    end
    $display("pixels of the band checked: %0d (black: %0d)", shown, empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
