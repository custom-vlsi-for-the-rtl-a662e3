// End-to-end testbench of cdac_top at its default (full) size.
//
// It plays the sprite engine, the media DSP and the monitor:
//  - loads the three colour LUTs over the media bus (red and green the
//    identity, blue inverted) while the buffers are being cleared after
//    reset, checks the status register, and enables the display;
//  - in every band period composites a random stack of four-pixel groups
//    (random addresses from a small pool so that groups land on top of each
//    other, random colour, coverage, and cursor-mode groups with cursor
//    pixels) into the buffer being composited, one group per clock, keeping
//    its own model of the band's colours, betas and valid flags;
//  - checks every pixel of the video output: the LUT output codes and
//    blanking 4 clocks after the raster position, and the analog levels,
//    HSync, VSync and stereo eye flag one clock later, against its model of
//    the band on screen (empty words black);
//  - runs frame 0 with the display disabled, frame 1 in normal mode and
//    frame 2 in line sequential stereo mode (switched over the media bus
//    during vertical blanking).
// Mechanisms counted (each must occur): normal composites, composites over
// a stored pixel, cursor pixels, saturated sums, empty words shown, band
// swaps, stereo lines, blanking by display disable, LUT loads, bus reads.
module tb_cdac_top;
  import cdac_pkg::*;

  localparam int HT = 1688, VT = 1066;
  localparam int FRAME = HT * VT;
  localparam int STAGES = 2;

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
  int n_comp = 0, n_over = 0, n_cursor = 0, n_sat = 0, n_empty_px = 0, n_swaps = 0;
  int n_stereo_lines = 0, n_disabled_blank = 0, n_lut_loads = 0, n_bus_reads = 0, n_pix = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (3 * FRAME + 40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- model ----------------
  typedef struct packed { logic [7:0] r, g, b; } px_t;
  px_t  comp_img [BAND_LINES][LINE_PIXELS];
  logic [7:0] comp_beta [BAND_LINES][LINE_PIXELS];
  logic comp_pv [BAND_LINES][WORDS_PER_LINE];
  px_t  disp_img [BAND_LINES][LINE_PIXELS];
  logic disp_pv [BAND_LINES][WORDS_PER_LINE];
  logic [7:0] lut [3][256];
  bit   en_model = 0, stereo_model = 0;

  function automatic int rmul(int x, int y);
    return (2 * x * y + 255) / 510;
  endfunction

  function automatic logic [7:0] add_sat(logic [7:0] b, int p);
    int s;
    s = int'(b) + p;
    if (s > 255) begin n_sat++; return 8'hFF; end
    return 8'(s);
  endfunction

  task automatic clear_comp();
    for (int j = 0; j < int'(BAND_LINES); j++)
      for (int i = 0; i < int'(WORDS_PER_LINE); i++) comp_pv[j][i] = 0;
  endtask

  // apply one group to the compositing model
  task automatic model_group(addr_t a, rgb_word_t c, word_t al, bit cm);
    int j, i; bit pv;
    j = int'(a[13:9]); i = int'(a[8:0]);
    pv = comp_pv[j][i];
    if (pv) n_over++;
    for (int p = 0; p < 4; p++) begin
      px_t b; int bb; int x;
      x = i * 4 + p;
      b  = pv ? comp_img[j][x] : '0;
      bb = pv ? int'(comp_beta[j][x]) : 255;
      if (cm && al[p] == 8'd1) begin
        comp_img[j][x] = ~b;
        comp_beta[j][x] = 8'(bb);
        n_cursor++;
      end else begin
        comp_img[j][x].r = add_sat(b.r, rmul(bb, int'(c.r[p])));
        comp_img[j][x].g = add_sat(b.g, rmul(bb, int'(c.g[p])));
        comp_img[j][x].b = add_sat(b.b, rmul(bb, int'(c.b[p])));
        comp_beta[j][x] = 8'(rmul(bb, 255 - int'(al[p])));
      end
    end
    comp_pv[j][i] = 1;
    n_comp++;
  endtask

  // ---------------- media bus master ----------------
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

  task automatic bus_read1(logic [15:0] a, output logic [15:0] d);
    mb_frame = 1; mb_wr = 0; mb_ad_in = a; mb_irdy = 0;
    @(negedge clk);
    mb_frame = 0; mb_irdy = 1;
    #1;
    while (!mb_trdy) begin @(negedge clk); #1; end
    d = mb_ad_out;
    chk(mb_ad_oe && mb_devsel, "bus read handshake");
    n_bus_reads++;
    @(negedge clk);
    mb_irdy = 0;
  endtask

  // ---------------- raster position (independent of the DUT) -------------
  int cyc = -1;   // edges since reset release; raster position = cyc + 1
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  // ---------------- sprite engine ----------------
  bit   band_go = 0;
  addr_t pool [400];
  initial for (int k = 0; k < 400; k++) pool[k] = {5'($urandom_range(31)), 9'($urandom_range(335))};

  initial begin : sprite_engine
    addr_t recent [$];
    forever begin
      @(negedge clk);
      if (band_go) begin
        band_go = 0;
        recent = {};
        for (int g = 0; g < 1500; g++) begin
          addr_t a; bit clash; rgb_word_t c; word_t al; bit cm;
          do begin
            a = (g % 5 == 0) ? {5'($urandom_range(31)), 9'($urandom_range(335))}
                             : pool[$urandom_range(399)];
            clash = 0;
            foreach (recent[k]) if (recent[k] == a) clash = 1;
          end while (clash);
          recent.push_back(a);
          if (recent.size() > STAGES + 1) void'(recent.pop_front());
          c  = {$urandom(), $urandom(), $urandom()};
          al = $urandom();
          cm = (g % 17 == 0);
          if (cm) al[$urandom_range(3)] = 8'd1;
          if (g % 7 == 0) al = 32'hFFFF_FFFF;   // opaque
          sp_valid = 1; sp_addr = a; sp_rgb = c; sp_alpha = al; sp_cursor_mode = cm;
          chk(sp_ready, "sprite port ready");
          model_group(a, c, al, cm);
          @(negedge clk);
        end
        sp_valid = 0; sp_cursor_mode = 0;
      end
    end
  end

  // band swaps: the composited band goes on screen, a new one is started
  int swap_cyc [$];
  initial begin : swapper
    forever begin
      @(negedge clk);
      if (band_swap) begin
        n_swaps++;
        swap_cyc.push_back(cyc);
        repeat (10) @(negedge clk);
        disp_img = comp_img;
        disp_pv  = comp_pv;
        clear_comp();
        band_go = 1;
      end
    end
  end

  // ---------------- video checker ----------------
  bit   check_on = 0;
  int   switch_cyc = -100;
  logic [7:0] prev_code [3];
  bit   prev_blank = 1;
  logic [2:0] sync_hist [$];

  always @(negedge clk) if (rst_n && cyc >= 5) begin
    int p, h, v, row, lpc; bit act, hs, vs, eye; px_t px; bit pv;
    // analog levels follow the codes of the previous cycle
    if (check_on) begin
      real e [3]; real got [3];
      got = '{vid_r, vid_g, vid_b};
      for (int c = 0; c < 3; c++) begin
        e[c] = prev_blank ? 0.0 : 0.7 * real'(prev_code[c]) / 255.0;
        chk(got[c] < e[c] + 1e-6 && got[c] > e[c] - 1e-6, "DAC level");
      end
    end
    prev_code = '{dac_code_r, dac_code_g, dac_code_b};
    prev_blank = dac_blank;

    // LUT outputs correspond to raster position cyc + 1 - 4
    p = (cyc - 3) % FRAME;
    h = p % HT; v = p / HT;
    act = h < 1344 && v < 1024;
    hs = h >= 1344 + 16 && h < 1344 + 16 + 144;
    vs = v >= 1024 + 1 && v < 1024 + 1 + 3;
    eye = stereo_model && v % 2 == 1;
    sync_hist.push_back({eye, vs, hs});
    if (sync_hist.size() > 1) begin
      logic [2:0] s;
      s = sync_hist.pop_front();
      // the eye flag is not compared in the few clocks around the mode switch
      if (check_on && (cyc < switch_cyc - 2 || cyc > switch_cyc + 8))
        chk({stereo_eye, vsync, hsync} == s, $sformatf("sync outputs %b exp %b at p=%0d", {stereo_eye, vsync, hsync}, s, p));
    end
    if (check_on) begin
      if (!act) chk(dac_blank, "blank outside active area");
      else if (!en_model) begin
        chk(dac_blank, "blank while display disabled");
        n_disabled_blank++;
      end else begin
        if (stereo_model) begin
          row = (v / 2) % 32; lpc = (v % 2 ? 672 : 0) + h / 2;
          if (h == 0) n_stereo_lines++;
        end else begin
          row = v % 32; lpc = h;
        end
        pv = disp_pv[row][lpc / 4];
        px = pv ? disp_img[row][lpc] : '0;
        if (!pv) n_empty_px++;
        n_pix++;
        chk(!dac_blank && dac_code_r == lut[0][px.r] && dac_code_g == lut[1][px.g] &&
            dac_code_b == lut[2][px.b],
            $sformatf("pixel h=%0d v=%0d: %h%h%h exp %h%h%h", h, v, dac_code_r, dac_code_g,
                      dac_code_b, lut[0][px.r], lut[1][px.g], lut[2][px.b]));
      end
    end
  end

  // ---------------- main sequence ----------------
  initial begin
    logic [15:0] d [$]; logic [15:0] r;
    clear_comp();
    for (int j = 0; j < 32; j++) for (int i = 0; i < 336; i++) disp_pv[j][i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    bus_read1(16'h0001, r);
    chk(r[1] == 1'b1, "status: clearing after reset");
    for (int c = 0; c < 3; c++) begin
      d = {};
      for (int k = 0; k < 256; k++) begin
        lut[c][k] = (c == 2) ? 8'(255 - k) : 8'(k);
        d.push_back({8'd0, lut[c][k]});
      end
      bus_write(16'h0100 * (c + 1), d);
      n_lut_loads++;
    end
    bus_read1(16'h0300, r);
    chk(r == 16'h00FF, "blue LUT read back");
    wait (sp_ready);
    @(negedge clk);
    chk(int'(cyc) >= int'(BUF_WORDS) - 1 && int'(cyc) < int'(BUF_WORDS) + 4, $sformatf("clear took until cycle %0d", cyc));
    bus_read1(16'h0001, r);
    chk(r == 16'h0000, "status: ready, composing M");
    check_on = 1;
    band_go = 1;                            // compose the first band
    // frame 0: display disabled. Enable in vertical blanking of frame 0.
    wait (cyc == 1030 * HT);
    @(negedge clk);
    bus_write(16'h0000, '{16'h0001});
    en_model = 1;
    // frame 1 normal; switch to stereo in its vertical blanking
    wait (cyc == FRAME + 1030 * HT);
    @(negedge clk);
    bus_write(16'h0000, '{16'h0003});
    switch_cyc = cyc;
    stereo_model = 1;
    bus_read1(16'h0000, r);
    chk(r == 16'h0003, "control read back");
    // frame 2 stereo
    wait (cyc == 3 * FRAME - 10);
    @(negedge clk);
    // band swaps: 32 per normal frame, 16 per stereo frame, each after the
    // last active pixel of a band
    chk(n_swaps == 32 + 32 + 16, $sformatf("%0d band swaps", n_swaps));
    foreach (swap_cyc[k]) begin
      int p, h, v;
      p = swap_cyc[k] % FRAME;   // pulse comes one clock after the last pixel
      h = p % HT; v = p / HT;
      chk(h == 1343 && (k < 64 ? v % 32 == 31 : v % 64 == 63), $sformatf("swap %0d at h=%0d v=%0d", k, h, v));
    end
    begin
      string names [10] = '{"composites", "composite over stored pixel", "cursor pixels",
                             "saturated sums", "empty words shown", "band swaps", "stereo lines",
                             "blanked (display disabled)", "LUT loads", "bus reads"};
      int cnt [10];
      cnt = '{n_comp, n_over, n_cursor, n_sat, n_empty_px, n_swaps, n_stereo_lines,
              n_disabled_blank, n_lut_loads, n_bus_reads};
      for (int k = 0; k < 10; k++) begin
        $display("  %-28s %0d", names[k], cnt[k]);
        chk(cnt[k] > 0, {"mechanism never happened: ", names[k]});
      end
    end
    $display("pixels compared %0d", n_pix);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
