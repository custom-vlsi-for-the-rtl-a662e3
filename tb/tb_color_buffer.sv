// Testbench of color_buffer: fills the whole 10752-word band with random
// RGB words and pixel-valid bits through the write port while reading
// random, already written addresses through the read port, compares each
// read (one cycle latency) with a copy kept here, and checks that a read of
// the word written in the same cycle returns the old contents and that
// addresses with I >= 336 are not stored.
module tb_color_buffer;
  import cdac_pkg::*;
  logic clk = 0;
  logic wr, wr_pv, rd_pv;
  addr_t wr_addr, rd_addr;
  rgb_word_t wr_rgb, rd_rgb;
  int checks = 0, failures = 0;

  color_buffer dut (.*);
  always #5 clk = ~clk;

  rgb_word_t ref_rgb [int];
  logic      ref_pv  [int];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(addr_t a, rgb_word_t e, logic epv);
    checks++;
    if (rd_rgb !== e || rd_pv !== epv) begin
      failures++;
      if (failures < 10) $display("FAIL read %h: %h/%0d exp %h/%0d", a, rd_rgb, rd_pv, e, epv);
    end
  endtask

  initial begin
    wr = 0; rd_addr = 0; wr_addr = 0; wr_rgb = '0; wr_pv = 0;
    @(posedge clk); #1;
    for (int j = 0; j < int'(BAND_LINES); j++)
      for (int i = 0; i < int'(WORDS_PER_LINE); i++) begin
        addr_t a; int k;
        a = {5'(j), 9'(i)};
        wr = 1; wr_addr = a; wr_rgb = {$urandom(), $urandom(), $urandom()}; wr_pv = 1'($urandom());
        // read a random word written before
        k = -1;
        if (ref_rgb.num() > 0) begin
          k = $urandom_range(ref_rgb.num() - 1);
          rd_addr = {5'(k / WORDS_PER_LINE), 9'(k % WORDS_PER_LINE)};
        end
        @(posedge clk); #1;
        if (k >= 0) check_read(rd_addr, ref_rgb[k], ref_pv[k]);
        ref_rgb[j * WORDS_PER_LINE + i] = wr_rgb;
        ref_pv[j * WORDS_PER_LINE + i]  = wr_pv;
      end
    // read during write returns the old word
    wr = 1; wr_addr = {5'd7, 9'd100}; rd_addr = wr_addr; wr_rgb = ~ref_rgb[7*336+100]; wr_pv = ~ref_pv[7*336+100];
    @(posedge clk); #1;
    check_read(rd_addr, ref_rgb[7*336+100], ref_pv[7*336+100]);
    wr = 0;
    @(posedge clk); #1;
    check_read(rd_addr, ~ref_rgb[7*336+100], ~ref_pv[7*336+100]);
    // I out of range: ignored, reads zero; word at I=0 of next line unchanged
    wr = 1; wr_addr = {5'd3, 9'd400}; wr_rgb = '1; wr_pv = 1;
    rd_addr = {5'd3, 9'd400};
    @(posedge clk); #1;
    wr = 0; rd_addr = {5'd4, 9'd0};
    check_read({5'd3, 9'd400}, '0, 1'b0);
    @(posedge clk); #1;
    check_read(rd_addr, ref_rgb[4*336], ref_pv[4*336]);
    // full readback sweep
    ref_rgb[7*336+100] = ~ref_rgb[7*336+100];
    ref_pv[7*336+100]  = ~ref_pv[7*336+100];
    for (int k = 0; k < int'(BUF_WORDS); k++) begin
      rd_addr = {5'(k / WORDS_PER_LINE), 9'(k % WORDS_PER_LINE)};
      @(posedge clk); #1;
      check_read(rd_addr, ref_rgb[k], ref_pv[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
