// Testbench of display_mux: random words from both buffers, random buffer
// select, pixel index and read flag; checks, one cycle after the data
// (two after rd/pix), that the output is the chosen pixel of the displayed
// buffer, or black when not reading or when the word's pixel valid is clear.
module tb_display_mux;
  import cdac_pkg::*;
  logic clk = 0, rd, disp_sel, pv_m, pv_n;
  logic [1:0] pix;
  rgb_word_t buf_m, buf_n;
  logic [7:0] r_out, g_out, b_out;
  int checks = 0, failures = 0, blacks = 0;

  display_mux dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic rd_h [$]; logic [1:0] pix_h [$];
    rd = 0; pix = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // data for the read issued last cycle
      disp_sel = 1'($urandom()); pv_m = ($urandom_range(3) != 0); pv_n = ($urandom_range(3) != 0);
      buf_m = {$urandom(), $urandom(), $urandom()}; buf_n = {$urandom(), $urandom(), $urandom()};
      @(posedge clk); #1;
      if (t >= 2) begin
        rgb_word_t w; logic pv; logic [7:0] er, eg, eb;
        w = disp_sel ? buf_n : buf_m; pv = disp_sel ? pv_n : pv_m;
        if (rd_h[0] && pv) begin
          er = w.r[pix_h[0]]; eg = w.g[pix_h[0]]; eb = w.b[pix_h[0]];
        end else begin
          er = 0; eg = 0; eb = 0; blacks++;
        end
        void'(rd_h.pop_front()); void'(pix_h.pop_front());
        checks++;
        if ({r_out, g_out, b_out} !== {er, eg, eb}) begin
          failures++;
          if (failures < 5) $display("FAIL t=%0d", t);
        end
      end
      // read for the next cycle's data
      rd = ($urandom_range(7) != 0); pix = 2'($urandom());
      rd_h.push_back(rd); pix_h.push_back(pix);
    end
    checks++; if (blacks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
