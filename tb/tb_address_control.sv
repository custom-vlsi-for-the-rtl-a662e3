// Testbench of address_control:
//  - after reset, both colour buffers are swept empty: every word {J, I}
//    with J < 32, I < 336 is written exactly once on both buffers while
//    comp_ready is low, which lasts exactly 10752 cycles;
//  - a compositor access presented in cycle t reads the compositing buffer
//    and the beta buffer at its address in cycle t and is written back to
//    the same address in cycle t + 1 + STAGES, to the buffer that was
//    selected when it entered, even if band_swap toggles in between;
//  - the display reads the other buffer, and disp_clear writes it.
module tb_address_control;
  import cdac_pkg::*;
  localparam int unsigned STAGES = 2;
  logic clk = 0, rst_n = 0;
  logic comp_valid, comp_ready, disp_rd, disp_clear, band_swap;
  addr_t comp_addr, disp_addr;
  logic comp_sel, disp_sel, rd_sel, wr_sel, wb_valid, m_wr, n_wr, beta_wr;
  addr_t m_wr_addr, m_rd_addr, n_wr_addr, n_rd_addr, beta_wr_addr, beta_rd_addr;
  int checks = 0, failures = 0, cyc = 0;

  address_control #(.STAGES(STAGES)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  bit seen_m [16384];
  bit seen_n [16384];

  initial begin
    int busy_cycles, dup;
    comp_valid = 0; comp_addr = 0; disp_rd = 0; disp_clear = 0; band_swap = 0; disp_addr = 0;
    @(negedge clk) rst_n = 1;
    busy_cycles = 0; dup = 0;
    while (!comp_ready) begin
      #1;
      if (!comp_ready) begin
        busy_cycles++;
        if (!m_wr || !n_wr) dup++;
        if (seen_m[m_wr_addr] || seen_n[n_wr_addr]) dup++;
        seen_m[m_wr_addr] = 1; seen_n[n_wr_addr] = 1;
        if (int'(m_wr_addr[8:0]) >= 336) dup++;
      end
      @(negedge clk);
    end
    chk(busy_cycles == int'(BUF_WORDS), $sformatf("sweep took %0d cycles", busy_cycles));
    chk(dup == 0, "sweep wrote a word twice, out of range or skipped a buffer");
    chk(comp_sel == 0, "buffer M composited first");

    // compositor accesses with a swap in flight
    @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      addr_t a; logic sel0;
      a = {5'($urandom_range(31)), 9'($urandom_range(335))};
      comp_valid = 1; comp_addr = a; disp_addr = ~a;
      disp_rd = 1; disp_clear = 1;
      sel0 = comp_sel;
      #1;
      chk((sel0 ? n_rd_addr : m_rd_addr) == a && beta_rd_addr == a, "read address");
      chk((sel0 ? m_rd_addr : n_rd_addr) == ~a, "display read address");
      band_swap = (n % 9 == 4);
      @(negedge clk);
      comp_valid = 0; band_swap = 0; disp_rd = 0; disp_clear = 0;
      chk(rd_sel == sel0, "rd_sel");
      repeat (STAGES) @(negedge clk);
      // write-back cycle
      chk(wb_valid && wr_sel == sel0, "wr_sel / wb_valid");
      chk(beta_wr && beta_wr_addr == a, "beta write-back");
      if (sel0) chk(n_wr && n_wr_addr == a && !m_wr, "write-back to N");
      else      chk(m_wr && m_wr_addr == a && !n_wr, "write-back to M");
      // display clear with no write-back pending
      @(negedge clk);
      disp_rd = 1; disp_clear = 1; disp_addr = a;
      #1;
      if (comp_sel) chk(m_wr && m_wr_addr == a && !n_wr, "display clear of M");
      else          chk(n_wr && n_wr_addr == a && !m_wr, "display clear of N");
      @(negedge clk);
      disp_rd = 0; disp_clear = 0;
      chk(disp_sel == !comp_sel, "disp_sel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
