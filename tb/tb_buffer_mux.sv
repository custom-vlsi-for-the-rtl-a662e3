// Testbench of buffer_mux: random words on all inputs for every select
// combination; checks the read side (B is the selected buffer's word, or
// zero if its pixel-valid flag is clear) and the write side (C goes, with
// pixel valid set, only to the buffer named by wr_sel and only when
// wb_valid; everything else is written as zero and invalid).
module tb_buffer_mux;
  import cdac_pkg::*;
  logic rd_sel, wr_sel, wb_valid, pixel_valid, pv_m_in, pv_n_in, pv_m_out, pv_n_out;
  rgb_word_t c, b, buf_m_in, buf_m_out, buf_n_in, buf_n_out;
  int checks = 0, failures = 0;

  buffer_mux dut (.*);

  function automatic rgb_word_t rnd_word();
    return {$urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      rgb_word_t eb, em, en;
      logic epv, epm, epn;
      {rd_sel, wr_sel, wb_valid} = 3'(n);
      {pv_m_in, pv_n_in} = 2'($urandom());
      c = rnd_word(); buf_m_in = rnd_word(); buf_n_in = rnd_word();
      #1;
      epv = rd_sel ? pv_n_in : pv_m_in;
      eb  = !epv ? '0 : rd_sel ? buf_n_in : buf_m_in;
      em  = (wb_valid && wr_sel == 0) ? c : '0;
      en  = (wb_valid && wr_sel == 1) ? c : '0;
      epm = wb_valid && wr_sel == 0;
      epn = wb_valid && wr_sel == 1;
      checks++;
      if (b !== eb || pixel_valid !== epv || buf_m_out !== em || buf_n_out !== en ||
          pv_m_out !== epm || pv_n_out !== epn) begin
        failures++;
        if (failures < 5) $display("FAIL sel rd=%0d wr=%0d wb=%0d", rd_sel, wr_sel, wb_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
