// Testbench of beta_buffer: writes the whole band with random beta words,
// reads every word back (one cycle latency) and compares with a copy kept
// here; checks read-during-write (old contents) and that an address with
// I >= 336 neither stores nor disturbs another word.
module tb_beta_buffer;
  import cdac_pkg::*;
  logic clk = 0;
  logic wr;
  addr_t wr_addr, rd_addr;
  word_t wr_alpha, rd_alpha;
  int checks = 0, failures = 0;
  word_t refm [BUF_WORDS];

  beta_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t ad(int k);
    return {5'(k / WORDS_PER_LINE), 9'(k % WORDS_PER_LINE)};
  endfunction

  task automatic chk(word_t e);
    checks++;
    if (rd_alpha !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h exp %h", rd_alpha, e);
    end
  endtask

  initial begin
    wr = 0; rd_addr = 0; wr_addr = 0; wr_alpha = 0;
    for (int k = 0; k < int'(BUF_WORDS); k++) begin
      wr = 1; wr_addr = ad(k); wr_alpha = $urandom(); refm[k] = wr_alpha;
      @(posedge clk); #1;
    end
    wr = 1; wr_addr = {5'd0, 9'd336}; wr_alpha = 32'hFFFF_FFFF;   // ignored
    @(posedge clk); #1;
    wr = 1; wr_addr = ad(500); rd_addr = ad(500); wr_alpha = ~refm[500];
    @(posedge clk); #1;
    chk(refm[500]);
    refm[500] = ~refm[500];
    wr = 0;
    for (int k = 0; k < int'(BUF_WORDS); k++) begin
      rd_addr = ad(k);
      @(posedge clk); #1;
      chk(refm[k]);
    end
    rd_addr = {5'd0, 9'd336};
    @(posedge clk); #1;
    chk('0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
