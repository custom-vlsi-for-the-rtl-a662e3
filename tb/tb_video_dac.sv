// Testbench of the video DAC model: every code 0..255 gives
// code / 255 * 0.7 V after the clock edge that latches it, blanking gives
// 0 V, and the output holds between edges.
module tb_video_dac;
  logic clk = 0, blank;
  logic [7:0] code;
  real vout;
  int checks = 0, failures = 0;

  video_dac dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(real e);
    checks++;
    if (vout > e + 1e-6 || vout < e - 1e-6) begin
      failures++;
      if (failures < 5) $display("FAIL %f exp %f", vout, e);
    end
  endtask

  initial begin
    blank = 1; code = 0;
    @(negedge clk);
    for (int k = 0; k < 256; k++) begin
      code = 8'(k); blank = 0;
      @(negedge clk);
      chk(0.7 * k / 255.0);
      code = 8'(255 - k);          // not latched until the next edge
      #1 chk(0.7 * k / 255.0);
      blank = (k % 5 == 0);
      @(negedge clk);
      chk(blank ? 0.0 : 0.7 * (255 - k) / 255.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
