// Testbench of color_lut: loads all 256 entries through the bus port with
// a random table, reads every entry back through the bus port, then streams
// random pixel values through the pixel port (latency 1) and compares with
// the table; finally rewrites one entry and checks it takes effect.
module tb_color_lut;
  logic clk = 0, we;
  logic [7:0] pix_in, pix_out, bus_addr, bus_wdata, bus_rdata;
  logic [7:0] tbl [256];
  int checks = 0, failures = 0;

  color_lut dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [7:0] got, logic [7:0] e);
    checks++;
    if (got !== e) begin failures++; if (failures < 5) $display("FAIL %h exp %h", got, e); end
  endtask

  initial begin
    we = 0; pix_in = 0; bus_addr = 0; bus_wdata = 0;
    @(negedge clk);
    for (int k = 0; k < 256; k++) begin
      tbl[k] = 8'($urandom());
      we = 1; bus_addr = 8'(k); bus_wdata = tbl[k];
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 256; k++) begin
      bus_addr = 8'(255 - k);
      @(negedge clk);
      chk(bus_rdata, tbl[255 - k]);
    end
    for (int k = 0; k < 1000; k++) begin
      pix_in = 8'($urandom());
      @(negedge clk);
      chk(pix_out, tbl[pix_in]);
    end
    we = 1; bus_addr = 8'h42; bus_wdata = ~tbl[8'h42]; pix_in = 8'h42;
    @(negedge clk);
    chk(pix_out, tbl[8'h42]);      // old value while writing
    we = 0;
    @(negedge clk);
    chk(pix_out, ~tbl[8'h42]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
