// Testbench of media_bus_if: a bus master issues single and burst writes
// and reads. Checks the control register (display enable, stereo), the
// read-only status register, a burst load of a whole 256-entry LUT with
// auto-incrementing address (lut_we pulses for the right channel, address
// and data), LUT read-back through the LUT model here (latency 1, like
// color_lut), the handshake (devsel, trdy, ad_oe), and that unmapped
// addresses read 0 and write nothing.
module tb_media_bus_if;
  logic clk = 0, rst_n = 0;
  logic frame, wr, irdy, ad_oe, trdy, devsel, display_en, stereo, comp_sel, init_busy;
  logic [15:0] ad_in, ad_out;
  logic [2:0] lut_we;
  logic [7:0] lut_addr, lut_wdata;
  logic [7:0] lut_rdata [3];
  logic [7:0] lut [3][256];
  int checks = 0, failures = 0, n_waits = 0;

  media_bus_if dut (.*);
  always #5 clk = ~clk;

  // LUT model (same port timing as color_lut)
  always_ff @(posedge clk) begin
    for (int c = 0; c < 3; c++) begin
      if (lut_we[c]) lut[c][lut_addr] <= lut_wdata;
      lut_rdata[c] <= lut[c][lut_addr];
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic bus_write(logic [15:0] a, logic [15:0] d [$]);
    frame = 1; wr = 1; ad_in = a; irdy = 0;
    @(negedge clk);
    for (int k = 0; k < d.size(); k++) begin
      frame = (k != d.size() - 1); irdy = 1; ad_in = d[k];
      #1 chk(devsel, "devsel during write");
      while (!trdy) begin @(negedge clk); n_waits++; end
      @(negedge clk);
    end
    frame = 0; irdy = 0;
  endtask

  task automatic bus_read(logic [15:0] a, int n, output logic [15:0] d [$]);
    d = {};
    frame = 1; wr = 0; ad_in = a; irdy = 0;
    @(negedge clk);
    for (int k = 0; k < n; k++) begin
      frame = (k != n - 1); irdy = 1;
      #1;
      while (!trdy) begin
        chk(devsel && !ad_oe, "wait state");
        @(negedge clk); n_waits++; #1;
      end
      chk(ad_oe, "ad_oe with read data");
      d.push_back(ad_out);
      @(negedge clk);
    end
    frame = 0; irdy = 0;
  endtask

  initial begin
    logic [15:0] d [$], r [$];
    frame = 0; wr = 0; irdy = 0; ad_in = 0; comp_sel = 0; init_busy = 1;
    for (int c = 0; c < 3; c++) for (int k = 0; k < 256; k++) lut[c][k] = 0;
    @(negedge clk) rst_n = 1;
    chk(!display_en && !stereo && !devsel, "reset state");
    bus_read(16'h0001, 1, r);
    chk(r[0] == 16'h0002, "status init busy");
    init_busy = 0; comp_sel = 1;
    bus_read(16'h0001, 1, r);
    chk(r[0] == 16'h0001, "status comp_sel");
    bus_write(16'h0000, '{16'h0003});
    chk(display_en && stereo, "ctrl write");
    bus_write(16'h0000, '{16'h0001});
    chk(display_en && !stereo, "ctrl write 2");
    bus_read(16'h0000, 1, r);
    chk(r[0] == 16'h0001, "ctrl read");
    // burst-load the green LUT
    d = {};
    for (int k = 0; k < 256; k++) d.push_back(16'($urandom_range(255)));
    bus_write(16'h0200, d);
    for (int k = 0; k < 256; k++) chk(lut[1][k] == d[k][7:0], "green LUT entry");
    for (int k = 0; k < 256; k++) chk(lut[0][k] == 0 && lut[2][k] == 0, "other LUTs untouched");
    // single write to blue 0x10, burst read back a few green entries
    bus_write(16'h0310, '{16'h00AB});
    chk(lut[2][8'h10] == 8'hAB, "blue LUT entry");
    bus_read(16'h0205, 6, r);
    for (int k = 0; k < 6; k++) chk(r[k] == {8'd0, d[5+k][7:0]}, "LUT burst read");
    bus_read(16'h0310, 1, r);
    chk(r[0] == 16'h00AB, "blue LUT read");
    // unmapped
    bus_write(16'h1234, '{16'hFFFF});
    bus_read(16'h1234, 1, r);
    chk(r[0] == 0 && display_en && !stereo, "unmapped address");
    @(negedge clk);
    chk(!devsel && !trdy, "idle after transfer");
    chk(n_waits > 0, "read wait states seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
