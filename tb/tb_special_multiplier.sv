// Testbench of special_multiplier: all 65536 operand pairs are streamed one
// per clock and each result is compared, STAGES cycles later, with
// round(a * b / 255) computed as (2ab + 255) / 510. Also checks that 0xFF
// is the identity.
module tb_special_multiplier;
  localparam int unsigned STAGES = 2;
  logic clk = 0;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;

  special_multiplier #(.STAGES(STAGES)) dut (.clk, .a, .b, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] hist [$];
  initial begin
    a = 0; b = 0;
    for (int n = 0; n < 65536 + STAGES; n++) begin
      if (n < 65536) begin
        a = 8'(n >> 8); b = 8'(n);
      end
      hist.push_back({a, b});
      @(posedge clk); #1;
      if (n >= int'(STAGES) - 1 && n - (int'(STAGES) - 1) < 65536) begin
        int unsigned x, z, exp_y;
        {x, z} = {24'd0, hist[n-STAGES+1][15:8], 24'd0, hist[n-STAGES+1][7:0]};
        exp_y = (2 * x * z + 255) / 510;
        checks++;
        if (y != 8'(exp_y)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d exp %0d", x, z, y, exp_y);
        end
        if (z == 255 && y != 8'(x)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
