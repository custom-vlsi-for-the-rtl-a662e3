// Pipeline delay register: out follows in after STAGES clock cycles
// (STAGES = 0 is a wire). Used for the "N-stage pipeline registers" that
// keep side signals aligned with the multipliers of the compositor.
module pipe_delay #(
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (STAGES == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] r [STAGES];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int s = 1; s < int'(STAGES); s++) r[s] <= r[s-1];
    end
    assign q = r[STAGES-1];
  end

endmodule
