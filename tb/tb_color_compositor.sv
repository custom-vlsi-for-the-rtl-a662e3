// Testbench of color_compositor: random and directed pixels, one per clock.
// Each result is checked STAGES cycles after its inputs against
//   cursor (cursor_mode and alpha == 1): C = ~B
//   otherwise:  C = min(255, B + round(B_BETA * A / 255))
// computed here from integers. Cursor cases and saturation are forced to
// occur and counted.
module tb_color_compositor;
  localparam int unsigned STAGES = 2;
  logic clk = 0;
  logic [7:0] a, a_alpha, b, b_beta, c;
  logic cursor_mode, cursor_en;
  int checks = 0, failures = 0, n_cursor = 0, n_sat = 0;

  color_compositor #(.STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int a, al, b, bb, cm; } vec_t;
  vec_t q [$];

  function automatic int model_c(vec_t v, output bit cur, output bit sat);
    int s;
    cur = v.cm != 0 && v.al == 1;
    s = v.b + (2 * v.bb * v.a + 255) / 510;
    sat = s > 255;
    if (cur) return 255 - v.b;
    return sat ? 255 : s;
  endfunction

  initial begin
    vec_t v;
    for (int n = 0; n < 10000 + STAGES; n++) begin
      v.a  = $urandom_range(255);
      v.al = ($urandom_range(3) == 0) ? 1 : $urandom_range(255);
      v.b  = $urandom_range(255);
      v.bb = $urandom_range(255);
      v.cm = $urandom_range(1);
      if (n % 7 == 0) begin v.b = 200; v.bb = 255; v.a = 200; v.cm = 0; end
      {a, a_alpha, b, b_beta, cursor_mode} = {8'(v.a), 8'(v.al), 8'(v.b), 8'(v.bb), 1'(v.cm)};
      q.push_back(v);
      @(posedge clk); #1;
      if (n >= int'(STAGES) - 1 && q.size() > 0) begin
        vec_t w; bit cur, sat; int e;
        w = q.pop_front();
        e = model_c(w, cur, sat);
        checks++;
        if (c != 8'(e) || cursor_en != cur) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d al=%0d b=%0d bb=%0d cm=%0d: c=%0d exp %0d", w.a, w.al, w.b, w.bb, w.cm, c, e);
        end
        if (cur) n_cursor++;
        if (sat && !cur) n_sat++;
      end
    end
    checks++; if (n_cursor == 0) failures++;
    checks++; if (n_sat == 0) failures++;
    $display("cursor pixels %0d, saturated sums %0d", n_cursor, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
