// Testbench of beta_compositor: random inputs, one per clock; results are
// checked STAGES cycles later against
//   beta' = pixel_valid ? B_BETA : 255
//   C_BETA = cursor_en ? beta' : round(beta' * (255 - A_ALPHA) / 255)
// where cursor_en, as in the chip, arrives STAGES cycles after the other
// inputs (it comes from the colour compositor's pipeline).
module tb_beta_compositor;
  localparam int unsigned STAGES = 2;
  logic clk = 0;
  logic cursor_en, pixel_valid;
  logic [7:0] a_alpha, b_beta, c_beta;
  int checks = 0, failures = 0, n_cur = 0, n_inv = 0;

  beta_compositor #(.STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int al, bb, pv, ce; } vec_t;
  vec_t q [$];

  initial begin
    vec_t v;
    cursor_en = 0;
    for (int n = 0; n < 10000 + STAGES; n++) begin
      v.al = $urandom_range(255);
      v.bb = $urandom_range(255);
      v.pv = ($urandom_range(3) != 0);
      v.ce = $urandom_range(1);
      {a_alpha, b_beta, pixel_valid} = {8'(v.al), 8'(v.bb), 1'(v.pv)};
      q.push_back(v);
      // cursor_en belongs to the pixel presented STAGES cycles ago
      if (q.size() > STAGES) cursor_en = 1'(q[q.size()-1-STAGES].ce);
      @(posedge clk); #1;
      if (q.size() == STAGES) begin
        vec_t w; int bp, e;
        w = q.pop_front();
        cursor_en = 1'(w.ce);
        #0;
        bp = w.pv ? w.bb : 255;
        e = w.ce ? bp : (2 * bp * (255 - w.al) + 255) / 510;
        #1;
        checks++;
        if (c_beta != 8'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL al=%0d bb=%0d pv=%0d ce=%0d: %0d exp %0d", w.al, w.bb, w.pv, w.ce, c_beta, e);
        end
        if (w.ce) n_cur++;
        if (!w.pv) n_inv++;
      end
    end
    checks++; if (n_cur == 0 || n_inv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
