// Testbench of compositing_engine: a random stream of four-pixel groups,
// one per clock. For each group the testbench plays the buffers: one cycle
// after the group it presents random stored words (colour of M and N,
// pixel-valid flags, betas) and the buffer select, and STAGES cycles later
// it checks the write data against a model of the compositing equations:
//   pv = valid flag of the selected buffer; B = pv ? stored : 0;
//   beta' = pv ? stored beta : 255; cursor = cursor_mode && alpha == 1;
//   C      = cursor ? ~B    : min(255, B + round(beta' * A / 255))
//   C_BETA = cursor ? beta' : round(beta' * (255 - alpha) / 255)
// and that only the selected buffer receives C with pixel valid set.
// The compositing rate, 4 pixels (12 channel compositions) per clock, is
// checked by counting the groups written back per cycle.
module tb_compositing_engine;
  import cdac_pkg::*;
  localparam int unsigned STAGES = 2;
  localparam int N = 3000;
  logic clk = 0;
  rgb_word_t sp_rgb, buf_m_in, buf_m_out, buf_n_in, buf_n_out;
  word_t sp_alpha, beta_in, beta_out;
  logic sp_cursor_mode, rd_sel, wr_sel, wb_valid, pv_m_in, pv_m_out, pv_n_in, pv_n_out;
  logic [2:0] cursor_pixels;
  int checks = 0, failures = 0, n_cursor = 0, n_invalid = 0, n_written = 0;

  compositing_engine #(.STAGES(STAGES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    rgb_word_t a; word_t al; logic cm;
    rgb_word_t bm, bn; logic pvm, pvn; word_t beta; logic sel;
  } txn_t;
  txn_t tx [N];

  function automatic int rmul(int x, int y);
    return (2 * x * y + 255) / 510;
  endfunction

  task automatic check_txn(int k);
    txn_t t; logic pv; rgb_word_t b, ec, got; word_t eb; int s; logic cur;
    t = tx[k];
    pv = t.sel ? t.pvn : t.pvm;
    b  = pv ? (t.sel ? t.bn : t.bm) : '0;
    for (int p = 0; p < 4; p++) begin
      int bp;
      bp  = pv ? int'(t.beta[p]) : 255;
      cur = t.cm && t.al[p] == 8'd1;
      if (cur) begin
        ec.r[p] = ~b.r[p]; ec.g[p] = ~b.g[p]; ec.b[p] = ~b.b[p];
        eb[p] = 8'(bp);
        n_cursor++;
      end else begin
        s = int'(b.r[p]) + rmul(bp, int'(t.a.r[p])); ec.r[p] = s > 255 ? 8'hFF : 8'(s);
        s = int'(b.g[p]) + rmul(bp, int'(t.a.g[p])); ec.g[p] = s > 255 ? 8'hFF : 8'(s);
        s = int'(b.b[p]) + rmul(bp, int'(t.a.b[p])); ec.b[p] = s > 255 ? 8'hFF : 8'(s);
        eb[p] = 8'(rmul(bp, 255 - int'(t.al[p])));
      end
    end
    if (!pv) n_invalid++;
    got = t.sel ? buf_n_out : buf_m_out;
    checks++;
    if (got !== ec || beta_out !== eb || (t.sel ? pv_n_out : pv_m_out) !== 1'b1 ||
        (t.sel ? pv_m_out : pv_n_out) !== 1'b0 || (t.sel ? buf_m_out : buf_n_out) !== '0) begin
      failures++;
      if (failures < 6) $display("FAIL txn %0d: got %h beta %h, exp %h beta %h", k, got, beta_out, ec, eb);
    end
    n_written++;
  endtask

  initial begin
    int cycles;
    rd_sel = 0; wr_sel = 0; wb_valid = 0;
    for (int k = 0; k < N; k++) begin
      tx[k].a    = {$urandom(), $urandom(), $urandom()};
      tx[k].al   = $urandom();
      if (k % 3 == 0) tx[k].al[$urandom_range(3)] = 8'd1;
      tx[k].cm   = 1'($urandom_range(1));
      tx[k].bm   = {$urandom(), $urandom(), $urandom()};
      tx[k].bn   = {$urandom(), $urandom(), $urandom()};
      tx[k].pvm  = ($urandom_range(4) != 0);
      tx[k].pvn  = ($urandom_range(4) != 0);
      tx[k].beta = $urandom();
      tx[k].sel  = 1'((k / 50) % 2);
    end
    cycles = 0;
    for (int t = 0; t < N + 1 + int'(STAGES); t++) begin
      @(negedge clk);
      if (t < N) begin
        sp_rgb = tx[t].a; sp_alpha = tx[t].al; sp_cursor_mode = tx[t].cm;
      end
      if (t >= 1 && t - 1 < N) begin
        buf_m_in = tx[t-1].bm; buf_n_in = tx[t-1].bn; pv_m_in = tx[t-1].pvm;
        pv_n_in = tx[t-1].pvn; beta_in = tx[t-1].beta; rd_sel = tx[t-1].sel;
      end
      wb_valid = 0;
      if (t >= 1 + int'(STAGES)) begin
        wr_sel = tx[t-1-STAGES].sel; wb_valid = 1;
        #1 check_txn(t - 1 - STAGES);
        cycles++;
      end
    end
    checks++;
    if (n_written != cycles || n_written != N) failures++;   // one group per clock
    checks++;
    if (n_cursor == 0 || n_invalid == 0) failures++;
    $display("groups %0d in %0d cycles, cursor pixels %0d, empty words %0d", n_written, cycles, n_cursor, n_invalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
