// tb_wt_core_full: end-to-end test of the wavelet core at its default
// size: 1024-pixel lines, 2048-line frames, 4 levels. Two frames are
// streamed, the first at one pixel per clock with no gaps, the second with
// random gaps, and every output word of every level is checked against the
// reference transform. The same mechanism counts and drain-time check as
// in the reduced-size test apply, and four lines go through the 1-D
// reconstruction unit.
module tb_wt_core_full;
  import wt_ref_pkg::*;
  localparam int PIX_W = wt_pkg::PIX_W_DEF, W = wt_pkg::COEF_W_DEF, N = wt_pkg::LINE_N_DEF,
                 H = wt_pkg::IMG_H_DEF, L = wt_pkg::LEVELS_DEF, FRAMES = 2;
  localparam int LW = $clog2(L), CW = $clog2(N), RW = $clog2(H);
  localparam int DRAIN_MAX = 2 * N;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  logic [PIX_W-1:0] in_pix = 0;
  logic out_valid, out_ll_final, ctx_switch, overflow;
  logic [LW-1:0] out_lvl;
  logic [RW-1:0] out_row;
  logic [CW-1:0] out_col;
  logic signed [W-1:0] out_ll, out_lh, out_hl, out_hh;
  logic rec_in_valid = 0, rec_in_ready, rec_out_valid;
  logic signed [W-1:0] rec_in_s = 0, rec_in_d = 0, rec_out_e, rec_out_o;
  int rec_exp[$];
  int n_rec = 0;

  wt_core dut (.*);

  always #5 clk = ~clk;

  typedef struct { int row; int col; int ll; int lh; int hl; int hh; } vout_t;
  vout_t expq [L][$];
  int checks = 0, failures = 0, outs = 0, cyc = 0;
  int n_switch = 0, n_flush = 0, n_wait = 0, n_bottom = 0;
  int n_pop [L];
  int last_pix_cyc = 0, last_out_cyc = 0, frame_outs_left = 0;

  // Reference: level-by-level 2-D transform, expected words in line order.
  task automatic add_expected(arr_t img);
    arr_t cur = img;
    int w = N, h = H;
    for (int l = 0; l < L; l++) begin
      arr_t ll, lh, hl, hh;
      fwd2d(cur, w, h, ll, lh, hl, hh);
      for (int i = 0; i < ll.size(); i++) begin
        vout_t v;
        v.row = i / (w/2); v.col = i % (w/2);
        v.ll = ll[i]; v.lh = lh[i]; v.hl = hl[i]; v.hh = hh[i];
        expq[l].push_back(v);
      end
      cur = ll; w /= 2; h /= 2;
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (ctx_switch) n_switch++;
      if (dut.step_valid && dut.step_flush) n_flush++;
      if (dut.pair_take && |dut.lvl_ready) n_wait++;
      for (int l = 1; l < L; l++) if (dut.lvl_pop[l]) n_pop[l]++;
      if (dut.u_vlift.do_lift && dut.u_vlift.is_last) n_bottom++;
    end
    if (rst_n && rec_out_valid) begin
      checks++;
      n_rec++;
      if (rec_exp.size() < 2 || int'(rec_out_e) != rec_exp[0] || int'(rec_out_o) != rec_exp[1]) begin
        failures++; $display("FAIL reconstruction %0d %0d", rec_out_e, rec_out_o);
      end
      if (rec_exp.size() >= 2) begin void'(rec_exp.pop_front()); void'(rec_exp.pop_front()); end
    end
    if (rst_n && out_valid) begin
      automatic int l = int'(out_lvl);
      automatic vout_t e;
      checks++;
      outs++;
      last_out_cyc = cyc;
      if (expq[l].size() == 0) begin
        failures++; $display("FAIL unexpected output at level %0d", l);
      end else begin
        e = expq[l].pop_front();
        if (int'(out_row) != e.row || int'(out_col) != e.col || int'(out_ll) != e.ll
            || int'(out_lh) != e.lh || int'(out_hl) != e.hl || int'(out_hh) != e.hh
            || out_ll_final != (l == L - 1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL lvl %0d r%0d/%0d c%0d/%0d: %0d %0d %0d %0d exp %0d %0d %0d %0d",
                     l, out_row, e.row, out_col, e.col, out_ll, out_lh, out_hl, out_hh,
                     e.ll, e.lh, e.hl, e.hh);
        end
      end
    end
  end

  initial begin
    for (int l = 0; l < L; l++) n_pop[l] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      automatic arr_t img = {};
      for (int i = 0; i < N * H; i++)
        img.push_back(int'($urandom_range(0, 255)));
      add_expected(img);
      for (int i = 0; i < N * H; i++) begin
        in_valid = 1; in_sof = (i == 0); in_pix = PIX_W'(img[i]);
        @(negedge clk);
        in_valid = 0; in_sof = 0;
        if (f == 1) repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      last_pix_cyc = cyc;
    end
    // Drain: wait until every expected word came out.
    begin
      automatic int left;
      do begin
        @(negedge clk);
        left = 0;
        for (int l = 0; l < L; l++) left += expq[l].size();
      end while (left != 0 && cyc - last_pix_cyc < 20 * N);
    end
    // Reconstruction path: rebuild lines from reference coefficients.
    for (int ln = 0; ln < 4; ln++) begin
      automatic arr_t x = {}, s, d;
      for (int i = 0; i < N; i++) x.push_back($urandom_range(0, 255));
      fwd1d(x, s, d);
      foreach (x[i]) rec_exp.push_back(x[i]);
      for (int k = 0; k < N / 2; k++) begin
        rec_in_valid = 1; rec_in_s = W'(s[k]); rec_in_d = W'(d[k]);
        #1;
        while (!rec_in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      rec_in_valid = 0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (rec_exp.size() != 0 || n_rec != 2 * N) begin
      failures++; $display("FAIL reconstruction: %0d pairs out, %0d samples missing", n_rec, rec_exp.size());
    end
    for (int l = 0; l < L; l++) begin
      checks++;
      if (expq[l].size() != 0) begin failures++; $display("FAIL level %0d: %0d words missing", l, expq[l].size()); end
    end
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow flagged"); end
    checks++;
    if (last_out_cyc - last_pix_cyc > DRAIN_MAX) begin
      failures++; $display("FAIL last output %0d clocks after last pixel", last_out_cyc - last_pix_cyc);
    end
    $display("outputs %0d, drain %0d clocks, switches %0d, flushes %0d, level steps deferred by input %0d, bottom-edge lifts %0d",
             outs, last_out_cyc - last_pix_cyc, n_switch, n_flush, n_wait, n_bottom);
    checks++;
    if (n_switch == 0 || n_flush == 0 || n_wait == 0 || n_bottom == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    for (int l = 1; l < L; l++) begin
      $display("level %0d FIFO pairs read %0d", l, n_pop[l]);
      checks++;
      if (n_pop[l] != FRAMES * (N >> l) * (H >> l) / 2) begin failures++; $display("FAIL level %0d pops", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * N * H) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
