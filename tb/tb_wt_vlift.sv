// tb_wt_vlift: feeds the vertical unit with horizontally transformed lines
// of two levels (random coefficient pairs), the levels interleaved at
// random, two frames each, and checks every output word (level, line,
// column and the four sub-band values) against the reference 1-D
// transform applied down each column. Checks that a level of h lines yields
// h/2 output lines and that every output comes one clock after its input.
module tb_wt_vlift;
  import wt_ref_pkg::*;
  localparam int W = 16, N = 16, H = 8, L = 2;
  localparam int LW = 1, CW = $clog2(N), RW = $clog2(H);
  logic clk = 0, rst_n = 0;
  logic h_valid = 0;
  logic [LW-1:0] h_lvl = 0;
  logic [RW-1:0] h_row = 0;
  logic [CW-1:0] h_col = 0;
  logic signed [W-1:0] h_s = 0, h_d = 0;
  logic v_valid;
  logic [LW-1:0] v_lvl;
  logic [RW-1:0] v_row;
  logic [CW-1:0] v_col;
  logic signed [W-1:0] v_ll, v_lh, v_hl, v_hh;
  int checks = 0, failures = 0, outs = 0;

  wt_vlift #(.W(W), .LINE_N(N), .IMG_H(H), .LEVELS(L)) dut (.*);

  always #5 clk = ~clk;

  // Input words per level in feed order, and expected outputs.
  typedef struct { int row; int col; int s; int d; } hin_t;
  typedef struct { int row; int col; int ll; int lh; int hl; int hh; } vout_t;
  hin_t  feed [L][$];
  vout_t expq [L][$];
  int    ptr [L];
  bit    was_lift;

  always @(posedge clk) if (rst_n && v_valid) begin
    automatic int l = int'(v_lvl);
    automatic vout_t e;
    checks++;
    outs++;
    if (expq[l].size() == 0) begin
      failures++; $display("FAIL unexpected output level %0d", l);
    end else begin
      e = expq[l].pop_front();
      if (int'(v_row) != e.row || int'(v_col) != e.col || int'(v_ll) != e.ll
          || int'(v_lh) != e.lh || int'(v_hl) != e.hl || int'(v_hh) != e.hh) begin
        failures++;
        $display("FAIL lvl %0d row %0d/%0d col %0d/%0d: %0d %0d %0d %0d exp %0d %0d %0d %0d",
                 l, v_row, e.row, v_col, e.col, v_ll, v_lh, v_hl, v_hh, e.ll, e.lh, e.hl, e.hh);
      end
    end
  end

  // Latency: an output must follow each lifting input by exactly one clock.
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (v_valid != was_lift) begin failures++; $display("FAIL latency"); end
    end
    was_lift <= h_valid && ((h_row[0] == 0 && h_row != 0) || int'(h_row) == (H >> h_lvl) - 1);
  end

  initial begin
    was_lift = 0;
    for (int l = 0; l < L; l++) begin
      automatic int p = N >> (l + 1), h = H >> l;
      for (int f = 0; f < 2; f++) begin
        automatic int cs[][], cd[][];
        cs = new[h]; cd = new[h];
        for (int r = 0; r < h; r++) begin
          cs[r] = new[p]; cd[r] = new[p];
          for (int k = 0; k < p; k++) begin
            automatic hin_t w;
            cs[r][k] = $urandom_range(0, 1023) - 512;
            cd[r][k] = $urandom_range(0, 1023) - 512;
            w.row = r; w.col = k; w.s = cs[r][k]; w.d = cd[r][k];
            feed[l].push_back(w);
          end
        end
        // Reference column transforms, output in line order.
        begin
          automatic int ll[][], lh[][], hl[][], hh[][];
          ll = new[h/2]; lh = new[h/2]; hl = new[h/2]; hh = new[h/2];
          for (int m = 0; m < h/2; m++) begin
            ll[m] = new[p]; lh[m] = new[p]; hl[m] = new[p]; hh[m] = new[p];
          end
          for (int k = 0; k < p; k++) begin
            automatic arr_t col = {}, s, d;
            for (int r = 0; r < h; r++) col.push_back(cs[r][k]);
            fwd1d(col, s, d);
            for (int m = 0; m < h/2; m++) begin ll[m][k] = s[m]; lh[m][k] = d[m]; end
            col = {};
            for (int r = 0; r < h; r++) col.push_back(cd[r][k]);
            fwd1d(col, s, d);
            for (int m = 0; m < h/2; m++) begin hl[m][k] = s[m]; hh[m][k] = d[m]; end
          end
          for (int m = 0; m < h/2; m++)
            for (int k = 0; k < p; k++) begin
              automatic vout_t v;
              v.row = m; v.col = k; v.ll = ll[m][k]; v.lh = lh[m][k];
              v.hl = hl[m][k]; v.hh = hh[m][k];
              expq[l].push_back(v);
            end
        end
      end
      ptr[l] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    while (ptr[0] < feed[0].size() || ptr[1] < feed[1].size()) begin
      automatic int l = $urandom_range(0, L - 1);
      automatic hin_t w;
      if (ptr[l] == feed[l].size()) l = 1 - l;
      w = feed[l][ptr[l]++];
      h_valid = 1; h_lvl = LW'(l); h_row = RW'(w.row); h_col = CW'(w.col);
      h_s = W'(w.s); h_d = W'(w.d);
      @(negedge clk);
      h_valid = 0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    for (int l = 0; l < L; l++) begin
      checks++;
      if (expq[l].size() != 0) begin failures++; $display("FAIL level %0d missing %0d", l, expq[l].size()); end
    end
    checks++;
    if (outs != 2 * ((H/2) * (N/2) + (H/4) * (N/4))) begin failures++; $display("FAIL outs %0d", outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
