// tb_wt_hlift: drives the horizontal unit with two levels whose steps are
// interleaved at random (every step a possible context switch), issuing a
// level's flush as soon as it is pending, and checks every output pair
// (level, line, column, smooth, detail) against the reference 1-D
// transform of that level's line. Also checks that a line of P pairs takes
// exactly P+1 steps of its level (P pair steps and one flush).
module tb_wt_hlift;
  import wt_ref_pkg::*;
  localparam int W = 16, N = 16, H = 4, L = 2;
  localparam int LW = 1, CW = $clog2(N), RW = $clog2(H);
  logic clk = 0, rst_n = 0;
  logic step_valid = 0, step_flush = 0;
  logic [LW-1:0] step_lvl = 0;
  logic signed [W-1:0] x_e = 0, x_o = 0;
  logic [L-1:0] flush_pend;
  logic h_valid;
  logic [LW-1:0] h_lvl;
  logic [RW-1:0] h_row;
  logic [CW-1:0] h_col;
  logic signed [W-1:0] h_s, h_d;
  int checks = 0, failures = 0, switches = 0, flushes = 0;

  wt_hlift #(.W(W), .LINE_N(N), .IMG_H(H), .LEVELS(L)) dut (.*);

  always #5 clk = ~clk;

  // Per level: the lines to feed (two frames) and the expected outputs.
  arr_t lines [L][$];
  int   exp_s [L][$], exp_d [L][$], exp_r [L][$], exp_c [L][$];
  int   nxt_line [L], nxt_pair [L], steps_in_line [L];

  always @(posedge clk) if (rst_n && h_valid) begin
    automatic int l = int'(h_lvl);
    checks++;
    if (exp_s[l].size() == 0 || int'(h_s) != exp_s[l][0] || int'(h_d) != exp_d[l][0]
        || int'(h_row) != exp_r[l][0] || int'(h_col) != exp_c[l][0]) begin
      failures++;
      $display("FAIL lvl %0d row %0d col %0d: s=%0d d=%0d", l, h_row, h_col, h_s, h_d);
    end
    if (exp_s[l].size() != 0) begin
      void'(exp_s[l].pop_front()); void'(exp_d[l].pop_front());
      void'(exp_r[l].pop_front()); void'(exp_c[l].pop_front());
    end
  end

  initial begin
    for (int l = 0; l < L; l++) begin
      automatic int n = N >> l, h = H >> l;
      for (int f = 0; f < 2; f++)
        for (int r = 0; r < h; r++) begin
          automatic arr_t x = {}, s, d;
          for (int i = 0; i < n; i++) x.push_back($urandom_range(0, 511) - 256);
          lines[l].push_back(x);
          fwd1d(x, s, d);
          foreach (s[k]) begin
            exp_s[l].push_back(s[k]); exp_d[l].push_back(d[k]);
            exp_r[l].push_back(r);    exp_c[l].push_back(k);
          end
        end
      nxt_line[l] = 0; nxt_pair[l] = 0; steps_in_line[l] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    forever begin
      automatic int l = $urandom_range(0, L - 1);
      automatic int prev = int'(step_lvl);
      if (nxt_line[0] == lines[0].size() && nxt_line[1] == lines[1].size()
          && flush_pend == '0) break;
      if (nxt_line[l] == lines[l].size() && !flush_pend[l]) l = 1 - l;
      step_valid = 1; step_lvl = LW'(l);
      if (l != prev) switches++;
      steps_in_line[l]++;
      if (flush_pend[l]) begin
        step_flush = 1;
        flushes++;
        checks++;
        if (steps_in_line[l] != (N >> (l + 1)) + 1) begin
          failures++; $display("FAIL level %0d line took %0d steps", l, steps_in_line[l]);
        end
        steps_in_line[l] = 0;
      end else begin
        step_flush = 0;
        x_e = W'(lines[l][nxt_line[l]][2*nxt_pair[l]]);
        x_o = W'(lines[l][nxt_line[l]][2*nxt_pair[l] + 1]);
        nxt_pair[l]++;
        if (nxt_pair[l] == (N >> (l + 1))) begin nxt_pair[l] = 0; nxt_line[l]++; end
      end
      @(negedge clk);
      step_valid = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    for (int l = 0; l < L; l++) begin
      checks++;
      if (exp_s[l].size() != 0) begin failures++; $display("FAIL level %0d missing %0d", l, exp_s[l].size()); end
    end
    checks++;
    if (switches < 10 || flushes != 2 * (H + H / 2)) begin
      failures++; $display("FAIL switches=%0d flushes=%0d", switches, flushes);
    end
    $display("context switches %0d, flushes %0d", switches, flushes);
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
