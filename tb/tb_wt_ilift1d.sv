// tb_wt_ilift1d: perfect-reconstruction test. Random lines (pixel range
// and wide signed values) are transformed by the reference forward lifting,
// streamed into the inverse unit (back to back, then with random gaps) and
// the output must equal the original samples exactly. Also checks that a
// line of P pairs occupies the input for exactly P+1 clocks at full rate.
module tb_wt_ilift1d;
  import wt_ref_pkg::*;
  localparam int W = 16, N = 12, P = N / 2, LINES = 40;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid;
  logic signed [W-1:0] in_s = 0, in_d = 0, out_e, out_o;
  int checks = 0, failures = 0;
  int expq[$];

  wt_ilift1d #(.W(W), .LINE_N(N)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() < 2 || int'(out_e) != expq[0] || int'(out_o) != expq[1]) begin
      failures++; $display("FAIL got %0d %0d", out_e, out_o);
    end
    if (expq.size() >= 2) begin void'(expq.pop_front()); void'(expq.pop_front()); end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int ln = 0; ln < LINES; ln++) begin
      automatic arr_t x = {}, s, d;
      automatic int t0, used;
      for (int i = 0; i < N; i++)
        x.push_back(ln % 2 ? $urandom_range(0, 8000) - 4000 : $urandom_range(0, 255));
      fwd1d(x, s, d);
      foreach (x[i]) expq.push_back(x[i]);
      t0 = $time;
      for (int k = 0; k < P; k++) begin
        in_valid = 1; in_s = W'(s[k]); in_d = W'(d[k]);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        in_valid = 0;
        if (ln >= LINES / 2) repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      if (ln < LINES / 2) begin
        // Full rate: the next line may start P+1 clocks after this one.
        @(negedge clk);
        used = ($time - t0) / 10;
        checks++;
        if (used != P + 1 || !in_ready) begin failures++; $display("FAIL line took %0d clocks", used); end
      end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d samples missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
