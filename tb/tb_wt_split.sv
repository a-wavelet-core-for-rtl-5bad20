// tb_wt_split: feeds pixels with random gaps and frame starts, takes pairs
// the next cycle (as the scheduler does), and checks every pair against the
// expected even/odd pixels, and that no overflow is flagged.
module tb_wt_split;
  localparam int PIX_W = 8, W = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  logic pair_take;
  logic [PIX_W-1:0] in_pix = 0;
  logic pair_valid, overflow;
  logic signed [W-1:0] pair_e, pair_o;
  int checks = 0, failures = 0, cyc = 0;
  int exp_q[$];

  wt_split #(.PIX_W(PIX_W), .W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // Take every offered pair at once and compare.
  always @(posedge clk) if (rst_n && pair_valid && pair_take) begin
    checks++;
    if (exp_q.size() < 2 || int'(pair_e) != exp_q[0] || int'(pair_o) != exp_q[1]) begin
      failures++;
      $display("FAIL pair %0d,%0d", pair_e, pair_o);
    end else begin
      void'(exp_q.pop_front()); void'(exp_q.pop_front());
    end
  end
  assign pair_take = pair_valid;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 3; f++) begin
      int npix = 2 * $urandom_range(4, 40);
      if (f == 2) npix++;  // odd leftover pixel, dropped by the next sof
      for (int i = 0; i < npix; i++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (i == 0); in_pix = PIX_W'($urandom);
        if (i < npix - (npix % 2)) exp_q.push_back(int'(in_pix));
        @(negedge clk);
        in_valid = 0; in_sof = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    // New frame: the pending odd pixel must be discarded.
    @(negedge clk); in_valid = 1; in_sof = 1; in_pix = 8'd77; exp_q.push_back(77);
    @(negedge clk); in_sof = 0; in_pix = 8'd200; exp_q.push_back(200);
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || overflow) begin failures++; $display("FAIL leftover %0d", exp_q.size()); end
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
