// tb_wt_fifo: random push/pop traffic against a queue model, checking the
// head word, empty, full and count every cycle, with a depth that is not a
// power of two so the pointer wrap is exercised; also fills the FIFO to
// full and drains it, and pushes and pops together while full.
module tb_wt_fifo;
  localparam int WIDTH = 12, DEPTH = 5;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [WIDTH-1:0] din = 0, dout;
  logic empty, full, overflow;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, fulls = 0;
  int model[$];

  wt_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_state();
    checks++;
    if (int'(count) != model.size() || empty != (model.size() == 0)
        || full != (model.size() == DEPTH) || overflow
        || (model.size() != 0 && int'(dout) != model[0])) begin
      failures++;
      $display("FAIL count=%0d/%0d empty=%0d full=%0d dout=%0h", count, model.size(), empty, full, dout);
    end
    if (full) fulls++;
  endtask

  task automatic cycle(bit ps, bit pp);
    push = ps; pop = pp; din = WIDTH'($urandom);
    @(posedge clk);
    if (pp && model.size() != 0) void'(model.pop_front());
    if (ps) model.push_back(int'(din));
    @(negedge clk);
    push = 0; pop = 0;
    check_state();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check_state();
    repeat (DEPTH) cycle(1, 0);                // fill
    cycle(1, 1);                               // push and pop while full
    repeat (DEPTH) cycle(0, 1);                // drain
    for (int i = 0; i < 3000; i++) begin
      automatic bit ps = $urandom_range(0, 1);
      automatic bit pp = $urandom_range(0, 1);
      if (model.size() == DEPTH) ps = pp;      // never overflow
      if (model.size() == 0) pp = 0;           // never underflow
      cycle(ps, pp);
    end
    checks++;
    if (fulls < 2) begin failures++; $display("FAIL full never reached"); end
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
