// tb_wt_sched: applies random request patterns to the arbiter and checks
// its choice against the priority rules written out independently: level-0
// flush, then the input pair, then the deepest level with work (its flush
// before its FIFO pair). Also checks the acknowledge signals and the
// context-switch flag against the previously issued level.
module tb_wt_sched;
  localparam int L = 4, LW = 2;
  logic clk = 0, rst_n = 0;
  logic in_pair_valid = 0;
  logic [L-1:0] flush_pend = 0, lvl_ready = 0;
  logic step_valid, step_flush, in_take, ctx_switch;
  logic [LW-1:0] step_lvl;
  logic [L-1:0] lvl_pop;
  int checks = 0, failures = 0, switches = 0;
  int last = 0;

  wt_sched #(.LEVELS(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      automatic bit ev = 0, ef = 0, et = 0;
      automatic int el = 0;
      automatic logic [L-1:0] ep = 0;
      in_pair_valid = 1'($urandom);
      flush_pend = L'($urandom) & L'($urandom);
      lvl_ready = L'($urandom) & ~L'(1);
      #1;
      if (flush_pend[0]) begin ev = 1; ef = 1; el = 0; end
      else if (in_pair_valid) begin ev = 1; et = 1; el = 0; end
      else
        for (int l = L - 1; l >= 1; l--)
          if (flush_pend[l] || lvl_ready[l]) begin
            ev = 1; el = l; ef = flush_pend[l]; ep[l] = !flush_pend[l];
            break;
          end
      checks++;
      if (step_valid != ev || (ev && (int'(step_lvl) != el || step_flush != ef))
          || in_take != et || lvl_pop != ep || ctx_switch != (ev && el != last)) begin
        failures++;
        $display("FAIL in=%0d fp=%b rdy=%b: v=%0d l=%0d f=%0d take=%0d pop=%b sw=%0d",
                 in_pair_valid, flush_pend, lvl_ready, step_valid, step_lvl, step_flush,
                 in_take, lvl_pop, ctx_switch);
      end
      if (ev) begin
        if (el != last) switches++;
        last = el;
      end
      @(negedge clk);
    end
    checks++;
    if (switches < 100) begin failures++; $display("FAIL few switches"); end
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
