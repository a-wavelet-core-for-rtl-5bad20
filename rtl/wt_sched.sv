// wt_sched: input multiplexer control and context-switch arbiter.
//
// Each clock it chooses what the lifting units work on, following the
// recursive pyramid idea: samples of the lower resolutions are slipped into
// the gaps of the input stream as soon as they can be computed.
//   1. a pending line flush of level 0 (it must precede the next input pair);
//   2. an input pair from the split stage (the video input cannot wait);
//   3. otherwise the deepest level l >= 1 that has work: its pending flush
//      first, else a pair waiting in its level FIFO (two samples are ready).
// The chosen level and operation go to the horizontal unit as a step; the
// matching source (input pair register or level FIFO) is acknowledged in
// the same cycle. Purely combinational; the choice switches the units'
// context in the clock in which it is made. ctx_switch marks a step whose
// level differs from that of the previous step, for observation.
module wt_sched #(
  parameter int unsigned LEVELS = wt_pkg::LEVELS_DEF,
  localparam int unsigned LW    = (LEVELS > 1) ? $clog2(LEVELS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_pair_valid,
  input  logic [LEVELS-1:0] flush_pend,
  input  logic [LEVELS-1:0] lvl_ready,    // level FIFO holds a pair (bit 0 unused)
  output logic              step_valid,
  output logic [LW-1:0]     step_lvl,
  output logic              step_flush,
  output logic              in_take,
  output logic [LEVELS-1:0] lvl_pop,
  output logic              ctx_switch
);
  logic [LW-1:0] last_lvl;

  always_comb begin
    step_valid = 1'b0;
    step_lvl   = '0;
    step_flush = 1'b0;
    in_take    = 1'b0;
    lvl_pop    = '0;
    if (flush_pend[0]) begin
      step_valid = 1'b1;
      step_flush = 1'b1;
    end else if (in_pair_valid) begin
      step_valid = 1'b1;
      in_take    = 1'b1;
    end else begin
      for (int l = 1; l < LEVELS; l++) begin
        // Later iterations overwrite earlier ones: the deepest level wins.
        if (flush_pend[l]) begin
          step_valid = 1'b1;
          step_lvl   = LW'(l);
          step_flush = 1'b1;
          lvl_pop    = '0;
        end else if (lvl_ready[l]) begin
          step_valid = 1'b1;
          step_lvl   = LW'(l);
          step_flush = 1'b0;
          lvl_pop    = '0;
          lvl_pop[l] = 1'b1;
        end
      end
    end
  end

  assign ctx_switch = step_valid && (step_lvl != last_lvl);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          last_lvl <= '0;
    else if (step_valid) last_lvl <= step_lvl;
  end

endmodule
