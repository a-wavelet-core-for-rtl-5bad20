// wt_hlift: horizontal 1-D lifting unit with one context per pyramid level.
//
// Each issued step hands the unit one even/odd sample pair of some level
// (step_lvl) or, with step_flush, asks it to close the current line of that
// level. Each level has its own set of context latches: the even and odd
// samples of the previous pair, the previous detail, the pair counter and
// the line counter. A step reads the latches of its level, computes with a
// single shared wt_lift_kernel (four adders) and writes the latches back,
// so switching level costs nothing: the old context stays where it is and
// the new one is read in the same clock.
//
// For pair j of a line (j >= 1) the step outputs coefficient pair j-1
// (smooth s, detail d), because the predict of pair j-1 needs the even
// sample of pair j. The first pair of a line only loads the latches. After
// the last pair the level raises flush_pend; the flush step then produces
// the last coefficient pair with the symmetric extension e1 = e0 and moves
// the level to its next line. A level with flush_pend set must get its
// flush before any further pair.
//
// Level l works on lines of LINE_N >> l samples and frames of IMG_H >> l
// lines; both must stay even and lines must hold at least two pairs.
// Output is registered: h_valid and the coefficient pair with its level,
// line and column (pair index) appear one clock after the step.
module wt_hlift #(
  parameter int unsigned W      = wt_pkg::COEF_W_DEF,
  parameter int unsigned LINE_N = wt_pkg::LINE_N_DEF,
  parameter int unsigned IMG_H  = wt_pkg::IMG_H_DEF,
  parameter int unsigned LEVELS = wt_pkg::LEVELS_DEF,
  localparam int unsigned LW    = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int unsigned CW    = $clog2(LINE_N),
  localparam int unsigned RW    = $clog2(IMG_H)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                step_valid,
  input  logic [LW-1:0]       step_lvl,
  input  logic                step_flush,
  input  logic signed [W-1:0] x_e,
  input  logic signed [W-1:0] x_o,
  output logic [LEVELS-1:0]   flush_pend,
  output logic                h_valid,
  output logic [LW-1:0]       h_lvl,
  output logic [RW-1:0]       h_row,
  output logic [CW-1:0]       h_col,
  output logic signed [W-1:0] h_s,
  output logic signed [W-1:0] h_d
);
  // Context latches, one set per level.
  logic signed [W-1:0] ctx_e  [LEVELS];
  logic signed [W-1:0] ctx_o  [LEVELS];
  logic signed [W-1:0] ctx_dp [LEVELS];
  logic [CW-1:0]       ctx_col[LEVELS];
  logic [RW-1:0]       ctx_row[LEVELS];

  logic signed [W-1:0] e0, o, e1, dprev, k_d, k_s;
  logic                first;
  logic [CW-1:0]       col, last_pair;
  logic [RW-1:0]       row, last_row;

  always_comb begin
    e0        = ctx_e[step_lvl];
    o         = ctx_o[step_lvl];
    dprev     = ctx_dp[step_lvl];
    col       = ctx_col[step_lvl];
    row       = ctx_row[step_lvl];
    last_pair = CW'((LINE_N >> (step_lvl + 1)) - 1);
    last_row  = RW'((IMG_H >> step_lvl) - 1);
    e1        = step_flush ? e0 : x_e;
    // The detail before the first one of a line is mirrored.
    first     = step_flush ? 1'b0 : (col == CW'(1));
  end

  wt_lift_kernel #(.W(W)) u_kernel (
    .e0(e0), .o(o), .e1(e1), .dprev(dprev), .first(first), .d(k_d), .s(k_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LEVELS; l++) begin
        ctx_e[l]   <= '0;
        ctx_o[l]   <= '0;
        ctx_dp[l]  <= '0;
        ctx_col[l] <= '0;
        ctx_row[l] <= '0;
      end
      flush_pend <= '0;
      h_valid    <= 1'b0;
      h_lvl      <= '0;
      h_row      <= '0;
      h_col      <= '0;
      h_s        <= '0;
      h_d        <= '0;
    end else begin
      h_valid <= 1'b0;
      if (step_valid) begin
        h_lvl <= step_lvl;
        h_row <= row;
        h_s   <= k_s;
        h_d   <= k_d;
        if (step_flush) begin
          // Last coefficient pair of the line, right edge mirrored.
          h_valid              <= 1'b1;
          h_col                <= last_pair;
          flush_pend[step_lvl] <= 1'b0;
          ctx_row[step_lvl]    <= (row == last_row) ? '0 : row + 1'b1;
        end else begin
          ctx_e[step_lvl] <= x_e;
          ctx_o[step_lvl] <= x_o;
          if (col != '0) begin
            h_valid          <= 1'b1;
            h_col            <= col - 1'b1;
            ctx_dp[step_lvl] <= k_d;
          end
          if (col == last_pair) begin
            ctx_col[step_lvl]    <= '0;
            flush_pend[step_lvl] <= 1'b1;
          end else begin
            ctx_col[step_lvl] <= col + 1'b1;
          end
        end
      end
    end
  end

  a_flush_first: assert property (@(posedge clk) disable iff (!rst_n)
    step_valid && !step_flush |-> !flush_pend[step_lvl])
    else $error("wt_hlift: pair issued to a level that waits for its flush");
  a_flush_needed: assert property (@(posedge clk) disable iff (!rst_n)
    step_valid && step_flush |-> flush_pend[step_lvl])
    else $error("wt_hlift: flush issued to a level with no line to close");

endmodule
