// wt_vlift: vertical 1-D lifting unit using the line-buffer method.
//
// Input is the output of the horizontal unit: for a level l, line r and
// column k, a pair of coefficients (h_s, h_d) that belong to two adjacent
// columns of the horizontally transformed image. Both columns are lifted in
// parallel by two wt_lift_kernel instances (eight adders), so the whole 2-D
// step uses twelve adders with the horizontal unit.
//
// Three line memories, each stacking one line per level:
//   a: the previous detail line (the last vertical detail computed),
//   b: the previous even line, not yet updated,
//   c: the odd line being held until the next even line arrives.
// Per incoming column, by line parity:
//   line 0            : b[k] <= input
//   odd line, not last: c[k] <= input
//   even line r >= 2  : D = c[k] - (b[k] + in)/2, S = b[k] + (a[k] + D)/4,
//                       output line r/2 - 1, then a[k] <= D, b[k] <= in
//   last line (odd)   : D = in - b[k] (bottom edge mirrored), S as above,
//                       output the last line of the level
// On the first output line the missing previous detail is mirrored (a is
// replaced by D). The outputs are the four sub-bands of the level: ll
// (horizontal low, vertical low), lh (horizontal low, vertical high),
// hl (horizontal high, vertical low) and hh.
//
// Memory reads are combinational and the writes land at the clock edge, so
// one column is handled per clock; the outputs are registered and appear
// one clock after h_valid. Level l has LINE_N >> (l+1) columns and
// IMG_H >> l lines. Output line numbers stay below IMG_H/2, so the top bit
// of v_row is always zero; v_row keeps the width of h_row for simplicity.
module wt_vlift #(
  parameter int unsigned W      = wt_pkg::COEF_W_DEF,
  parameter int unsigned LINE_N = wt_pkg::LINE_N_DEF,
  parameter int unsigned IMG_H  = wt_pkg::IMG_H_DEF,
  parameter int unsigned LEVELS = wt_pkg::LEVELS_DEF,
  localparam int unsigned LW    = (LEVELS > 1) ? $clog2(LEVELS) : 1,
  localparam int unsigned CW    = $clog2(LINE_N),
  localparam int unsigned RW    = $clog2(IMG_H),
  localparam int unsigned DEPTH = wt_pkg::stack_depth(LINE_N, LEVELS),
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                h_valid,
  input  logic [LW-1:0]       h_lvl,
  input  logic [RW-1:0]       h_row,
  input  logic [CW-1:0]       h_col,
  input  logic signed [W-1:0] h_s,
  input  logic signed [W-1:0] h_d,
  output logic                v_valid,
  output logic [LW-1:0]       v_lvl,
  output logic [RW-1:0]       v_row,
  output logic [CW-1:0]       v_col,
  output logic signed [W-1:0] v_ll,
  output logic signed [W-1:0] v_lh,
  output logic signed [W-1:0] v_hl,
  output logic signed [W-1:0] v_hh
);
  logic [AW-1:0]    addr;
  logic [2*W-1:0]   a_rd, b_rd, c_rd, in_pair, d_pair;
  logic             a_we, b_we, c_we;
  logic [RW-1:0]    last_row;
  logic             is_even, is_last, do_lift, first;
  logic signed [W-1:0] e0 [2], o [2], e1 [2], dprev [2], kd [2], ks [2];

  assign in_pair  = {h_d, h_s};
  assign addr     = AW'(wt_pkg::level_base(LINE_N, 32'(h_lvl)) + 32'(h_col));
  assign last_row = RW'((IMG_H >> h_lvl) - 1);
  assign is_even  = !h_row[0];
  assign is_last  = (h_row == last_row);
  assign do_lift  = h_valid && ((is_even && h_row != '0) || is_last);
  // First output line of the level: no previous detail line yet.
  assign first    = is_last ? (h_row == RW'(1)) : (h_row == RW'(2));

  wt_linemem #(.WIDTH(2*W), .DEPTH(DEPTH)) u_mem_a (
    .clk, .addr, .we(a_we), .wdata(d_pair), .rdata(a_rd));
  wt_linemem #(.WIDTH(2*W), .DEPTH(DEPTH)) u_mem_b (
    .clk, .addr, .we(b_we), .wdata(in_pair), .rdata(b_rd));
  wt_linemem #(.WIDTH(2*W), .DEPTH(DEPTH)) u_mem_c (
    .clk, .addr, .we(c_we), .wdata(in_pair), .rdata(c_rd));

  for (genvar i = 0; i < 2; i++) begin : g_col
    always_comb begin
      e0[i]    = b_rd[i*W +: W];
      dprev[i] = a_rd[i*W +: W];
      if (is_last) begin
        o[i]  = in_pair[i*W +: W];
        e1[i] = b_rd[i*W +: W];
      end else begin
        o[i]  = c_rd[i*W +: W];
        e1[i] = in_pair[i*W +: W];
      end
    end
    wt_lift_kernel #(.W(W)) u_kernel (
      .e0(e0[i]), .o(o[i]), .e1(e1[i]), .dprev(dprev[i]), .first(first),
      .d(kd[i]), .s(ks[i]));
  end

  assign d_pair = {kd[1], kd[0]};
  assign a_we   = do_lift;
  assign b_we   = h_valid && is_even;
  assign c_we   = h_valid && !is_even && !is_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_valid <= 1'b0;
      v_lvl   <= '0;
      v_row   <= '0;
      v_col   <= '0;
      v_ll    <= '0;
      v_lh    <= '0;
      v_hl    <= '0;
      v_hh    <= '0;
    end else begin
      v_valid <= do_lift;
      if (do_lift) begin
        v_lvl <= h_lvl;
        v_row <= (h_row - 1'b1) >> 1;
        v_col <= h_col;
        v_ll  <= ks[0];
        v_lh  <= kd[0];
        v_hl  <= ks[1];
        v_hh  <= kd[1];
      end
    end
  end

endmodule
