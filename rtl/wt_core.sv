// wt_core: multi-resolution 2-D lifting wavelet transform core (top level).
//
// A raster stream of pixels (up to one per clock) is transformed into the
// sub-bands of a LEVELS-deep 2-D wavelet pyramid with the CDF 2-2 (5/3)
// wavelet, using one horizontal and one vertical lifting unit for all
// levels. The data path is
//
//   pixels -> wt_split -> [input mux] -> wt_hlift -> wt_vlift -> sub-bands
//                             ^                           |
//                             +--- level FIFOs <- pack ---+  (ll of level l)
//
// wt_split forms even/odd pixel pairs. wt_sched picks each clock either
// the input pair or work of a deeper level and switches both units to that
// level's context. wt_hlift produces one horizontal (smooth, detail) pair
// per step; wt_vlift lifts the two columns vertically with its line
// memories and emits the four sub-band coefficients ll, lh, hl, hh of one
// position of one level. The ll coefficient of every level but the last is
// packed two by two and queued in the FIFO of the next level, from where
// the scheduler feeds it back into the same units: the recursive pyramid
// schedule, which interleaves the levels into one regular data flow.
//
// Interface: in_sof marks the first pixel of a frame; it restarts the
// pixel pairing only, so frames must be complete (IMG_H lines of LINE_N
// pixels) for the line counters of the levels to stay aligned. Output words carry
// their level (0 = finest), row and column within that level's sub-bands;
// out_ll_final is set on the last level, whose ll band is the final
// approximation (the ll values of other levels are intermediate). Latency
// from the completing pixel of a pair to its sub-band word is at least four
// clocks; outputs come in bursts during the even lines of each level.
// `overflow` is a sticky error flag (input pair or level FIFO overrun);
// ctx_switch pulses when a step works on a different level than the step
// before it. The rec_* ports reach a separate 1-D inverse lifting unit
// (wt_ilift1d) that rebuilds a line of LINE_N samples from its smooth and
// detail coefficients; it runs independently of the forward path.
//
// Memory: three line memories of LINE_N - (LINE_N >> LEVELS) pairs, under
// 3 lines, plus level FIFOs of one line of their level each, together
// under seven lines of coefficients.
module wt_core #(
  parameter int unsigned PIX_W  = wt_pkg::PIX_W_DEF,
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
  input  logic                in_valid,
  input  logic                in_sof,
  input  logic [PIX_W-1:0]    in_pix,
  output logic                out_valid,
  output logic [LW-1:0]       out_lvl,
  output logic [RW-1:0]       out_row,
  output logic [CW-1:0]       out_col,
  output logic signed [W-1:0] out_ll,
  output logic signed [W-1:0] out_lh,
  output logic signed [W-1:0] out_hl,
  output logic signed [W-1:0] out_hh,
  output logic                out_ll_final,
  output logic                ctx_switch,
  output logic                overflow,
  // 1-D reconstruction unit, side by side with the forward core.
  input  logic                rec_in_valid,
  output logic                rec_in_ready,
  input  logic signed [W-1:0] rec_in_s,
  input  logic signed [W-1:0] rec_in_d,
  output logic                rec_out_valid,
  output logic signed [W-1:0] rec_out_e,
  output logic signed [W-1:0] rec_out_o
);
  // Input split.
  logic                pair_valid, pair_take, split_ovf;
  logic signed [W-1:0] pair_e, pair_o;

  // Scheduler / input mux.
  logic              step_valid, step_flush;
  logic [LW-1:0]     step_lvl;
  logic [LEVELS-1:0] flush_pend, lvl_ready, lvl_pop, fifo_ovf;
  logic signed [W-1:0] x_e, x_o;
  logic [2*W-1:0]    fifo_dout [LEVELS];

  // Horizontal to vertical.
  logic                h_valid;
  logic [LW-1:0]       h_lvl;
  logic [RW-1:0]       h_row;
  logic [CW-1:0]       h_col;
  logic signed [W-1:0] h_s, h_d;

  wt_split #(.PIX_W(PIX_W), .W(W)) u_split (
    .clk, .rst_n, .in_valid, .in_sof, .in_pix,
    .pair_valid, .pair_e, .pair_o, .pair_take, .overflow(split_ovf));

  wt_sched #(.LEVELS(LEVELS)) u_sched (
    .clk, .rst_n, .in_pair_valid(pair_valid), .flush_pend, .lvl_ready,
    .step_valid, .step_lvl, .step_flush, .in_take(pair_take),
    .lvl_pop, .ctx_switch);

  // Input multiplexer: level 0 reads the pixel pair, deeper levels read the
  // head of their FIFO.
  always_comb begin
    if (step_lvl == '0) begin
      x_e = pair_e;
      x_o = pair_o;
    end else begin
      x_e = fifo_dout[step_lvl][W-1:0];
      x_o = fifo_dout[step_lvl][2*W-1:W];
    end
  end

  wt_hlift #(.W(W), .LINE_N(LINE_N), .IMG_H(IMG_H), .LEVELS(LEVELS)) u_hlift (
    .clk, .rst_n, .step_valid, .step_lvl, .step_flush, .x_e, .x_o,
    .flush_pend, .h_valid, .h_lvl, .h_row, .h_col, .h_s, .h_d);

  wt_vlift #(.W(W), .LINE_N(LINE_N), .IMG_H(IMG_H), .LEVELS(LEVELS)) u_vlift (
    .clk, .rst_n, .h_valid, .h_lvl, .h_row, .h_col, .h_s, .h_d,
    .v_valid(out_valid), .v_lvl(out_lvl), .v_row(out_row), .v_col(out_col),
    .v_ll(out_ll), .v_lh(out_lh), .v_hl(out_hl), .v_hh(out_hh));

  assign out_ll_final = (out_lvl == LW'(LEVELS - 1));

  // Level 0 has no FIFO: it is fed from the input.
  assign lvl_ready[0] = 1'b0;
  assign fifo_ovf[0]  = 1'b0;
  assign fifo_dout[0] = '0;

  // Levels 1 .. LEVELS-1: pack the ll output of the level below into
  // even/odd pairs and queue them.
  for (genvar l = 1; l < LEVELS; l++) begin : g_lvl
    logic                half_valid, push;
    logic signed [W-1:0] half_q;
    logic                empty;
    logic                ll_in;

    assign ll_in = out_valid && (out_lvl == LW'(l - 1));
    assign push  = ll_in && half_valid;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        half_valid <= 1'b0;
        half_q     <= '0;
      end else if (ll_in) begin
        half_valid <= !half_valid;
        if (!half_valid) half_q <= out_ll;
      end
    end

    wt_fifo #(.WIDTH(2*W), .DEPTH(LINE_N >> (l + 1))) u_fifo (
      .clk, .rst_n, .push, .din({out_ll, half_q}), .pop(lvl_pop[l]),
      .dout(fifo_dout[l]), .empty, .full(), .count(), .overflow(fifo_ovf[l]));

    assign lvl_ready[l] = !empty;
  end

  assign overflow = split_ovf || (|fifo_ovf);

  // Inverse 1-D lifting for lines of LINE_N samples. It shares nothing with
  // the forward path; it is brought out on its own ports.
  wt_ilift1d #(.W(W), .LINE_N(LINE_N)) u_ilift (
    .clk, .rst_n, .in_valid(rec_in_valid), .in_ready(rec_in_ready),
    .in_s(rec_in_s), .in_d(rec_in_d),
    .out_valid(rec_out_valid), .out_e(rec_out_e), .out_o(rec_out_o));

endmodule
