// wt_split: the "split" step of the lifting scheme for the input stream.
//
// Pixels arrive one per clock at most (in_valid), in raster order; in_sof
// marks the first pixel of a frame and restarts the pairing. Each even
// pixel is held until its odd partner arrives; the pair (even, odd) is then
// offered on pair_valid/pair_e/pair_o, sign-extended to the coefficient
// width, until the scheduler takes it (pair_take). Splitting before any
// computation means the lifting units only ever see whole pairs.
//
// Lines have an even number of pixels, so a pair never straddles two lines.
// Pixels are unsigned, so the bits of pair_e/pair_o above PIX_W are always
// zero; they are kept so the pair has the width of every other datapath
// sample.
// A video source cannot be stalled: a new pair completing while the last
// one is still waiting is an overflow, flagged by an assertion and by the
// sticky `overflow` output. One pair register is enough because pairs come
// at most every second cycle and the scheduler never holds one back for
// more than one cycle.
module wt_split #(
  parameter int unsigned PIX_W = wt_pkg::PIX_W_DEF,
  parameter int unsigned W     = wt_pkg::COEF_W_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_sof,
  input  logic [PIX_W-1:0]    in_pix,
  output logic                pair_valid,
  output logic signed [W-1:0] pair_e,
  output logic signed [W-1:0] pair_o,
  input  logic                pair_take,
  output logic                overflow
);
  logic             have_even;
  logic [PIX_W-1:0] even_q;
  logic             odd_now;

  // The incoming pixel completes a pair if an even one is held and this is
  // not the start of a new frame.
  assign odd_now = in_valid && have_even && !in_sof;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_even  <= 1'b0;
      even_q     <= '0;
      pair_valid <= 1'b0;
      pair_e     <= '0;
      pair_o     <= '0;
      overflow   <= 1'b0;
    end else begin
      if (pair_take) pair_valid <= 1'b0;
      if (in_valid) begin
        if (odd_now) begin
          have_even  <= 1'b0;
          pair_valid <= 1'b1;
          pair_e     <= W'({1'b0, even_q});
          pair_o     <= W'({1'b0, in_pix});
          if (pair_valid && !pair_take) overflow <= 1'b1;
        end else begin
          have_even <= 1'b1;
          even_q    <= in_pix;
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(odd_now && pair_valid && !pair_take))
    else $error("wt_split: input pair lost, scheduler did not take the previous one");

endmodule
