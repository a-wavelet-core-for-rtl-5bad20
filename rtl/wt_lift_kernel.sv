// wt_lift_kernel: one forward lifting stage of the CDF 2-2 (5/3) wavelet.
//
// Given an even sample e0, the odd sample o that follows it, the next even
// sample e1 and the previous detail dprev, it computes
//   predict:  d = o  - floor((e0 + e1) / 2)
//   update:   s = e0 + floor((dprev + d) / 4)
// with four adders (two for predict, two for update) and the factors 1/2
// and 1/4 done as arithmetic right shifts. It is the datapath of one 1-D
// lifting block; the delay registers that feed it (previous even sample,
// previous detail) belong to the caller, so the same kernel serves the
// horizontal unit and both columns of the vertical unit.
//
// Boundaries use whole-sample symmetric extension: at the right/bottom
// edge the caller passes e1 = e0, and at the left/top edge it sets `first`,
// which makes the kernel use d in place of the missing previous detail.
// The rounding (plain floor, no offset) is this design's choice.
//
// Purely combinational; intermediate sums are one bit wider than W and the
// results are cut back to W bits.
module wt_lift_kernel #(
  parameter int unsigned W = wt_pkg::COEF_W_DEF
) (
  input  logic signed [W-1:0] e0,
  input  logic signed [W-1:0] o,
  input  logic signed [W-1:0] e1,
  input  logic signed [W-1:0] dprev,
  input  logic                first,
  output logic signed [W-1:0] d,
  output logic signed [W-1:0] s
);
  logic signed [W:0] esum, dsum, dfull, sfull;
  logic signed [W-1:0] dp;

  always_comb begin
    esum  = (W+1)'(e0) + (W+1)'(e1);               // adder 1
    dfull = (W+1)'(o) - (esum >>> 1);               // adder 2 (predict)
    d     = dfull[W-1:0];
    dp    = first ? d : dprev;
    dsum  = (W+1)'(dp) + (W+1)'(d);                 // adder 3
    sfull = (W+1)'(e0) + (dsum >>> 2);              // adder 4 (update)
    s     = sfull[W-1:0];
  end

endmodule
