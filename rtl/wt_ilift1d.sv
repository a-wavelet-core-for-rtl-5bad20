// wt_ilift1d: 1-D inverse lifting of the CDF 2-2 (5/3) wavelet, one line.
//
// It undoes the forward steps in reverse order with the signs changed:
//   undo update:  e[n] = s[n] - floor((d[n-1] + d[n]) / 4),  d[-1] = d[0]
//   undo predict: o[n] = d[n] + floor((e[n] + e[n+1]) / 2),  e[P] = e[P-1]
//   merge:        x[2n] = e[n], x[2n+1] = o[n]
// which restores exactly the samples the forward transform (wt_lift_kernel
// with the same symmetric edges) started from. Four adders, as in the
// forward direction.
//
// Interface: a line of LINE_N samples arrives as LINE_N/2 coefficient
// pairs (in_s, in_d) with in_valid/in_ready. The pair n is reconstructed
// when pair n+1 arrives (undo predict needs e[n+1]), so after the last
// pair of a line the unit spends one clock closing the line, with in_ready
// low; a line of P pairs therefore takes P+1 clocks at full rate. Output
// pairs (out_e, out_o) are registered and leave one clock after the pair
// that completes them, flagged by out_valid.
module wt_ilift1d #(
  parameter int unsigned W      = wt_pkg::COEF_W_DEF,
  parameter int unsigned LINE_N = wt_pkg::LINE_N_DEF,
  localparam int unsigned CW    = $clog2(LINE_N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_s,
  input  logic signed [W-1:0] in_d,
  output logic                out_valid,
  output logic signed [W-1:0] out_e,
  output logic signed [W-1:0] out_o
);
  localparam int unsigned P = LINE_N / 2;

  logic [CW-1:0]       col;       // index of the incoming pair
  logic                closing;   // the line's last pair is waiting for its odd sample
  logic signed [W-1:0] e_q, d_q;  // e[n-1] and d[n-1]
  logic signed [W:0]   dsum, efull, esum, ofull;
  logic signed [W-1:0] dp, e_new, e_next, o_prev;

  assign in_ready = !closing;

  always_comb begin
    // Undo update on the incoming pair.
    dp     = (col == '0) ? in_d : d_q;
    dsum   = (W+1)'(dp) + (W+1)'(in_d);                  // adder 1
    efull  = (W+1)'(in_s) - (dsum >>> 2);                 // adder 2
    e_new  = efull[W-1:0];
    // Undo predict of the previous pair; at the line end e[P] = e[P-1].
    e_next = closing ? e_q : e_new;
    esum   = (W+1)'(e_q) + (W+1)'(e_next);               // adder 3
    ofull  = (W+1)'(d_q) + (esum >>> 1);                  // adder 4
    o_prev = ofull[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      closing   <= 1'b0;
      e_q       <= '0;
      d_q       <= '0;
      out_valid <= 1'b0;
      out_e     <= '0;
      out_o     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (closing) begin
        out_valid <= 1'b1;
        out_e     <= e_q;
        out_o     <= o_prev;
        closing   <= 1'b0;
      end else if (in_valid) begin
        if (col != '0) begin
          out_valid <= 1'b1;
          out_e     <= e_q;
          out_o     <= o_prev;
        end
        e_q <= e_new;
        d_q <= in_d;
        if (col == CW'(P - 1)) begin
          col     <= '0;
          closing <= 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
