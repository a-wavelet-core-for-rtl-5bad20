// wt_fifo: small synchronous FIFO.
//
// In the multi-level core one of these per level above the first holds the
// approximation samples the level below produced (packed two per word, an
// even/odd pair) until the scheduler switches the lifting units to that
// level. DEPTH words of WIDTH bits in a circular buffer with read and write
// pointers and an occupancy counter. The head word is visible on dout while
// not empty; pop removes it at the clock edge, push appends din. Push and
// pop in the same cycle are allowed, also when full. Pushing into a full
// FIFO without popping is an error: the word is dropped, an assertion fires
// and the sticky `overflow` flag is set.
module wt_fifo #(
  parameter int unsigned WIDTH = 2 * wt_pkg::COEF_W_DEF,
  parameter int unsigned DEPTH = wt_pkg::LINE_N_DEF / 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CNTW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [CNTW-1:0]  count,
  output logic             overflow
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CNTW'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rp];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wp <= incr(wp);
      if (do_pop)  rp <= incr(rp);
      count <= count + CNTW'(do_push) - CNTW'(do_pop);
      if (push && !do_push) overflow <= 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(push && full && !pop))
    else $error("wt_fifo: push into a full FIFO");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(pop && empty))
    else $error("wt_fifo: pop from an empty FIFO");

endmodule
