// wt_linemem: line memory of the vertical lifting unit.
//
// A plain RAM of DEPTH words with one combinational read port and one write
// port on the same address, so a step can read the old word of a column and
// replace it in the same clock. Addressed by level base plus column, it
// holds one line per pyramid level. Used three times: as the two delay
// lines that keep the previous detail line and the previous even line, and
// as the line FIFO that keeps the odd line until the next even line comes
// (written and read in column order, so addressing by column gives FIFO
// order). The contents are not reset; the vertical unit writes every word
// before it reads it.
module wt_linemem #(
  parameter int unsigned WIDTH = 2 * wt_pkg::COEF_W_DEF,
  parameter int unsigned DEPTH = wt_pkg::stack_depth(wt_pkg::LINE_N_DEF, wt_pkg::LEVELS_DEF),
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

endmodule
