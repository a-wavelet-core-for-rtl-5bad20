// tb_wt_linemem: writes random words at random addresses and checks that
// every read returns the last word written there, including the
// read-old-then-write pattern of the delay lines (read and write of the
// same address in one clock return the old word).
module tb_wt_linemem;
  localparam int WIDTH = 20, DEPTH = 12, AW = $clog2(DEPTH);
  logic clk = 0;
  logic [AW-1:0] addr = 0;
  logic we = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  int model [DEPTH];

  wt_linemem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      addr = AW'(a); we = 1; wdata = WIDTH'($urandom); model[a] = int'(wdata);
      @(negedge clk);
    end
    for (int i = 0; i < 2000; i++) begin
      addr = AW'($urandom_range(0, DEPTH - 1));
      we = 1'($urandom);
      wdata = WIDTH'($urandom);
      #1;
      checks++;
      if (int'(rdata) != model[addr]) begin
        failures++; $display("FAIL addr %0d: %0h exp %0h", addr, rdata, model[addr]);
      end
      if (we) model[addr] = int'(wdata);
      @(negedge clk);
    end
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
