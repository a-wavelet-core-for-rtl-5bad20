// tb_wt_lift_kernel: checks the lifting kernel against the predict/update
// equations on directed corner cases and random operands, including the
// left-edge mirror (first) and negative values.
module tb_wt_lift_kernel;
  localparam int W = 16;
  logic signed [W-1:0] e0, o, e1, dprev, d, s;
  logic first;
  int checks = 0, failures = 0;

  wt_lift_kernel #(.W(W)) dut (.*);

  task automatic apply(int ve0, int vo, int ve1, int vdp, bit vf);
    int ed, es, dp;
    e0 = W'(ve0); o = W'(vo); e1 = W'(ve1); dprev = W'(vdp); first = vf;
    #1;
    ed = vo - ((ve0 + ve1) >>> 1);
    dp = vf ? ed : vdp;
    es = ve0 + ((dp + ed) >>> 2);
    checks += 2;
    if (int'(d) != ed || int'(s) != es) begin
      failures++;
      $display("FAIL e0=%0d o=%0d e1=%0d dp=%0d f=%0d: d=%0d/%0d s=%0d/%0d",
               ve0, vo, ve1, vdp, vf, d, ed, s, es);
    end
  endtask

  initial begin
    apply(10, 12, 14, 0, 1);     // linear ramp: detail 0
    apply(0, 255, 0, 0, 1);      // peak
    apply(255, 0, 255, -255, 0); // valley, negative detail
    apply(3, 4, 4, -1, 0);       // floor of odd sums
    apply(-7, -3, -2, 5, 0);     // negative operands
    for (int i = 0; i < 2000; i++)
      apply($urandom_range(0, 2000) - 1000, $urandom_range(0, 2000) - 1000,
            $urandom_range(0, 2000) - 1000, $urandom_range(0, 2000) - 1000,
            1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
