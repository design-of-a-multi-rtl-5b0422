// tb_fgfp: exhaustive check of the FGFP threshold abstraction.
//
// For 2 and 4 contexts every control level and threshold code is applied,
// and the conduct output is compared with the threshold-voltage rule worked
// out in real numbers: conducts when level > code - 0.5.
module tb_fgfp;

  logic [0:0] vc2;
  logic [1:0] thr2;
  logic       cond2;
  logic [1:0] vc4;
  logic [2:0] thr4;
  logic       cond4;

  int checks   = 0;
  int failures = 0;

  fgfp #(.NCTX(2)) dut2 (.vc(vc2), .thr(thr2), .cond(cond2));
  fgfp #(.NCTX(4)) dut4 (.vc(vc4), .thr(thr4), .cond(cond4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= 2; k++)
      for (int v = 0; v < 2; v++) begin
        vc2 = 1'(v); thr2 = 2'(k); #1;
        checks++;
        if (cond2 !== (real'(v) > real'(k) - 0.5)) begin
          failures++;
          $display("FAIL n=2 vc=%0d thr=%0d cond=%0b", v, k, cond2);
        end
      end
    for (int k = 0; k <= 4; k++)
      for (int v = 0; v < 4; v++) begin
        vc4 = 2'(v); thr4 = 3'(k); #1;
        checks++;
        if (cond4 !== (real'(v) > real'(k) - 0.5)) begin
          failures++;
          $display("FAIL n=4 vc=%0d thr=%0d cond=%0b", v, k, cond4);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
