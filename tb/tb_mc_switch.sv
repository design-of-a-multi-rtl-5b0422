// tb_mc_switch: every ON/OFF pattern on 2-, 4- and 8-context MC switches.
//
// Each pattern is compiled into thresholds with the bench helper and the
// switch is checked in every context against the wanted pattern. The
// 4-context example of the published design (ON in contexts 0 and 2, thresholds
// -0.5/2.5 and 1.5/0.5) is applied by hand. Random thresholds are then
// checked against a window-literal evaluation written here.
module tb_mc_switch;

  import mcfpga_cfg_pkg::*;

  logic [0:0]      cs2;
  logic [1:0][1:0] thr2;
  logic            on2;
  logic [1:0]      cs4;
  logic [3:0][2:0] thr4;
  logic            on4;
  logic [2:0]      cs8;
  logic [7:0][3:0] thr8;
  logic            on8;

  int checks   = 0;
  int failures = 0;

  mc_switch #(.NCTX(2)) dut2 (.cs(cs2), .thr(thr2), .on(on2));
  mc_switch #(.NCTX(4)) dut4 (.cs(cs4), .thr(thr4), .on(on4));
  mc_switch #(.NCTX(8)) dut8 (.cs(cs8), .thr(thr8), .on(on8));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b", what, got, exp);
    end
  endtask

  // Window-literal value of a 4-context switch from raw codes.
  function automatic logic ref4(logic [3:0][2:0] t, int s);
    logic r = 1'b0;
    for (int w = 0; w < 2; w++)
      r |= (s >= int'(t[2*w])) && ((3 - s) >= int'(t[2*w+1]));
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 4; p++) begin
      thr2 = cfg_util#(2)::compile(2'(p));
      for (int s = 0; s < 2; s++) begin
        cs2 = 1'(s); #1;
        check($sformatf("n=2 pat=%b s=%0d", p, s), on2, p[s]);
      end
    end
    for (int p = 0; p < 16; p++) begin
      thr4 = cfg_util#(4)::compile(4'(p));
      for (int s = 0; s < 4; s++) begin
        cs4 = 2'(s); #1;
        check($sformatf("n=4 pat=%b s=%0d", p, s), on4, p[s]);
      end
    end
    for (int p = 0; p < 256; p++) begin
      thr8 = cfg_util#(8)::compile(8'(p));
      for (int s = 0; s < 8; s++) begin
        cs8 = 3'(s); #1;
        check($sformatf("n=8 pat=%b s=%0d", p, s), on8, p[s]);
      end
    end
    // Published example: F = WL(0) + WL(2); codes k stand for Vth = k - 0.5.
    thr4[0] = 3'd0;  // -0.5 on S
    thr4[1] = 3'd3;  //  2.5 on ~S
    thr4[2] = 3'd2;  //  1.5 on S
    thr4[3] = 3'd1;  //  0.5 on ~S
    for (int s = 0; s < 4; s++) begin
      cs4 = 2'(s); #1;
      check($sformatf("example s=%0d", s), on4, (s == 0) || (s == 2));
    end
    for (int i = 0; i < 500; i++) begin
      for (int k = 0; k < 4; k++) thr4[k] = 3'($urandom_range(0, 4));
      cs4 = 2'($urandom_range(0, 3)); #1;
      check("random n=4", on4, ref4(thr4, int'(cs4)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
