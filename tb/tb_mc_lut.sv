// tb_mc_lut: a 4-context MC-LUT holding a different random truth table in
// each context. All contexts and input pairs are applied and the output is
// compared with entry {L1,L2} of that context's table.
module tb_mc_lut;

  import mcfpga_cfg_pkg::*;

  localparam int unsigned N = 4;

  logic [1:0]                cs;
  logic [3:0][N-1:0][2:0]    thr;
  logic                      l1;
  logic                      l2;
  logic                      out;
  logic [N-1:0][3:0]         tt;     // tt[context][entry]
  logic [N-1:0]              pat;

  int checks   = 0;
  int failures = 0;

  mc_lut #(.NCTX(N)) dut (.cs(cs), .thr(thr), .l1(l1), .l2(l2), .out(out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 50; trial++) begin
      for (int c = 0; c < N; c++) tt[c] = 4'($urandom);
      if (trial == 0) tt = {4'b0110, 4'b1000, 4'b1110, 4'b1010};  // XOR, AND, OR, L1
      for (int e = 0; e < 4; e++) begin
        for (int c = 0; c < N; c++) pat[c] = tt[c][e];
        thr[e] = cfg_util#(N)::compile(pat);
      end
      for (int c = 0; c < N; c++)
        for (int e = 0; e < 4; e++) begin
          cs = 2'(c);
          {l1, l2} = 2'(e);
          #1;
          checks++;
          if (out !== tt[c][e]) begin
            failures++;
            $display("FAIL ctx=%0d L1L2=%02b out=%0b exp=%0b", c, e, out, tt[c][e]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
