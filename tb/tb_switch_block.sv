// tb_switch_block: random per-context connection patterns on all 16
// switches of a 4-context switch block, with random resolved line values.
// The reported connection matrix must equal the wanted patterns in the
// selected context, and the three terminal inputs must be the OR of the
// lines connected to them.
module tb_switch_block;

  import mcfpga_cfg_pkg::*;

  localparam int unsigned N = 4;

  logic [1:0]                    cs;
  logic [3:0][3:0][N-1:0][2:0]   thr;
  logic [3:0]                    line_val;
  logic [3:0][3:0]               conn;
  logic                          l1, l2, wrst;
  logic [3:0][3:0][N-1:0]        pat;   // [side][term][context]

  int checks   = 0;
  int failures = 0;

  switch_block #(.NCTX(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] e_term;
    logic [3:0][3:0] e_conn;
    for (int trial = 0; trial < 200; trial++) begin
      for (int s = 0; s < 4; s++)
        for (int t = 0; t < 4; t++) begin
          pat[s][t] = N'($urandom);
          thr[s][t] = cfg_util#(N)::compile(pat[s][t]);
        end
      for (int k = 0; k < 16; k++) begin
        cs = 2'($urandom);
        line_val = 4'($urandom);
        #1;
        e_term = '0;
        for (int s = 0; s < 4; s++) begin
          for (int t = 0; t < 4; t++) e_conn[s][t] = pat[s][t][cs];
          for (int t = 0; t < 3; t++)
            if (pat[s][t][cs] && line_val[s]) e_term[t] = 1'b1;
        end
        checks++;
        if ({l1, l2, wrst} !== {e_term[0], e_term[1], e_term[2]} || conn !== e_conn) begin
          failures++;
          $display("FAIL cs=%0d lines=%b got l1l2rst=%b%b%b conn=%h", cs, line_val,
                   l1, l2, wrst, conn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
