// tb_mcfpga_top_ctx4: the array built with 4 contexts (window-literal
// switches with two windows each) on a 3 x 3 mesh.
//
// Random configurations, alternately dense and sparse, are loaded through the chain; the context changes
// at random every clock and the edges get random inputs. All four edge
// outputs are compared each clock with the reference model. Every one of
// the four contexts must have been selected.
module tb_mcfpga_top_ctx4;

  import mcfpga_pkg::*;
  import mcfpga_cfg_pkg::*;

  localparam int unsigned R    = 3;
  localparam int unsigned C    = 3;
  localparam int unsigned N    = 4;
  localparam int unsigned BITS = cell_cfg_bits(N);
  typedef cfg_util#(N) cu;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [1:0]   cs;
  logic         cfg_en;
  logic         cfg_in;
  logic         cfg_out;
  logic [C-1:0] n_in, n_out, s_in, s_out;
  logic [R-1:0] w_in, w_out, e_in, e_out;

  int checks   = 0;
  int failures = 0;
  int ctx_used[N];

  array_model #(R, C, N) model;

  mcfpga_top #(.ROWS(R), .COLS(C), .NCTX(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic load(input cu::pats_t p[R][C]);
    logic [BITS-1:0] v;
    cfg_en = 1'b1;
    for (int k = R*C - 1; k >= 0; k--) begin
      v = cu::cell_bits(p[k / C][k % C]);
      for (int i = 0; i < BITS; i++) begin
        cfg_in = v[i];
        @(posedge clk);
        #1;
      end
    end
    cfg_en = 1'b0;
  endtask

  initial begin
    cu::pats_t p[R][C];
    model = new();
    rst_n = 1'b0; cs = '0; cfg_en = 1'b0; cfg_in = 1'b0;
    n_in = '0; s_in = '0; w_in = '0; e_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int trial = 0; trial < 12; trial++) begin
      foreach (p[r, c])
        for (int k = 0; k < NSW_CELL; k++)
          p[r][c][k] = (trial % 2 == 0) ? N'($urandom)                          // dense
                                         : N'($urandom & $urandom & $urandom);  // sparse
      load(p);
      foreach (p[r, c]) model.p[r][c] = p[r][c];
      rst_n = 1'b0; #1 rst_n = 1'b1;
      model.clear();
      for (int cyc = 0; cyc < 300; cyc++) begin
        cs = 2'($urandom);
        ctx_used[cs]++;
        n_in = C'($urandom); s_in = C'($urandom);
        w_in = R'($urandom); e_in = R'($urandom);
        #1;
        model.settle(int'(cs), n_in, s_in, w_in, e_in);
        check("n_out", 16'(n_out), 16'(model.n_out()));
        check("s_out", 16'(s_out), 16'(model.s_out()));
        check("w_out", 16'(w_out), 16'(model.w_out()));
        check("e_out", 16'(e_out), 16'(model.e_out()));
        @(posedge clk);
        model.clock(int'(cs));
        #1;
      end
    end
    foreach (ctx_used[i]) begin
      checks++;
      if (ctx_used[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
