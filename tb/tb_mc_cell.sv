// tb_mc_cell: one 4-context cell, loaded through its configuration chain.
//
// 1. A random configuration is shifted in, then a second one behind it; the
//    first must come out of cfg_out bit for bit (chain length CFG_BITS).
// 2. Directed: context 0 adds the W line to the N line, RST on S, result to
//    E; context 1 ANDs E and S onto W and N. Words are checked as numbers.
// 3. Random: many random configurations, random lines and a context that
//    changes every cycle; the switch states and LOUT are compared cycle by
//    cycle with the wanted patterns and the pattern-level reference model
//    of the bench package.
module tb_mc_cell;

  import mcfpga_cfg_pkg::*;
  import mcfpga_pkg::*;

  localparam int unsigned N    = 4;
  localparam int unsigned BITS = cell_cfg_bits(N);
  typedef cfg_util#(N) cu;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] cs;
  logic       cfg_en;
  logic       cfg_in;
  logic       cfg_out;
  logic [3:0] line_val;
  logic [3:0][3:0] conn;
  logic       lout;

  int checks   = 0;
  int failures = 0;

  mc_cell #(.NCTX(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic load(logic [BITS-1:0] v);
    cfg_en = 1'b1;
    for (int i = 0; i < BITS; i++) begin
      cfg_in = v[i];
      @(posedge clk);
      #1;
    end
    cfg_en = 1'b0;
  endtask

  initial begin
    cu::pats_t p;
    logic [BITS-1:0] v1, v2;
    logic [7:0] opa, opb, res;
    logic lout_m, cy_m, lout_d, cy_d;
    int mism;

    rst_n = 1'b0; cs = '0; cfg_en = 1'b0; cfg_in = 1'b0; line_val = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. chain pass-through
    for (int k = 0; k < NSW_CELL; k++) p[k] = N'($urandom);
    v1 = cu::cell_bits(p);
    for (int k = 0; k < NSW_CELL; k++) p[k] = N'($urandom);
    v2 = cu::cell_bits(p);
    load(v1);
    cfg_en = 1'b1;
    mism = 0;
    for (int i = 0; i < BITS; i++) begin
      if (cfg_out !== v1[i]) mism++;
      cfg_in = v2[i];
      @(posedge clk);
      #1;
    end
    cfg_en = 1'b0;
    check("chain pass-through mismatches", 8'(mism), 8'd0);

    // 2. directed two-context cell
    p = '0;
    p[SIDE_W*4 + TERM_L1][0]   = 1'b1;
    p[SIDE_N*4 + TERM_L2][0]   = 1'b1;
    p[SIDE_S*4 + TERM_RST][0]  = 1'b1;
    p[SIDE_E*4 + TERM_LOUT][0] = 1'b1;
    p[SIDE_E*4 + TERM_L1][1]   = 1'b1;
    p[SIDE_S*4 + TERM_L2][1]   = 1'b1;
    p[SIDE_W*4 + TERM_LOUT][1] = 1'b1;
    p[SIDE_N*4 + TERM_LOUT][1] = 1'b1;
    p[16 + 1][0] = 1'b1;  p[16 + 2][0] = 1'b1;   // XOR in context 0
    p[16 + 3][1] = 1'b1;                         // AND in context 1
    p[20][0] = 1'b1;                             // MODE: arithmetic in ctx 0
    load(cu::cell_bits(p));
    for (int wd = 0; wd < 40; wd++) begin
      opa = 8'($urandom); opb = 8'($urandom);
      cs = 2'(wd % 2);
      for (int i = 0; i < 8; i++) begin
        line_val = '0;
        if (cs == 0) begin
          line_val[SIDE_W] = opa[i]; line_val[SIDE_N] = opb[i]; line_val[SIDE_S] = (i == 0);
        end else begin
          line_val[SIDE_E] = opa[i]; line_val[SIDE_S] = opb[i];
        end
        @(posedge clk);
        #1;
        res[i] = lout;
        if (cs == 0)
          check("ctx0 LOUT only to E", {4'b0, conn[SIDE_N][TERM_LOUT], conn[SIDE_W][TERM_LOUT],
                conn[SIDE_E][TERM_LOUT], conn[SIDE_S][TERM_LOUT]}, 8'b0010);
        else
          check("ctx1 LOUT to W and N", {4'b0, conn[SIDE_N][TERM_LOUT], conn[SIDE_W][TERM_LOUT],
                conn[SIDE_E][TERM_LOUT], conn[SIDE_S][TERM_LOUT]}, 8'b1100);
      end
      check(cs == 0 ? "add word" : "and word", res, (cs == 0) ? opa + opb : opa & opb);
    end

    // 3. random configurations against the reference model
    for (int trial = 0; trial < 40; trial++) begin
      for (int k = 0; k < NSW_CELL; k++) p[k] = N'($urandom);
      load(cu::cell_bits(p));
      rst_n = 1'b0; #1 rst_n = 1'b1;
      lout_m = 1'b0; cy_m = 1'b0;
      for (int cyc = 0; cyc < 100; cyc++) begin
        cs = 2'($urandom);
        line_val = 4'($urandom);
        #1;
        for (int k = 0; k < 16; k++)
          check("conn vs pattern", {7'b0, conn[k / 4][k % 4]}, {7'b0, p[k][cs]});
        check("lout vs model", {7'b0, lout}, {7'b0, lout_m});
        cu::cell_next(p, int'(cs), line_val, cy_m, lout_d, cy_d);
        @(posedge clk);
        lout_m = lout_d; cy_m = cy_d;
        #1;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
