// tb_mcfpga_top: end-to-end test of the array at its default size
// (4 x 4 cells, 2 contexts), configured only through the serial chain.
//
// Directed part, two contexts loaded once:
//   context 0  cell (0,1) and cell (1,0) delay the operands A (north edge,
//              column 1) and B (west edge, row 1) by one clock and pass them
//              to cell (0,0), which adds them bit-serially; RST comes from
//              the north edge of column 0 and the sum leaves on the west
//              edge of row 0 two clocks after its operand bits. Row 3 is a
//              chain of four delay cells from west to east.
//   context 1  the same cells compute A - ~B (cell (1,0) in logic mode as an
//              inverter, cell (0,0) subtracting), which is A + B + 1, and the
//              row-3 chain runs from east to west.
// In context 0, row 2 also joins its lines W and E through the L2 terminal
// wire of all four cells, a pass-through net from the west pin to the east
// pin that bypasses the logic blocks (same-cycle); in context 1 that net is
// open. Words alternate between the contexts, so the array is switched between
// configurations without any reload. Results, latencies and the traffic on
// the chains are checked, and each mechanism (context switch, add,
// subtract, logic mode, delay mode, word-boundary RST, chain routing in
// both directions, pass-through net, configuration load and read-back) is counted; one that
// never happened counts as a failure.
// Random part: random configurations (alternately dense and sparse), contexts changing every clock and
// random edge inputs, all four edges compared each clock with the reference
// model of the bench package.
module tb_mcfpga_top;

  import mcfpga_pkg::*;
  import mcfpga_cfg_pkg::*;

  // Must equal the defaults of mcfpga_top, which is used unparameterised.
  localparam int unsigned R    = 4;
  localparam int unsigned C    = 4;
  localparam int unsigned N    = 2;
  localparam int unsigned BITS = cell_cfg_bits(N);
  localparam int W = 8;
  typedef cfg_util#(N) cu;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [0:0]   cs;
  logic         cfg_en;
  logic         cfg_in;
  logic         cfg_out;
  logic [C-1:0] n_in, n_out, s_in, s_out;
  logic [R-1:0] w_in, w_out, e_in, e_out;

  int checks   = 0;
  int failures = 0;
  int n_ctx_switch = 0, n_add = 0, n_sub = 0, n_logic = 0, n_delay = 0;
  int n_rst = 0, n_chain_we = 0, n_chain_ew = 0, n_cfg = 0, n_readback = 0, n_thru = 0;

  array_model #(R, C, N) model;

  mcfpga_top dut (.*);

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

  // Shift a whole array configuration in: last cell first, bit 0 first.
  // Also returns what came out of cfg_out meanwhile (the old contents).
  task automatic load(input cu::pats_t p[R][C], output logic [R*C*BITS-1:0] old);
    logic [BITS-1:0] v;
    int n = 0;
    cfg_en = 1'b1;
    for (int k = R*C - 1; k >= 0; k--) begin
      v = cu::cell_bits(p[k / C][k % C]);
      for (int i = 0; i < BITS; i++) begin
        cfg_in = v[i];
        old[n] = cfg_out;
        n++;
        @(posedge clk);
        #1;
      end
    end
    cfg_en = 1'b0;
    n_cfg++;
  endtask

  function automatic logic [R*C*BITS-1:0] stream(cu::pats_t p[R][C]);
    logic [R*C*BITS-1:0] s;
    logic [BITS-1:0] v;
    int n = 0;
    for (int k = R*C - 1; k >= 0; k--) begin
      v = cu::cell_bits(p[k / C][k % C]);
      for (int i = 0; i < BITS; i++) begin
        s[n] = v[i];
        n++;
      end
    end
    return s;
  endfunction

  function automatic int sw(side_e s, term_e t);
    return int'(s) * 4 + int'(t);
  endfunction

  initial begin
    cu::pats_t p[R][C];
    cu::pats_t q[R][C];
    logic [R*C*BITS-1:0] old;
    logic [W-1:0] opa, opb, res, expv;
    logic [15:0] chain_hist;
    int ctx;

    model = new();
    rst_n = 1'b0; cs = '0; cfg_en = 1'b0; cfg_in = 1'b0;
    n_in = '0; s_in = '0; w_in = '0; e_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---------------- directed configuration ----------------
    foreach (p[r, c]) p[r][c] = '0;
    // cell (0,1): delay A from N onto its W line, both contexts
    p[0][1][sw(SIDE_N, TERM_L1)]   = 2'b11;
    p[0][1][sw(SIDE_W, TERM_LOUT)] = 2'b11;
    p[0][1][16 + 2] = 2'b11;  p[0][1][16 + 3] = 2'b11;          // LUT = L1
    // cell (1,0): B from W onto its N line; delay in ctx 0, inverter in ctx 1
    p[1][0][sw(SIDE_W, TERM_L1)]   = 2'b11;
    p[1][0][sw(SIDE_N, TERM_LOUT)] = 2'b11;
    p[1][0][16 + 2] = 2'b01;  p[1][0][16 + 3] = 2'b01;          // L1 in ctx 0
    p[1][0][16 + 0] = 2'b10;  p[1][0][16 + 1] = 2'b10;          // ~L1 in ctx 1
    // cell (0,0): L1 <- E, L2 <- S, RST <- N, LOUT -> W, arithmetic
    p[0][0][sw(SIDE_E, TERM_L1)]   = 2'b11;
    p[0][0][sw(SIDE_S, TERM_L2)]   = 2'b11;
    p[0][0][sw(SIDE_N, TERM_RST)]  = 2'b11;
    p[0][0][sw(SIDE_W, TERM_LOUT)] = 2'b11;
    p[0][0][16 + 1] = 2'b11;  p[0][0][16 + 2] = 2'b11;          // XOR
    p[0][0][20] = 2'b11;                                         // MODE
    p[0][0][21] = 2'b10;                                         // SUB in ctx 1
    // row 3: west-to-east chain in ctx 0, east-to-west in ctx 1
    for (int c = 0; c < C; c++) begin
      p[3][c][sw(SIDE_W, TERM_L1)]   = 2'b01;
      p[3][c][sw(SIDE_E, TERM_LOUT)] = 2'b01;
      p[3][c][sw(SIDE_E, TERM_L1)]   = 2'b10;
      p[3][c][sw(SIDE_W, TERM_LOUT)] = 2'b10;
      p[3][c][16 + 2] = 2'b11;  p[3][c][16 + 3] = 2'b11;
    end
    // row 2: W and E joined through the L2 wire in context 0 only
    for (int c = 0; c < C; c++) begin
      p[2][c][sw(SIDE_W, TERM_L2)] = 2'b01;
      p[2][c][sw(SIDE_E, TERM_L2)] = 2'b01;
    end
    load(p, old);
    rst_n = 1'b0; #1 rst_n = 1'b1;

    // Each word: W operand bits, then 2 flush clocks, in one context.
    for (int wd = 0; wd < 60; wd++) begin
      ctx = wd % 2;
      if (wd > 0 && 32'(cs) != ctx) n_ctx_switch++;
      cs  = 1'(ctx);
      opa = W'($urandom);
      opb = W'($urandom);
      chain_hist = '0;
      for (int t = 0; t < W + 2; t++) begin
        n_in[1] = (t < W) ? opa[t] : 1'b0;
        w_in[1] = (t < W) ? opb[t] : 1'b0;
        n_in[0] = (t == 1);                  // word marker, aligned to delayed bits
        if (t == 1) n_rst++;
        if (ctx == 1 && t < W) n_logic++;
        chain_hist = {chain_hist[14:0], 1'($urandom)};
        w_in[3] = (ctx == 0) ? chain_hist[0] : 1'b0;
        e_in[3] = (ctx == 1) ? chain_hist[0] : 1'b0;
        w_in[2] = 1'($urandom);
        #1;
        check("pass-through W->E", {15'b0, e_out[2]}, {15'b0, (ctx == 0) & w_in[2]});
        if (ctx == 0 && w_in[2]) n_thru++;
        if (t >= 2) res[t-2] = w_out[0];     // sum bit t-2, two clocks late
        if (t >= 4) begin                    // chain output, four clocks late
          if (ctx == 0) begin
            check("chain W->E", {15'b0, e_out[3]}, {15'b0, chain_hist[4]});
            n_chain_we++;
          end else begin
            check("chain E->W", {15'b0, w_out[3]}, {15'b0, chain_hist[4]});
            n_chain_ew++;
          end
          n_delay++;
        end
        @(posedge clk);
        #1;
      end
      expv = (ctx == 0) ? opa + opb : opa + opb + 1'b1;
      check(ctx == 0 ? "A+B" : "A-~B", {8'b0, res}, {8'b0, expv});
      if (ctx == 0) n_add++; else n_sub++;
    end
    n_in = '0; w_in = '0; e_in = '0;

    // ---------------- random configurations ----------------
    for (int trial = 0; trial < 12; trial++) begin
      foreach (q[r, c])
        for (int k = 0; k < NSW_CELL; k++)
          q[r][c][k] = (trial % 2 == 0) ? N'($urandom)                          // dense
                                         : N'($urandom & $urandom & $urandom);  // sparse
      load(q, old);
      // what came out of the chain must be the previous configuration
      check("config read-back", 16'(old != stream(p)), 16'd0);
      n_readback++;
      p = q;
      foreach (p[r, c]) model.p[r][c] = p[r][c];
      rst_n = 1'b0; #1 rst_n = 1'b1;
      model.clear();
      for (int cyc = 0; cyc < 300; cyc++) begin
        logic [0:0] ncs;
        ncs = 1'($urandom);
        if (ncs != cs) n_ctx_switch++;
        cs = ncs;
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

    $display("mechanisms: ctx_switch=%0d add=%0d sub=%0d logic=%0d delay=%0d rst=%0d",
             n_ctx_switch, n_add, n_sub, n_logic, n_delay, n_rst);
    $display("            chain_we=%0d chain_ew=%0d pass_through=%0d cfg_load=%0d readback=%0d",
             n_chain_we, n_chain_ew, n_thru, n_cfg, n_readback);
    begin
      int m[11];
      m = '{n_ctx_switch, n_add, n_sub, n_logic, n_delay, n_rst, n_chain_we,
            n_chain_ew, n_thru, n_cfg, n_readback};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
