// tb_logic_block: the three modes of a 4-context logic block.
//
// Context 0 is a bit-serial adder (LUT = XOR, MODE on), context 1 a
// subtractor (LUT = XOR, MODE and SUB on), context 2 a random 2-input
// logic function (MODE off) and context 3 the delay mode (LUT passes L1).
// Random 8-bit words are sent LSB first with RST on the first bit, each in
// a randomly chosen context. LOUT must show each result bit exactly one
// clock after its operand bits (the pipeline register), and whole words
// must equal A + B or A - B. Each mode is counted and must occur.
module tb_logic_block;

  import mcfpga_cfg_pkg::*;

  localparam int unsigned N = 4;
  localparam int W = 8;

  logic                    clk = 1'b0;
  logic                    rst_n;
  logic [1:0]              cs;
  logic [3:0][N-1:0][2:0]  lut_thr;
  logic [N-1:0][2:0]       mode_thr;
  logic [N-1:0][2:0]       sub_thr;
  logic                    l1, l2, wrst;
  logic                    lout;

  logic [N-1:0][3:0]       tt;       // LUT table per context
  logic [N-1:0]            pat;

  int checks   = 0;
  int failures = 0;
  int mode_cnt[N];

  logic_block #(.NCTX(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] opa, opb, res, expv;
    logic         ebit;
    int           ctx;
    tt[0] = 4'b0110;             // XOR
    tt[1] = 4'b0110;             // XOR
    tt[2] = 4'($urandom);        // any function
    tt[3] = 4'b1100;             // entries {L1,L2} = 10, 11 -> pass L1
    for (int e = 0; e < 4; e++) begin
      for (int c = 0; c < N; c++) pat[c] = tt[c][e];
      lut_thr[e] = cfg_util#(N)::compile(pat);
    end
    mode_thr = cfg_util#(N)::compile(4'b0011);
    sub_thr  = cfg_util#(N)::compile(4'b0010);
    rst_n = 1'b0; cs = '0; l1 = 0; l2 = 0; wrst = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int wd = 0; wd < 400; wd++) begin
      ctx = (wd < N) ? wd : $urandom_range(0, N - 1);
      mode_cnt[ctx]++;
      cs  = 2'(ctx);
      opa = W'($urandom);
      opb = W'($urandom);
      for (int i = 0; i < W; i++) begin
        l1 = opa[i]; l2 = opb[i]; wrst = (i == 0);
        @(posedge clk);
        #1;
        // one clock after the operands: result bit i on LOUT
        res[i] = lout;
        case (ctx)
          0: begin expv = opa + opb; ebit = expv[i]; end
          1: begin expv = opa - opb; ebit = expv[i]; end
          2: ebit = tt[2][{opa[i], opb[i]}];
          default: ebit = opa[i];
        endcase
        checks++;
        if (lout !== ebit) begin
          failures++;
          $display("FAIL word %0d ctx %0d bit %0d lout=%0b exp=%0b", wd, ctx, i, lout, ebit);
        end
      end
      if (ctx < 2) begin
        expv = (ctx == 0) ? opa + opb : opa - opb;
        checks++;
        if (res !== expv) begin
          failures++;
          $display("FAIL word %0d ctx %0d result %02h exp %02h", wd, ctx, res, expv);
        end
      end
    end
    for (int c = 0; c < N; c++) begin
      checks++;
      if (mode_cnt[c] == 0) failures++;
    end
    $display("modes used: add=%0d sub=%0d logic=%0d delay=%0d",
             mode_cnt[0], mode_cnt[1], mode_cnt[2], mode_cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
