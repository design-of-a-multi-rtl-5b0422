// tb_carry_gen: bit-serial addition and subtraction through the carry
// generator.
//
// Random 8-bit words are fed least significant bit first with wrst on the
// first bit. Per bit, sum = a ^ b ^ cy is formed here (the XOR of the
// logic block) and collected; each word must give (A + B) mod 256, or
// (A - B) mod 256 with sub set. Back-to-back words check that wrst clears
// the carry at every word boundary.
module tb_carry_gen;

  localparam int W = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic a;
  logic b;
  logic wrst;
  logic sub;
  logic cy;

  int checks   = 0;
  int failures = 0;
  int words_add = 0;
  int words_sub = 0;

  carry_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] opa, opb, res, expv;
    rst_n = 1'b0; a = 0; b = 0; wrst = 0; sub = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int wd = 0; wd < 400; wd++) begin
      opa = W'($urandom);
      opb = W'($urandom);
      if (wd < 4) begin opa = 8'hFF; opb = 8'h01; end   // long carry chain
      sub = (wd % 2 == 1);
      for (int i = 0; i < W; i++) begin
        a = opa[i]; b = opb[i]; wrst = (i == 0);
        #1;
        res[i] = a ^ b ^ cy;
        @(posedge clk);
        #1;
      end
      expv = sub ? opa - opb : opa + opb;
      checks++;
      if (sub) words_sub++; else words_add++;
      if (res !== expv) begin
        failures++;
        $display("FAIL sub=%0b %02h op %02h = %02h exp %02h", sub, opa, opb, res, expv);
      end
    end
    checks++;
    if (words_add == 0 || words_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
