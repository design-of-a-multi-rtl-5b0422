// carry_gen: bit-serial carry generator of the logic block.
//
// Operands arrive least significant bit first, one bit per clock on a (L1)
// and b (L2); wrst (the RST line) is high during the first bit of every
// word. The carry into the current bit is cy: 0 on a word's first bit,
// otherwise the stored carry. The next carry needs only a 2-to-1 mux: when
// the two operand bits agree, the carry out equals them (majority), when
// they differ it equals the carry in. The register then stores it.
//
// Subtraction a - b uses the same mux with its select inverted (sub = 1):
// the stored value is then the borrow, which equals b when the bits differ
// and the borrow in when they agree. The difference bit is a ^ b ^ borrow,
// the same XOR as the sum. The mux-and-flip-flop structure and the RST word
// marker follow the published design, which gives no more than the parts;
// the exact select logic and the SUB input are this design's choices.
//
// Timing: cy is combinational in wrst and the register; the register loads
// on every rising clk edge and is cleared by rst_n (asynchronous, low).
module carry_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic a,      // operand bit (L1)
  input  logic b,      // operand bit (L2)
  input  logic wrst,   // first bit of a word: carry/borrow in is 0
  input  logic sub,    // 1: store borrow of a - b instead of carry of a + b
  output logic cy      // carry (or borrow) into the current bit
);

  logic c_q;
  logic c_next;

  always_comb begin
    cy     = wrst ? 1'b0 : c_q;
    c_next = (a ^ b ^ sub) ? cy : b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_q <= 1'b0;
    else        c_q <= c_next;
  end

endmodule
