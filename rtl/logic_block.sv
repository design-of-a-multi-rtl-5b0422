// logic_block: fine-grained logic block of one cell.
//
// Parts, as drawn for the cell: a multi-context 2-input LUT on L1 and L2,
// a carry generator (CG) fed by L1, L2 and the word-boundary line RST, a
// 2-to-1 mux that passes either the CG output or 0 under MODE, an XOR of
// the LUT output with the mux output, and a pipeline D-FF driving LOUT.
// The three operating modes come from this one datapath:
//   logic      MODE = 0, LUT holds any 2-input function  -> LOUT = f(L1,L2)
//   delay      MODE = 0, LUT passes L1 (entries 10, 11)  -> 1-bit storage
//   arithmetic MODE = 1, LUT holds XOR                    -> L1 ^ L2 ^ carry,
//              a bit-serial adder (SUB = 0) or subtractor (SUB = 1).
// Every result is registered, so LOUT follows its inputs by one clock.
//
// MODE and SUB are each one more MC switch, so they too can change with the
// context. The published design names MODE and says the block may add or
// subtract, but not how MODE is stored or how subtraction is chosen, so the
// SUB switch and the per-context MODE are this design's choices.
//
// Interface: cs selects the context; thresholds come from the cell's
// configuration storage. LOUT is cleared by rst_n (asynchronous, low).
module logic_block #(
  parameter int unsigned NCTX = 2,
  localparam int unsigned CSW = mcfpga_pkg::cs_width(NCTX),
  localparam int unsigned TW  = mcfpga_pkg::thr_width(NCTX)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [CSW-1:0]               cs,        // context selection
  input  logic [3:0][NCTX-1:0][TW-1:0] lut_thr,   // MC-LUT switches
  input  logic [NCTX-1:0][TW-1:0]      mode_thr,  // MODE switch
  input  logic [NCTX-1:0][TW-1:0]      sub_thr,   // SUB switch
  input  logic                         l1,
  input  logic                         l2,
  input  logic                         wrst,      // RST: word boundary
  output logic                         lout
);

  logic lut_out;
  logic mode;
  logic sub;
  logic cy;
  logic mux_out;
  logic xor_out;

  mc_lut #(.NCTX(NCTX)) u_lut (
    .cs (cs),
    .thr(lut_thr),
    .l1 (l1),
    .l2 (l2),
    .out(lut_out)
  );

  mc_switch #(.NCTX(NCTX)) u_mode (.cs(cs), .thr(mode_thr), .on(mode));
  mc_switch #(.NCTX(NCTX)) u_sub  (.cs(cs), .thr(sub_thr),  .on(sub));

  carry_gen u_cg (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (l1),
    .b    (l2),
    .wrst (wrst),
    .sub  (sub),
    .cy   (cy)
  );

  always_comb begin
    mux_out = mode ? cy : 1'b0;
    xor_out = lut_out ^ mux_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lout <= 1'b0;
    else        lout <= xor_out;
  end

endmodule
