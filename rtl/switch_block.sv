// switch_block: switch block of one cell.
//
// Four lines, N, W, E and S, run through the block, each shared with the
// neighbouring cell on that side. A 4x4 grid of MC switches connects every
// line to each of four terminal wires: L1, L2, RST (the logic block's
// inputs) and LOUT (its output). Which connections exist changes with the
// context.
//
// The switches are pass gates, so a terminal wire with two switches ON
// also joins the two lines: a signal can pass through the cell without
// touching the logic block. Such joins span cells, so the value on each
// line is resolved by the array (mesh_interconnect) from the connection
// matrix `conn` that this block reports. Given the resolved line values
// `line_val`, the block forms the three logic-block inputs: each is the OR
// of the lines its switches connect to it, and 0 if none. Since all lines
// joined to one terminal wire carry the same resolved value, that OR is the
// value of the terminal wire. The 4x4 arrangement follows the cell
// drawing; the OR resolution (exact whenever each net has at most one
// active driver, the only legal use of pass gates) is this design's.
//
// Purely combinational. thr[side][term] holds the FGFP thresholds of the
// switch between line `side` and terminal `term` (see mcfpga_pkg).
module switch_block #(
  parameter int unsigned NCTX = 2,
  localparam int unsigned CSW = mcfpga_pkg::cs_width(NCTX),
  localparam int unsigned TW  = mcfpga_pkg::thr_width(NCTX)
) (
  input  logic [CSW-1:0]                    cs,        // context selection
  input  logic [3:0][3:0][NCTX-1:0][TW-1:0] thr,       // [side][term]
  input  logic [3:0]                        line_val,  // resolved lines
  output logic [3:0][3:0]                   conn,      // [side][term] ON
  output logic                              l1,
  output logic                              l2,
  output logic                              wrst       // RST terminal
);

  import mcfpga_pkg::*;

  for (genvar s = 0; s < 4; s++) begin : g_side
    for (genvar t = 0; t < 4; t++) begin : g_term
      mc_switch #(.NCTX(NCTX)) u_sw (.cs(cs), .thr(thr[s][t]), .on(conn[s][t]));
    end
  end

  always_comb begin
    l1   = 1'b0;
    l2   = 1'b0;
    wrst = 1'b0;
    for (int s = 0; s < 4; s++) begin
      l1   |= conn[s][TERM_L1]  & line_val[s];
      l2   |= conn[s][TERM_L2]  & line_val[s];
      wrst |= conn[s][TERM_RST] & line_val[s];
    end
  end

endmodule
