// mcfpga_pkg: constants shared by the multi-context FPGA cell and array.
//
// Every configuration point of a cell is a multi-context switch (MC switch)
// built from NCTX floating-gate functional pass gates (FGFPs). A cell holds
// NSW_CELL such switches: 16 in the switch block (4 lines N, W, E, S times
// 4 logic-block terminals L1, L2, RST, LOUT), 4 in the MC-LUT, and two that
// give the per-context MODE and SUB control bits of the logic block. The
// switch-block and LUT counts follow the cell drawing; MODE as a per-context
// switch and the SUB bit are this design's choices.
//
// The threshold of one FGFP is stored as a code k in 0..NCTX, standing for a
// threshold voltage of k - 0.5 context levels: the gate conducts when its
// control level is at least k, and never when k = NCTX.
package mcfpga_pkg;

  // Lines of the switch block, in the order drawn (top to bottom).
  typedef enum logic [1:0] {
    SIDE_N = 2'd0,
    SIDE_W = 2'd1,
    SIDE_E = 2'd2,
    SIDE_S = 2'd3
  } side_e;

  // Logic-block terminals reached through the switch block.
  typedef enum logic [1:0] {
    TERM_L1   = 2'd0,
    TERM_L2   = 2'd1,
    TERM_RST  = 2'd2,
    TERM_LOUT = 2'd3
  } term_e;

  localparam int unsigned NSIDES = 4;
  localparam int unsigned NTERMS = 4;

  // MC-switch numbering inside a cell's configuration.
  localparam int unsigned SW_SB0   = 0;                  // side*NTERMS + term
  localparam int unsigned SW_LUT0  = NSIDES * NTERMS;    // 16..19, LUT entry {L1,L2}
  localparam int unsigned SW_MODE  = SW_LUT0 + 4;        // 20
  localparam int unsigned SW_SUB   = SW_MODE + 1;        // 21
  localparam int unsigned NSW_CELL = SW_SUB + 1;         // 22

  // Width of a threshold code for NCTX contexts.
  function automatic int unsigned thr_width(int unsigned nctx);
    return $clog2(nctx + 1);
  endfunction

  // Width of the context-selection signal for NCTX contexts.
  function automatic int unsigned cs_width(int unsigned nctx);
    return (nctx > 1) ? $clog2(nctx) : 1;
  endfunction

  // Configuration bits held by one cell.
  function automatic int unsigned cell_cfg_bits(int unsigned nctx);
    return NSW_CELL * nctx * thr_width(nctx);
  endfunction

endpackage
