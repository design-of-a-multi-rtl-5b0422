// mc_cell: one cell of the mesh array, a logic block plus a switch block.
//
// The cell takes the resolved values of the four lines it shares with its
// neighbours (line_val, indexed N, W, E, S) and reports its registered
// logic-block output (lout) together with the ON state of its 16
// switch-block switches (conn, [side][terminal]); the array resolves every
// line from these, including paths through the cell's terminal wires (see
// mesh_interconnect). All 22 MC switches of the
// cell (16 switch-block, 4 LUT, MODE, SUB; numbering in mcfpga_pkg) get
// their FGFP threshold codes from the cell's configuration storage.
//
// Configuration storage: on the chip the thresholds are non-volatile charge
// on floating gates, written by a high-voltage circuit. Here they are a
// shift register of CFG_BITS bits that loads one bit per clock from cfg_in
// while cfg_en is high and passes its last bit on to cfg_out, so the cells
// of an array form one chain. Bit b of the register holds bit (b mod TW) of
// threshold ((b / TW) mod NCTX) of switch (b / (NCTX*TW)); the bit shifted
// in first ends at bit 0. The register has no reset, as the floating gates
// keep their charge. The chain is this design's stand-in for the writing
// circuit. Context switching is immediate: changing cs re-selects every
// switch in the same cycle, while LOUT and the carry keep their state.
module mc_cell #(
  parameter int unsigned NCTX = 2,
  localparam int unsigned CSW      = mcfpga_pkg::cs_width(NCTX),
  localparam int unsigned TW       = mcfpga_pkg::thr_width(NCTX),
  localparam int unsigned CFG_BITS = mcfpga_pkg::cell_cfg_bits(NCTX)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [CSW-1:0] cs,       // context selection
  input  logic           cfg_en,   // shift configuration
  input  logic           cfg_in,   // configuration chain in
  output logic           cfg_out,  // configuration chain out
  input  logic [3:0]     line_val, // resolved value of lines N, W, E, S
  output logic [3:0][3:0] conn,    // switch-block state [side][terminal]
  output logic           lout      // registered logic-block output
);

  import mcfpga_pkg::*;

  typedef logic [NCTX-1:0][TW-1:0] sw_thr_t;

  logic [CFG_BITS-1:0]           cfg_q;
  sw_thr_t [NSW_CELL-1:0]        sw_thr;
  logic [3:0][3:0][NCTX-1:0][TW-1:0] sb_thr;
  logic [3:0][NCTX-1:0][TW-1:0]  lut_thr;

  logic l1;
  logic l2;
  logic wrst;

  always_ff @(posedge clk) begin
    if (cfg_en) cfg_q <= {cfg_in, cfg_q[CFG_BITS-1:1]};
  end

  always_comb begin
    cfg_out = cfg_q[0];
    sw_thr  = cfg_q;
    for (int s = 0; s < 4; s++)
      for (int t = 0; t < 4; t++)
        sb_thr[s][t] = sw_thr[SW_SB0 + s*NTERMS + t];
    for (int e = 0; e < 4; e++)
      lut_thr[e] = sw_thr[SW_LUT0 + e];
  end

  switch_block #(.NCTX(NCTX)) u_sb (
    .cs      (cs),
    .thr     (sb_thr),
    .line_val(line_val),
    .conn    (conn),
    .l1      (l1),
    .l2      (l2),
    .wrst    (wrst)
  );

  logic_block #(.NCTX(NCTX)) u_lb (
    .clk     (clk),
    .rst_n   (rst_n),
    .cs      (cs),
    .lut_thr (lut_thr),
    .mode_thr(sw_thr[SW_MODE]),
    .sub_thr (sw_thr[SW_SUB]),
    .l1      (l1),
    .l2      (l2),
    .wrst    (wrst),
    .lout    (lout)
  );

endmodule
