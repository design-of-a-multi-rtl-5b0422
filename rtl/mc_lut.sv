// mc_lut: multi-context two-input lookup table.
//
// Four MC switches have their inputs tied to ground; the one picked by the
// LUT inputs (L1, L2), L1 being the upper index bit, is connected to a
// dynamic node that is precharged to VDD and then evaluated. If the picked
// switch is ON in the current context the node discharges, and an inverter
// turns that into a 1 at the output. The truth-table entry {L1,L2} of the
// current context is therefore the ON/OFF state of MC switch {L1,L2}.
//
// The precharge/evaluate sequence is a circuit technique with no logical
// effect, so this model gives the evaluated value combinationally: out is
// valid as soon as cs, l1 and l2 are. Structure from the published design; the
// combinational treatment of precharge is this design's simplification.
module mc_lut #(
  parameter int unsigned NCTX = 2,
  localparam int unsigned CSW = mcfpga_pkg::cs_width(NCTX),
  localparam int unsigned TW  = mcfpga_pkg::thr_width(NCTX)
) (
  input  logic [CSW-1:0]                cs,   // context selection
  input  logic [3:0][NCTX-1:0][TW-1:0]  thr,  // thresholds, entry {L1,L2}
  input  logic                          l1,   // LUT input, index bit 1
  input  logic                          l2,   // LUT input, index bit 0
  output logic                          out   // LUT output
);

  logic [3:0] sw_on;                    // ON state of each entry's switch
  logic       node_discharged;          // dynamic node pulled to ground

  for (genvar e = 0; e < 4; e++) begin : g_entry
    mc_switch #(.NCTX(NCTX)) u_sw (.cs(cs), .thr(thr[e]), .on(sw_on[e]));
  end

  always_comb begin
    node_discharged = sw_on[{l1, l2}];
    out             = node_discharged;  // output inverter of the high node
  end

endmodule
