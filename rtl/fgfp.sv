// fgfp: floating-gate-MOS functional pass gate, digital abstraction.
//
// An FGMOS used both as the storage of a configuration value and as the pass
// transistor itself. Charge on the floating gate sets its threshold voltage;
// the channel conducts when the control-gate level vc exceeds it. With the
// context signal applied as a multiple-valued control level 0..NCTX-1, one
// such device realises an up-literal: it is ON for every level at or above
// its threshold. Driving it with the complemented level NCTX-1-S turns it
// into a down-literal of S.
//
// The threshold is given as a code thr = k standing for Vth = k - 0.5 levels
// (k = 0 conducts always, k = NCTX never). The analog device and its
// programming are outside digital logic; this module only keeps their
// function, cond = (vc >= thr). Purely combinational.
module fgfp #(
  parameter int unsigned NCTX = 2,
  localparam int unsigned CSW = mcfpga_pkg::cs_width(NCTX),
  localparam int unsigned TW  = mcfpga_pkg::thr_width(NCTX)
) (
  input  logic [CSW-1:0] vc,    // control-gate level
  input  logic [TW-1:0]  thr,   // programmed threshold code
  output logic           cond   // channel conducts
);

  always_comb cond = (32'(vc) >= 32'(thr));

endmodule
