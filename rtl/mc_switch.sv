// mc_switch: multi-context switch built from FGMOS functional pass gates.
//
// The switch must be ON or OFF in each of NCTX contexts, in any pattern,
// with the context chosen by the binary context-selection signal cs = S.
// Any pattern over the ordered contexts 0..NCTX-1 is a union of runs of ON
// contexts; each run is a "window literal" that is 1 for S1 <= S <= S2.
// A window literal is the AND of an up-literal (S >= S1) and a down-literal
// (S <= S2), and the down-literal of S is the up-literal of the complemented
// level NCTX-1-S. Each literal is one FGFP, so a window is two FGFPs in
// series (wired-AND) and the switch is NCTX/2 windows in parallel
// (wired-OR). NCTX/2 windows cover the worst, alternating, pattern.
//
// For NCTX = 2, the configuration of the fabricated chip, the FGMOS is used
// as a binary device: one FGFP gated by S and one gated by its complement,
// in parallel. Each then forms a one-transistor window on its own.
//
// thr[i] is the threshold code of FGFP i (see fgfp). For NCTX > 2, FGFP 2w
// is the up-literal of window w on S and FGFP 2w+1 its down-literal on the
// complement; a window is disabled by giving its up-literal the code NCTX.
// For NCTX = 2, thr[0] is the gate on S and thr[1] the gate on ~S.
//
// The output `on` is the state of the pass path, combinational in cs and
// thr. A wired-OR/wired-AND of pass transistors becomes OR/AND of the
// conduct signals. The structure follows the published design; the numbering of
// the thresholds is this design's own.
module mc_switch #(
  parameter int unsigned NCTX = 2,
  localparam int unsigned CSW = mcfpga_pkg::cs_width(NCTX),
  localparam int unsigned TW  = mcfpga_pkg::thr_width(NCTX)
) (
  input  logic [CSW-1:0]          cs,   // context selection S
  input  logic [NCTX-1:0][TW-1:0] thr,  // FGFP threshold codes
  output logic                    on    // switch state in context S
);

  initial begin
    assert (NCTX >= 2 && NCTX % 2 == 0)
      else $error("mc_switch: NCTX must be even and at least 2");
  end

  logic [CSW-1:0]  s_bar;              // complemented level NCTX-1-S
  logic [NCTX-1:0] cond;               // conduct signal of each FGFP

  always_comb s_bar = CSW'(NCTX - 1) - cs;

  for (genvar i = 0; i < NCTX; i++) begin : g_fg
    fgfp #(.NCTX(NCTX)) u_fg (
      .vc  ((i % 2 == 0) ? cs : s_bar),
      .thr (thr[i]),
      .cond(cond[i])
    );
  end

  if (NCTX == 2) begin : g_binary
    // Two FGMOSs in parallel, gated by CS and its complement.
    always_comb on = cond[0] | cond[1];
  end else begin : g_window
    logic [NCTX/2-1:0] wl;             // window-literal outputs
    for (genvar w = 0; w < NCTX / 2; w++) begin : g_wl
      always_comb wl[w] = cond[2*w] & cond[2*w+1];
    end
    always_comb on = |wl;
  end

endmodule
