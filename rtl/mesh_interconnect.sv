// mesh_interconnect: resolves the lines of the cell mesh.
//
// Between every two adjacent cells runs one line: the E line of a cell is
// the W line of its east neighbour, the S line of a cell the N line of its
// south neighbour. Lines on the array edge are the array's pins. Inside a
// cell, each of the four terminal wires (L1, L2, RST, LOUT) touches all
// four lines through pass-gate switches, so every terminal wire with
// switches ON joins those lines into one net, and the LOUT wire also
// carries the cell's registered output. Nets can therefore run through
// several cells.
//
// A net's value is the OR of what drives it: the edge inputs on it and the
// LOUT of every cell whose LOUT wire is joined to it (a legal configuration
// drives each net from at most one source, where OR and pass-gate wiring
// agree). The module finds this by propagation: starting from the edge
// inputs, it sweeps all cells NLINES times; in each sweep every terminal
// wire takes the OR of its connected lines (plus LOUT for the LOUT wire)
// and gives it back to them. A value moves across at least one cell per
// sweep and a simple path crosses at most NLINES lines, so the result is
// exact. The mesh and its four-neighbour lines follow the published design; the
// OR resolution and the propagation scheme are this design's.
//
// Each sweep is one generate stage (g_sweep[k]) refining the line values
// of the stage before. The sweeps are the cost of describing bidirectional
// pass gates with unidirectional logic: on silicon the nets are plain
// wires through the switches, while this description grows with the square
// of the array size (about 39k cells at 4 x 4 before optimisation).
//
// Purely combinational; nothing here depends on the lines through a
// register-free path back to itself, because LOUT is registered.
// Line indices per cell: 0 = N, 1 = W, 2 = E, 3 = S.
module mesh_interconnect #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4
) (
  input  logic [ROWS-1:0][COLS-1:0][3:0][3:0] conn,      // [r][c][side][term]
  input  logic [ROWS-1:0][COLS-1:0]           lout,      // cell outputs
  input  logic [COLS-1:0]                     n_in,
  input  logic [COLS-1:0]                     s_in,
  input  logic [ROWS-1:0]                     w_in,
  input  logic [ROWS-1:0]                     e_in,
  output logic [ROWS-1:0][COLS-1:0][3:0]      line_val,  // [r][c][side]
  output logic [COLS-1:0]                     n_out,
  output logic [COLS-1:0]                     s_out,
  output logic [ROWS-1:0]                     w_out,
  output logic [ROWS-1:0]                     e_out
);

  localparam int unsigned NLINES = ROWS * (COLS + 1) + (ROWS + 1) * COLS;

  typedef logic [ROWS-1:0][COLS:0] hlines_t;   // [r][c]: W line of cell (r,c)
  typedef logic [ROWS:0][COLS-1:0] vlines_t;   // [r][c]: N line of cell (r,c)

  hlines_t hl_init;
  vlines_t vl_init;
  hlines_t hl;
  vlines_t vl;

  always_comb begin
    hl_init = '0;
    vl_init = '0;
    for (int r = 0; r < ROWS; r++) begin
      hl_init[r][0]    = w_in[r];
      hl_init[r][COLS] = e_in[r];
    end
    for (int c = 0; c < COLS; c++) begin
      vl_init[0][c]    = n_in[c];
      vl_init[ROWS][c] = s_in[c];
    end
  end

  // One generate stage per sweep; stage k refines the lines of stage k-1.
  for (genvar k = 0; k < NLINES; k++) begin : g_sweep
    hlines_t hl_q;
    vlines_t vl_q;
    hlines_t hl_p;
    vlines_t vl_p;

    if (k == 0) begin : g_first
      always_comb begin
        hl_p = hl_init;
        vl_p = vl_init;
      end
    end else begin : g_next
      always_comb begin
        hl_p = g_sweep[k-1].hl_q;
        vl_p = g_sweep[k-1].vl_q;
      end
    end

    always_comb begin
      logic [3:0] lv;
      logic       x;
      hl_q = hl_p;
      vl_q = vl_p;
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          lv = {vl_q[r+1][c], hl_q[r][c+1], hl_q[r][c], vl_q[r][c]};
          for (int t = 0; t < 4; t++) begin
            x = (t == 3) ? lout[r][c] : 1'b0;
            for (int s = 0; s < 4; s++) x |= conn[r][c][s][t] & lv[s];
            for (int s = 0; s < 4; s++) lv[s] |= conn[r][c][s][t] & x;
          end
          {vl_q[r+1][c], hl_q[r][c+1], hl_q[r][c], vl_q[r][c]} = lv;
        end
      end
    end
  end

  always_comb begin
    hl = g_sweep[NLINES-1].hl_q;
    vl = g_sweep[NLINES-1].vl_q;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        line_val[r][c] = {vl[r+1][c], hl[r][c+1], hl[r][c], vl[r][c]};
    for (int c = 0; c < COLS; c++) begin
      n_out[c] = vl[0][c];
      s_out[c] = vl[ROWS][c];
    end
    for (int r = 0; r < ROWS; r++) begin
      w_out[r] = hl[r][0];
      e_out[r] = hl[r][COLS];
    end
  end

endmodule
