// mcfpga_cfg_pkg: configuration helpers for the multi-context FPGA benches.
//
// cfg_util#(NCTX)::compile turns the wanted ON/OFF pattern of one MC switch
// (bit s = state in context s) into FGFP threshold codes. For NCTX = 2 the
// gate on S gets code 1 (conducts for S = 1) or 2 (never), and the gate on
// ~S the same for context 0. For larger NCTX every run of ON contexts
// [a, b] becomes one window: up-literal code a on S, and code NCTX-1-b on
// the complement, which conducts exactly for S <= b. Unused windows get
// the up-literal code NCTX, so they never conduct.
//
// cfg_util#(NCTX)::cell_bits packs the patterns of a cell's 22 switches into
// the bit order of the cell's configuration register.
//
// cfg_util#(NCTX)::cell_next is a reference model of one cell's registers
// at the level of wanted patterns, written from the cell's function
// (majority carry, borrow of a - b) rather than from its circuit.
// array_model finds the nets of a whole array with union-find over lines
// and terminal wires, independently of the propagation used in the RTL.
package mcfpga_cfg_pkg;

  class cfg_util #(int unsigned NCTX = 2);
    localparam int unsigned TW   = mcfpga_pkg::thr_width(NCTX);
    localparam int unsigned NSW  = mcfpga_pkg::NSW_CELL;
    localparam int unsigned BITS = mcfpga_pkg::cell_cfg_bits(NCTX);

    typedef logic [NCTX-1:0][TW-1:0] thr_t;
    typedef logic [NSW-1:0][NCTX-1:0] pats_t;

    static function thr_t compile(logic [NCTX-1:0] pat);
      thr_t t;
      int   w;
      int   s;
      int   a;
      if (NCTX == 2) begin
        t[0] = pat[1] ? TW'(1) : TW'(2);
        t[1] = pat[0] ? TW'(1) : TW'(2);
        return t;
      end
      for (int i = 0; i < NCTX / 2; i++) begin
        t[2*i]   = TW'(NCTX);
        t[2*i+1] = '0;
      end
      w = 0;
      s = 0;
      while (s < NCTX) begin
        if (pat[s]) begin
          a = s;
          while (s < NCTX && pat[s]) s++;
          t[2*w]   = TW'(a);
          t[2*w+1] = TW'(NCTX - s);   // NCTX-1-b with b = s-1
          w++;
        end else begin
          s++;
        end
      end
      return t;
    endfunction

    static function logic [BITS-1:0] cell_bits(pats_t pats);
      logic [NSW-1:0][NCTX-1:0][TW-1:0] v;
      for (int k = 0; k < NSW; k++) v[k] = compile(pats[k]);
      return v;
    endfunction

    // Next output-register and carry-register values of a cell.
    static function void cell_next(pats_t p, int cs, logic [3:0] line, logic cy_q,
                                   output logic lout_d, output logic cy_d);
      logic a, b, r, cin, f, mode, sub;
      a = 1'b0; b = 1'b0; r = 1'b0;
      for (int s = 0; s < 4; s++) begin
        a |= p[s*4 + 0][cs] & line[s];
        b |= p[s*4 + 1][cs] & line[s];
        r |= p[s*4 + 2][cs] & line[s];
      end
      f    = p[16 + int'({a, b})][cs];
      mode = p[20][cs];
      sub  = p[21][cs];
      cin  = r ? 1'b0 : cy_q;
      if (sub) cy_d = (!a && b) || (!(a ^ b) && cin);
      else     cy_d = (a && b) || (a && cin) || (b && cin);
      lout_d = f ^ (mode && cin);
    endfunction
  endclass

  // Cycle-level reference model of a ROWS x COLS array. Nodes are the
  // lines (horizontal first, then vertical) and the four terminal wires of
  // every cell; an ON switch unites a line with a terminal wire. A net is 1
  // when an edge input on it is 1 or a cell whose LOUT wire is in it
  // outputs 1.
  class array_model #(int unsigned ROWS = 4, int unsigned COLS = 4, int unsigned NCTX = 2);
    localparam int unsigned NH = ROWS * (COLS + 1);
    localparam int unsigned NV = (ROWS + 1) * COLS;
    localparam int unsigned NL = NH + NV;
    localparam int unsigned NNODE = NL + 4 * ROWS * COLS;
    typedef cfg_util#(NCTX) cu;
    cu::pats_t  p    [ROWS][COLS];
    logic       lout [ROWS][COLS];
    logic       cy   [ROWS][COLS];
    logic [3:0] line [ROWS][COLS];
    logic       lval [NL];
    int         parent [NNODE];

    function void clear();
      foreach (lout[r, c]) begin
        lout[r][c] = 1'b0;
        cy[r][c]   = 1'b0;
      end
    endfunction

    function int hidx(int r, int c);  // W line of cell (r,c), c in 0..COLS
      return r * (COLS + 1) + c;
    endfunction
    function int vidx(int r, int c);  // N line of cell (r,c), r in 0..ROWS
      return NH + r * COLS + c;
    endfunction
    function int side_line(int r, int c, int s);
      case (s)
        0:       return vidx(r, c);
        1:       return hidx(r, c);
        2:       return hidx(r, c + 1);
        default: return vidx(r + 1, c);
      endcase
    endfunction
    function int find(int x);
      while (parent[x] != x) x = parent[x];
      return x;
    endfunction

    // Resolve all lines for the current registers, context and inputs.
    function void settle(int cs, logic [COLS-1:0] n_in, logic [COLS-1:0] s_in,
                         logic [ROWS-1:0] w_in, logic [ROWS-1:0] e_in);
      logic val [NNODE];
      foreach (parent[i]) parent[i] = i;
      foreach (p[r, c])
        for (int t = 0; t < 4; t++)
          for (int s = 0; s < 4; s++)
            if (p[r][c][s*4 + t][cs]) begin
              int a, b;
              a = find(side_line(r, c, s));
              b = find(NL + (r * COLS + c) * 4 + t);
              if (a != b) parent[a] = b;
            end
      foreach (val[i]) val[i] = 1'b0;
      for (int r = 0; r < ROWS; r++) begin
        if (w_in[r]) val[find(hidx(r, 0))]    = 1'b1;
        if (e_in[r]) val[find(hidx(r, COLS))] = 1'b1;
      end
      for (int c = 0; c < COLS; c++) begin
        if (n_in[c]) val[find(vidx(0, c))]    = 1'b1;
        if (s_in[c]) val[find(vidx(ROWS, c))] = 1'b1;
      end
      foreach (lout[r, c])
        if (lout[r][c]) val[find(NL + (r * COLS + c) * 4 + 3)] = 1'b1;
      for (int i = 0; i < NL; i++) lval[i] = val[find(i)];
      foreach (line[r, c])
        for (int s = 0; s < 4; s++) line[r][c][s] = lval[side_line(r, c, s)];
    endfunction

    // Clock edge: every cell loads its next output and carry.
    function void clock(int cs);
      logic ld, cd;
      foreach (lout[r, c]) begin
        cu::cell_next(p[r][c], cs, line[r][c], cy[r][c], ld, cd);
        lout[r][c] = ld;
        cy[r][c]   = cd;
      end
    endfunction

    function logic [COLS-1:0] n_out();
      for (int c = 0; c < COLS; c++) n_out[c] = lval[vidx(0, c)];
    endfunction
    function logic [COLS-1:0] s_out();
      for (int c = 0; c < COLS; c++) s_out[c] = lval[vidx(ROWS, c)];
    endfunction
    function logic [ROWS-1:0] w_out();
      for (int r = 0; r < ROWS; r++) w_out[r] = lval[hidx(r, 0)];
    endfunction
    function logic [ROWS-1:0] e_out();
      for (int r = 0; r < ROWS; r++) e_out[r] = lval[hidx(r, COLS)];
    endfunction
  endclass

endpackage
