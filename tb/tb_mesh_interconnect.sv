// tb_mesh_interconnect: net resolution of a 4 x 4 mesh.
//
// Directed: a pass-through net along row 1 (every cell joins W and E on
// its L1 wire) must carry the west pin to the east pin, and a turn through
// cell (0,2) (N joined to E on its RST wire) must link the north pin of
// column 2 to the net on the line east of that cell. A LOUT wire joined to
// two lines must drive both. Random: sparse random connection matrices and
// outputs, compared with a union-find over lines and terminal wires written
// here.
module tb_mesh_interconnect;

  localparam int R  = 4;
  localparam int C  = 4;
  localparam int NH = R * (C + 1);
  localparam int NL = NH + (R + 1) * C;

  logic [R-1:0][C-1:0][3:0][3:0] conn;
  logic [R-1:0][C-1:0]           lout;
  logic [C-1:0]                  n_in, s_in, n_out, s_out;
  logic [R-1:0]                  w_in, e_in, w_out, e_out;
  logic [R-1:0][C-1:0][3:0]      line_val;

  int checks   = 0;
  int failures = 0;
  int parent[NL + 4*R*C];

  mesh_interconnect #(.ROWS(R), .COLS(C)) dut (.*);

  function automatic int line_of(int r, int c, int s);
    case (s)
      0:       return NH + r * C + c;
      1:       return r * (C + 1) + c;
      2:       return r * (C + 1) + c + 1;
      default: return NH + (r + 1) * C + c;
    endcase
  endfunction

  function automatic int find(int x);
    while (parent[x] != x) x = parent[x];
    return x;
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic compare();
    logic val[NL + 4*R*C];
    logic [R-1:0][C-1:0][3:0] e_line;
    foreach (parent[i]) parent[i] = i;
    foreach (val[i]) val[i] = 1'b0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        for (int s = 0; s < 4; s++)
          for (int t = 0; t < 4; t++)
            if (conn[r][c][s][t]) begin
              int a, b;
              a = find(line_of(r, c, s));
              b = find(NL + (r * C + c) * 4 + t);
              if (a != b) parent[a] = b;
            end
    for (int r = 0; r < R; r++) begin
      if (w_in[r]) val[find(line_of(r, 0, 1))] = 1'b1;
      if (e_in[r]) val[find(line_of(r, C-1, 2))] = 1'b1;
    end
    for (int c = 0; c < C; c++) begin
      if (n_in[c]) val[find(line_of(0, c, 0))] = 1'b1;
      if (s_in[c]) val[find(line_of(R-1, c, 3))] = 1'b1;
    end
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        if (lout[r][c]) val[find(NL + (r * C + c) * 4 + 3)] = 1'b1;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        for (int s = 0; s < 4; s++) e_line[r][c][s] = val[find(line_of(r, c, s))];
    check("line_val", 64'(line_val), 64'(e_line));
    for (int c = 0; c < C; c++) begin
      check("n_out", 64'(n_out[c]), 64'(e_line[0][c][0]));
      check("s_out", 64'(s_out[c]), 64'(e_line[R-1][c][3]));
    end
    for (int r = 0; r < R; r++) begin
      check("w_out", 64'(w_out[r]), 64'(e_line[r][0][1]));
      check("e_out", 64'(e_out[r]), 64'(e_line[r][C-1][2]));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    conn = '0; lout = '0; n_in = '0; s_in = '0; w_in = '0; e_in = '0;
    // pass-through along row 1 and a turn in cell (0,2)
    for (int c = 0; c < C; c++) begin
      conn[1][c][1][0] = 1'b1;
      conn[1][c][2][0] = 1'b1;
    end
    conn[0][2][0][2] = 1'b1;
    conn[0][2][2][2] = 1'b1;
    for (int v = 0; v < 2; v++) begin
      w_in[1] = 1'(v);
      n_in[2] = 1'(1 - v);
      #1;
      check("row-1 pass-through", 64'(e_out[1]), 64'(v));
      check("turn N->E in (0,2)", 64'(line_val[0][3][1]), 64'(1 - v));
      check("no leak to row 0", 64'(e_out[0]), 64'(0));
    end
    // LOUT of cell (3,1) on both its W and S lines
    w_in = '0; n_in = '0;
    conn[3][1][1][3] = 1'b1;
    conn[3][1][3][3] = 1'b1;
    lout[3][1] = 1'b1;
    #1;
    check("LOUT onto W", 64'(line_val[3][0][2]), 64'(1));
    check("LOUT onto S", 64'(s_out[1]), 64'(1));
    compare();
    for (int trial = 0; trial < 2000; trial++) begin
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          for (int s = 0; s < 4; s++)
            conn[r][c][s] = 4'($urandom & $urandom & ((trial % 3 == 0) ? 32'hF : $urandom));
      lout = 16'($urandom & $urandom);
      n_in = C'($urandom & $urandom); s_in = C'($urandom & $urandom);
      w_in = R'($urandom & $urandom); e_in = R'($urandom & $urandom);
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
