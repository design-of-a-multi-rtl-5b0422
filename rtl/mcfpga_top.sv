// mcfpga_top: multi-context FPGA, a mesh of ROWS x COLS bit-serial cells.
//
// Each cell connects only to its four neighbours, through the lines it
// shares with them; mesh_interconnect resolves every line from the cells'
// switch states and registered outputs, including nets that pass through
// cells over their terminal wires. The edge lines are the array's pins: an
// edge input (n_in, s_in, w_in, e_in) is ORed onto its line, and the
// matching output (n_out, ...) shows the resolved line, so a signal routed
// across the array from one pin to another appears in the same cycle. The
// context-selection signal cs goes to every cell, so one change of cs
// switches the whole array to another configuration plane at once, without
// reloading anything.
//
// Configuration: one shift chain, cfg_in -> cell (0,0) -> (0,1) -> ... ->
// cell (ROWS-1, COLS-1) -> cfg_out, loading one bit per clock while cfg_en
// is high (cell layout in mc_cell.sv). The fabricated device was a 4 x 4
// array with 2 contexts, the defaults here. Row 0 is the north edge,
// column 0 the west edge. Every net driver is a cell's output register or a
// pin, so no combinational loop exists.
module mcfpga_top #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter int unsigned NCTX = 2,
  localparam int unsigned CSW = mcfpga_pkg::cs_width(NCTX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [CSW-1:0]  cs,       // context selection, common to all cells
  input  logic            cfg_en,
  input  logic            cfg_in,
  output logic            cfg_out,
  input  logic [COLS-1:0] n_in,     // north edge lines, column c
  output logic [COLS-1:0] n_out,
  input  logic [COLS-1:0] s_in,     // south edge lines
  output logic [COLS-1:0] s_out,
  input  logic [ROWS-1:0] w_in,     // west edge lines, row r
  output logic [ROWS-1:0] w_out,
  input  logic [ROWS-1:0] e_in,     // east edge lines
  output logic [ROWS-1:0] e_out
);

  logic [ROWS-1:0][COLS-1:0][3:0][3:0] conn;      // per cell [side][term]
  logic [ROWS-1:0][COLS-1:0]           lout;      // per cell output
  logic [ROWS-1:0][COLS-1:0][3:0]      line_val;  // per cell [side]
  logic [ROWS*COLS:0]                  chain;

  assign chain[0] = cfg_in;
  assign cfg_out  = chain[ROWS*COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      mc_cell #(.NCTX(NCTX)) u_cell (
        .clk     (clk),
        .rst_n   (rst_n),
        .cs      (cs),
        .cfg_en  (cfg_en),
        .cfg_in  (chain[r*COLS + c]),
        .cfg_out (chain[r*COLS + c + 1]),
        .line_val(line_val[r][c]),
        .conn    (conn[r][c]),
        .lout    (lout[r][c])
      );
    end
  end

  mesh_interconnect #(.ROWS(ROWS), .COLS(COLS)) u_mesh (
    .conn    (conn),
    .lout    (lout),
    .n_in    (n_in),
    .s_in    (s_in),
    .w_in    (w_in),
    .e_in    (e_in),
    .line_val(line_val),
    .n_out   (n_out),
    .s_out   (s_out),
    .w_out   (w_out),
    .e_out   (e_out)
  );

endmodule
