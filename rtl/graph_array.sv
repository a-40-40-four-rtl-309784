// graph_array: the ROWS x COLS four-neighbour wavefront array.
//
// Every grid position holds one vertex_cell and its four outgoing
// edge_cells (S, E, N, W), so a 40x40 array has 1600 vertices and 6400
// edges. The output of the edge leaving vertex (r,c) towards direction d
// drives the input on the facing side of the neighbour: the north edge of
// (r,c) feeds the south input of (r-1,c), the east edge feeds the west input
// of (r,c+1), and so on. Row 0 is the north (top) side, column 0 the west
// side. Edges on the perimeter that point out of the array are brought out
// (bnd_out_*), and the perimeter inputs that face outward come in from ports
// (bnd_in_*), so several arrays can be tiled, or one array re-run with the
// points of first impact of a previous run as starts.
//
// The edge at (r,c) is biased by the X-ladder level of column c and the
// Y-ladder level of row r. Configuration is written one row at a time: every
// cell of a row whose cfg_row_we bit is high takes its word from cfg_data
// (word-line / bit-line SRAM write). ip_o gives the stored IP<3:0> code of
// every cell for readout.
//
// Timing: a vertex locks one clock after an input rises; an edge rises its
// output ceil(T/I) clocks after its input rises (see edge_cell). A hop from
// one vertex locking to the next vertex locking therefore takes
// ceil(T/I) + 1 clocks.
module graph_array
  import graph_pkg::*;
#(
  parameter int unsigned ROWS   = 40,
  parameter int unsigned COLS   = 40,
  parameter int unsigned C_BASE = 16,
  parameter int unsigned Q_UNIT = 32
) (
  input  logic                  clk,
  input  logic                  rst_ni,
  input  logic                  en,
  input  logic                  lock_rst,
  input  logic                  ip_clr,
  input  bias_t     [COLS-1:0]  bias_x,
  input  bias_t     [ROWS-1:0]  bias_y,
  input  logic      [ROWS-1:0]  cfg_row_we,
  input  cell_cfg_t [COLS-1:0]  cfg_data,
  input  logic      [COLS-1:0]  bnd_in_n,   // into the N inputs of row 0
  input  logic      [COLS-1:0]  bnd_in_s,   // into the S inputs of row ROWS-1
  input  logic      [ROWS-1:0]  bnd_in_w,   // into the W inputs of column 0
  input  logic      [ROWS-1:0]  bnd_in_e,   // into the E inputs of column COLS-1
  output logic      [COLS-1:0]  bnd_out_n,  // N edges of row 0
  output logic      [COLS-1:0]  bnd_out_s,  // S edges of row ROWS-1
  output logic      [ROWS-1:0]  bnd_out_w,  // W edges of column 0
  output logic      [ROWS-1:0]  bnd_out_e,  // E edges of column COLS-1
  output dirmask_t  [ROWS-1:0][COLS-1:0] ip_o,
  output logic      [ROWS-1:0][COLS-1:0] pin_o
);

  dirmask_t [ROWS-1:0][COLS-1:0] vin;   // vertex inputs
  dirmask_t [ROWS-1:0][COLS-1:0] vout;  // vertex outputs (edge inputs)
  dirmask_t [ROWS-1:0][COLS-1:0] eout;  // edge outputs

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // Inputs: each comes from the facing edge of the neighbour.
      if (r == 0) begin : g_n_bnd
        assign vin[r][c][DIR_N] = bnd_in_n[c];
      end else begin : g_n_int
        assign vin[r][c][DIR_N] = eout[r-1][c][DIR_S];
      end
      if (r == ROWS - 1) begin : g_s_bnd
        assign vin[r][c][DIR_S] = bnd_in_s[c];
      end else begin : g_s_int
        assign vin[r][c][DIR_S] = eout[r+1][c][DIR_N];
      end
      if (c == 0) begin : g_w_bnd
        assign vin[r][c][DIR_W] = bnd_in_w[r];
      end else begin : g_w_int
        assign vin[r][c][DIR_W] = eout[r][c-1][DIR_E];
      end
      if (c == COLS - 1) begin : g_e_bnd
        assign vin[r][c][DIR_E] = bnd_in_e[r];
      end else begin : g_e_int
        assign vin[r][c][DIR_E] = eout[r][c+1][DIR_W];
      end

      vertex_cell u_vertex (
        .clk       (clk),
        .rst_ni    (rst_ni),
        .en        (en),
        .lock_rst  (lock_rst),
        .ip_clr    (ip_clr),
        .in_i      (vin[r][c]),
        .cfg_we    (cfg_row_we[r]),
        .cfg_con   (cfg_data[c].con),
        .cfg_start (cfg_data[c].start),
        .out_o     (vout[r][c]),
        .ip_o      (ip_o[r][c]),
        .pin_o     (pin_o[r][c])
      );

      for (genvar d = 0; d < NDIR; d++) begin : g_edge
        edge_cell #(
          .C_BASE (C_BASE),
          .Q_UNIT (Q_UNIT)
        ) u_edge (
          .clk      (clk),
          .rst_ni   (rst_ni),
          .lock_rst (lock_rst),
          .in_i     (vout[r][c][d]),
          .bias_x   (bias_x[c]),
          .bias_y   (bias_y[r]),
          .cfg_we   (cfg_row_we[r]),
          .cfg_w    (cfg_data[c].weight[d]),
          .out_o    (eout[r][c][d])
        );
      end
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_bnd_col
    assign bnd_out_n[c] = eout[0][c][DIR_N];
    assign bnd_out_s[c] = eout[ROWS-1][c][DIR_S];
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_bnd_row
    assign bnd_out_w[r] = eout[r][0][DIR_W];
    assign bnd_out_e[r] = eout[r][COLS-1][DIR_E];
  end

endmodule
