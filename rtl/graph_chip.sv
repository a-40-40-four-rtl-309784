// graph_chip: 40x40 time-based wavefront-expansion graph processor (top).
//
// The chip solves single-source shortest-path problems on a Manhattan grid
// by racing a wavefront through the graph itself. Each vertex locks onto the
// first pulse that reaches it and remembers the direction(s) it came from;
// each edge delays the pulse in proportion to its cost. When the wavefront
// has swept the array, the stored input-pulse codes (IP<3:0>) of all cells
// form a tree that points from every reached vertex back to the start.
//
// Blocks:
//   graph_array      ROWS x COLS vertices, four outgoing edges each;
//   gradient_ladder  X ladder (one bias level per column) and Y ladder (one
//                    per row); together they bias every edge so the
//                    wavefront can be sped up towards a target (A*-like);
//   scan_ctrl        WL / BL scan chains for writing connection bits, start
//                    bits and edge weights, and the scan-out chain for IP.
//
// Operation: load the configuration by scan (cfg_write per row), set the
// ladder taps and pad codes, pulse ip_clr and lock_rst, raise en and keep it
// high for as many clocks as the wavefront needs, then read IP out row by
// row (select the row on the WL chain, so_capture, then 4*COLS so_shift).
// The bnd_* ports expose the perimeter edges so several chips can be tiled
// or one chip re-run on neighbouring tiles of a larger map.
//
// The analog pad levels of the ladders (V1, V2, V3 per axis) are digital
// codes here; one clock is one time step of the wavefront.
module graph_chip
  import graph_pkg::*;
#(
  parameter int unsigned ROWS   = 40,
  parameter int unsigned COLS   = 40,
  parameter int unsigned C_BASE = 16,
  parameter int unsigned Q_UNIT = 32
) (
  input  logic                         clk,
  input  logic                         rst_ni,
  // evaluation control
  input  logic                         en,
  input  logic                         lock_rst,
  input  logic                         ip_clr,
  // scan access
  input  logic                         wl_shift,
  input  logic                         wl_si,
  input  logic                         bl_shift,
  input  logic                         bl_si,
  input  logic                         cfg_write,
  input  logic                         so_capture,
  input  logic                         so_shift,
  output logic                         so_o,
  // X-direction gradient ladder (columns)
  input  logic                         gx_tap_shift,
  input  logic                         gx_tap_si,
  input  bias_t                        gx_v1,
  input  bias_t                        gx_v2,
  input  bias_t                        gx_v3,
  // Y-direction gradient ladder (rows)
  input  logic                         gy_tap_shift,
  input  logic                         gy_tap_si,
  input  bias_t                        gy_v1,
  input  bias_t                        gy_v2,
  input  bias_t                        gy_v3,
  // perimeter wavefront ports for tiling
  input  logic      [COLS-1:0]         bnd_in_n,
  input  logic      [COLS-1:0]         bnd_in_s,
  input  logic      [ROWS-1:0]         bnd_in_w,
  input  logic      [ROWS-1:0]         bnd_in_e,
  output logic      [COLS-1:0]         bnd_out_n,
  output logic      [COLS-1:0]         bnd_out_s,
  output logic      [ROWS-1:0]         bnd_out_w,
  output logic      [ROWS-1:0]         bnd_out_e,
  // status
  output logic      [COLS-1:0]         gx_taps_o,  // stored X ladder tap bits
  output logic      [ROWS-1:0]         gy_taps_o,  // stored Y ladder tap bits
  output logic      [ROWS-1:0][COLS-1:0] pin_o     // locked vertices
);

  bias_t     [COLS-1:0]            bias_x;
  bias_t     [ROWS-1:0]            bias_y;
  logic      [ROWS-1:0]            cfg_row_we;
  cell_cfg_t [COLS-1:0]            cfg_data;
  dirmask_t  [ROWS-1:0][COLS-1:0]  ip;

  gradient_ladder #(.N(COLS)) u_grad_x (
    .clk       (clk),
    .rst_ni    (rst_ni),
    .tap_shift (gx_tap_shift),
    .tap_si    (gx_tap_si),
    .v1        (gx_v1),
    .v2        (gx_v2),
    .v3        (gx_v3),
    .tap_q     (gx_taps_o),
    .level_o   (bias_x)
  );

  gradient_ladder #(.N(ROWS)) u_grad_y (
    .clk       (clk),
    .rst_ni    (rst_ni),
    .tap_shift (gy_tap_shift),
    .tap_si    (gy_tap_si),
    .v1        (gy_v1),
    .v2        (gy_v2),
    .v3        (gy_v3),
    .tap_q     (gy_taps_o),
    .level_o   (bias_y)
  );

  scan_ctrl #(.ROWS(ROWS), .COLS(COLS)) u_scan (
    .clk        (clk),
    .rst_ni     (rst_ni),
    .wl_shift   (wl_shift),
    .wl_si      (wl_si),
    .bl_shift   (bl_shift),
    .bl_si      (bl_si),
    .cfg_write  (cfg_write),
    .so_capture (so_capture),
    .so_shift   (so_shift),
    .so_o       (so_o),
    .cfg_row_we (cfg_row_we),
    .cfg_data   (cfg_data),
    .ip_i       (ip)
  );

  graph_array #(
    .ROWS   (ROWS),
    .COLS   (COLS),
    .C_BASE (C_BASE),
    .Q_UNIT (Q_UNIT)
  ) u_array (
    .clk        (clk),
    .rst_ni     (rst_ni),
    .en         (en),
    .lock_rst   (lock_rst),
    .ip_clr     (ip_clr),
    .bias_x     (bias_x),
    .bias_y     (bias_y),
    .cfg_row_we (cfg_row_we),
    .cfg_data   (cfg_data),
    .bnd_in_n   (bnd_in_n),
    .bnd_in_s   (bnd_in_s),
    .bnd_in_w   (bnd_in_w),
    .bnd_in_e   (bnd_in_e),
    .bnd_out_n  (bnd_out_n),
    .bnd_out_s  (bnd_out_s),
    .bnd_out_w  (bnd_out_w),
    .bnd_out_e  (bnd_out_e),
    .ip_o       (ip),
    .pin_o      (pin_o)
  );

endmodule
