// scan_ctrl: serial word-line / bit-line scan access to the array SRAMs.
//
// Three shift registers along the array edges give a few-pin access to the
// per-cell memories:
//   * WL scan (ROWS bits): selects the row(s) to be written or read. A new
//     bit enters at row 0 and moves towards row ROWS-1 on each wl_shift.
//   * BL scan (COLS * CFG_W bits): holds one configuration word per column
//     (graph_pkg::cell_cfg_t). A new bit enters at the LSB of column 0 and
//     moves towards the MSB of column COLS-1 on each bl_shift, so the first
//     bit shifted in ends in the MSB of the last column.
//     cfg_write writes the BL contents into every selected row in one clock.
//   * Scan out (COLS * 4 bits): so_capture loads the IP<3:0> codes of the
//     selected row (bitwise OR of the selected rows if more than one is
//     selected); so_shift moves it out MSB first, so so_o first shows IP<3>
//     of column COLS-1 and last IP<0> of column 0.
// All operations are single-clock and synchronous; they may be issued on
// consecutive clocks.
//
// The chip's die shows a WL scan, a BL scan and a scan-out chain along the
// array; their exact organisation, bit order and control pins are this
// design's own choice.
module scan_ctrl
  import graph_pkg::*;
#(
  parameter int unsigned ROWS = 40,
  parameter int unsigned COLS = 40
) (
  input  logic                         clk,
  input  logic                         rst_ni,
  input  logic                         wl_shift,
  input  logic                         wl_si,
  input  logic                         bl_shift,
  input  logic                         bl_si,
  input  logic                         cfg_write,
  input  logic                         so_capture,
  input  logic                         so_shift,
  output logic                         so_o,
  output logic      [ROWS-1:0]         cfg_row_we,
  output cell_cfg_t [COLS-1:0]         cfg_data,
  input  dirmask_t  [ROWS-1:0][COLS-1:0] ip_i
);

  localparam int unsigned BL_W = COLS * CFG_W;
  localparam int unsigned SO_W = COLS * NDIR;

  logic [ROWS-1:0] wl_q;
  logic [BL_W-1:0] bl_q;
  logic [SO_W-1:0] so_q;
  dirmask_t [COLS-1:0] row_ip;

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni)       wl_q <= '0;
    else if (wl_shift) wl_q <= {wl_q[ROWS-2:0], wl_si};
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni)       bl_q <= '0;
    else if (bl_shift) bl_q <= {bl_q[BL_W-2:0], bl_si};
  end

  always_comb begin
    row_ip = '0;
    for (int r = 0; r < int'(ROWS); r++)
      if (wl_q[r]) row_ip = row_ip | ip_i[r];
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni)         so_q <= '0;
    else if (so_capture) so_q <= row_ip;
    else if (so_shift)   so_q <= {so_q[SO_W-2:0], 1'b0};
  end

  assign cfg_row_we = cfg_write ? wl_q : '0;
  assign cfg_data   = bl_q;
  assign so_o       = so_q[SO_W-1];

endmodule
