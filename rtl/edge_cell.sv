// edge_cell: programmable delay of one directed graph edge.
//
// In the silicon the edge is a current-starved inverter loaded by four
// binary-weighted capacitors: the bias voltages VX and VY set the charging
// current and the stored 4-bit weight W<3:0> sets the load, so the delay
// grows with W and shrinks with the bias. This cell is the clocked digital
// equivalent of that circuit. While the wavefront level on in_i is high,
// every clock adds the "current" bias_x + bias_y to a charge accumulator;
// out_o rises on the clock edge where the accumulated charge reaches the
// threshold (C_BASE + W) * Q_UNIT and stays high until lock_rst. The delay
// in clocks is therefore ceil((C_BASE + W) * Q_UNIT / (bias_x + bias_y)),
// counted from the first clock that sees in_i high. With zero bias the edge
// never fires.
//
// Interface / timing:
//   cfg_we/cfg_w  write the 4-bit weight SRAM.
//   lock_rst      clears the accumulator and the output (evaluation reset).
//
// Follows the document: 4-bit weight, load linear in W (binary-weighted
// capacitors), two bias inputs VX/VY from the gradient ladders. Design
// choices: the linear current-vs-bias law, C_BASE and Q_UNIT.
module edge_cell
  import graph_pkg::*;
#(
  parameter int unsigned C_BASE = 16,  // fixed load, in weight LSBs
  parameter int unsigned Q_UNIT = 32   // charge per load unit
) (
  input  logic    clk,
  input  logic    rst_ni,
  input  logic    lock_rst,
  input  logic    in_i,
  input  bias_t   bias_x,
  input  bias_t   bias_y,
  input  logic    cfg_we,
  input  weight_t cfg_w,
  output logic    out_o
);

  localparam int unsigned T_MAX = (C_BASE + (1 << W_BITS) - 1) * Q_UNIT;
  localparam int unsigned ACC_W = $clog2(T_MAX + (2 << V_BITS)) + 1;

  weight_t          w_q;
  logic [ACC_W-1:0] acc_q;
  logic [ACC_W-1:0] acc_n;
  logic [ACC_W-1:0] thresh;
  logic             out_q;

  assign thresh = ACC_W'((C_BASE + 32'(w_q)) * Q_UNIT);
  assign acc_n  = acc_q + ACC_W'(bias_x) + ACC_W'(bias_y);

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni)     w_q <= '0;
    else if (cfg_we) w_q <= cfg_w;
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) begin
      acc_q <= '0;
      out_q <= 1'b0;
    end else if (lock_rst) begin
      acc_q <= '0;
      out_q <= 1'b0;
    end else if (in_i && !out_q) begin
      acc_q <= acc_n;
      if (acc_n >= thresh) out_q <= 1'b1;
    end
  end

  assign out_o = out_q;

endmodule
