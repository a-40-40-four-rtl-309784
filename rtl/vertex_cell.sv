// vertex_cell: one graph vertex with first-in lockout and direction decode.
//
// The vertex watches the wavefront level on its four inputs (S, E, N, W).
// While EN is high, the first clock edge that sees any input high (or the
// START bit) locks the cell: PIN is set and, in the same edge, the pulse
// latch PL<d> is set for every direction d whose input was NOT high at that
// moment. Inputs that rise later are ignored (lockout). Simultaneous winners
// are all treated as first. A start vertex sets all four PL bits.
//
// PL<d> does two things, as in the vertex schematic:
//   * pulse repeater: OUT<d> = PL<d> AND CON<d>, so the wavefront continues
//     to every connected neighbour that did not deliver the winning pulse;
//   * SRAM DMA: the IP<d> bit is written to 1 one clock later. IP<3:0> is
//     read out after the evaluation; its 0 bits point back along the
//     shortest path(s).
//
// Interface / timing:
//   lock_rst  synchronous clear of PIN and PL (the RST of the latches); IP
//             keeps its value so it can be read out after the evaluation.
//   ip_clr    synchronous clear of the IP bits before a new evaluation.
//   cfg_we    writes the connection bits and START (local SRAM word); it
//             also clears IP.
//   rst_ni    asynchronous power-on reset of every stored bit.
// Lock happens on the clock edge after an input is seen high; OUT follows
// PL combinationally; IP follows PL by one clock.
//
// Follows the document: lockout on the first pulse, PL for the non-winning
// directions, OUT = PL & CON, IP written from PL, IP bit numbering of the
// readout key. Design choices: the asynchronous SR latches are replaced by
// clocked flops (one clock = one time step), IP is held in flops, and START
// drives all four directions.
module vertex_cell
  import graph_pkg::*;
(
  input  logic     clk,
  input  logic     rst_ni,
  input  logic     en,        // global enable EN
  input  logic     lock_rst,  // RST of the lockout/pulse latches
  input  logic     ip_clr,    // clear the stored IP code
  input  dirmask_t in_i,      // wavefront level arriving from each direction
  input  logic     cfg_we,    // write connection/START SRAM bits
  input  dirmask_t cfg_con,
  input  logic     cfg_start,
  output dirmask_t out_o,     // wavefront level sent towards each neighbour
  output dirmask_t ip_o,      // stored input-pulse code IP<3:0>
  output logic     pin_o      // cell has latched a pulse
);

  logic     pin_q;
  dirmask_t pl_q;
  dirmask_t ip_q;
  dirmask_t con_q;
  logic     start_q;
  logic     fire;

  // A pulse (or START) seen while enabled and not yet locked.
  assign fire = en && !pin_q && ((|in_i) || start_q);

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) begin
      pin_q <= 1'b0;
      pl_q  <= '0;
    end else if (lock_rst) begin
      pin_q <= 1'b0;
      pl_q  <= '0;
    end else if (fire) begin
      pin_q <= 1'b1;
      pl_q  <= start_q ? '1 : ~in_i;
    end
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni) begin
      con_q   <= '0;
      start_q <= 1'b0;
    end else if (cfg_we) begin
      con_q   <= cfg_con;
      start_q <= cfg_start;
    end
  end

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni)               ip_q <= '0;
    else if (ip_clr || cfg_we) ip_q <= '0;
    else                       ip_q <= ip_q | pl_q;
  end

  assign out_o = pl_q & con_q;
  assign ip_o  = ip_q;
  assign pin_o = pin_q;

  // Once locked, the pulse latches never change until RST.
  assert property (@(posedge clk) disable iff (!rst_ni)
                   pin_q && !lock_rst |=> pin_q && $stable(pl_q));

endmodule
