// gradient_ladder: programmable bias ladder for one axis (X columns or Y rows).
//
// On the chip a resistive ladder runs along one side of the array and gives
// every column (X ladder) or row (Y ladder) its own bias voltage. The two
// ends of the ladder sit at the pad levels V1 and V2. Each ladder node also
// has a switch, controlled by a 1-bit scan SRAM, that can tie it to a third
// pad level V3. Nodes whose switch is open take the level set by the resistor
// chain, which with equal resistors is a straight line between the nearest
// fixed nodes on either side. With one switch closed at stage k the profile
// rises (or falls) linearly from V1 to V3 at stage k and then goes linearly to
// V2 at the far end; with no switch closed it is a straight line V1 -> V2.
//
// This module is the digital equivalent: levels are V_BITS-wide codes and
// level_o[i] = va + (vb - va) * (i - a) / (b - a), truncated towards zero,
// where a <= i <= b are the nearest fixed nodes (ends or closed taps) and
// va, vb their levels. Closing a switch at an end node overrides V1 or V2.
//
// Interface / timing:
//   tap_shift/tap_si  serial load of the N tap bits (shift towards higher
//                     index, new bit enters at index 0).
//   tap_q             the stored tap bits.
//   level_o           combinational from the tap bits and pad codes.
module gradient_ladder
  import graph_pkg::*;
#(
  parameter int unsigned N = 40  // stages: columns for X, rows for Y
) (
  input  logic           clk,
  input  logic           rst_ni,
  input  logic           tap_shift,
  input  logic           tap_si,
  input  bias_t          v1,      // level at stage 0
  input  bias_t          v2,      // level at stage N-1
  input  bias_t          v3,      // level applied through closed taps
  output logic [N-1:0]   tap_q,
  output bias_t [N-1:0]  level_o
);

  always_ff @(posedge clk or negedge rst_ni) begin
    if (!rst_ni)        tap_q <= '0;
    else if (tap_shift) tap_q <= {tap_q[N-2:0], tap_si};
  end

  // Level of a fixed node: closed tap wins, else the end pad.
  function automatic int fixed_level(int idx, logic [N-1:0] taps,
                                     bias_t l1, bias_t l2, bias_t l3);
    if (taps[idx])      return int'(l3);
    else if (idx == 0)  return int'(l1);
    else                return int'(l2);
  endfunction

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      int a, b, va, vb;
      a = 0;
      b = int'(N) - 1;
      for (int j = 0; j <= i; j++)
        if (tap_q[j]) a = j;
      for (int j = int'(N) - 1; j >= i; j--)
        if (tap_q[j]) b = j;
      va = fixed_level(a, tap_q, v1, v2, v3);
      vb = fixed_level(b, tap_q, v1, v2, v3);
      if (a == b) level_o[i] = bias_t'(va);
      else        level_o[i] = bias_t'(va + ((vb - va) * (i - a)) / (b - a));
    end
  end

endmodule
