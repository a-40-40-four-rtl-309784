// graph_pkg: types and constants shared by the wavefront graph array.
//
// Direction numbering follows the readout key of the IP code: bit 0 is the
// south port, bit 1 east, bit 2 north and bit 3 west. A cell's IP<3:0> code
// has a 0 in every direction a first (winning) pulse came from and a 1 in
// every other direction, so tracing the 0 bits walks the shortest path back
// towards the start vertex.
//
// cell_cfg_t is the word written into one grid position through the
// bit-line scan chain: the start flag and the four connection bits of the
// vertex, and the 4-bit weight of each of its four outgoing edges.
package graph_pkg;

  localparam int unsigned NDIR   = 4;  // cardinal neighbours per vertex
  localparam int unsigned W_BITS = 4;  // edge weight resolution (4b SRAM)
  localparam int unsigned V_BITS = 8;  // bias level code width (design choice)

  typedef enum logic [1:0] {
    DIR_S = 2'd0,
    DIR_E = 2'd1,
    DIR_N = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  typedef logic [NDIR-1:0] dirmask_t;           // one bit per direction
  typedef logic [W_BITS-1:0] weight_t;
  typedef logic [V_BITS-1:0] bias_t;

  typedef struct packed {
    logic                     start;   // vertex fires in all directions at EN
    dirmask_t                 con;     // connection to the neighbour in that direction
    logic [NDIR-1:0][W_BITS-1:0] weight;  // weight of the outgoing edge per direction
  } cell_cfg_t;

  localparam int unsigned CFG_W = $bits(cell_cfg_t);

  // Port on the neighbour that faces direction d of this vertex.
  function automatic dir_e opposite(dir_e d);
    case (d)
      DIR_S:   return DIR_N;
      DIR_N:   return DIR_S;
      DIR_E:   return DIR_W;
      default: return DIR_E;
    endcase
  endfunction

endpackage
