# Wavefront-expansion graph array (40×40, four-neighbour)

This RTL finds shortest paths by letting a wavefront race through the graph
itself, with no sequential search. Every vertex of a 40×40 Manhattan grid is a
small cell that locks onto the first pulse that reaches it. Every edge delays
the pulse by its cost. Once the wave has swept the grid, each vertex holds a
4-bit code saying which neighbour(s) the winning pulse came from. Following
those codes from any vertex leads back to the start along a shortest path,
so one evaluation gives the shortest paths from the start to every vertex.
Run time grows with path length, not with the number of vertices.

The original circuit is a time-based, largely analog design: current-starved
inverter delays, SR latches and resistive bias ladders. This RTL is a clocked
digital equivalent. One clock is one time step, edge delays are integer clock
counts, and bias voltages are 8-bit codes. Its logic follows the vertex
schematic closely. The analog parts are replaced by the simplest digital
behaviour with the same role. These replacements are listed under
"Departures" below.

## The vertex: first-in lockout (`vertex_cell`)

Each vertex has four inputs and four outputs, one per direction. The bit
numbering of all 4-bit fields is S=0, E=1, N=2, W=3 (`graph_pkg::dir_e`).

* While `en` is high, the first clock edge that sees any input high locks the
  cell: `PIN` is set. In the same edge, the pulse latch `PL[d]` is set for
  every direction `d` whose input was **not** high. If several inputs rise in
  the same clock, they all count as first.
* After that the cell ignores its inputs. This is the lockout, and it is what
  makes the stored result a shortest-path tree.
* `OUT[d] = PL[d] & CON[d]`. The pulse goes on to every connected neighbour
  except the one(s) it came from. `CON` is the per-vertex connection mask.
  A blocked cell is a vertex whose `CON` bits are 0, with its neighbours'
  `CON` bits towards it also 0.
* One clock later `IP[d] |= PL[d]`. `IP` is stored in the cell and is read
  out after the evaluation. A reached vertex has `IP` with 0s pointing at its
  winning predecessor(s) and 1s elsewhere. An unreached vertex reads `0000`.
  A start vertex reads `1111`.
* A vertex with its `START` bit set locks as soon as `en` rises and fires in
  all connected directions.
* `lock_rst` clears `PIN`/`PL` and leaves `IP` intact. `ip_clr`, or a write
  of the cell's configuration, clears `IP`.

An assertion in the cell checks that `PIN`/`PL` never change once locked.

## The edge: a charge integrator (`edge_cell`)

Each vertex owns four outgoing edge cells, so the array has 6400 edges. Each
edge has a 4-bit weight `W`. In silicon the delay is a capacitor, loaded in
proportion to `W`, charged by a current set by two bias voltages. The
digital cell does the same in discrete time. While its input is high, it adds
`bias_x + bias_y` to an accumulator every clock. Its output rises when the
sum reaches `(C_BASE + W) * Q_UNIT`. The edge delay in clocks is therefore

    D = ceil((C_BASE + W) * Q_UNIT / (bias_x + bias_y))

and one hop from a vertex locking to its neighbour locking takes `D + 1`
clocks. The extra clock is the vertex lock. No divider is needed. A larger
weight means a slower edge, and a higher bias a faster one. With zero bias
the edge never fires. Defaults are `C_BASE = 16` and `Q_UNIT = 32`: with a
flat bias of 128 + 128, an edge takes 2–4 clocks depending on `W`.

## Bias gradient ladders (`gradient_ladder`)

Two ladders run along the array: the X ladder gives one level per column and
the Y ladder one per row. The edge at (row r, column c) gets
`bias_x[c] + bias_y[r]`. Raising the bias towards a target region speeds the
wavefront up there. This pulls the search towards the target, much like the
heuristic in A*.

Each ladder is defined by three pad levels and a chain of tap bits:

* stage 0 is at `v1` and stage N‑1 at `v2`;
* every stage whose tap bit is 1 is tied to `v3`;
* every other stage lies on the straight line between the nearest fixed
  stages on either side, truncated towards zero.

For example, with one tap at stage 30 the profile rises linearly from `v1` to
`v3` at stage 30, then goes linearly to `v2`. With no tap it is a straight
line from `v1` to `v2`. The tap bits are loaded serially with `g?_tap_shift`
and `g?_tap_si`. The new bit enters at stage 0.

## Scan access (`scan_ctrl`)

All configuration and readout goes through a few serial pins:

| chain | length | use |
|---|---|---|
| WL | ROWS bits | row select; the new bit enters at row 0 |
| BL | COLS × 21 bits | one `cell_cfg_t` per column: `{start, con[3:0], weight[3:0][3:0]}`; the first bit shifted in ends in the MSB of column COLS‑1 |
| scan-out | COLS × 4 bits | `so_capture` loads the IP codes of the selected row; `so_o` then gives IP[3] of column COLS‑1 first and IP[0] of column 0 last |

`cfg_write` writes the BL words into every selected row in one clock. To walk
through the rows, shift a single 1 into WL once, then shift in one 0 per row.
Writing one row of a 40-column array takes 840 BL clocks plus 2. Reading it
out takes 160 shift clocks plus 2.

## Top level (`graph_chip`) and a typical run

`graph_chip` connects the array, the two ladders and the scan block. A run
goes like this:

1. Load the map, row by row, over BL/WL and `cfg_write`.
2. Load the tap chains and set the six pad codes `gx_v1..3` and `gy_v1..3`.
3. Pulse `lock_rst` and `ip_clr` for one clock.
4. Raise `en`. Keep it high until `pin_o` stops changing. The design has no
   "done" flag. A 40×40 maze with flat bias settles in about 240 clocks.
5. Lower `en` and read the IP codes out row by row.

The perimeter edges that point out of the array are brought out as
`bnd_out_n/s/w/e`. The outward-facing perimeter inputs come in as
`bnd_in_n/s/w/e`. Larger maps can be handled in two ways:

* **Stitching:** wire the outputs of one chip to the facing inputs of its
  neighbour. The wavefront then crosses the seam exactly as it crosses an
  interior edge.
* **Re-use:** run one chip tile by tile. Note where a tile's wavefront first
  hits a shared edge (the earliest `bnd_out_*`), and drive those positions
  high on the `bnd_in_*` of the next tile's run. A cell started this way has
  the `IP` bit of that boundary direction cleared.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 40, 40 | array size |
| `C_BASE` | 16 | fixed edge load, in weight units |
| `Q_UNIT` | 32 | charge per load unit |
| `graph_pkg::V_BITS` | 8 | bias code width |
| `graph_pkg::W_BITS` | 4 | edge weight width |

## Departures from the original circuit

* The design is synchronous: one clock is one time step. The original is
  asynchronous and measures about 1.79 ns per vertex-plus-edge. Pulses that
  arrive in the same clock count as simultaneous, so a coarse clock gives
  more ties than the analog circuit.
* The edge delay law (current proportional to the bias code, load linear in
  `W`, `C_BASE`, `Q_UNIT`) is a model. It is not the measured delay-vs-bias
  curve of the silicon edge, which is strongly non-linear and barely
  sensitive to `W` at high bias.
* The ladders compute straight-line interpolation in integer codes. There
  are no resistors or voltages.
* Two points of the vertex bit numbering conflict in the source material:
  - The IP bit order S=0, E=1, N=2, W=3 follows the readout key. One timing
    example would instead put north at bit 3.
  - The vertex memory is described both as 12 bits and as four 4-bit
    blocks. Here the vertex stores `CON`, `START` and `IP`, and each edge
    stores its own 4-bit weight.
* The WL/BL/scan-out organisation, bit orders and control pins are this
  design's own. So are the `START` behaviour (fire in all four directions)
  and the asynchronous active-low power-on reset `rst_ni`.
* Pads, power and the analog bias pins are not modelled. The pad levels are
  plain input codes.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `vertex_cell_tb` | lockout, simultaneous arrivals, CON masking, EN gating, START, RST keeping IP, IP clear, one-clock lock latency, 200 random cases |
| `edge_cell_tb` | delay in clocks against the formula above for fixed and random weights and biases; zero bias never fires |
| `gradient_ladder_tb` | tap chain and every stage level against a real-arithmetic reference: no tap, tap at stage 30, two taps, tap on an end node, random |
| `scan_ctrl_tb` | WL/BL write enables and words, scan-out bit order and length |
| `graph_array_tb` | 8×10 random maps: lock clock and IP of every vertex and firing time of every perimeter edge, against a shortest-path relaxation model |
| `graph_chip_tb` | full 40×40 chip at default parameters, all through the pins (see below) |
| `graph_multicore_tb` | four 8×8 chips stitched 2×2 with one blockage spanning three of them, checked against a model of the combined 16×16 grid |

`graph_chip_tb` runs five scenarios:

1. a maze with a flat bias;
2. the same maze with an X/Y gradient tapped at stage 30;
3. collision avoidance, with starts on the sides of five obstacles so the
   wavefronts meet midway between them;
4. the next tile started from the first east-edge impact points of
   scenario 1;
5. a two-slit wall pattern.

It counts each mechanism (scan write, start, lockout, tie, blockage, change
due to the gradient, boundary in and out, readout) and fails if any of them
never happens. With verilator 5 it takes about 3 minutes to build and about
1.5 minutes to run. To run any testbench:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        --top-module graph_chip_tb rtl/graph_pkg.sv tb/graph_chip_tb.sv
    ./obj_dir/Vgraph_chip_tb
