// graph_multicore_tb: four chips stitched 2x2 into one larger map.
//
// Four graph_chip instances (reduced to S x S vertices each) are tiled as
//     core 1 | core 2
//     -------+-------
//     core 0 | core 3
// with each perimeter edge output of one core driving the facing perimeter
// input of its neighbour, so the wavefront crosses tile borders exactly as
// it crosses an edge inside a tile. The map has a start in the lower-left of
// core 0 and one blockage that spans cores 1, 2 and 3 (a bar along the top
// half plus a vertical bar down core 3). All four cores are programmed and
// read through their own scan pins. Lock clocks and IP codes of every vertex
// are compared with a reference computed on the combined 2S x 2S grid.
module graph_multicore_tb;
  import graph_pkg::*;

  localparam int S      = 8;
  localparam int G      = 2 * S;
  localparam int C_BASE = 16;
  localparam int Q_UNIT = 32;
  localparam int INF    = 1 << 30;
  localparam int BIAS   = 128;

  // core k sits at row offset R0[k], column offset C0[k]
  localparam int R0 [4] = '{S, 0, 0, S};
  localparam int C0 [4] = '{0, 0, S, S};

  logic clk = 1'b0;
  logic rst_ni, en, lock_rst, ip_clr;
  logic wl_shift, wl_si, bl_shift, cfg_write, so_capture, so_shift;
  logic [3:0] bl_si, so;
  logic [S-1:0] bin_n [4], bin_s [4], bin_w [4], bin_e [4];
  logic [S-1:0] bout_n [4], bout_s [4], bout_w [4], bout_e [4];
  logic [S-1:0][S-1:0] pin [4];
  logic [S-1:0] tx [4], ty [4];

  for (genvar k = 0; k < 4; k++) begin : g_core
    graph_chip #(.ROWS(S), .COLS(S), .C_BASE(C_BASE), .Q_UNIT(Q_UNIT)) u_chip (
      .clk(clk), .rst_ni(rst_ni), .en(en), .lock_rst(lock_rst), .ip_clr(ip_clr),
      .wl_shift(wl_shift), .wl_si(wl_si), .bl_shift(bl_shift), .bl_si(bl_si[k]),
      .cfg_write(cfg_write), .so_capture(so_capture), .so_shift(so_shift), .so_o(so[k]),
      .gx_tap_shift(1'b0), .gx_tap_si(1'b0),
      .gx_v1(bias_t'(BIAS / 2)), .gx_v2(bias_t'(BIAS / 2)), .gx_v3(bias_t'(BIAS / 2)),
      .gy_tap_shift(1'b0), .gy_tap_si(1'b0),
      .gy_v1(bias_t'(BIAS / 2)), .gy_v2(bias_t'(BIAS / 2)), .gy_v3(bias_t'(BIAS / 2)),
      .bnd_in_n(bin_n[k]), .bnd_in_s(bin_s[k]), .bnd_in_w(bin_w[k]), .bnd_in_e(bin_e[k]),
      .bnd_out_n(bout_n[k]), .bnd_out_s(bout_s[k]), .bnd_out_w(bout_w[k]), .bnd_out_e(bout_e[k]),
      .gx_taps_o(tx[k]), .gy_taps_o(ty[k]), .pin_o(pin[k])
    );
  end

  // Stitching across the shared tile edges; outer perimeter tied low.
  always_comb begin
    bin_s[1] = bout_n[0];  bin_n[0] = bout_s[1];   // core 0 <-> core 1
    bin_w[3] = bout_e[0];  bin_e[0] = bout_w[3];   // core 0 <-> core 3
    bin_w[2] = bout_e[1];  bin_e[1] = bout_w[2];   // core 1 <-> core 2
    bin_s[2] = bout_n[3];  bin_n[3] = bout_s[2];   // core 3 <-> core 2
    bin_w[0] = '0; bin_s[0] = '0;
    bin_w[1] = '0; bin_n[1] = '0;
    bin_n[2] = '0; bin_e[2] = '0;
    bin_s[3] = '0; bin_e[3] = '0;
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_cross = 0;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  cell_cfg_t cfg [G][G];
  bit        blk [G][G];
  int        ref_t [G][G];
  dirmask_t  ref_ip [G][G];
  int        meas_t [G][G];

  function automatic bit nbr(int r, int c, int d, output int nr, output int nc);
    nr = r; nc = c;
    case (d)
      0: nr = r + 1;
      1: nc = c + 1;
      2: nr = r - 1;
      default: nc = c - 1;
    endcase
    return nr >= 0 && nr < G && nc >= 0 && nc < G;
  endfunction

  function automatic int hop(int r, int c, int d);
    if (!cfg[r][c].con[d]) return INF;
    return ((C_BASE + int'(cfg[r][c].weight[d])) * Q_UNIT + BIAS - 1) / BIAS;
  endfunction

  initial begin
    int nr, nc;
    bit changed;
    rst_ni = 1'b0; en = 1'b0; lock_rst = 1'b0; ip_clr = 1'b0;
    wl_shift = 1'b0; wl_si = 1'b0; bl_shift = 1'b0; bl_si = '0;
    cfg_write = 1'b0; so_capture = 1'b0; so_shift = 1'b0;
    repeat (3) @(negedge clk);
    rst_ni = 1'b1;

    // Map: random weights, blockage spanning cores 1, 2 and 3.
    for (int r = 0; r < G; r++)
      for (int c = 0; c < G; c++) begin
        cfg[r][c] = '0;
        cfg[r][c].con = 4'b1111;
        cfg[r][c].weight = {weight_t'($urandom_range(0, 15)), weight_t'($urandom_range(0, 15)),
                            weight_t'($urandom_range(0, 15)), weight_t'($urandom_range(0, 15))};
        blk[r][c] = (r >= S - 3 && r <= S - 2 && c >= S - 4 && c <= G - 3) ||
                    (c >= S + 3 && c <= S + 4 && r >= S - 3);
      end
    for (int r = 0; r < G; r++)
      for (int c = 0; c < G; c++)
        for (int d = 0; d < 4; d++)
          if (blk[r][c] || (nbr(r, c, d, nr, nc) && blk[nr][nc])) cfg[r][c].con[d] = 1'b0;
    cfg[G - 3][2].start = 1'b1;

    // Program all four cores in parallel, row by row.
    for (int r = 0; r < S; r++) begin
      for (int c = S - 1; c >= 0; c--)
        for (int b = CFG_W - 1; b >= 0; b--) begin
          @(negedge clk);
          for (int k = 0; k < 4; k++) bl_si[k] = cfg[R0[k] + r][C0[k] + c][b];
          bl_shift = 1'b1;
        end
      @(negedge clk);
      bl_shift = 1'b0; wl_si = (r == 0); wl_shift = 1'b1;
      @(negedge clk);
      wl_shift = 1'b0; cfg_write = 1'b1;
      @(negedge clk);
      cfg_write = 1'b0;
    end

    // Reference on the combined grid.
    for (int r = 0; r < G; r++)
      for (int c = 0; c < G; c++) begin
        ref_t[r][c] = cfg[r][c].start ? 1 : INF;
        meas_t[r][c] = INF;
      end
    do begin
      changed = 0;
      for (int r = 0; r < G; r++)
        for (int c = 0; c < G; c++)
          if (ref_t[r][c] < INF)
            for (int d = 0; d < 4; d++) begin
              automatic int h = hop(r, c, d);
              if (h < INF && nbr(r, c, d, nr, nc) && ref_t[r][c] + h + 1 < ref_t[nr][nc]) begin
                ref_t[nr][nc] = ref_t[r][c] + h + 1;
                changed = 1;
              end
            end
    end while (changed);
    for (int r = 0; r < G; r++)
      for (int c = 0; c < G; c++) begin
        if (ref_t[r][c] == INF) ref_ip[r][c] = '0;
        else if (cfg[r][c].start) ref_ip[r][c] = '1;
        else begin
          ref_ip[r][c] = '1;
          for (int d = 0; d < 4; d++) begin
            automatic int od = (d + 2) % 4;
            if (nbr(r, c, d, nr, nc) && ref_t[nr][nc] < INF && hop(nr, nc, od) < INF &&
                ref_t[nr][nc] + hop(nr, nc, od) + 1 == ref_t[r][c]) begin
              ref_ip[r][c][d] = 1'b0;
              if ((nr / S) != (r / S) || (nc / S) != (c / S)) n_cross++;
            end
          end
        end
      end

    begin
      automatic int nreach = 0;
      for (int r = 0; r < G; r++) for (int c = 0; c < G; c++) if (ref_t[r][c] < INF) nreach++;
      $display("reference: %0d of %0d vertices reachable", nreach, G * G);
    end

    // Evaluate.
    @(negedge clk);
    lock_rst = 1'b1; ip_clr = 1'b1;
    @(negedge clk);
    lock_rst = 1'b0; ip_clr = 1'b0; en = 1'b1;
    for (int t = 1; t <= 3000; t++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++)
        for (int r = 0; r < S; r++)
          for (int c = 0; c < S; c++)
            if (pin[k][r][c] && meas_t[R0[k] + r][C0[k] + c] == INF) meas_t[R0[k] + r][C0[k] + c] = t;
    end
    en = 1'b0;
    for (int r = 0; r < G; r++)
      for (int c = 0; c < G; c++)
        check(meas_t[r][c] == ref_t[r][c],
              $sformatf("(%0d,%0d) locked at %0d expected %0d", r, c, meas_t[r][c], ref_t[r][c]));

    // Read back every core through its scan-out chain.
    for (int r = 0; r < S; r++) begin
      @(negedge clk);
      wl_si = (r == 0); wl_shift = 1'b1;
      @(negedge clk);
      wl_shift = 1'b0; so_capture = 1'b1;
      @(negedge clk);
      so_capture = 1'b0;
      for (int c = S - 1; c >= 0; c--)
        for (int b = NDIR - 1; b >= 0; b--) begin
          for (int k = 0; k < 4; k++)
            check(so[k] == ref_ip[R0[k] + r][C0[k] + c][b],
                  $sformatf("core %0d (%0d,%0d) IP bit %0d", k, r, c, b));
          so_shift = 1'b1;
          @(negedge clk);
          so_shift = 1'b0;
        end
    end
    $display("winning pulses that crossed a tile border: %0d", n_cross);
    check(n_cross > 0, "wavefront crossed a tile border");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
