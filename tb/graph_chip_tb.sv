// graph_chip_tb: end-to-end test of the full 40x40 chip at its default size.
//
// Everything goes through the chip pins: the map is written with the WL/BL
// scan chains, the gradient ladders are programmed through their tap chains
// and pad codes, the wavefront runs with EN high, and the IP codes are read
// back through the scan-out chain. A reference model in this file computes
// the ladder levels, the lock clock of every vertex (shortest-path
// relaxation with hop cost ceil((C_BASE + W) * Q_UNIT / (bias_x + bias_y)) + 1)
// and the expected IP codes; both the lock clocks (watched on pin_o) and the
// read-back IP codes are compared with it.
//
// Scenarios, after the applications the chip is meant for:
//   1. shortest path on a map with rectangular blockages, start top-left,
//      flat bias (no gradient);
//   2. the same map with a voltage gradient, weak at the top-left corner and
//      strong towards the bottom-right, the ladder tap at stage 30;
//   3. collision avoidance: starts on the sides of several obstacles, the
//      wavefronts meet midway between them;
//   4. tiling: the perimeter rows where scenario 1 first reached the east
//      side start the next tile through the west boundary inputs;
//   5. two-slit wavefront experiment: a wall with one slit, then a wall
//      with two slits; the wavefront must pass both.
// Each mechanism (scan write, start, lockout, simultaneous arrival,
// blockage, gradient change, boundary in/out, readout) is counted and must
// occur at least once.
module graph_chip_tb;
  import graph_pkg::*;

  localparam int ROWS   = 40;   // chip defaults
  localparam int COLS   = 40;
  localparam int C_BASE = 16;
  localparam int Q_UNIT = 32;
  localparam int INF    = 1 << 30;
  localparam int MAX_RUN = 20000;

  logic clk = 1'b0;
  logic rst_ni, en, lock_rst, ip_clr;
  logic wl_shift, wl_si, bl_shift, bl_si, cfg_write, so_capture, so_shift, so;
  logic gx_tap_shift, gx_tap_si, gy_tap_shift, gy_tap_si;
  bias_t gx_v1, gx_v2, gx_v3, gy_v1, gy_v2, gy_v3;
  logic [COLS-1:0] bin_n, bin_s, bout_n, bout_s, gx_taps;
  logic [ROWS-1:0] bin_w, bin_e, bout_w, bout_e, gy_taps;
  logic [ROWS-1:0][COLS-1:0] pin;

  graph_chip dut (
    .clk(clk), .rst_ni(rst_ni), .en(en), .lock_rst(lock_rst), .ip_clr(ip_clr),
    .wl_shift(wl_shift), .wl_si(wl_si), .bl_shift(bl_shift), .bl_si(bl_si),
    .cfg_write(cfg_write), .so_capture(so_capture), .so_shift(so_shift), .so_o(so),
    .gx_tap_shift(gx_tap_shift), .gx_tap_si(gx_tap_si),
    .gx_v1(gx_v1), .gx_v2(gx_v2), .gx_v3(gx_v3),
    .gy_tap_shift(gy_tap_shift), .gy_tap_si(gy_tap_si),
    .gy_v1(gy_v1), .gy_v2(gy_v2), .gy_v3(gy_v3),
    .bnd_in_n(bin_n), .bnd_in_s(bin_s), .bnd_in_w(bin_w), .bnd_in_e(bin_e),
    .bnd_out_n(bout_n), .bnd_out_s(bout_s), .bnd_out_w(bout_w), .bnd_out_e(bout_e),
    .gx_taps_o(gx_taps), .gy_taps_o(gy_taps), .pin_o(pin)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_rows_written = 0, n_starts = 0, n_lockout = 0, n_ties = 0;
  int n_blocked = 0, n_grad_diff = 0, n_bnd_in = 0, n_bnd_out = 0, n_readout = 0;
  int n_slits = 0;

  initial begin
    repeat (2000000) @(posedge clk);
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

  // ---------------------------------------------------------------- model
  cell_cfg_t cfg [ROWS][COLS];
  bit        blocked [ROWS][COLS];
  int        bx [COLS];
  int        by [ROWS];
  int        ref_t [ROWS][COLS];
  dirmask_t  ref_ip [ROWS][COLS];
  int        meas_t [ROWS][COLS];
  dirmask_t  read_ip [ROWS][COLS];
  dirmask_t  flat_ip [ROWS][COLS];
  int        east_t [ROWS];
  int        flat_east [ROWS];
  bit        src_w [ROWS];

  function automatic bit nbr(int r, int c, int d, output int nr, output int nc);
    nr = r; nc = c;
    case (d)
      0: nr = r + 1;
      1: nc = c + 1;
      2: nr = r - 1;
      default: nc = c - 1;
    endcase
    return nr >= 0 && nr < ROWS && nc >= 0 && nc < COLS;
  endfunction

  function automatic int hop(int r, int c, int d);
    int cur = bx[c] + by[r];
    if (!cfg[r][c].con[d] || cur == 0) return INF;
    return ((C_BASE + int'(cfg[r][c].weight[d])) * Q_UNIT + cur - 1) / cur;
  endfunction

  // Ladder reference: straight lines between fixed nodes, truncated.
  task automatic ladder_ref(input int n, input bit taps [], input int l1, input int l2,
                            input int l3, output int lv []);
    int fi[$], fv[$];
    lv = new[n];
    for (int i = 0; i < n; i++) begin
      if (taps[i])        begin fi.push_back(i); fv.push_back(l3); end
      else if (i == 0)     begin fi.push_back(i); fv.push_back(l1); end
      else if (i == n - 1) begin fi.push_back(i); fv.push_back(l2); end
    end
    for (int s = 0; s + 1 < fi.size(); s++)
      for (int i = fi[s]; i <= fi[s+1]; i++) begin
        real slope = real'(fv[s+1] - fv[s]) / real'(fi[s+1] - fi[s]);
        lv[i] = fv[s] + $rtoi(slope * real'(i - fi[s]) + (slope < 0 ? -1e-9 : 1e-9));
      end
  endtask

  task automatic reference();
    int nr, nc;
    bit changed;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        ref_t[r][c] = (cfg[r][c].start || (c == 0 && src_w[r])) ? 1 : INF;
    do begin
      changed = 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if (ref_t[r][c] < INF)
            for (int d = 0; d < 4; d++) begin
              int h = hop(r, c, d);
              if (h < INF && nbr(r, c, d, nr, nc) && ref_t[r][c] + h + 1 < ref_t[nr][nc]) begin
                ref_t[nr][nc] = ref_t[r][c] + h + 1;
                changed = 1;
              end
            end
    end while (changed);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        dirmask_t e;
        if (ref_t[r][c] == INF) e = '0;
        else if (cfg[r][c].start) e = '1;
        else begin
          int win = 0;
          e = '1;
          if (c == 0 && src_w[r]) begin e[DIR_W] = 1'b0; win++; end
          for (int d = 0; d < 4; d++) begin
            int od = (d + 2) % 4;
            if (nbr(r, c, d, nr, nc) && ref_t[nr][nc] < INF && hop(nr, nc, od) < INF) begin
              int a = ref_t[nr][nc] + hop(nr, nc, od) + 1;
              if (a == ref_t[r][c]) begin e[d] = 1'b0; win++; end
              else n_lockout++;
            end
          end
          if (win > 1) n_ties++;
        end
        ref_ip[r][c] = e;
      end
  endtask

  // ------------------------------------------------------------- stimulus
  task automatic clear_map();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        cfg[r][c] = '0;
        cfg[r][c].con = 4'b1111;
        blocked[r][c] = 0;
      end
    for (int r = 0; r < ROWS; r++) src_w[r] = 0;
  endtask

  task automatic block_rect(int r0, int c0, int r1, int c1);
    for (int r = r0; r <= r1; r++)
      for (int c = c0; c <= c1; c++) blocked[r][c] = 1;
  endtask

  // Cut every connection into or out of a blocked cell.
  task automatic apply_blocks();
    int nr, nc;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        for (int d = 0; d < 4; d++)
          if (blocked[r][c] || (nbr(r, c, d, nr, nc) && blocked[nr][nc]))
            cfg[r][c].con[d] = 1'b0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) if (blocked[r][c]) n_blocked++;
  endtask

  task automatic write_config();
    for (int r = 0; r < ROWS; r++) begin
      for (int c = COLS - 1; c >= 0; c--)
        for (int b = CFG_W - 1; b >= 0; b--) begin
          @(negedge clk);
          bl_si = cfg[r][c][b]; bl_shift = 1'b1;
        end
      @(negedge clk);
      bl_shift = 1'b0; wl_si = (r == 0); wl_shift = 1'b1;   // walk the row select
      @(negedge clk);
      wl_shift = 1'b0; cfg_write = 1'b1;
      @(negedge clk);
      cfg_write = 1'b0;
      n_rows_written++;
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) if (cfg[r][c].start) n_starts++;
  endtask

  task automatic program_ladders(input bit on);
    bit tx [], ty [];
    int lx [], ly [];
    tx = new[COLS]; ty = new[ROWS];
    for (int i = 0; i < COLS; i++) tx[i] = on && (i == 30);
    for (int i = 0; i < ROWS; i++) ty[i] = on && (i == 30);
    for (int i = COLS - 1; i >= 0; i--) begin
      @(negedge clk);
      gx_tap_si = tx[i]; gx_tap_shift = 1'b1;
    end
    @(negedge clk);
    gx_tap_shift = 1'b0;
    for (int i = ROWS - 1; i >= 0; i--) begin
      @(negedge clk);
      gy_tap_si = ty[i]; gy_tap_shift = 1'b1;
    end
    @(negedge clk);
    gy_tap_shift = 1'b0;
    if (on) begin
      gx_v1 = 8'd70;  gx_v2 = 8'd180; gx_v3 = 8'd230;
      gy_v1 = 8'd70;  gy_v2 = 8'd180; gy_v3 = 8'd230;
    end else begin
      gx_v1 = 8'd128; gx_v2 = 8'd128; gx_v3 = 8'd128;
      gy_v1 = 8'd128; gy_v2 = 8'd128; gy_v3 = 8'd128;
    end
    ladder_ref(COLS, tx, int'(gx_v1), int'(gx_v2), int'(gx_v3), lx);
    ladder_ref(ROWS, ty, int'(gy_v1), int'(gy_v2), int'(gy_v3), ly);
    for (int i = 0; i < COLS; i++) bx[i] = lx[i];
    for (int i = 0; i < ROWS; i++) by[i] = ly[i];
    @(negedge clk);
    for (int i = 0; i < COLS; i++) check(gx_taps[i] == tx[i], "X tap chain");
    for (int i = 0; i < ROWS; i++) check(gy_taps[i] == ty[i], "Y tap chain");
  endtask

  // Run one evaluation: clear, raise EN, watch lock clocks until quiet.
  task automatic evaluate(input string name);
    int t, quiet;
    @(negedge clk);
    lock_rst = 1'b1; ip_clr = 1'b1;
    @(negedge clk);
    lock_rst = 1'b0; ip_clr = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) meas_t[r][c] = INF;
      east_t[r] = INF;
    end
    en = 1'b1;
    for (int r = 0; r < ROWS; r++) bin_w[r] = src_w[r];
    for (int r = 0; r < ROWS; r++) if (src_w[r]) n_bnd_in++;
    quiet = 0;
    for (t = 1; t <= MAX_RUN && quiet < 200; t++) begin
      bit any = 0;
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++)
          if (pin[r][c] && meas_t[r][c] == INF) begin meas_t[r][c] = t; any = 1; end
        if (bout_e[r] && east_t[r] == INF) begin east_t[r] = t; n_bnd_out++; end
      end
      quiet = any ? 0 : quiet + 1;
    end
    $display("%s: wavefront settled after %0d clocks", name, t - quiet);
    en = 1'b0;
    bin_w = '0;
    reference();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        check(meas_t[r][c] == ref_t[r][c],
              $sformatf("%s (%0d,%0d) locked at %0d expected %0d", name, r, c, meas_t[r][c], ref_t[r][c]));
  endtask

  // Read all IP codes back through the scan-out chain and compare.
  task automatic readout(input string name);
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wl_si = (r == 0); wl_shift = 1'b1;
      @(negedge clk);
      wl_shift = 1'b0; so_capture = 1'b1;
      @(negedge clk);
      so_capture = 1'b0;
      for (int c = COLS - 1; c >= 0; c--)
        for (int b = NDIR - 1; b >= 0; b--) begin
          read_ip[r][c][b] = so;
          so_shift = 1'b1;
          @(negedge clk);
          so_shift = 1'b0;
          n_readout++;
        end
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        check(read_ip[r][c] == ref_ip[r][c],
              $sformatf("%s (%0d,%0d) IP %b expected %b", name, r, c, read_ip[r][c], ref_ip[r][c]));
  endtask

  task automatic maze();
    clear_map();
    block_rect(5, 4, 12, 9);
    block_rect(3, 15, 20, 17);
    block_rect(25, 2, 27, 30);
    block_rect(14, 24, 22, 34);
    block_rect(30, 33, 37, 35);
    block_rect(32, 10, 38, 14);
    apply_blocks();
    cfg[0][0].start = 1'b1;
  endtask

  // --------------------------------------------------------------- script
  initial begin
    rst_ni = 1'b0; en = 1'b0; lock_rst = 1'b0; ip_clr = 1'b0;
    wl_shift = 1'b0; wl_si = 1'b0; bl_shift = 1'b0; bl_si = 1'b0;
    cfg_write = 1'b0; so_capture = 1'b0; so_shift = 1'b0;
    gx_tap_shift = 1'b0; gx_tap_si = 1'b0; gy_tap_shift = 1'b0; gy_tap_si = 1'b0;
    gx_v1 = '0; gx_v2 = '0; gx_v3 = '0; gy_v1 = '0; gy_v2 = '0; gy_v3 = '0;
    bin_n = '0; bin_s = '0; bin_w = '0; bin_e = '0;
    repeat (3) @(negedge clk);
    rst_ni = 1'b1;

    // 1. shortest path, no gradient
    maze();
    write_config();
    program_ladders(1'b0);
    evaluate("SSP flat");
    readout("SSP flat");
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) flat_ip[r][c] = read_ip[r][c];
    for (int r = 0; r < ROWS; r++) flat_east[r] = east_t[r];

    // 2. same map with the voltage gradient
    program_ladders(1'b1);
    evaluate("SSP gradient");
    readout("SSP gradient");
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) if (read_ip[r][c] != flat_ip[r][c]) n_grad_diff++;

    // 4. tiling: the first points of impact of scenario 1 on the shared
    //    east edge start the neighbouring tile through its west inputs.
    begin
      int tmin = INF;
      for (int r = 0; r < ROWS; r++) if (flat_east[r] < tmin) tmin = flat_east[r];
      clear_map();
      block_rect(8, 20, 39, 24);      // vertical blockage as in the tiling example
      block_rect(8, 10, 10, 24);
      apply_blocks();
      for (int r = 0; r < ROWS; r++) src_w[r] = (tmin < INF) && (flat_east[r] == tmin);
      write_config();
      program_ladders(1'b0);
      evaluate("tile east of SSP");
      readout("tile east of SSP");
    end

    // 3. collision avoidance: start from the sides of four obstacles
    clear_map();
    block_rect(6, 6, 13, 13);
    block_rect(6, 26, 13, 33);
    block_rect(26, 6, 33, 13);
    block_rect(26, 26, 33, 33);
    block_rect(17, 17, 22, 22);
    apply_blocks();
    for (int i = 6; i <= 13; i++) begin
      cfg[i][5].start = 1'b1;  cfg[i][14].start = 1'b1;
      cfg[i][25].start = 1'b1; cfg[i][34].start = 1'b1;
      cfg[i+20][5].start = 1'b1;  cfg[i+20][14].start = 1'b1;
      cfg[i+20][25].start = 1'b1; cfg[i+20][34].start = 1'b1;
    end
    for (int i = 17; i <= 22; i++) begin
      cfg[i][16].start = 1'b1; cfg[i][23].start = 1'b1;
    end
    write_config();
    evaluate("collision avoidance");
    readout("collision avoidance");

    // 5. two-slit experiment: one slit in the first wall, two in the second.
    clear_map();
    block_rect(0, 13, 39, 14);
    block_rect(0, 26, 39, 27);
    for (int r = 9; r <= 10; r++) begin blocked[r][13] = 0; blocked[r][14] = 0; end
    for (int r = 12; r <= 13; r++) begin blocked[r][26] = 0; blocked[r][27] = 0; end
    for (int r = 26; r <= 27; r++) begin blocked[r][26] = 0; blocked[r][27] = 0; end
    apply_blocks();
    cfg[4][6].start = 1'b1;
    write_config();
    program_ladders(1'b0);
    evaluate("two-slit");
    readout("two-slit");
    if (meas_t[12][27] < INF && meas_t[26][27] < INF) n_slits = 2;
    check(n_slits == 2, "wavefront passed both slits");

    $display("mechanisms: rows_written=%0d starts=%0d lockouts=%0d ties=%0d blocked=%0d grad_diff=%0d bnd_in=%0d bnd_out=%0d readout_bits=%0d",
             n_rows_written, n_starts, n_lockout, n_ties, n_blocked, n_grad_diff, n_bnd_in, n_bnd_out, n_readout);
    check(n_rows_written > 0, "scan write happened");
    check(n_starts > 0, "start vertex used");
    check(n_lockout > 0, "lockout happened");
    check(n_ties > 0, "simultaneous arrival happened");
    check(n_blocked > 0, "blockage present");
    check(n_grad_diff > 0, "gradient changed the result");
    check(n_bnd_in > 0, "boundary input used");
    check(n_bnd_out > 0, "boundary output fired");
    check(n_readout > 0, "scan readout happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
