// graph_array_tb: self-checking wavefront test of the vertex/edge grid.
//
// Programs random maps (edge weights, connection bits with blocked cells,
// per-row and per-column bias codes, one or two start vertices and an
// optional pulse entering through a perimeter port), lets the wavefront run
// and compares, for every vertex, the clock at which it locked and its IP
// code with a reference computed here by shortest-path relaxation:
//   hop cost u -> v = ceil((C_BASE + W) * Q_UNIT / (bias_x + bias_y)) + 1
// (edge delay plus the one-clock vertex lock), IP bit d cleared exactly for
// the neighbours whose pulse arrives at the minimum time. Also checks the
// firing time of every perimeter output edge.
module graph_array_tb;
  import graph_pkg::*;

  localparam int unsigned ROWS   = 8;
  localparam int unsigned COLS   = 10;
  localparam int unsigned C_BASE = 16;
  localparam int unsigned Q_UNIT = 32;
  localparam int INF = 1 << 30;

  logic clk = 1'b0;
  logic rst_ni, en, lock_rst, ip_clr;
  bias_t     [COLS-1:0] bias_x;
  bias_t     [ROWS-1:0] bias_y;
  logic      [ROWS-1:0] row_we;
  cell_cfg_t [COLS-1:0] cfg_data;
  logic [COLS-1:0] bin_n, bin_s, bout_n, bout_s;
  logic [ROWS-1:0] bin_w, bin_e, bout_w, bout_e;
  dirmask_t [ROWS-1:0][COLS-1:0] ip;
  logic [ROWS-1:0][COLS-1:0] pin;
  int checks = 0, failures = 0;
  int n_lockout = 0, n_ties = 0;

  graph_array #(.ROWS(ROWS), .COLS(COLS), .C_BASE(C_BASE), .Q_UNIT(Q_UNIT)) dut (
    .clk(clk), .rst_ni(rst_ni), .en(en), .lock_rst(lock_rst), .ip_clr(ip_clr),
    .bias_x(bias_x), .bias_y(bias_y), .cfg_row_we(row_we), .cfg_data(cfg_data),
    .bnd_in_n(bin_n), .bnd_in_s(bin_s), .bnd_in_w(bin_w), .bnd_in_e(bin_e),
    .bnd_out_n(bout_n), .bnd_out_s(bout_s), .bnd_out_w(bout_w), .bnd_out_e(bout_e),
    .ip_o(ip), .pin_o(pin)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cell_cfg_t cfg [ROWS][COLS];
  int arr [ROWS][COLS];        // measured lock clock
  int ref_t [ROWS][COLS];      // reference lock clock
  dirmask_t ref_ip [ROWS][COLS];  // reference IP code
  int bo_t [4][64];            // measured perimeter output clocks [dir][index]

  function automatic int hop(int r, int c, int d);
    int cur = int'(bias_x[c]) + int'(bias_y[r]);
    if (!cfg[r][c].con[d] || cur == 0) return INF;
    return ((C_BASE + int'(cfg[r][c].weight[d])) * Q_UNIT + cur - 1) / cur;
  endfunction

  // Neighbour of (r,c) in direction d; returns 0 if off the grid.
  function automatic bit nbr(int r, int c, int d, output int nr, output int nc);
    nr = r; nc = c;
    case (d)
      0: nr = r + 1;   // S
      1: nc = c + 1;   // E
      2: nr = r - 1;   // N
      default: nc = c - 1;  // W
    endcase
    return nr >= 0 && nr < int'(ROWS) && nc >= 0 && nc < int'(COLS);
  endfunction

  task automatic run_map(input int trial);
    int nr, nc, t;
    bit changed;
    bit use_bnd;
    int bnd_row;
    // Random map.
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        cfg[r][c] = cell_cfg_t'($urandom);
        cfg[r][c].start = 1'b0;
        cfg[r][c].con = ($urandom_range(0, 9) == 0) ? 4'b0000 : dirmask_t'($urandom | $urandom);
      end
    if (trial % 3 == 0)  // uniform weights: many simultaneous arrivals
      for (int r = 0; r < int'(ROWS); r++)
        for (int c = 0; c < int'(COLS); c++) begin
          cfg[r][c].weight = '0;
          cfg[r][c].con = 4'b1111;
        end
    cfg[$urandom_range(0, ROWS - 1)][$urandom_range(0, COLS - 1)].start = 1'b1;
    if (trial % 2 == 1) cfg[$urandom_range(0, ROWS - 1)][$urandom_range(0, COLS - 1)].start = 1'b1;
    for (int c = 0; c < int'(COLS); c++) bias_x[c] = bias_t'($urandom_range(40, 255));
    for (int r = 0; r < int'(ROWS); r++) bias_y[r] = bias_t'($urandom_range(40, 255));
    use_bnd = (trial % 4 == 2);
    bnd_row = $urandom_range(0, ROWS - 1);

    // Write the configuration row by row.
    for (int r = 0; r < int'(ROWS); r++) begin
      @(negedge clk);
      row_we = '0; row_we[r] = 1'b1;
      for (int c = 0; c < int'(COLS); c++) cfg_data[c] = cfg[r][c];
    end
    @(negedge clk);
    row_we = '0;
    lock_rst = 1'b1; ip_clr = 1'b1;
    @(negedge clk);
    lock_rst = 1'b0; ip_clr = 1'b0;

    // Reference: sources lock at clock 1.
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        ref_t[r][c] = cfg[r][c].start ? 1 : INF;
        arr[r][c] = INF;
      end
    if (use_bnd) ref_t[bnd_row][0] = 1;
    do begin
      changed = 0;
      for (int r = 0; r < int'(ROWS); r++)
        for (int c = 0; c < int'(COLS); c++)
          if (ref_t[r][c] < INF)
            for (int d = 0; d < 4; d++) begin
              int h = hop(r, c, d);
              if (h < INF && nbr(r, c, d, nr, nc) && ref_t[r][c] + h + 1 < ref_t[nr][nc]) begin
                ref_t[nr][nc] = ref_t[r][c] + h + 1;
                changed = 1;
              end
            end
    end while (changed);

    // Run.
    for (int d = 0; d < 4; d++) for (int i = 0; i < 64; i++) bo_t[d][i] = INF;
    en = 1'b1;
    if (use_bnd) bin_w[bnd_row] = 1'b1;
    for (t = 1; t <= 2500; t++) begin
      @(negedge clk);
      for (int r = 0; r < int'(ROWS); r++)
        for (int c = 0; c < int'(COLS); c++)
          if (pin[r][c] && arr[r][c] == INF) arr[r][c] = t;
      for (int c = 0; c < int'(COLS); c++) begin
        if (bout_n[c] && bo_t[2][c] == INF) bo_t[2][c] = t;
        if (bout_s[c] && bo_t[0][c] == INF) bo_t[0][c] = t;
      end
      for (int r = 0; r < int'(ROWS); r++) begin
        if (bout_w[r] && bo_t[3][r] == INF) bo_t[3][r] = t;
        if (bout_e[r] && bo_t[1][r] == INF) bo_t[1][r] = t;
      end
    end

    // Compare.
    for (int r = 0; r < int'(ROWS); r++)
      for (int c = 0; c < int'(COLS); c++) begin
        dirmask_t exp_ip;
        int winners = 0, losers = 0;
        checks++;
        if (arr[r][c] != ref_t[r][c]) begin
          failures++;
          $display("FAIL trial %0d (%0d,%0d): locked at %0d expected %0d", trial, r, c, arr[r][c], ref_t[r][c]);
        end
        if (ref_t[r][c] == INF) exp_ip = '0;
        else if (cfg[r][c].start) exp_ip = '1;
        else begin
          exp_ip = '1;
          for (int d = 0; d < 4; d++) begin
            int od = (d + 2) % 4;  // facing direction on the neighbour
            if (nbr(r, c, d, nr, nc) && ref_t[nr][nc] < INF && hop(nr, nc, od) < INF) begin
              if (ref_t[nr][nc] + hop(nr, nc, od) + 1 == ref_t[r][c]) begin
                exp_ip[d] = 1'b0;
                winners++;
              end else if (ref_t[nr][nc] + hop(nr, nc, od) + 1 > ref_t[r][c]) losers++;
            end
          end
          if (use_bnd && r == bnd_row && c == 0) exp_ip[DIR_W] = 1'b0;
          if (winners > 1) n_ties++;
          if (losers > 0) n_lockout++;
        end
        ref_ip[r][c] = exp_ip;
        checks++;
        if (ip[r][c] != exp_ip) begin
          failures++;
          $display("FAIL trial %0d (%0d,%0d): IP %b expected %b", trial, r, c, ip[r][c], exp_ip);
        end
      end
    for (int c = 0; c < int'(COLS); c++) begin
      int e;
      e = ref_t[0][c] < INF && hop(0, c, DIR_N) < INF && ref_ip[0][c][DIR_N] ? ref_t[0][c] + hop(0, c, DIR_N) : INF;
      checks++;
      if (bo_t[2][c] != e) begin failures++; $display("FAIL north out %0d: %0d vs %0d", c, bo_t[2][c], e); end
      e = ref_t[ROWS-1][c] < INF && hop(ROWS-1, c, DIR_S) < INF && ref_ip[ROWS-1][c][DIR_S] ? ref_t[ROWS-1][c] + hop(ROWS-1, c, DIR_S) : INF;
      checks++;
      if (bo_t[0][c] != e) begin failures++; $display("FAIL south out %0d: %0d vs %0d", c, bo_t[0][c], e); end
    end
    for (int r = 0; r < int'(ROWS); r++) begin
      int e;
      e = ref_t[r][0] < INF && hop(r, 0, DIR_W) < INF && ref_ip[r][0][DIR_W] ? ref_t[r][0] + hop(r, 0, DIR_W) : INF;
      checks++;
      if (bo_t[3][r] != e) begin failures++; $display("FAIL west out %0d: %0d vs %0d", r, bo_t[3][r], e); end
      e = ref_t[r][COLS-1] < INF && hop(r, COLS-1, DIR_E) < INF && ref_ip[r][COLS-1][DIR_E] ? ref_t[r][COLS-1] + hop(r, COLS-1, DIR_E) : INF;
      checks++;
      if (bo_t[1][r] != e) begin failures++; $display("FAIL east out %0d: %0d vs %0d", r, bo_t[1][r], e); end
    end
    en = 1'b0;
    bin_w = '0;
  endtask

  initial begin
    rst_ni = 1'b0; en = 1'b0; lock_rst = 1'b0; ip_clr = 1'b0; row_we = '0;
    cfg_data = '0; bias_x = '0; bias_y = '0;
    bin_n = '0; bin_s = '0; bin_w = '0; bin_e = '0;
    repeat (2) @(negedge clk);
    rst_ni = 1'b1;
    for (int trial = 0; trial < 12; trial++) run_map(trial);
    checks++;
    if (n_ties == 0 || n_lockout == 0) begin
      failures++;
      $display("FAIL coverage: ties=%0d lockouts=%0d", n_ties, n_lockout);
    end
    $display("simultaneous-arrival cells %0d, locked-out later pulses %0d", n_ties, n_lockout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
