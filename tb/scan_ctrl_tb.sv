// scan_ctrl_tb: self-checking test of the WL/BL scan chains and scan-out.
//
// Shifts random row selections into the WL chain and random configuration
// words into the BL chain, then checks the row write enables and the
// per-column words against the bit order documented in scan_ctrl. Drives a
// random IP array, captures a selected row and checks every bit that comes
// out of the scan-out chain, MSB of the last column first. The full row
// readout must take exactly 4*COLS shift clocks.
module scan_ctrl_tb;
  import graph_pkg::*;

  localparam int unsigned ROWS = 6;
  localparam int unsigned COLS = 5;

  logic clk = 1'b0;
  logic rst_ni, wl_shift, wl_si, bl_shift, bl_si, cfg_write, so_capture, so_shift, so;
  logic [ROWS-1:0] row_we;
  cell_cfg_t [COLS-1:0] cfg_data;
  dirmask_t [ROWS-1:0][COLS-1:0] ip;
  int checks = 0, failures = 0;

  scan_ctrl #(.ROWS(ROWS), .COLS(COLS)) dut (
    .clk(clk), .rst_ni(rst_ni), .wl_shift(wl_shift), .wl_si(wl_si),
    .bl_shift(bl_shift), .bl_si(bl_si), .cfg_write(cfg_write),
    .so_capture(so_capture), .so_shift(so_shift), .so_o(so),
    .cfg_row_we(row_we), .cfg_data(cfg_data), .ip_i(ip)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic select_rows(input logic [ROWS-1:0] sel);
    for (int i = int'(ROWS) - 1; i >= 0; i--) begin
      @(negedge clk);
      wl_si = sel[i]; wl_shift = 1'b1;
    end
    @(negedge clk);
    wl_shift = 1'b0;
  endtask

  // Words are sent column COLS-1 first, MSB first.
  task automatic load_words(input cell_cfg_t words [COLS]);
    for (int c = int'(COLS) - 1; c >= 0; c--)
      for (int b = int'(CFG_W) - 1; b >= 0; b--) begin
        @(negedge clk);
        bl_si = words[c][b]; bl_shift = 1'b1;
      end
    @(negedge clk);
    bl_shift = 1'b0;
  endtask

  initial begin
    cell_cfg_t words [COLS];
    logic [ROWS-1:0] sel;
    rst_ni = 1'b0; wl_shift = 1'b0; wl_si = 1'b0; bl_shift = 1'b0; bl_si = 1'b0;
    cfg_write = 1'b0; so_capture = 1'b0; so_shift = 1'b0;
    ip = '0;
    repeat (2) @(negedge clk);
    rst_ni = 1'b1;

    for (int k = 0; k < 20; k++) begin
      sel = '0;
      sel[$urandom_range(0, ROWS - 1)] = 1'b1;
      if (k % 5 == 4) sel = ROWS'($urandom);
      select_rows(sel);
      for (int c = 0; c < int'(COLS); c++) words[c] = cell_cfg_t'($urandom);
      load_words(words);
      check(row_we == '0, "no write without cfg_write");
      cfg_write = 1'b1;
      #1;
      check(row_we == sel, $sformatf("row enables %b expected %b", row_we, sel));
      for (int c = 0; c < int'(COLS); c++)
        check(cfg_data[c] == words[c], $sformatf("column %0d word", c));
      @(negedge clk);
      cfg_write = 1'b0;

      // Readout of one selected row.
      sel = '0;
      sel[$urandom_range(0, ROWS - 1)] = 1'b1;
      select_rows(sel);
      for (int r = 0; r < int'(ROWS); r++)
        for (int c = 0; c < int'(COLS); c++) ip[r][c] = dirmask_t'($urandom);
      so_capture = 1'b1;
      @(negedge clk);
      so_capture = 1'b0;
      for (int c = int'(COLS) - 1; c >= 0; c--)
        for (int b = int'(NDIR) - 1; b >= 0; b--) begin
          logic expect_bit = 1'b0;
          for (int r = 0; r < int'(ROWS); r++) if (sel[r]) expect_bit = ip[r][c][b];
          check(so == expect_bit, $sformatf("scan-out column %0d bit %0d", c, b));
          so_shift = 1'b1;
          @(negedge clk);
          so_shift = 1'b0;
        end
      // After 4*COLS shifts the chain is empty.
      check(so == 1'b0, "scan-out drained after 4*COLS shifts");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
