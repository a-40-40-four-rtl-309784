// edge_cell_tb: self-checking test of the edge delay.
//
// For a spread of weights and bias codes, raises the input and counts the
// clocks until the output rises. The expected count is
// ceil((C_BASE + W) * Q_UNIT / (bias_x + bias_y)), worked out here from the
// parameters. Also checks that the output stays high, that lock_rst clears
// it, and that an edge with zero bias never fires.
module edge_cell_tb;
  import graph_pkg::*;

  localparam int unsigned C_BASE = 16;
  localparam int unsigned Q_UNIT = 32;

  logic clk = 1'b0;
  logic rst_ni, lock_rst, in_i, cfg_we, out;
  bias_t bx, by;
  weight_t w;
  int checks = 0, failures = 0;

  edge_cell #(.C_BASE(C_BASE), .Q_UNIT(Q_UNIT)) dut (
    .clk(clk), .rst_ni(rst_ni), .lock_rst(lock_rst), .in_i(in_i),
    .bias_x(bx), .bias_y(by), .cfg_we(cfg_we), .cfg_w(w), .out_o(out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (w=%0d bx=%0d by=%0d)", what, w, bx, by);
    end
  endtask

  task automatic run_case(input int wt, input int x, input int y);
    int expect_clk, n;
    @(negedge clk);
    w = weight_t'(wt); cfg_we = 1'b1; bx = bias_t'(x); by = bias_t'(y);
    lock_rst = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0; lock_rst = 1'b0;
    check(!out, "cleared");
    if (x + y == 0) expect_clk = -1;
    else expect_clk = ((C_BASE + wt) * Q_UNIT + x + y - 1) / (x + y);
    in_i = 1'b1;
    n = 0;
    while (!out && n < 3000) begin
      @(negedge clk);
      n++;
    end
    if (expect_clk < 0) check(!out, "zero bias never fires");
    else                check(n == expect_clk, $sformatf("delay %0d clocks, expected %0d", n, expect_clk));
    repeat (3) @(negedge clk);
    check(out == (expect_clk >= 0), "output holds");
    in_i = 1'b0;
  endtask

  initial begin
    rst_ni = 1'b0; lock_rst = 1'b0; in_i = 1'b0; cfg_we = 1'b0;
    w = '0; bx = '0; by = '0;
    repeat (2) @(negedge clk);
    rst_ni = 1'b1;
    run_case(0, 128, 128);
    run_case(15, 128, 128);
    run_case(8, 60, 40);
    run_case(1, 255, 255);
    run_case(0, 1, 0);
    run_case(5, 0, 0);
    for (int k = 0; k < 60; k++)
      run_case($urandom_range(0, 15), $urandom_range(0, 255), $urandom_range(1, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
