// vertex_cell_tb: self-checking test of the vertex lockout and decode.
//
// Drives the four inputs with single, simultaneous, late and random pulse
// patterns and checks PIN, OUT = PL & CON and the IP code against values
// worked out from the lockout rule: the directions that were high at the
// first locking clock are cleared in IP, all others set. Also checks that
// the lock takes exactly one clock, that EN gates the cell, that START fires
// all four directions, that RST keeps IP and that IP clear works.
module vertex_cell_tb;
  import graph_pkg::*;

  logic clk = 1'b0;
  logic rst_ni, en, lock_rst, ip_clr, cfg_we, cfg_start, pin;
  dirmask_t in_i, cfg_con, out, ip;
  int checks = 0, failures = 0;

  vertex_cell dut (
    .clk(clk), .rst_ni(rst_ni), .en(en), .lock_rst(lock_rst), .ip_clr(ip_clr),
    .in_i(in_i), .cfg_we(cfg_we), .cfg_con(cfg_con), .cfg_start(cfg_start),
    .out_o(out), .ip_o(ip), .pin_o(pin)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: pin=%b out=%b ip=%b", what, pin, out, ip);
    end
  endtask

  task automatic configure(input dirmask_t con, input logic start);
    @(negedge clk);
    cfg_con = con; cfg_start = start; cfg_we = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // New evaluation: clear the latches and the IP bits.
  task automatic restart();
    @(negedge clk);
    in_i = '0; lock_rst = 1'b1; ip_clr = 1'b1;
    @(negedge clk);
    lock_rst = 1'b0; ip_clr = 1'b0;
  endtask

  // Apply a first input pattern, then a later one, and check the result.
  task automatic pulse_case(input dirmask_t con, input dirmask_t first,
                            input dirmask_t later, input string what);
    dirmask_t exp_pl;
    configure(con, 1'b0);
    restart();
    en = 1'b1;
    @(negedge clk);
    check(!pin && out == '0, {what, " idle"});
    in_i = first;
    @(negedge clk);                      // one clock later: locked
    exp_pl = ~first;
    check(pin == (first != '0), {what, " lock after one clock"});
    check(out == (first != '0 ? (exp_pl & con) : '0), {what, " out"});
    in_i = first | later;                // later pulses are locked out
    @(negedge clk);
    @(negedge clk);
    check(out == (first != '0 ? (exp_pl & con) : '0), {what, " lockout"});
    check(ip == (first != '0 ? exp_pl : '0), {what, " ip"});
    en = 1'b0;
  endtask

  initial begin
    rst_ni = 1'b0; en = 1'b0; lock_rst = 1'b0; ip_clr = 1'b0; cfg_we = 1'b0;
    cfg_start = 1'b0; cfg_con = '0; in_i = '0;
    repeat (2) @(negedge clk);
    rst_ni = 1'b1;

    // The document's example: north first, south later -> IP = S,E,W set.
    pulse_case(4'b1111, 4'b0100, 4'b0001, "north then south");
    check(ip == 4'b1011, "north example ip=1011");
    // Simultaneous north and west.
    pulse_case(4'b1111, 4'b1100, 4'b0011, "north+west");
    // Connection mask gates the repeater but not IP.
    pulse_case(4'b0101, 4'b0010, 4'b1101, "masked east");
    pulse_case(4'b0000, 4'b0001, 4'b1110, "blocked cell");

    // EN low: no lock.
    configure(4'b1111, 1'b0);
    restart();
    en = 1'b0; in_i = 4'b0001;
    repeat (3) @(negedge clk);
    check(!pin && out == '0 && ip == '0, "EN low holds cell");
    en = 1'b1;
    @(negedge clk);
    check(pin && out == 4'b1110, "EN high locks");

    // RST clears the latches but keeps IP; ip_clr clears IP.
    @(negedge clk);
    en = 1'b0; in_i = '0; lock_rst = 1'b1;
    @(negedge clk);
    lock_rst = 1'b0;
    check(!pin && out == '0 && ip == 4'b1110, "RST keeps IP");
    ip_clr = 1'b1;
    @(negedge clk);
    ip_clr = 1'b0;
    check(ip == '0, "IP clear");

    // START: fires all connected directions without an input.
    configure(4'b1011, 1'b1);
    restart();
    en = 1'b1;
    @(negedge clk);
    @(negedge clk);
    check(pin && out == 4'b1011 && ip == 4'b1111, "start vertex");
    en = 1'b0;

    // Random patterns.
    for (int k = 0; k < 200; k++) begin
      dirmask_t c, f, l;
      c = dirmask_t'($urandom);
      f = dirmask_t'($urandom_range(1, 15));
      l = dirmask_t'($urandom);
      pulse_case(c, f, l, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
