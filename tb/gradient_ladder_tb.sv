// gradient_ladder_tb: self-checking test of the bias ladder profile.
//
// Loads tap patterns through the serial tap chain and compares every stage
// level with a reference built segment by segment in real arithmetic: fixed
// nodes are the two ends (V1, V2) and every closed tap (V3); between two
// fixed nodes the level is a straight line, truncated towards zero. Cases:
// no tap (V1 -> V2 line), the single tap at stage 30, two taps, a tap on an
// end node, and random patterns and levels.
module gradient_ladder_tb;
  import graph_pkg::*;

  localparam int unsigned N = 40;

  logic clk = 1'b0;
  logic rst_ni, tap_shift, tap_si;
  bias_t v1, v2, v3;
  logic [N-1:0] tap_q;
  bias_t [N-1:0] level;
  int checks = 0, failures = 0;

  gradient_ladder #(.N(N)) dut (
    .clk(clk), .rst_ni(rst_ni), .tap_shift(tap_shift), .tap_si(tap_si),
    .v1(v1), .v2(v2), .v3(v3), .tap_q(tap_q), .level_o(level)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Shift a tap pattern in: bit N-1 first, so it ends at index N-1.
  task automatic load_taps(input logic [N-1:0] pat);
    for (int i = int'(N) - 1; i >= 0; i--) begin
      @(negedge clk);
      tap_si = pat[i]; tap_shift = 1'b1;
    end
    @(negedge clk);
    tap_shift = 1'b0;
  endtask

  task automatic check_profile(input logic [N-1:0] pat, input int l1, input int l2,
                               input int l3, input string what);
    int fixed_idx[$];
    int fixed_val[$];
    int expv [N];
    int bad = 0;
    v1 = bias_t'(l1); v2 = bias_t'(l2); v3 = bias_t'(l3);
    load_taps(pat);
    checks++;
    if (tap_q != pat) begin
      failures++;
      $display("FAIL %s: tap chain %h expected %h", what, tap_q, pat);
    end
    // Fixed nodes in order.
    for (int i = 0; i < int'(N); i++) begin
      if (pat[i])                      begin fixed_idx.push_back(i); fixed_val.push_back(l3); end
      else if (i == 0)                 begin fixed_idx.push_back(i); fixed_val.push_back(l1); end
      else if (i == int'(N) - 1)       begin fixed_idx.push_back(i); fixed_val.push_back(l2); end
    end
    for (int s = 0; s + 1 < fixed_idx.size(); s++) begin
      int a = fixed_idx[s], b = fixed_idx[s+1];
      for (int i = a; i <= b; i++) begin
        real slope = real'(fixed_val[s+1] - fixed_val[s]) / real'(b - a);
        expv[i] = fixed_val[s] + $rtoi(slope * real'(i - a) + (slope < 0 ? -1e-9 : 1e-9));
      end
    end
    #1;
    for (int i = 0; i < int'(N); i++) begin
      checks++;
      if (int'(level[i]) != expv[i]) begin
        failures++;
        bad++;
        if (bad < 5) $display("FAIL %s: stage %0d level %0d expected %0d", what, i, level[i], expv[i]);
      end
    end
  endtask

  initial begin
    logic [N-1:0] p;
    rst_ni = 1'b0; tap_shift = 1'b0; tap_si = 1'b0; v1 = '0; v2 = '0; v3 = '0;
    repeat (2) @(negedge clk);
    rst_ni = 1'b1;
    check_profile('0, 90, 220, 255, "no tap");
    check_profile('0, 200, 10, 255, "no tap falling");
    p = '0; p[30] = 1'b1;
    check_profile(p, 100, 150, 230, "tap at stage 30");
    p = '0; p[8] = 1'b1; p[25] = 1'b1;
    check_profile(p, 120, 40, 250, "two taps");
    p = '0; p[0] = 1'b1;
    check_profile(p, 10, 100, 200, "tap on end node");
    for (int k = 0; k < 30; k++) begin
      p = {$urandom, $urandom};
      for (int i = 0; i < int'(N); i++) if ($urandom_range(0, 7) != 0) p[i] = 1'b0;
      check_profile(p, $urandom_range(0, 255), $urandom_range(0, 255),
                    $urandom_range(0, 255), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
