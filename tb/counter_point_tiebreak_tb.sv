// counter_point_tiebreak_tb: two tie-break counters cross-coupled as on the
// scoreboard (each sees the other's count, both cleared by either game
// pulse). Checked against a model with unbounded point counts: the
// tie-break is won at 7+ points with a lead of 2; the display shows the
// counts lowered together while both would be 15 or more. Scripted
// sequences cover 7-0, 7-5, 8-6 and a long tie-break that passes 15-15.
module counter_point_tiebreak_tb;
  import tennis_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic sw_a = 0, sw_b = 0;
  logic [TB_W-1:0] res_a, res_b;
  logic game_a, game_b;
  logic pair_rst;

  assign pair_rst = rst | game_a | game_b;

  counter_point_tiebreak u_a (.clk, .rst(pair_rst), .sw_own(sw_a), .sw_other(sw_b),
                              .other_res(res_b), .res(res_a), .game(game_a));
  counter_point_tiebreak u_b (.clk, .rst(pair_rst), .sw_own(sw_b), .sw_other(sw_a),
                              .other_res(res_a), .res(res_b), .game(game_b));

  always #5 clk = ~clk;

  int ta = 0, tb = 0;
  int folds = 0, wins_a = 0, wins_b = 0, long_wins = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: res %0d-%0d model %0d-%0d", what, $time, res_a, res_b, ta, tb);
    end
  endtask

  task automatic point(bit to_a);
    int sa, sb;
    bit won;
    @(negedge clk);
    sw_a = to_a; sw_b = !to_a;
    @(negedge clk);
    sw_a = 0; sw_b = 0;
    if (to_a) ta++; else tb++;
    won = (ta >= 7 && ta >= tb + 2) || (tb >= 7 && tb >= ta + 2);
    if (won) begin
      check("game pulse", game_a == to_a && game_b == !to_a);
      if (to_a) wins_a++; else wins_b++;
      if (ta + tb > 30) long_wins++;
      ta = 0; tb = 0;
      @(negedge clk);
      check("pulse one clock", !game_a && !game_b);
    end else begin
      check("no game pulse", !game_a && !game_b);
    end
    sa = ta; sb = tb;
    while (sa >= 15 && sb >= 15) begin sa--; sb--; end
    if (sa != ta) folds++;
    check("res_a", int'(res_a) == sa);
    check("res_b", int'(res_b) == sb);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (7) point(1);                               // 7-0
    repeat (5) begin point(1); point(0); end
    point(1); point(1);                                // 7-5
    repeat (6) begin point(0); point(1); end
    point(0); point(0);                                // 8-6 for B
    repeat (6) point(1); repeat (6) point(0);
    repeat (12) begin point(1); point(0); end
    point(0); point(0);                                // long one for B
    for (int i = 0; i < 3000; i++) point($urandom_range(0, 1) == 1);
    check("went past 15", folds > 0);
    check("both won", wins_a > 0 && wins_b > 0);
    $display("wins A=%0d B=%0d long=%0d folded=%0d", wins_a, wins_b, long_wins, folds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
