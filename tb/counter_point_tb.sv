// counter_point_tb: two regular-phase point counters cross-coupled as on
// the scoreboard (each one's 40 and advantage flags feed the other, both
// cleared by either game pulse). Random point sequences, with long deuce
// battles, are checked against a model that counts raw points per player
// and applies the tennis rules: game at 4+ points with a lead of 2, 40-40
// is deuce, a lead of one from deuce is advantage. Also checks that the
// game pulse follows the winning point by one clock and lasts one clock.
module counter_point_tb;
  import tennis_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic sw_a = 0, sw_b = 0;
  point_t res_a, res_b;
  logic game_a, game_b, p40_a, p40_b, adv_a, adv_b;
  logic pair_rst;

  assign pair_rst = rst | game_a | game_b;

  counter_point u_a (.clk, .rst(pair_rst), .sw_own(sw_a), .sw_other(sw_b), .a_in(adv_b), .p40_in(p40_b),
                     .res(res_a), .game(game_a), .p40_out(p40_a), .a_out(adv_a));
  counter_point u_b (.clk, .rst(pair_rst), .sw_own(sw_b), .sw_other(sw_a), .a_in(adv_a), .p40_in(p40_a),
                     .res(res_b), .game(game_b), .p40_out(p40_b), .a_out(adv_b));

  always #5 clk = ~clk;

  // Model: raw points won in the current game.
  int pa = 0, pb = 0;
  int deuces = 0, advantages = 0, games_a = 0, games_b = 0;

  function automatic point_t shown(int mine, int theirs);
    if (mine >= 3 && theirs >= 3) return (mine > theirs) ? PT_ADV : PT_40;
    return point_t'(mine);
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: res_a=%0d res_b=%0d model %0d-%0d", what, $time, res_a, res_b, pa, pb);
    end
  endtask

  task automatic point(bit to_a);
    bit won;
    @(negedge clk);
    sw_a = to_a; sw_b = !to_a;
    @(negedge clk);
    sw_a = 0; sw_b = 0;
    if (to_a) pa++; else pb++;
    won = (pa >= 4 && pa >= pb + 2) || (pb >= 4 && pb >= pa + 2);
    if (won) begin
      // The winner's game pulse is high in the clock after its point.
      check("game pulse", game_a == to_a && game_b == !to_a);
      if (to_a) games_a++; else games_b++;
      pa = 0; pb = 0;
      @(negedge clk);
      check("pulse one clock", !game_a && !game_b);
    end else begin
      check("no game pulse", !game_a && !game_b);
      if (pa >= 3 && pa == pb) deuces++;
      if (pa >= 3 && pb >= 3 && pa != pb) advantages++;
    end
    check("res_a", res_a == shown(pa, pb));
    check("res_b", res_b == shown(pb, pa));
    check("p40 flags", p40_a == (res_a == PT_40) && p40_b == (res_b == PT_40));
    check("adv flags", adv_a == (res_a == PT_ADV) && adv_b == (res_b == PT_ADV));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // Straight game for A: 15 30 40 game.
    repeat (4) point(1);
    // Deuce, advantage B, deuce, advantage A, game A.
    repeat (3) point(1); repeat (3) point(0);
    point(0); point(1); point(1); point(1);
    // Random games, biased towards alternation so deuce comes often.
    for (int i = 0; i < 3000; i++) point($urandom_range(0, 1) == 1);
    // Reset in the middle of a game.
    point(1); point(0); point(1);
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    pa = 0; pb = 0;
    check("reset", res_a == PT_00 && res_b == PT_00);
    check("deuce happened", deuces > 0);
    check("advantage happened", advantages > 0);
    check("both won games", games_a > 0 && games_b > 0);
    $display("deuces=%0d advantages=%0d games A=%0d B=%0d", deuces, advantages, games_a, games_b);
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
