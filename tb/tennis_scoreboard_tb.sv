// tennis_scoreboard_tb: end-to-end test of the scoreboard at its default
// (and only) configuration.
//
// Plays whole matches by pressing sw_a / sw_b and, after each press, decodes
// nothing: it compares the six 7-segment outputs bit for bit with what an
// independent model of a tennis match says the board must show. The model
// keeps raw points, games and sets as integers and applies the rules
// directly (game at 4+ points with a lead of 2; tie-break at 6-6, won at 7+
// with a lead of 2; set at 6 with a lead of 2 or at 7; match at two sets).
// It also checks the latency of a point (the scorer's display changes on
// the second clock edge after the press is first sampled, not before), that
// a simultaneous press of both buttons and any press after the match is
// over change nothing, and that reset clears the board in mid-match.
// Every mechanism is counted, and one that never happened is a failure.
module tennis_scoreboard_tb;
  import tennis_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sw_a = 0, sw_b = 0;
  logic [13:0] disp_point_a, disp_point_b;
  seg7_t disp_game_a, disp_game_b, disp_set_a, disp_set_b;

  tennis_scoreboard dut (.*);

  always #10 clk = ~clk;   // 20 ns, 50 MHz

  // Active-low {g,f,e,d,c,b,a}: digits 0..9, letter A, blank.
  seg7_t SEG [12] = '{7'b1000000, 7'b1111001, 7'b0100100, 7'b0110000, 7'b0011001,
                      7'b0010010, 7'b0000010, 7'b1111000, 7'b0000000, 7'b0010000,
                      7'b0001000, 7'b1111111};
  localparam int LET_A = 10, BLANK = 11;

  // ---- match model ----------------------------------------------------
  int pa, pb, ga, gb, sa, sb;
  bit over;

  // mechanism counters
  int n_deuce, n_adv, n_adv_lost, n_game_from_adv, n_game_straight, n_tb_enter,
      n_tb_won, n_tb_past15, n_set6, n_set75, n_set76, n_match, n_ignored_over,
      n_simultaneous, n_reset_mid;

  function automatic bit tiebreak();
    return ga == 6 && gb == 6;
  endfunction

  task automatic model_reset();
    pa = 0; pb = 0; ga = 0; gb = 0; sa = 0; sb = 0; over = 0;
  endtask

  // Apply one point to the model; returns 1 if it changed the games.
  task automatic model_point(bit to_a);
    int mine, theirs;
    bit won;
    if (over) begin n_ignored_over++; return; end
    if (to_a) pa++; else pb++;
    mine = to_a ? pa : pb;
    theirs = to_a ? pb : pa;
    if (tiebreak()) begin
      won = mine >= 7 && mine >= theirs + 2;
      if (won) n_tb_won++;
      if (!won && mine >= 15 && theirs >= 14) n_tb_past15++;
    end else begin
      won = mine >= 4 && mine >= theirs + 2;
      if (won && mine == 4 && theirs <= 2) n_game_straight++;
      if (won && mine > 4) n_game_from_adv++;
      if (!won && mine >= 3 && mine == theirs) begin
        n_deuce++;
        if (theirs >= 4) n_adv_lost++;
      end
      if (!won && mine >= 4 && mine == theirs + 1) n_adv++;
    end
    if (won) begin
      pa = 0; pb = 0;
      if (to_a) ga++; else gb++;
      mine = to_a ? ga : gb;
      theirs = to_a ? gb : ga;
      if (mine == 7 || (mine == 6 && theirs <= 4)) begin
        if (mine == 7 && theirs == 6) n_set76++;
        else if (mine == 7) n_set75++;
        else n_set6++;
        ga = 0; gb = 0;
        if (to_a) sa++; else sb++;
        if (sa == 2 || sb == 2) begin over = 1; n_match++; end
      end else if (tiebreak()) n_tb_enter++;
    end
  endtask

  function automatic logic [13:0] pair(int t, int u);
    return {SEG[t], SEG[u]};
  endfunction

  function automatic logic [13:0] exp_points(int mine, int theirs, bit tb);
    if (tb) begin
      while (mine >= 15 && theirs >= 15) begin mine--; theirs--; end
      return pair(mine / 10, mine % 10);
    end
    if (mine >= 3 && theirs >= 3) return (mine > theirs) ? pair(BLANK, LET_A) : pair(4, 0);
    case (mine)
      0: return pair(0, 0);
      1: return pair(1, 5);
      2: return pair(3, 0);
      default: return pair(4, 0);
    endcase
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at %0t: model pts %0d-%0d games %0d-%0d sets %0d-%0d", what, $time,
                 pa, pb, ga, gb, sa, sb);
    end
  endtask

  task automatic check_board();
    check("points A", disp_point_a == exp_points(pa, pb, tiebreak()));
    check("points B", disp_point_b == exp_points(pb, pa, tiebreak()));
    check("games A",  disp_game_a == SEG[ga]);
    check("games B",  disp_game_b == SEG[gb]);
    check("sets A",   disp_set_a == SEG[sa]);
    check("sets B",   disp_set_b == SEG[sb]);
  endtask

  // One press: held two clocks, then a gap long enough for every counter
  // to settle. Checks latency on the scorer's point display.
  task automatic press(bit to_a);
    logic [13:0] prev_disp;
    int old_ga, old_gb;
    prev_disp = to_a ? disp_point_a : disp_point_b;
    old_ga = ga; old_gb = gb;
    @(negedge clk);
    sw_a = to_a; sw_b = !to_a;
    @(negedge clk);                 // edge k: first sample
    @(negedge clk);                 // edge k+1
    sw_a = 0; sw_b = 0;
    check("no change before latency", (to_a ? disp_point_a : disp_point_b) == prev_disp);
    model_point(to_a);
    @(negedge clk);                 // edge k+2: point counted
    if (ga == old_ga && gb == old_gb && !over)
      check("point after two edges", (to_a ? disp_point_a : disp_point_b) ==
                                     (to_a ? exp_points(pa, pb, tiebreak()) : exp_points(pb, pa, tiebreak())));
    repeat (4) @(negedge clk);
    check_board();
  endtask

  task automatic press_both();
    @(negedge clk);
    sw_a = 1; sw_b = 1;
    repeat (2) @(negedge clk);
    sw_a = 0; sw_b = 0;
    repeat (6) @(negedge clk);
    n_simultaneous++;
    check_board();
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    model_reset();
    @(negedge clk);
    check_board();
  endtask

  task automatic win_game(bit to_a);
    repeat (4) press(to_a);
  endtask

  initial begin
    model_reset();
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check_board();

    // Scripted match: a straight game, a deuce game, a simultaneous press,
    // 6-6 and a tie-break that passes 15-15, then the match is finished.
    win_game(1);
    repeat (3) begin press(1); press(0); end   // deuce
    press(0); press(1);                        // advantage B lost
    press(1); press(1);                        // advantage A, game A
    press_both();
    repeat (6) win_game(0);                    // B takes the set 6-2
    check("first set to B", sb == 1 && sa == 0 && ga == 0 && gb == 0);
    do_reset();

    // Reach 6-6 exactly and play a long tie-break.
    repeat (5) begin win_game(1); win_game(0); end  // 5-5
    win_game(1); win_game(0);                        // 6-6
    check("tie-break entered", tiebreak());
    repeat (16) begin press(1); press(0); end        // 16-16 shown 14-14
    press(1); press(1);                              // A takes the tie-break
    // Second set 6-0 for A ends the match.
    repeat (6) win_game(1);
    check("match over", over);
    press(0); press(1);                              // ignored
    do_reset();

    // Reset in mid-match.
    win_game(0); press(1); press(1);
    do_reset();
    n_reset_mid++;

    // Random matches.
    for (int m = 0; m < 40; m++) begin
      while (!over) begin
        if ($urandom_range(0, 49) == 0) press_both();
        else press($urandom_range(0, 1) == 1);
      end
      press($urandom_range(0, 1) == 1);
      do_reset();
    end

    $display("deuce=%0d adv=%0d adv_lost=%0d game_from_adv=%0d straight=%0d", n_deuce, n_adv,
             n_adv_lost, n_game_from_adv, n_game_straight);
    $display("tb_enter=%0d tb_won=%0d tb_past15=%0d set6=%0d set75=%0d set76=%0d", n_tb_enter,
             n_tb_won, n_tb_past15, n_set6, n_set75, n_set76);
    $display("match=%0d ignored_after_match=%0d simultaneous=%0d reset_mid=%0d", n_match,
             n_ignored_over, n_simultaneous, n_reset_mid);
    check("deuce",            n_deuce > 0);
    check("advantage",        n_adv > 0);
    check("advantage lost",   n_adv_lost > 0);
    check("game from adv",    n_game_from_adv > 0);
    check("straight game",    n_game_straight > 0);
    check("tie-break enter",  n_tb_enter > 0);
    check("tie-break won",    n_tb_won > 0);
    check("tie-break past 15", n_tb_past15 > 0);
    check("set 6-x",          n_set6 > 0);
    check("set 7-5",          n_set75 > 0);
    check("set 7-6",          n_set76 > 0);
    check("match won",        n_match > 0);
    check("blocked press",    n_ignored_over > 0);
    check("simultaneous",     n_simultaneous > 0);
    check("reset mid-match",  n_reset_mid > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
