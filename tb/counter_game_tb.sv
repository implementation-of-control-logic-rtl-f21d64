// counter_game_tb: two game counters cross-coupled as on the scoreboard
// (each sees the other's count, both cleared by either set pulse). Game
// pulses are checked against a model of the set rule: six games with a
// lead of two, otherwise seven. Covers 6-0, 6-4, 7-5, 7-6 and the six-game
// flags that start the tie-break.
module counter_game_tb;
  import tennis_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic en_a = 0, en_b = 0;
  logic [GAME_W-1:0] res_a, res_b;
  logic set_a, set_b, is6_a, is6_b;
  logic pair_rst;

  assign pair_rst = rst | set_a | set_b;

  counter_game u_a (.clk, .rst(pair_rst), .en(en_a), .other_res(res_b), .res(res_a), .set(set_a), .is6(is6_a));
  counter_game u_b (.clk, .rst(pair_rst), .en(en_b), .other_res(res_a), .res(res_b), .set(set_b), .is6(is6_b));

  always #5 clk = ~clk;

  int ga = 0, gb = 0;
  int sets_6 = 0, sets_7_5 = 0, sets_7_6 = 0, both6 = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: res %0d-%0d model %0d-%0d", what, $time, res_a, res_b, ga, gb);
    end
  endtask

  task automatic game(bit to_a);
    bit won;
    @(negedge clk);
    en_a = to_a; en_b = !to_a;
    @(negedge clk);
    en_a = 0; en_b = 0;
    if (to_a) ga++; else gb++;
    won = (ga == 7 || gb == 7) || (ga == 6 && gb <= 4) || (gb == 6 && ga <= 4);
    if (won) begin
      check("set pulse", set_a == to_a && set_b == !to_a);
      if (ga == 7 && gb == 6 || gb == 7 && ga == 6) sets_7_6++;
      else if (ga == 7 || gb == 7) sets_7_5++;
      else sets_6++;
      ga = 0; gb = 0;
      @(negedge clk);
      check("pulse one clock", !set_a && !set_b);
    end else begin
      check("no set pulse", !set_a && !set_b);
    end
    check("res_a", int'(res_a) == ga);
    check("res_b", int'(res_b) == gb);
    check("is6", is6_a == (ga == 6) && is6_b == (gb == 6));
    if (is6_a && is6_b) both6++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (6) game(1);                                  // 6-0
    repeat (4) begin game(1); game(0); end game(1); game(1); // 6-4
    repeat (5) begin game(0); game(1); end game(0); game(0); // 7-5 B
    repeat (6) begin game(1); game(0); end game(1);          // 7-6 A
    for (int i = 0; i < 2000; i++) game($urandom_range(0, 1) == 1);
    check("6-x set", sets_6 > 0);
    check("7-5 set", sets_7_5 > 0);
    check("7-6 set", sets_7_6 > 0);
    check("6-6 seen", both6 > 0);
    $display("sets 6-x=%0d 7-5=%0d 7-6=%0d", sets_6, sets_7_5, sets_7_6);
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
