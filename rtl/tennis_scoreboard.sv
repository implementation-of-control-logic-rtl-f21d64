// tennis_scoreboard: two-button tennis scoreboard.
//
// The umpire only says who won each point: sw_a or sw_b. The board keeps
// points (00/15/30/40/A, or 0..15 in a tie-break), games and sets for both
// players and drives six 7-segment displays. rst starts a new match.
//
// Structure (the scoreboard's block diagram):
//   button_player A/B   -> one pulse per press; a clock with both pulses
//                          is ignored, and both are masked once a player
//                          has two sets (game_over) until rst.
//   counter_point A/B   -> regular points, cross-coupled through their
//                          40 and advantage flags; fed while not out_6_6.
//   counter_point_tiebreak A/B -> tie-break points; fed while out_6_6.
//   counter_game A/B    -> games, from either point counter's game pulse.
//   counter_set A/B     -> sets, from the game counter's set pulse.
//   out_6_6             -> both game counters at six: tie-break phase.
//   point_mux + display_point, display_digit -> 7-segment outputs.
// Point counters are cleared by rst or by any game pulse, game counters by
// rst or any set pulse (the winner's own counter clears in the winning
// edge, the loser's one clock later). Set counters clear only on rst.
//
// Timing: a press first sampled at rising edge k is counted at edge k+2,
// when the scorer's point display changes. A won game reaches the game
// display and clears the loser's points at k+3; a won set reaches the set
// display and clears the loser's games at k+4. Presses must therefore be
// at least five clocks apart, far shorter than any human press.
// All resets are synchronous, active high.
// Outputs are active-low segments {g,f,e,d,c,b,a}; point displays are
// {tens, units}. 4 inputs and 56 outputs: 60 pins, as in the original chip.
module tennis_scoreboard
  import tennis_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sw_a,
  input  logic        sw_b,
  output logic [13:0] disp_point_a,
  output logic [13:0] disp_point_b,
  output seg7_t       disp_game_a,
  output seg7_t       disp_game_b,
  output seg7_t       disp_set_a,
  output seg7_t       disp_set_b
);

  // ---- buttons -------------------------------------------------------
  logic pulse_a, pulse_b;
  logic taster_a, taster_b;      // accepted points
  logic game_over;

  button_player u_btn_a (.clk, .rst, .sw(sw_a), .pulse(pulse_a));
  button_player u_btn_b (.clk, .rst, .sw(sw_b), .pulse(pulse_b));

  assign taster_a = pulse_a & ~pulse_b & ~game_over;
  assign taster_b = pulse_b & ~pulse_a & ~game_over;

  // ---- phase select --------------------------------------------------
  logic game6_a, game6_b, out_6_6;
  assign out_6_6 = game6_a & game6_b;

  logic reg_a, reg_b, tb_a, tb_b;
  assign reg_a = taster_a & ~out_6_6;
  assign reg_b = taster_b & ~out_6_6;
  assign tb_a  = taster_a &  out_6_6;
  assign tb_b  = taster_b &  out_6_6;

  // ---- points --------------------------------------------------------
  point_t          point_a, point_b;
  logic [TB_W-1:0] tb_point_a, tb_point_b;
  logic            game_reg_a, game_reg_b, game_tb_a, game_tb_b;
  logic            p40_a, p40_b, adv_a, adv_b;
  logic            poen_rst;

  assign poen_rst = rst | game_reg_a | game_reg_b | game_tb_a | game_tb_b;

  counter_point u_pt_a (
    .clk, .rst(poen_rst), .sw_own(reg_a), .sw_other(reg_b),
    .a_in(adv_b), .p40_in(p40_b),
    .res(point_a), .game(game_reg_a), .p40_out(p40_a), .a_out(adv_a));
  counter_point u_pt_b (
    .clk, .rst(poen_rst), .sw_own(reg_b), .sw_other(reg_a),
    .a_in(adv_a), .p40_in(p40_a),
    .res(point_b), .game(game_reg_b), .p40_out(p40_b), .a_out(adv_b));

  counter_point_tiebreak u_tb_a (
    .clk, .rst(poen_rst), .sw_own(tb_a), .sw_other(tb_b),
    .other_res(tb_point_b), .res(tb_point_a), .game(game_tb_a));
  counter_point_tiebreak u_tb_b (
    .clk, .rst(poen_rst), .sw_own(tb_b), .sw_other(tb_a),
    .other_res(tb_point_a), .res(tb_point_b), .game(game_tb_b));

  // ---- games ---------------------------------------------------------
  logic [GAME_W-1:0] games_a, games_b;
  logic              set_won_a, set_won_b;
  logic              game_rst;

  assign game_rst = rst | set_won_a | set_won_b;

  counter_game u_game_a (
    .clk, .rst(game_rst), .en(game_reg_a | game_tb_a), .other_res(games_b),
    .res(games_a), .set(set_won_a), .is6(game6_a));
  counter_game u_game_b (
    .clk, .rst(game_rst), .en(game_reg_b | game_tb_b), .other_res(games_a),
    .res(games_b), .set(set_won_b), .is6(game6_b));

  // ---- sets ----------------------------------------------------------
  logic [SET_W-1:0] sets_a, sets_b;
  logic             p2_a, p2_b;

  counter_set u_set_a (.clk, .en(set_won_a), .rst, .res(sets_a), .p2_out(p2_a));
  counter_set u_set_b (.clk, .en(set_won_b), .rst, .res(sets_b), .p2_out(p2_b));

  assign game_over = p2_a | p2_b;

  // ---- displays ------------------------------------------------------
  digit_pair_t digits_a, digits_b;

  point_mux u_mux_a (.out_6_6, .point(point_a), .tb_point(tb_point_a), .digits(digits_a));
  point_mux u_mux_b (.out_6_6, .point(point_b), .tb_point(tb_point_b), .digits(digits_b));

  display_point u_disp_pt_a (.digits(digits_a), .seg(disp_point_a));
  display_point u_disp_pt_b (.digits(digits_b), .seg(disp_point_b));

  display_digit u_disp_game_a (.digit(digit_t'(games_a)), .seg(disp_game_a));
  display_digit u_disp_game_b (.digit(digit_t'(games_b)), .seg(disp_game_b));
  display_digit u_disp_set_a  (.digit(digit_t'(sets_a)),  .seg(disp_set_a));
  display_digit u_disp_set_b  (.digit(digit_t'(sets_b)),  .seg(disp_set_b));

  // At most one point counter steps per clock.
  assert property (@(posedge clk) $onehot0({reg_a, reg_b, tb_a, tb_b}))
    else $error("tennis_scoreboard: more than one point accepted in a clock");

endmodule
