// counter_point: regular-phase point counter of one player.
//
// A 3-bit register Res counts 0..4, coded 00, 15, 30, 40 and advantage.
// Two copies are used, one per player, cross-coupled through p40/a flags.
// On every rising clock edge the game pulse is first cleared; then
//   - rst clears Res;
//   - a point for this player (sw_own) wins the game if Res is advantage,
//     or if Res is 40 and the other player has neither 40 nor advantage:
//     Res returns to 00 and game is high for that one clock;
//   - otherwise it adds one to Res, unless the other player holds the
//     advantage (then the other counter steps back to 40 instead: deuce);
//   - a point for the other player (sw_other) while this player holds the
//     advantage takes Res back from A to 40.
// p40_out and a_out decode Res = 40 and Res = A for the other counter.
// This is the scoreboard's own algorithm, with one change: a point scored
// at 40 against the other player's advantage does not win the game (the
// algorithm as published tests only the other player's 40 flag there);
// it needs the a_in test added so that deuce works.
module counter_point
  import tennis_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   sw_own,
  input  logic   sw_other,
  input  logic   a_in,
  input  logic   p40_in,
  output point_t res,
  output logic   game,
  output logic   p40_out,
  output logic   a_out
);

  logic wins;
  assign wins = (res == PT_ADV) || (res == PT_40 && !p40_in && !a_in);

  always_ff @(posedge clk) begin
    game <= 1'b0;
    if (rst) begin
      res <= PT_00;
    end else if (sw_own) begin
      if (wins) begin
        res  <= PT_00;
        game <= 1'b1;
      end else if (!a_in) begin
        res <= point_t'(res + 1'b1);
      end
    end else if (sw_other && res == PT_ADV) begin
      res <= PT_40;
    end
  end

  assign p40_out = (res == PT_40);
  assign a_out   = (res == PT_ADV);

  // Res never leaves the five legal codes.
  assert property (@(posedge clk) disable iff (rst) res <= PT_ADV)
    else $error("counter_point: illegal point code %0d", res);

endmodule
