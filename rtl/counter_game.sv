// counter_game: game counter of one player.
//
// en is the one-clock game pulse from this player's regular or tie-break
// point counter. The new count wins the set when it reaches SET_GAMES with
// a lead of two over other_res, or reaches SET_GAMES+1 (7-5, or 7-6 after
// the tie-break): the count clears and set is high for one clock.
// Otherwise the count goes up by one. is6 flags six games; both players'
// flags together start the tie-break. The scoreboard fixes 6 games, 7 after
// a tie-break and the tie-break at 6-6; the two-game lead at 6 follows the
// rules of tennis, since without it 6-6 could never occur.
// rst is synchronous and active high.
module counter_game
  import tennis_pkg::*;
#(
  parameter int unsigned W     = GAME_W,
  parameter int unsigned GAMES = SET_GAMES
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] other_res,
  output logic [W-1:0] res,
  output logic         set,
  output logic         is6
);

  logic [W-1:0] next;
  logic         wins;

  assign next = res + 1'b1;
  assign wins = (next == W'(GAMES + 1)) ||
                ((next == W'(GAMES)) && ({1'b0, other_res} + (W+1)'(2) <= {1'b0, next}));

  always_ff @(posedge clk) begin
    set <= 1'b0;
    if (rst) begin
      res <= '0;
    end else if (en) begin
      if (wins) begin
        res <= '0;
        set <= 1'b1;
      end else begin
        res <= next;
      end
    end
  end

  assign is6 = (res == W'(GAMES));

endmodule
