// counter_point_tiebreak: tie-break point counter of one player.
//
// Used while both players have six games. Counts this player's tie-break
// points 0..15. A point for this player wins the tie-break (and with it the
// game) when the new count reaches TB_WIN_POINTS and leads the other
// player's count by at least TB_LEAD: the count clears and game is high for
// one clock, as in counter_point. The other player's count comes in on
// other_res. The count range 0..15 and the win rule are the scoreboard's.
// What happens past 15 is this design's choice: a point that would level
// the score at 15-15 leaves both counters at 14-14 instead, which changes
// nothing in the outcome since only the difference matters from then on.
// rst is synchronous and active high.
module counter_point_tiebreak
  import tennis_pkg::*;
#(
  parameter int unsigned W          = TB_W,
  parameter int unsigned WIN_POINTS = TB_WIN_POINTS,
  parameter int unsigned LEAD       = TB_LEAD
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         sw_own,
  input  logic         sw_other,
  input  logic [W-1:0] other_res,
  output logic [W-1:0] res,
  output logic         game
);

  localparam logic [W-1:0] MAX = '1;

  logic [W:0] next;   // one bit wider: own count after the point
  logic       wins;
  logic       level_at_max_own, level_at_max_other;

  assign next = {1'b0, res} + 1'b1;
  assign wins = (next >= (W+1)'(WIN_POINTS)) && (next >= {1'b0, other_res} + (W+1)'(LEAD));
  // This point would make it MAX-MAX: the scorer stays at MAX-1 ...
  assign level_at_max_own   = (res == MAX - 1'b1) && (other_res == MAX);
  // ... and the other player's MAX drops to MAX-1.
  assign level_at_max_other = (res == MAX) && (other_res == MAX - 1'b1);

  always_ff @(posedge clk) begin
    game <= 1'b0;
    if (rst) begin
      res <= '0;
    end else if (sw_own) begin
      if (wins) begin
        res  <= '0;
        game <= 1'b1;
      end else if (!level_at_max_own) begin
        res <= next[W-1:0];
      end
    end else if (sw_other && level_at_max_other) begin
      res <= MAX - 1'b1;
    end
  end

endmodule
