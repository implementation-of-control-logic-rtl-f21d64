// counter_set: set counter of one player.
//
// en is the one-clock set pulse from this player's game counter. The count
// goes up by one per set and holds at SETS_TO_WIN; p2_out is high once the
// player has won the match (two sets) and is used to block the buttons
// until reset. Port names follow the original design's set counter (clk,
// en, rst, p2_out, a 2-bit count); holding at the top count is this
// design's choice. rst is synchronous and active high.
module counter_set
  import tennis_pkg::*;
#(
  parameter int unsigned W    = SET_W,
  parameter int unsigned WINS = SETS_TO_WIN
) (
  input  logic         clk,
  input  logic         en,
  input  logic         rst,
  output logic [W-1:0] res,
  output logic         p2_out
);

  assign p2_out = (res == W'(WINS));

  always_ff @(posedge clk) begin
    if (rst)               res <= '0;
    else if (en && !p2_out) res <= res + 1'b1;
  end

endmodule
