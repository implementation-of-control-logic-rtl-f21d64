// button_player: turns a press of an umpire's point button into one pulse.
//
// The button level is brought into the clock domain by a chain of
// SYNC_STAGES flip-flops and a further flip-flop remembers the previous
// synchronized level; pulse is high for exactly one clock when the
// synchronized level rises. A press held for many clocks therefore scores
// one point. The pulse is high during the clock that follows the
// SYNC_STAGES-th edge sampling the button high (with two stages: the
// second such edge), so the next edge can count it. That the block emits one pulse per
// press is the scoreboard's; the synchronizer and edge detector are this
// design's choice (buttons are assumed debounced outside the chip).
// rst is synchronous and active high.
module button_player #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic sw,
  output logic pulse
);

  logic [SYNC_STAGES:0] shift;  // [SYNC_STAGES-1:0] synchronizer, [SYNC_STAGES] previous level

  always_ff @(posedge clk) begin
    if (rst) shift <= '0;
    else     shift <= {shift[SYNC_STAGES-1:0], sw};
  end

  assign pulse = shift[SYNC_STAGES-1] & ~shift[SYNC_STAGES];

endmodule
