// tennis_pkg: types and constants shared by the tennis scoreboard.
//
// Regular-phase points are held as a 3-bit code 0..4 meaning 00, 15, 30, 40
// and advantage; this coding follows the scoreboard's point table. Tie-break
// points, games and sets are plain binary counts. Every display digit is
// carried as a 4-bit code (0..9, the letter A, or blank) and turned into
// active-low segments {g,f,e,d,c,b,a}, the polarity of the board's
// 7-segment displays. The digit codes for A and blank, and the blank
// pattern for unused codes, are this design's own choice.
package tennis_pkg;

  // Regular-phase point code (3-bit counter 0..4).
  localparam int unsigned POINT_W = 3;
  typedef enum logic [POINT_W-1:0] {
    PT_00  = 3'd0,
    PT_15  = 3'd1,
    PT_30  = 3'd2,
    PT_40  = 3'd3,
    PT_ADV = 3'd4
  } point_t;

  // Counter widths and match rules.
  localparam int unsigned TB_W          = 4;  // tie-break points 0..15
  localparam int unsigned TB_WIN_POINTS = 7;  // tie-break won at >= 7 ...
  localparam int unsigned TB_LEAD       = 2;  // ... with a lead of >= 2
  localparam int unsigned GAME_W        = 3;  // games 0..7
  localparam int unsigned SET_GAMES     = 6;  // set won at 6 (lead 2) or 7
  localparam int unsigned SET_W         = 2;  // sets 0..2
  localparam int unsigned SETS_TO_WIN   = 2;  // match won with two sets

  // Display digit codes.
  typedef logic [3:0] digit_t;
  localparam digit_t DIGIT_A     = 4'd10;
  localparam digit_t DIGIT_BLANK = 4'd15;

  typedef struct packed {
    digit_t tens;
    digit_t units;
  } digit_pair_t;

  // Active-low 7-segment pattern, bit order {g,f,e,d,c,b,a}.
  typedef logic [6:0] seg7_t;
  localparam seg7_t SEG_BLANK = 7'b111_1111;

endpackage
