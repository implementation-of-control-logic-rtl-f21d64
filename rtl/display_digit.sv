// display_digit: one 7-segment digit of the scoreboard.
//
// A purely combinational decoder from a 4-bit digit code to the seven
// segment lines. Codes 0..9 show the decimal digit, code 10 the letter A
// (advantage) and every other code a dark digit. The outputs are active low
// in the order {g,f,e,d,c,b,a}: 0 is 1000000, 1 is 1111001 and 6 is
// 0000010, the patterns the original board's simulation shows. The same
// decoder serves the game and set displays (one digit each) and both digits
// of each point display. No clock, no latency.
module display_digit
  import tennis_pkg::*;
(
  input  digit_t digit,
  output seg7_t  seg
);

  always_comb begin
    unique case (digit)
      4'd0:    seg = 7'b100_0000;
      4'd1:    seg = 7'b111_1001;
      4'd2:    seg = 7'b010_0100;
      4'd3:    seg = 7'b011_0000;
      4'd4:    seg = 7'b001_1001;
      4'd5:    seg = 7'b001_0010;
      4'd6:    seg = 7'b000_0010;
      4'd7:    seg = 7'b111_1000;
      4'd8:    seg = 7'b000_0000;
      4'd9:    seg = 7'b001_0000;
      DIGIT_A: seg = 7'b000_1000;
      default: seg = SEG_BLANK;
    endcase
  end

endmodule
