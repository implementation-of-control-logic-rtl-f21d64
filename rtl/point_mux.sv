// point_mux: chooses what a player's point display shows.
//
// In the regular phase (out_6_6 low) the 3-bit point code is shown as the
// tennis score: 00, 15, 30, 40, or a blank digit followed by the letter A
// for advantage. In the tie-break (out_6_6 high, both players on six games)
// the tie-break count 0..15 is shown in decimal with a leading zero, e.g.
// 06. The selection by the tie-break signal follows the scoreboard's block
// diagram (a 2-to-1 multiplexer in front of each point display); doing the
// conversion to display digits here, and the look of advantage, are this
// design's choice. Combinational.
module point_mux
  import tennis_pkg::*;
(
  input  logic              out_6_6,
  input  point_t            point,
  input  logic [TB_W-1:0]   tb_point,
  output digit_pair_t       digits
);

  digit_pair_t regular, tiebreak;

  always_comb begin
    unique case (point)
      PT_00:   regular = '{tens: 4'd0,        units: 4'd0};
      PT_15:   regular = '{tens: 4'd1,        units: 4'd5};
      PT_30:   regular = '{tens: 4'd3,        units: 4'd0};
      PT_40:   regular = '{tens: 4'd4,        units: 4'd0};
      PT_ADV:  regular = '{tens: DIGIT_BLANK, units: DIGIT_A};
      default: regular = '{tens: DIGIT_BLANK, units: DIGIT_BLANK};
    endcase
  end

  always_comb begin
    if (tb_point >= TB_W'(10)) tiebreak = '{tens: 4'd1, units: digit_t'(tb_point - TB_W'(10))};
    else                       tiebreak = '{tens: 4'd0, units: digit_t'(tb_point)};
  end

  assign digits = out_6_6 ? tiebreak : regular;

endmodule
