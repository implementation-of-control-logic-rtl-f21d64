// display_point: the two-digit point display of one player.
//
// Takes the {tens, units} digit pair chosen by point_mux and drives the two
// 7-segment digits through two display_digit decoders. The 14-bit output is
// {tens segments, units segments}, each active low {g,f,e,d,c,b,a}; the
// board's simulation shows this display as one 14-bit value. Which half
// holds the tens digit is this design's choice. Combinational.
module display_point
  import tennis_pkg::*;
(
  input  digit_pair_t digits,
  output logic [13:0] seg
);

  seg7_t seg_tens, seg_units;

  display_digit u_tens  (.digit(digits.tens),  .seg(seg_tens));
  display_digit u_units (.digit(digits.units), .seg(seg_units));

  assign seg = {seg_tens, seg_units};

endmodule
