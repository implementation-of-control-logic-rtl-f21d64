// display_digit_tb: checks every digit code of the 7-segment decoder
// against a hand-written segment table (active low, {g,f,e,d,c,b,a}).
module display_digit_tb;
  import tennis_pkg::*;

  int checks = 0, failures = 0;
  digit_t digit;
  seg7_t  seg;

  display_digit dut (.digit, .seg);

  // Lit segments per code written out as letters, turned into bits here.
  function automatic seg7_t from_letters(string lit);
    seg7_t s = 7'h7F;
    foreach (lit[i]) s[3'(lit[i] - "a")] = 1'b0;
    return s;
  endfunction

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg",
                      "abc", "abcdefg", "abcdfg", "abcefg", "", "", "", "", ""};

  initial begin
    for (int d = 0; d < 16; d++) begin
      digit = digit_t'(d);
      #1;
      checks++;
      if (seg !== from_letters(lit[d])) begin
        failures++;
        $display("FAIL digit %0d: seg=%b expected %b", d, seg, from_letters(lit[d]));
      end
    end
    // Patterns printed for the original board: 0, 1 and 6.
    digit = 4'd0; #1; checks++; if (seg !== 7'b1000000) failures++;
    digit = 4'd1; #1; checks++; if (seg !== 7'b1111001) failures++;
    digit = 4'd6; #1; checks++; if (seg !== 7'b0000010) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
