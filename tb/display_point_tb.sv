// display_point_tb: drives every pair of digit codes into the two-digit
// point display and checks the 14-bit output is {tens, units} with the
// expected active-low patterns.
module display_point_tb;
  import tennis_pkg::*;

  int checks = 0, failures = 0;
  digit_pair_t digits;
  logic [13:0] seg;

  display_point dut (.digits, .seg);

  seg7_t table_ [16] = '{7'b1000000, 7'b1111001, 7'b0100100, 7'b0110000, 7'b0011001,
                         7'b0010010, 7'b0000010, 7'b1111000, 7'b0000000, 7'b0010000,
                         7'b0001000, 7'h7F, 7'h7F, 7'h7F, 7'h7F, 7'h7F};

  initial begin
    for (int t = 0; t < 16; t++)
      for (int u = 0; u < 16; u++) begin
        digits = '{tens: digit_t'(t), units: digit_t'(u)};
        #1;
        checks++;
        if (seg !== {table_[t], table_[u]}) begin
          failures++;
          $display("FAIL %0d%0d: %b", t, u, seg);
        end
      end
    // "00" as printed for the original board's point display.
    digits = '{tens: 4'd0, units: 4'd0}; #1;
    checks++; if (seg !== 14'b10000001000000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
