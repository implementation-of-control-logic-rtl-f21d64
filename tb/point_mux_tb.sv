// point_mux_tb: checks the regular point codes (00 15 30 40 A) and every
// tie-break count 0..15 against the expected display digits, in both
// positions of the phase select.
module point_mux_tb;
  import tennis_pkg::*;

  int checks = 0, failures = 0;
  logic            out_6_6;
  point_t          point;
  logic [TB_W-1:0] tb_point;
  digit_pair_t     digits;

  point_mux dut (.out_6_6, .point, .tb_point, .digits);

  // Expected regular display, as two characters.
  digit_pair_t reg_exp [5] = '{'{0, 0}, '{1, 5}, '{3, 0}, '{4, 0}, '{15, 10}};

  initial begin
    for (int p = 0; p < 5; p++)
      for (int t = 0; t < 16; t++) begin
        point = point_t'(p);
        tb_point = TB_W'(t);
        out_6_6 = 1'b0; #1;
        checks++;
        if (digits !== reg_exp[p]) begin
          failures++;
          $display("FAIL regular %0d: %h", p, digits);
        end
        out_6_6 = 1'b1; #1;
        checks++;
        if (digits.tens !== digit_t'(t / 10) || digits.units !== digit_t'(t % 10)) begin
          failures++;
          $display("FAIL tie-break %0d: %h", t, digits);
        end
      end
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
