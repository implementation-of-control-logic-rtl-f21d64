// counter_set_tb: random set pulses and resets against a saturating model
// count; p2_out must rise exactly when the count reaches two.
module counter_set_tb;
  import tennis_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0;
  logic [SET_W-1:0] res;
  logic p2_out;
  int model = 0, reached = 0;

  counter_set dut (.clk, .en, .rst, .res, .p2_out);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    @(negedge clk);
    checks++; if (res != 0 || p2_out) failures++;
    for (int i = 0; i < 500; i++) begin
      rst = ($urandom_range(0, 9) == 0);
      en  = ($urandom_range(0, 2) == 0);
      @(negedge clk);
      if (rst) model = 0;
      else if (en && model < 2) model++;
      if (model == 2) reached++;
      checks++;
      if (int'(res) != model || p2_out != (model == 2)) begin
        failures++;
        $display("FAIL at %0t: res=%0d p2=%b model=%0d", $time, res, p2_out, model);
      end
    end
    checks++; if (reached == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
