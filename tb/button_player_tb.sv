// button_player_tb: presses of random length and gaps; checks exactly one
// pulse per press, one clock wide, SYNC_STAGES+1 edges after the press is
// first sampled, and no pulse during reset.
module button_player_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sw = 0, pulse;
  localparam int STAGES = 2;

  button_player #(.SYNC_STAGES(STAGES)) dut (.clk, .rst, .sw, .pulse);

  always #5 clk = ~clk;

  int cycle = 0;
  int pulses = 0;

  // Expected pulse times: a rising sw seen at edge n gives pulse high
  // after edge n+STAGES, i.e. sampled high at edge n+STAGES+1.
  int expect_at [$];
  logic sw_q = 0;
  always @(posedge clk) begin
    cycle++;
    if (!rst && sw && !sw_q) expect_at.push_back(cycle + STAGES);
    sw_q <= rst ? 1'b0 : sw;
    if (pulse) begin
      pulses++;
      checks++;
      if (expect_at.size() == 0 || expect_at[0] != cycle) begin
        failures++;
        $display("FAIL unexpected pulse at cycle %0d", cycle);
      end
      if (expect_at.size() != 0) void'(expect_at.pop_front());
    end else if (expect_at.size() != 0 && expect_at[0] < cycle) begin
      checks++;
      failures++;
      $display("FAIL missing pulse due at cycle %0d", expect_at[0]);
      void'(expect_at.pop_front());
    end
  end

  int presses = 0;

  initial begin
    repeat (3) @(negedge clk);
    // Hold the button during reset: no pulse may come out of it.
    sw = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (pulses != 0) failures++;
    sw = 0;
    @(negedge clk);
    rst = 0;
    repeat (200) begin
      repeat ($urandom_range(1, 6)) @(negedge clk);
      sw = 1; presses++;
      repeat ($urandom_range(1, 8)) @(negedge clk);
      sw = 0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (pulses != presses) begin
      failures++;
      $display("FAIL %0d pulses for %0d presses", pulses, presses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
