// Self-checking testbench for lacg_icg.
//
// The clock has a 10 ns period (high 0..5, low 5..10 of each cycle). The
// enable is changed at random times, in both clock phases. The expected
// gated clock is worked out from a sample of en taken 1 ns before every
// rising edge (the end of the transparent phase): during the high phase gclk
// must equal that sample, during the low phase it must be 0. Changes of en
// inside the high phase must not reach gclk. The number of gclk pulses is
// also compared with the number of enabled cycles.
module tb_lacg_icg;

  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;

  int checks   = 0;
  int failures = 0;
  int pulses   = 0;
  int expected_pulses = 0;
  int high_phase_changes = 0;

  lacg_icg dut (.clk(clk), .en(en), .gclk(gclk));

  always @(posedge gclk) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit en_sample;
    // first low phase so the latch holds a known value
    #5;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // low phase: t = 0 .. 5 relative to this point (clk low)
      #1 en = 1'(($urandom % 3) != 0);
      #1 check(gclk == 1'b0, "gclk high while clk low");
      #2 en_sample = en;           // 1 ns before the rising edge
      #1 clk = 1'b1;               // rising edge
      if (en_sample) expected_pulses++;
      #1 check(gclk == en_sample, "gclk differs from enable sampled before edge");
      // change en in the high phase; gclk must not follow
      if (($urandom % 2) == 0) begin
        en = ~en;
        high_phase_changes++;
      end
      #1 check(gclk == en_sample, "gclk followed en during high phase");
      #2 check(gclk == en_sample, "gclk changed late in high phase");
      #1 clk = 1'b0;
      #0 check(gclk == 1'b0, "gclk not low after falling edge");
    end
    #1;
    check(pulses == expected_pulses, "pulse count");
    check(high_phase_changes > 0, "no enable change in high phase exercised");
    $display("gated pulses %0d of 400 cycles", pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
