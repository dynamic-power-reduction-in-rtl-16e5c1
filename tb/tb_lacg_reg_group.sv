// Self-checking testbench for lacg_reg_group.
//
// Two instances: an 8-bit group and a single flip-flop (WIDTH = 1). New data
// and enable are applied 1 ns after each falling clock edge. A reference
// model keeps the expected register value and counts the gated clock pulses
// each instance should produce: one per cycle where en is high and d differs
// from q, none otherwise. The single flip-flop is also checked row by row
// against the D/Q/XOR/gated-clock truth table. An asynchronous reset in the
// middle of the run must load all ones without a clock edge.
module tb_lacg_reg_group;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         en = 1'b0;
  logic [W-1:0] d8 = '0;
  logic [W-1:0] q8, k8;
  logic         g8, gclk8;
  logic [0:0]   d1 = '0;
  logic [0:0]   q1, k1;
  logic         g1, gclk1;

  lacg_reg_group #(.WIDTH(W)) dut8 (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d8), .q(q8), .k(k8), .g(g8), .gclk(gclk8)
  );
  lacg_reg_group #(.WIDTH(1)) dut1 (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d1), .q(q1), .k(k1), .g(g1), .gclk(gclk1)
  );

  int checks = 0, failures = 0;
  int pulses8 = 0, pulses1 = 0, exp_pulses8 = 0, exp_pulses1 = 0;
  int rows_seen [4];
  int held_cycles = 0, en_off_cycles = 0;

  always @(posedge gclk8) pulses8++;
  always @(posedge gclk1) pulses1++;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] m8;
    logic         m1;
    m8 = '1;
    m1 = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(q8 == '1 && q1 == 1'b1, "reset value");
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      #1;
      en = 1'(($urandom % 8) != 0);
      // bias towards unchanged data so both gated and clocked cycles occur
      d8 = (($urandom % 3) == 0) ? m8 : 8'($urandom);
      d1 = 1'($urandom);
      #1;
      // combinational outputs against the truth table
      check(k8 == (d8 ^ m8) && g8 == (d8 != m8), "8-bit XOR/OR outputs");
      check(k1 == (d1 ^ m1) && g1 == (d1[0] != m1), "1-bit XOR output");
      rows_seen[{d1[0], m1}]++;
      if (en && d8 != m8) exp_pulses8++;
      if (en && d1[0] != m1) exp_pulses1++;
      if (!en) en_off_cycles++;
      if (en && d8 == m8) held_cycles++;
      if (en) begin
        m8 = d8;
        m1 = d1[0];
      end
      // mid-run asynchronous reset, asserted while clk is low
      if (cyc == 1000) begin
        @(posedge clk);
        #2 rst_n = 1'b0;
        en = 1'b0;
        #1 check(q8 == '1 && q1 == 1'b1, "asynchronous reset");
        m8 = '1;
        m1 = 1'b1;
        @(negedge clk);
        #1 rst_n = 1'b1;
        continue;
      end
      @(posedge clk);
      #1;
      check(q8 == m8, "8-bit register value");
      check(q1 == m1, "1-bit register value");
    end
    @(negedge clk);
    check(pulses8 == exp_pulses8, "8-bit gated clock pulse count");
    check(pulses1 == exp_pulses1, "1-bit gated clock pulse count");
    for (int r = 0; r < 4; r++) check(rows_seen[r] > 0, "truth table row not exercised");
    check(held_cycles > 0 && en_off_cycles > 0, "gating cases not exercised");
    $display("8-bit group: %0d gated pulses of 2000 cycles; 1-bit: %0d", pulses8, pulses1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
