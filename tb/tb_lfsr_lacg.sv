// End-to-end testbench for lfsr_lacg at its default size (32 bits, groups of
// 8, four gated clocks).
//
// A reference LFSR kept here (taps at stages 32, 22, 2 and 1, shifting
// towards the MSB, all ones after reset) predicts the state after every clock
// edge. Enable and reset are driven 1 ns after falling edges. Checked every
// cycle: the state q, the next state d, the change vector k = d ^ q and the
// group enables g. Checked at the end: the number of pulses on each group's
// gated clock equals the number of enabled cycles in which that group had a
// changing bit. The mechanisms of the design are counted and each must occur:
//   - a group left unclocked in a cycle where another group is clocked
//   - all groups stopped by en = 0
//   - an asynchronous reset in the middle of the run
// The share of clock edges that reach the flip-flops is printed.
module tb_lfsr_lacg;

  localparam int unsigned N  = 32;
  localparam int unsigned K  = 8;
  localparam int unsigned NG = N / K;
  localparam int unsigned Cycles = 20000;

  logic          clk = 1'b0;
  logic          rst_n = 1'b1;
  logic          en = 1'b0;
  logic [N-1:0]  q, d, k;
  logic [NG-1:0] g, gc;
  logic          serial_out;

  lfsr_lacg dut (
    .clk(clk), .rst_n(rst_n), .en(en), .q(q), .serial_out(serial_out),
    .d(d), .k(k), .g(g), .gc(gc)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pulses [NG];
  int exp_pulses [NG];
  int n_group_skipped = 0, n_en_off = 0, n_en_on = 0, n_reset = 0;

  for (genvar j = 0; j < NG; j++) begin : g_cnt
    initial pulses[j] = 0;
    always @(posedge gc[j]) pulses[j]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [N-1:0] ref_next(input logic [N-1:0] s);
    return {s[N-2:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  initial begin
    #(10 * (Cycles + 100) * 1ns);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] m, mn, dm;
    int total_pulses;
    foreach (exp_pulses[j]) exp_pulses[j] = 0;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    #1 rst_n = 1'b1;
    n_reset++;
    m = '1;
    check(q == m, "reset state");
    for (int cyc = 0; cyc < Cycles; cyc++) begin
      @(negedge clk);
      #1;
      // runs of enabled cycles with occasional disabled cycles
      en = (($urandom % 16) != 0);
      if (cyc == Cycles / 2) begin
        rst_n = 1'b0;
        #1 check(q == '1, "asynchronous reset");
        n_reset++;
        m = '1;
        en = 1'b0;
        #1 rst_n = 1'b1;
      end
      #1;
      mn = ref_next(m);
      dm = mn ^ m;
      check(d == mn, "next state d");
      check(k == dm, "change vector k");
      for (int j = 0; j < NG; j++) begin
        check(g[j] == (dm[j*K +: K] != '0), "group enable g");
        if (en && dm[j*K +: K] != '0) exp_pulses[j]++;
      end
      if (!en) n_en_off++;
      else n_en_on++;
      if (en) for (int j = 0; j < NG; j++) if (dm[j*K +: K] == '0) n_group_skipped++;
      if (en) m = mn;
      @(posedge clk);
      #1;
      check(q == m, "state q after clock edge");
      check(serial_out == m[N-1], "serial output");
    end
    @(negedge clk);
    total_pulses = 0;
    for (int j = 0; j < NG; j++) begin
      check(pulses[j] == exp_pulses[j], "gated clock pulse count");
      $display("group %0d: %0d gated pulses of %0d clock cycles", j, pulses[j], Cycles);
      total_pulses += pulses[j];
    end
    $display("flip-flop clock edges: %0d of %0d in enabled cycles (%0d%%)", total_pulses * K,
             n_en_on * N, (100 * total_pulses * K) / (n_en_on * N));
    $display("mechanisms: group skipped %0d, enable off %0d, reset %0d",
             n_group_skipped, n_en_off, n_reset);
    check(n_group_skipped > 0, "no group was ever left unclocked");
    check(n_en_off > 0, "enable never low");
    check(n_reset > 1, "no reset during operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
