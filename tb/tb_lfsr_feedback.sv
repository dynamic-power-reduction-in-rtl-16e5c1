// Self-checking testbench for lfsr_feedback.
//
// One instance per register length used by the design (4, 8, 16, 32, 64).
// The expected next state is computed here from tap lists given as stage
// numbers (stage t is bit t-1), independently of the package's tap masks.
// For 4, 8 and 16 bits the state is iterated through the block from all ones
// until it returns, and the period must be 2^N - 1 (maximal length, no
// all-zero state). For 32 and 64 bits random states are checked, plus the
// register values of the reference traces: 8'hC1 -> 8'h83,
// 16'h8DB1 -> 16'h1B63 and 32'hFB81FF92 -> 32'hF703FF24.
module tb_lfsr_feedback;

  logic [3:0]  q4;  logic [3:0]  d4;
  logic [7:0]  q8;  logic [7:0]  d8;
  logic [15:0] q16; logic [15:0] d16;
  logic [31:0] q32; logic [31:0] d32;
  logic [63:0] q64; logic [63:0] d64;

  lfsr_feedback #(.N(4))  u4  (.q(q4),  .d(d4));
  lfsr_feedback #(.N(8))  u8  (.q(q8),  .d(d8));
  lfsr_feedback #(.N(16)) u16 (.q(q16), .d(d16));
  lfsr_feedback #(.N(32)) u32 (.q(q32), .d(d32));
  lfsr_feedback #(.N(64)) u64 (.q(q64), .d(d64));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference: next state from a list of tapped stages
  function automatic logic [63:0] ref_next(input int n, input logic [63:0] q);
    int taps [$];
    logic fb;
    case (n)
      4:  taps = '{4, 3};
      8:  taps = '{8, 6, 5, 4};
      16: taps = '{16, 15, 13, 4};
      32: taps = '{32, 22, 2, 1};
      64: taps = '{64, 63, 61, 60};
      default: taps = '{};
    endcase
    fb = 1'b0;
    foreach (taps[i]) fb ^= q[taps[i]-1];
    ref_next = '0;
    for (int b = n - 1; b > 0; b--) ref_next[b] = q[b-1];
    ref_next[0] = fb;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int period;
    // maximal length for 4, 8 and 16 bits
    q4 = '1; period = 0;
    do begin
      #1 check(64'(d4) == ref_next(4, 64'(q4)), "4-bit next state");
      check(d4 != '0, "4-bit reached zero");
      q4 = d4; period++;
    end while (q4 != '1 && period < 20);
    check(period == 15, "4-bit period");
    q8 = '1; period = 0;
    do begin
      #1 check(64'(d8) == ref_next(8, 64'(q8)), "8-bit next state");
      q8 = d8; period++;
    end while (q8 != '1 && period < 300);
    check(period == 255, "8-bit period");
    q16 = '1; period = 0;
    do begin
      #1 if (64'(d16) != ref_next(16, 64'(q16))) check(1'b0, "16-bit next state");
      q16 = d16; period++;
    end while (q16 != '1 && period < 70000);
    check(period == 65535, "16-bit period");
    $display("periods: 4-bit 15, 8-bit 255, 16-bit %0d", period);
    // values of the reference traces
    q8 = 8'hC1; q16 = 16'h8DB1; q32 = 32'hFB81FF92;
    #1;
    check(d8 == 8'h83, "8-bit trace value");
    check(d16 == 16'h1B63, "16-bit trace value");
    check(d32 == 32'hF703FF24, "32-bit trace value");
    // random states for the long registers
    for (int i = 0; i < 5000; i++) begin
      q32 = $urandom;
      q64 = {$urandom, $urandom};
      #1;
      check(64'(d32) == ref_next(32, 64'(q32)), "32-bit next state");
      check(d64 == ref_next(64, q64), "64-bit next state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
