// Checker used by tb_lfsr_lacg_sizes: one lfsr_lacg of length N with group
// size K, compared against a reference LFSR kept here.
//
// The reference is updated at every rising clk edge (all ones in reset, one
// shift when en is high) and the design's state is compared with it at every
// falling edge. Expected gated clock pulses are counted per group: one for
// each enabled edge at which a bit of the group changes. For N <= 16 the
// number of enabled shifts until the state first returns to all ones must be
// 2^N - 1. At the end (done rising) the pulse counts are compared and the
// share of flip-flop clock edges that were not gated away is printed.
module lfsr_lacg_check #(
  parameter int unsigned N = 8,
  parameter int unsigned K = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic done,
  output int   checks,
  output int   failures
);

  localparam int unsigned NG = (N + K - 1) / K;

  logic [N-1:0]  q, d, k;
  logic [NG-1:0] g, gc;
  logic          serial_out;

  lfsr_lacg #(.N(N), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .q(q), .serial_out(serial_out),
    .d(d), .k(k), .g(g), .gc(gc)
  );

  logic [N-1:0] m;
  longint       pulses [NG];
  longint       exp_pulses [NG];
  longint       shifts;
  longint       period;

  initial begin
    checks = 0;
    failures = 0;
    shifts = 0;
    period = 0;
    foreach (exp_pulses[j]) exp_pulses[j] = 0;
  end

  for (genvar j = 0; j < NG; j++) begin : g_cnt
    initial pulses[j] = 0;
    always @(posedge gc[j]) pulses[j]++;
  end

  function automatic logic [N-1:0] ref_next(input logic [N-1:0] s);
    logic [63:0] x;
    logic        fb;
    x = 64'(s);
    case (N)
      4:  fb = x[3] ^ x[2];
      8:  fb = x[7] ^ x[5] ^ x[4] ^ x[3];
      16: fb = x[15] ^ x[14] ^ x[12] ^ x[3];
      32: fb = x[31] ^ x[21] ^ x[1] ^ x[0];
      64: fb = x[63] ^ x[62] ^ x[60] ^ x[59];
      default: fb = 1'b0;
    endcase
    return {s[N-2:0], fb};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d K=%0d %s at %0t", N, K, what, $time);
    end
  endtask

  always @(posedge clk) begin
    logic [N-1:0] mn;
    if (!rst_n) begin
      m = '1;
    end else if (en) begin
      mn = ref_next(m);
      for (int j = 0; j < NG; j++) begin
        int lo, w;
        lo = j * K;
        w  = (lo + K <= N) ? K : N - lo;
        for (int b = lo; b < lo + w; b++) begin
          if (mn[b] != m[b]) begin
            exp_pulses[j]++;
            break;
          end
        end
      end
      m = mn;
      shifts++;
      if (m == '1 && period == 0) period = shifts;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      check(q == m, "state");
      check(k == (d ^ q), "change vector");
    end
  end

  always @(posedge done) begin
    longint edges;
    edges = 0;
    for (int j = 0; j < NG; j++) begin
      int w;
      w = (j * K + K <= N) ? K : N - j * K;
      check(pulses[j] == exp_pulses[j], "gated clock pulse count");
      edges += pulses[j] * w;
    end
    if (N <= 16) check(period == (64'd1 << N) - 1, "maximal period");
    $display("N=%0d K=%0d: %0d gated clocks, period %0d, flip-flop clock edges %0d of %0d (%0d.%0d%%)",
             N, K, NG, period, edges, shifts * N, (1000 * edges / (shifts * N)) / 10,
             (1000 * edges / (shifts * N)) % 10);
  end

endmodule
