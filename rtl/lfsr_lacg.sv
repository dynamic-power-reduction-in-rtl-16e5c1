// N-bit LFSR with grouped look-ahead clock gating (top level).
//
// The register stages are split into groups of K consecutive flip-flops
// (group j holds bits j*K .. j*K+K-1; the last group is shorter when K does
// not divide N). The next state d comes from lfsr_feedback. Each group is a
// lacg_reg_group: it XORs d with q per bit, ORs its XOR outputs, ANDs the
// result with en and feeds an integrated clock gate, so the group's
// flip-flops see a clock edge only in cycles where one of its bits changes.
// K = N gives the ungrouped form with a single gated clock for all stages;
// the default N = 32, K = 8 gives four gated clocks gc[3:0].
//
// Interface:
//   clk        free-running clock
//   rst_n      asynchronous active-low reset; loads all ones
//   en         enable; while low no group is clocked and q holds
//   q          present LFSR state; serial_out = q[N-1]
//   d          next state (d = {q[N-2:0], fb})
//   k          per-bit change vector d ^ q
//   g          per-group OR of k
//   gc         per-group gated clocks
// Timing: one shift per rising clk edge while en is high; the enables are
// latched while clk is low, from the state settled after the previous edge.
//
// Grouping, XOR/OR/ICG structure, the all-ones reset value and the 16-bit
// tap set come from the source design. The asynchronous reset, its polarity
// and the placement of groups on consecutive bits are choices of this
// implementation.
module lfsr_lacg #(
  parameter int unsigned N = 32,
  parameter int unsigned K = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  output logic [N-1:0]          q,
  output logic                  serial_out,
  output logic [N-1:0]          d,
  output logic [N-1:0]          k,
  output logic [(N+K-1)/K-1:0]  g,
  output logic [(N+K-1)/K-1:0]  gc
);

  localparam int unsigned NumGroups = (N + K - 1) / K;

  if (K < 1 || K > N) begin : g_bad_k
    $error("lfsr_lacg: group size K = %0d must be in 1..N", K);
  end

  lfsr_feedback #(.N(N)) u_feedback (
    .q (q),
    .d (d)
  );

  for (genvar j = 0; j < NumGroups; j++) begin : g_group
    localparam int unsigned Lo = j * K;
    localparam int unsigned W  = (Lo + K <= N) ? K : N - Lo;

    lacg_reg_group #(
      .WIDTH       (W),
      .RESET_VALUE ({W{1'b1}})
    ) u_group (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (en),
      .d     (d[Lo +: W]),
      .q     (q[Lo +: W]),
      .k     (k[Lo +: W]),
      .g     (g[j]),
      .gclk  (gc[j])
    );
  end

  assign serial_out = q[N-1];

endmodule
