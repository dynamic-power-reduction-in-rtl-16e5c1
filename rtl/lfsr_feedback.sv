// Next-state logic of an N-bit Fibonacci LFSR.
//
// The feedback bit fb is the XOR of the tapped stages of the present state q
// (tap mask from lfsr_lacg_pkg::lfsr_taps). The next state shifts q one place
// towards the most significant bit and puts fb into bit 0:
//   d = {q[N-2:0], fb}
// Bit N-1 is the stage that leaves the register (the serial output).
// Purely combinational; d is the value every stage will hold after the next
// clock edge, which is what the look-ahead gating compares against q.
//
// Shift direction and tap positions for 4 and 16 bits follow the source
// design; tap sets for other lengths are listed in lfsr_lacg_pkg.
module lfsr_feedback
  import lfsr_lacg_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] q,
  output logic [N-1:0] d
);

  localparam tap_mask_t  Taps    = lfsr_taps(N);
  localparam logic [N-1:0] TapMask = Taps[N-1:0];

  if (N < 2 || N > MaxLen || Taps == '0) begin : g_bad_len
    $error("lfsr_feedback: no tap set for N = %0d", N);
  end

  logic fb;

  assign fb = ^(q & TapMask);
  assign d  = {q[N-2:0], fb};

endmodule
