// Integrated clock gate (ICG) of the look-ahead clock gating scheme.
//
// A level-sensitive latch is transparent while clk is low and holds while clk
// is high; the gated clock is the AND of clk with the latched enable. The
// enable therefore has the whole low phase of the cycle to settle, and a
// change of en while clk is high cannot cut or create a pulse: gclk is either
// a full copy of the clk high phase or stays low for that cycle.
//
// Interface: clk (free-running clock), en (enable for the next rising edge),
// gclk (gated clock). Timing: the value of en just before a rising edge of
// clk decides whether gclk rises at that edge.
//
// The latch-plus-AND structure follows the source design. The latch is the
// intended storage element of this cell; the latch a linter reports here is
// that one.
module lacg_icg (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
