// Group of WIDTH flip-flops that share one look-ahead gated clock.
//
// Each flip-flop compares its next value d with its present value q in an XOR
// (k = d ^ q). The XOR outputs of the group are ORed into one group enable g,
// which is ANDed with the external enable en and passed to an integrated
// clock gate (lacg_icg). The group's flip-flops are clocked by that gated
// clock, so the group receives a clock edge only in cycles where at least one
// of its bits actually changes and en is high. With WIDTH = 1 this is the
// single D flip-flop with clock gating whose truth table is:
//   D Q | Y=D^Q | gated clock
//   0 0 |   0   | held low
//   0 1 |   1   | follows clk
//   1 0 |   1   | follows clk
//   1 1 |   0   | held low
//
// Interface: d/q are the data in/out, en gates all clocking, rst_n is an
// asynchronous active-low reset that loads RESET_VALUE without needing a
// clock edge. k, g and gclk are brought out for observation. Timing: q takes
// d at the rising clk edge if en & (d != q) held just before it; otherwise q
// keeps its value, which is the same as loading d when d == q.
//
// The XOR / OR / enable-AND / ICG chain is that of the source design. The
// asynchronous reset and its all-ones default value are choices of this
// implementation.
module lacg_reg_group #(
  parameter int unsigned     WIDTH       = 8,
  parameter logic [WIDTH-1:0] RESET_VALUE = '1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] k,
  output logic             g,
  output logic             gclk
);

  assign k = d ^ q;
  assign g = |k;

  lacg_icg u_icg (
    .clk  (clk),
    .en   (en & g),
    .gclk (gclk)
  );

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= RESET_VALUE;
    else        q <= d;
  end

endmodule
