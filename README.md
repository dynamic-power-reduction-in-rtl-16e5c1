# LFSR with grouped look-ahead clock gating

A linear feedback shift register (LFSR) clocks every flip-flop on every cycle.
This design cuts that clock activity. Each flip-flop's next value `d` is compared
with its present value `q` a cycle ahead. The flip-flops are then clocked only
when something is about to change.

The comparison is shared: flip-flops are split into groups of `K`, and each
group gets one gated clock. That clock fires only if at least one bit of the
group will change at the next edge. The default build is a 32-bit LFSR in four
groups of 8 flip-flops, so it has four gated clocks `gc[3:0]`. Setting `K = N`
gives the ungrouped form, with one gated clock for the whole register.

## How one group works

```
 d[i] ──┐
        XOR ── k[i] ──┐
 q[i] ──┘             │   (one XOR per flip-flop in the group)
                      OR ── g ──AND── en_g ──► latch (open while clk low) ──AND── gclk ──► K flip-flops
                      │           │                                              │
          (other k's) ┘          en                                             clk
```

- `k = d ^ q` per bit. `g = |k` says that the group changes at the next edge.
- `g & en` goes through an integrated clock gate (`lacg_icg`). This is a
  latch that is transparent while `clk` is low. Its output is ANDed with
  `clk`.
- The enable is worked out from the state that settled after the previous
  edge. It has the whole low phase to propagate, and the latch freezes it
  before the rising edge. So `gclk` is either a full copy of the clock's high
  phase or stays low for that cycle. There are no glitches.
- A cycle where the group is not clocked is one where `d == q` for every bit
  of the group. Skipping it therefore never changes the register's contents.
- With `WIDTH = 1`, `lacg_reg_group` is a single gated flip-flop:

  | D | Q | k = D^Q | gated clock |
  |---|---|---------|-------------|
  | 0 | 0 | 0       | held low    |
  | 0 | 1 | 1       | follows clk |
  | 1 | 0 | 1       | follows clk |
  | 1 | 1 | 0       | held low    |

## The LFSR

This is a Fibonacci register. Stage `t` is bit `t-1` of `q`. Bit 0 receives
the XOR of the tapped stages, and every other bit takes the value of the bit
below it:

```
d = {q[N-2:0], ^(q & TAPS)}        serial_out = q[N-1]
```

The reset value is all ones. The tap sets are in `lfsr_lacg_pkg::lfsr_taps`:

| N  | tapped stages    | origin |
|----|------------------|--------|
| 4  | 4, 3             | published polynomial 1 + x^3 + x^4 |
| 8  | 8, 6, 5, 4       | standard maximal-length set (this design's choice) |
| 16 | 16, 15, 13, 4    | published polynomial 1 + x^4 + x^13 + x^15 + x^16 |
| 32 | 32, 22, 2, 1     | standard maximal-length set (this design's choice) |
| 64 | 64, 63, 61, 60   | standard maximal-length set (this design's choice) |

Other lengths stop elaboration with an error. The 8-, 16- and 32-bit settings
reproduce the register values of the published simulation traces:

- `C1 → 83`
- `8DB1 → 1B63`
- `FB81FF92 → F703FF24`

The 4-, 8- and 16-bit registers are checked in simulation to run through all
2^N − 1 states.

## What the gating achieves on an LFSR

This is the main thing to know before using the design. It is measured with
the testbenches below and follows from how the register shifts:

- **Ungrouped (`K = N`):** the single gated clock fires on every enabled cycle.
  `d == q` over the whole register would need all bits equal. The only such
  state a maximal LFSR reaches is all ones. With an even number of taps, the
  feedback from all ones is 0, so even that state changes. The clock is then
  saved only while `en` is low.
- **Grouped:** a group that does not contain bit 0 stays unclocked only when its
  `K` bits and the bit below it are all equal. For random LFSR data that
  happens with probability of about 2^−K.

Share of flip-flop clock edges that still reach the flip-flops, over 70,000
mostly-enabled cycles:

| N \ K | 4     | 8     | 16    | 32    | N (ungrouped) |
|-------|-------|-------|-------|-------|---------------|
| 4     |       |       |       |       | 100 %         |
| 8     | 94.1 %|       |       |       | 100 %         |
| 16    | 93.7 %| 99.5 %|       |       | 100 %         |
| 32    | 93.9 %| 99.6 %| 99.9 %|       | 100 %         |
| 64    | 91.3 %| 97.7 %| 99.0 %| 99.7 %| 100 %         |

The published scheme reports large power savings for these configurations.
Those figures come from circuit-level power simulation, and this RTL does not
reproduce them. Judged by clock edges alone, the savings come from grouping
with small `K` and from holding `en` low. They do not come from the
per-cycle comparison on a free-running LFSR. The per-bit XORs and the OR tree
are extra logic that toggles every cycle.

## Files

| file | contents |
|------|----------|
| `rtl/lfsr_lacg_pkg.sv` | tap masks per register length |
| `rtl/lacg_icg.sv` | clock gate: latch open while `clk` is low, AND with `clk` |
| `rtl/lacg_reg_group.sv` | `WIDTH` flip-flops with XOR/OR change detection and one gated clock |
| `rtl/lfsr_feedback.sv` | combinational next-state logic `d = {q[N-2:0], fb}` |
| `rtl/lfsr_lacg.sv` | top: `N`-bit LFSR built from `ceil(N/K)` groups |

Ports of the top `lfsr_lacg #(N = 32, K = 8)`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | free-running clock |
| `rst_n` | in | 1 | asynchronous active-low reset, loads all ones |
| `en` | in | 1 | low: no group is clocked, `q` holds |
| `q` | out | N | state |
| `serial_out` | out | 1 | `q[N-1]` |
| `d` | out | N | next state |
| `k` | out | N | `d ^ q` |
| `g` | out | ceil(N/K) | per-group change flag |
| `gc` | out | ceil(N/K) | per-group gated clocks |

Group `j` holds bits `j*K .. j*K+K-1`. If `K` does not divide `N`, the last
group is shorter.

Timing: the register shifts once per rising edge of `clk` while `en` is high.
`en` and the data are sampled from the low phase before that edge. The reset
needs no clock edge.

## Simulation

Every testbench checks itself and ends by printing `TB_RESULT checks=… failures=…`:

| testbench | what it checks |
|-----------|----------------|
| `tb_lacg_icg` | gated clock against the enable sampled before each edge; changes of `en` during the high phase must not reach `gclk`; pulse count |
| `tb_lacg_reg_group` | 8-bit group and single flip-flop against a model; all four truth-table rows; pulse counts; asynchronous reset |
| `tb_lfsr_feedback` | next state for 4–64 bits against separate tap lists; full periods for 4, 8 and 16 bits; trace values |
| `tb_lfsr_lacg` | default top (32 bits, K = 8), 20,000 cycles against a reference LFSR; `d`, `k`, `g`, `q` every cycle; pulses per gated clock. It also counts three events, each of which must occur: a group skipped while others are clocked, `en` low, and a reset mid-run |
| `tb_lfsr_lacg_sizes` (uses `tb/lfsr_lacg_check.sv`) | all 15 length/group-size combinations above side by side, including the full 16-bit sequence; prints the table of clock-edge shares |

Example run with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/lfsr_lacg_pkg.sv tb/tb_lfsr_lacg.sv \
  --top-module tb_lfsr_lacg -Mdir obj && ./obj/Vtb_lfsr_lacg
```

Each testbench finishes in well under a second. To run another size, override
`N` and `K` on `lfsr_lacg`. The reference models in the testbenches know the
tap sets of 4, 8, 16, 32 and 64 bits only.

The gated clocks are derived from `clk` by continuous assignment. The
simulation therefore depends on all gated clocks rising in the same time step
as `clk`, before any flip-flop updates. This is standard scheduling for
non-blocking assignments, and the testbenches confirm it with Verilator. In silicon, the clock gate would be a library ICG cell
and the gated clocks would be balanced by clock-tree synthesis.

## Where this design makes its own choices

- **Reset:** asynchronous and active low. The published material only says
  the register starts from a non-zero value such as all ones.
- **Clock-gate latch:** transparent while `clk` is low. This is the
  glitch-free reading of a "negative" latch ahead of an AND gate. The clock
  gate has no reset, because it is rewritten in every low phase.
- **Enable order:** the external enable is ANDed with the group's OR output
  before the latch.
- **Look-ahead enable:** each group's enable is formed from its own `d ^ q`.
  The general form of the technique derives a flip-flop's enable from the
  change signals of the flip-flops that feed it. For a shift register these
  are the same thing, since `d[i]` is `q[i-1]` (or the feedback for bit 0).
  No separate dependency network is built.
- **Taps and shift direction:** the 8-, 32- and 64-bit tap sets are this
  design's choice (see the table above). The serial output is the last stage,
  `q[N-1]`.
- **Not built:** the comparison circuits the scheme was evaluated against
  (an ungated LFSR, data-driven gating, latch-based gated flip-flops). Also
  not built: the power figures, and some extra observation signals of the
  published traces whose meaning is not defined.
