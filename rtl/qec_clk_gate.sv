// qec_clk_gate: latch-based clock gate.
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the clock is ANDed with the latch output, so the gated clock never
// carries a shortened pulse when the enable changes. Used by the enable
// sequencer to gate the loop-filter clock with EN_A. The latch is intended:
// it is what makes the gate glitch-free. Gating the loop-filter clock follows
// the reference design; the latch-and-AND form is this design's choice.
// Interface: clk (free-running), en (must be synchronous to clk), gclk.
`timescale 1ps / 10fs
module qec_clk_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  always_comb gclk = clk & en_l;

endmodule
