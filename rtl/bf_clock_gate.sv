// bf_clock_gate: integrated clock gate (latch + AND).
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the gated clock is the AND of the clock and the latched enable.
// The latch holds the enable steady through the high phase, so the gated
// clock has no glitches even if `en` changes while `clk` is high. A flop
// clocked by `gclk` behaves like a flop with clock enable `en`: it updates
// at a rising edge of `clk` exactly when `en` was high just before that edge.
// `test_en` forces the clock on (scan / test). The latch-plus-AND structure
// is the one shown for the clock gating unit of the design; the test enable
// is this design's addition. The latch is intended: it is the clock gate.
module bf_clock_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en | test_en;
  end

  assign gclk = clk & en_lat;

endmodule
