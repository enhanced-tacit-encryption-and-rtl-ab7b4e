// clock_gate: integrated clock-gating cell (latch plus AND).
//
// The enable is captured by a level-sensitive latch that is transparent while
// the clock is low, so the gated clock `gclk` can neither glitch nor shorten a
// high phase: gclk = clk & en_latched. `test_en` forces the clock on (scan).
// The latch is intentional: it is what makes the cell glitch-free, and a
// synthesis or lint tool reporting it as a latch is expected.
//
// Timing: a change of `en` set up before the rising edge of `clk` takes
// effect on that edge. The E-TACIT scheme names clock gating as one of its
// power techniques without describing the cell; this standard cell form is
// this design's choice.
module clock_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en | test_en;
  end

  assign gclk = clk & en_latched;

endmodule
