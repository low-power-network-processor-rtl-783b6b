// clock_gate: glitch-free clock gate for the clock network of one PE.
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the gated clock is the clock ANDed with the latched enable. An
// enable change therefore takes effect at the next rising edge and can never
// cut a high phase short. This is the usual integrated clock-gating cell; the
// paper gates each PE's clock as a whole (coarse-grained gating) but does
// not show the cell, so its form is this design's choice.
//
// Interface: clk_i is the free-running core clock, en_i the enable (sampled
// while clk_i is low), gclk_o the gated clock.
module clock_gate (
  input  logic clk_i,
  input  logic en_i,
  output logic gclk_o
);

  logic en_latched;

  // Intended latch: transparent during the low phase of the clock.
  always_latch begin
    if (!clk_i) en_latched = en_i;
  end

  assign gclk_o = clk_i & en_latched;

endmodule
