// clk_gate: integrated clock gating cell, the element that turns the clock
// enable of the clock & sync generator into the divided internal clock.
//
// A latch, transparent while clk is low, holds the enable through the high
// phase, so gclk = clk & en_latched never glitches. A rising edge of gclk
// happens exactly at those rising edges of clk before which `en` was high,
// which is the same set of edges at which a flip-flop written with
// `if (en)` on clk updates. The latch is intended (this is the standard ICG
// structure); a library ICG cell would replace this module in a real flow.
module clk_gate (
  input  logic clk,    // source clock
  input  logic en,     // enable for the next rising edge
  output logic gclk    // gated (divided) clock
);
  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;
endmodule
