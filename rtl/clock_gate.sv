// clock_gate: integrated clock-gating cell (latch + AND).
//
// Function: gclk_o = clk_i AND en, so sequential elements behind it see no
// clock edges while the enable is low, which removes their clock-toggle
// power. The enable is captured by a latch that is transparent while clk_i is
// low and holds while clk_i is high; the enable can therefore change at any
// time in the low phase without producing a glitch or a shortened pulse on
// gclk_o. The AND form follows the gating equation GCLK = CLK . EN; the latch
// in front of the AND is the usual construction of a glitch-free gating cell
// and is this design's choice.
//
// Interface: clk_i free-running clock, en_i enable (sampled during the low
// phase), gclk_o gated clock. Timing: en_i must be settled before the rising
// edge of clk_i for that cycle's pulse to pass; a change of en_i while clk_i
// is high takes effect at the next cycle.
module clock_gate (
  input  logic clk_i,
  input  logic en_i,
  output logic gclk_o
);
  logic en_latched;

  // Transparent-low latch: holds the enable stable while the clock is high.
  always_latch begin
    if (!clk_i) en_latched = en_i;
  end

  assign gclk_o = clk_i & en_latched;
endmodule
