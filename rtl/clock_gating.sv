// clock_gating: glitch-free clock gate (latch + AND), the usual integrated
// clock-gating cell.
//
// The enable is captured by a latch that is transparent while clk is low, so
// it cannot change while clk is high; gclk = clk AND latched enable. A flop on
// gclk therefore receives exactly those rising edges of clk for which en was
// high during the preceding low phase -- the same cycles in which a flop with
// a clock enable would load. Gating the clock in AND form follows the
// low-power scheme of the design; the latch in front of the AND is this
// implementation's choice to keep the gated clock free of glitches.
// The latch is intended (it is the cell's function).
module clock_gating (
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
