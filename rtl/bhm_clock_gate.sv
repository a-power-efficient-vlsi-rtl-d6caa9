// bhm_clock_gate: glitch-free clock gate for the processor clocks.
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the clock is ANDed with the latched enable, so the gated clock
// never shows a shortened pulse. The document says the system control unit
// turns processor clocks off; the cell itself is this design's choice
// (a technology library's integrated clock-gating cell would replace it).
module bhm_clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
