// clock_gate: glitch-free gate for the high-frequency controller clock, the function that a
// global clock buffer with clock enable provides in the FPGA prototype. The enable is captured
// by a latch that is transparent while clk is low, so a change of en can only take effect at
// the next rising edge of clk and never shortens a high pulse. gclk = clk AND latched enable.
// The latch is intended: it is the standard integrated-clock-gating structure.
//
// Timing: en sampled while clk is low; gclk's first pulse after en rises is the next full
// clk high phase; after en falls, the pulse already in progress completes and none follows.
module clock_gate (
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
