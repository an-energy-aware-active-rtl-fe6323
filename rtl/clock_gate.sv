// clock_gate: latch-based clock gate for the periodically-active subsystem.
//
// The enable is caught in a latch that is transparent while the clock is low, so
// the gated clock can only start or stop between clock pulses and never produces
// a shortened pulse. Gating the on-board clock to put the periodically-active
// subsystem to sleep follows the prototype; the standard latch-and-AND cell is
// this design's choice.
//
// Timing: en sampled before a rising edge of clk decides whether that edge (and
// its high phase) appears on gclk.
module clock_gate (
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
