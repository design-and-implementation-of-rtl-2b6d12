// dpm_clock_gate -- latch-based (synthesis-style) clock gate.
//
// A negative latch is transparent while clk is low and captures the enable
// en; while clk is high it holds, so the latched enable gen can only change
// in the low phase. The gated clock is gclk = clk AND gen: it carries a
// full-width pulse in every cycle whose enable was high just before the
// rising edge of clk, and stays low otherwise, with no glitch because gen
// is stable for the whole high phase.
//
// Interface: clk (global clock), rst_n (active-low, asynchronous, clears the
// latch so the clock starts gated off), en (enable), gclk (gated clock).
// Timing: en must be settled before the rising edge of clk; a change of en
// in the high phase takes effect on the next cycle.
//
// The negative latch, its reset and the signal names (En, GEN, CLK, GCLK)
// follow the design's gating scheme. That scheme also stops the latch's own
// clock while en already equals gen, which saves latch toggling but changes
// no output; it is left out here. The AND output stage and the active-low
// reset are this implementation's choices, the usual form of such a gate.
module dpm_clock_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic gclk
);

  logic gen;   // latched enable (GEN)

  always_latch begin
    if (!rst_n)    gen = 1'b0;
    else if (!clk) gen = en;
  end

  assign gclk = clk & gen;

endmodule
