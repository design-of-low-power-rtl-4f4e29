// clock_gate: latch-based integrated clock gate (ICG).
//
// The power-saving mechanism of the design: a register whose load enable
// is low receives no clock edge at all, instead of being clocked and fed
// back its own value through a multiplexer.  The enable is captured by a
// latch that is transparent while clk is low and holds while clk is high,
// and the latch output is ANDed with clk.  The enable may therefore change
// anywhere in the low phase (the control unit changes its outputs just after
// the falling edge) without producing a glitch or a truncated pulse on
// gclk.  The latch is intended: it is the standard structure of a glitch-
// free clock gate, and a latch warning from a lint tool on this module is
// expected.  The original applies clock gating at synthesis; where the
// gates sit in this RTL is this design's own choice.
//
// Timing: gclk = clk while the enable sampled in the preceding low phase
// was 1, else gclk stays low for that whole high phase.
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
