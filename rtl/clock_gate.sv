// Latch-based integrated clock gate.
//
// The gated clock gclk follows clk while en is high and stays low while en is
// low. en is captured by a latch that is transparent only while clk is low, so
// a change of en during the high phase of clk cannot clip or create a clock
// pulse: gclk = clk & en_latched. In the encoder this stops the FM0
// flip-flops while the Manchester code is selected, which is the clock
// gating the design is named for; the design does not describe the gate's
// circuit, so this standard glitch-free form is this implementation's choice.
//
// Interface: clk (free-running clock), en (enable, may change at any time
// while clk is high), gclk (gated clock).
// Timing: an en that is stable through the low phase before a rising edge of
// clk decides whether that rising edge and the high phase after it reach gclk.
// The latch in this module is intended; it is the gate's storage element.
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

endmodule : clock_gate
