// clock_gate: clock gate built as clock AND enable.
//
// gclk = clk & en_latched. The enable is captured by a latch that is transparent while
// clk is low, so a change of en while clk is high cannot cut or create a pulse on gclk:
// the gated clock only ever carries whole clock pulses. en must be settled before the
// rising edge of clk for that edge to pass (it is normally driven by flops clocked on
// the rising edge of clk, so it settles during the preceding low phase).
//
// The AND of clock and enable is the gating the design description gives; the latch in
// front of the AND is this design's addition (the usual integrated clock-gate form).
// The latch is intentional and is the only latch in the design.
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
