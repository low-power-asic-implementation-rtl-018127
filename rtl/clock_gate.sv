// clock_gate: glitch-free clock gate for the encryption block's sleep mode.
//
// The power-gating scheme stops the clock of the sleeping block by combining
// the clock with an enable. Here the enable is caught in a latch that is
// transparent while clk is low, and the gated clock is clk AND the latched
// enable, as in a standard integrated clock-gating cell. A change of en
// during the high phase cannot cut a clock pulse short.
// Timing: en sampled up to the rising edge of clk decides whether that edge
// (and the pulse after it) reaches gclk. The latch is intended; it is the
// storage element of the clock gate.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;
endmodule
