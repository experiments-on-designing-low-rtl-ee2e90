// Integrated clock-gating cell: the clock-gating element of the chain.
//
// Each filter stage is clocked only when it has work to do. The enable is
// captured by a level-sensitive latch that is transparent while clk is low,
// and the gated clock is clk AND the latched enable. Because the latch is
// closed while clk is high, a change of en during the high phase cannot
// produce a glitch or a short pulse on gclk: the enable must be settled
// before the rising edge of clk on which the gated block is to be clocked,
// exactly as for a flip-flop's data input.
//
// The latch is intended: it is the standard glitch-free gating cell, and a
// library ICG cell can replace this module one for one. Clock gating of
// idle stages follows the architecture; the latch-and-AND cell is this
// design's choice.
module clk_gate (
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
