// clk_gate: latch-based clock gating cell.
//
// The enable is captured by a latch that is transparent while clk is low and held while clk
// is high, so gclk = clk & en_latched never glitches: a bank clocked by gclk sees a rising
// edge only in cycles where `en` was 1 before that edge, and otherwise keeps its contents
// without switching its clock net. Used to stop the clocks of the variable node bank and of
// the check node bank while they are idle. The latch is intentional (it is the standard
// integrated clock gating structure).
// The published design applies clock gating to reduce dynamic power without changing behaviour; the
// latch-and-AND cell is this design's realisation of it.
module clk_gate (
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
