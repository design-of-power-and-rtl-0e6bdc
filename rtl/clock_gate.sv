// clock_gate: latch-based clock gating cell.
//
// The enable is caught by a latch that is open while clk is low, and the
// gated clock is clk ANDed with the latched enable. The enable therefore only
// takes effect from the next rising edge of clk and cannot cut a high phase
// short, so gclk never glitches. When en is low at the rising edge, gclk stays
// low for the whole cycle and every flip-flop on it keeps its value.
//
// The description only says that a clock-gating logic turns off the clocks
// of unused units; the latch-and-AND cell is this implementation's choice.
// The latch is intended (it is the standard glitch-free gating cell), so a
// latch warning for en_latched is expected.
module clock_gate (
  input  logic clk,   // free-running clock
  input  logic en,    // enable, sampled while clk is low
  output logic gclk   // gated clock
);
  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;
endmodule
