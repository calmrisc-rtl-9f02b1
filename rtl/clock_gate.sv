// clock_gate: latch-based integrated clock gate.
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the clock is ANDed with the latched enable. The enable may
// therefore change at any time during the high phase without producing a
// glitch: gclk carries a full high pulse in every cycle whose enable was
// high at the rising edge, and stays low otherwise.
//
// The latch is intended (this is the standard gate cell); a latch warning
// for en_l is expected. Using gated clocks in the program address unit is
// the published power-saving scheme; the cell's structure is the common
// one and this design's choice.
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
