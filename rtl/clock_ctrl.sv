// clock_ctrl -- clock controller of a data memory unit.
//
// Gives each block RAM of the RAM cluster its own clock, which is switched
// off when the configuration bit of that RAM is 0, so that RAMs a
// constraint length does not need are not clocked at all.  Each output is a
// conventional integrated clock gate: a latch, transparent while the clock
// is low, holds the enable, and the gated clock is the AND of the clock and
// the latched enable, so a change of `ram_en` never produces a short pulse.
// The latch is intended; it is the standard glitch-free gating cell.  Gating
// the clocks of unused RAMs follows the design; the gate circuit is this
// design's choice.
module clock_ctrl #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic [N-1:0] ram_en,
  output logic [N-1:0] gclk
);

  logic [N-1:0] en_lat;

  always_latch begin
    if (!clk) en_lat = ram_en;
  end

  assign gclk = {N{clk}} & en_lat;

endmodule
