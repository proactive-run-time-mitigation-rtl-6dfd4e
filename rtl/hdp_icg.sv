// hdp_icg: integrated clock gater of one HDP ALU domain.
//
// A latch that is transparent while the clock is low captures the enable,
// and the clock is ANDed with the latched enable. The enable can therefore
// change at any time in the high phase without glitching the gated clock:
// a change made in cycle c takes effect from the next rising edge.
//
// The latch is intended (it is the standard glitch-free gater); synthesis
// would map this module to the library's ICG cell. The HDP description
// names the ICG and its role; the latch-AND structure is the usual one and
// this design's choice.
module hdp_icg (
  input  logic clk_i,
  input  logic en_i,
  output logic clk_o
);

  logic en_latched;

  always_latch begin
    if (!clk_i) en_latched = en_i;
  end

  assign clk_o = clk_i & en_latched;

endmodule
