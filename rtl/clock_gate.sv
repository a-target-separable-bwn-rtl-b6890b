// clock_gate: latch-based clock gate.
//
// en is captured by a latch that is transparent while clk is low, and the
// gated clock is clk AND the latched enable, so gclk only ever carries whole
// clock pulses: an enable that changes while clk is high takes effect at
// the next low phase. The units behind a gate draw no clock power while
// disabled. The latch is intended: it is what keeps the gated clock free of
// glitches.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk)
      en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
