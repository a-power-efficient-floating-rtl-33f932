// clock_gate: latch-based integrated clock gate for one execution pipeline.
//
// The enable is captured by a latch that is transparent while clk is low, and
// the gated clock is clk AND the latched enable. Because the latch is closed
// while clk is high, a change of en during the high phase cannot cut or
// create a clock pulse: gclk is glitch-free. en must settle before the rising
// edge of clk at which the gated registers are to be clocked (it is produced
// by the decoder and the pipeline's busy flag in the cycle before). The
// intended latch is the only state here; a synthesis flow would map this
// module onto the library's ICG cell.
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
