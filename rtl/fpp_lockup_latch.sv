// fpp_lockup_latch: hold element at a destination terminal of a registered lane.
//
// A latch clocked by the inverted lane clock: transparent while clk is low,
// holding while clk is high. Data launched at a rising edge therefore reaches
// the terminal only after the following falling edge and stays stable across
// the next rising edge. This gives half a clock period of hold margin on the
// inter-die connection, which is sensitive to hold violations and races. The
// standard requires a hold element at every destination of a registered lane
// and names a latch at the inverted clock as an example; that form is used here.
//
// The latch is intentional; a tool that reports an inferred latch here is
// reporting this element. Where the enable is also used as a clock by
// flip-flops in the same lane, a lint tool may instead claim that no latch
// was found in the always_latch block; the element is a latch all the same.
module fpp_lockup_latch (
  input  logic clk,  // lane clock (FPP_CLK_IN)
  input  logic d,
  output logic q
);

  always_latch begin
    if (!clk) q = d;
  end

endmodule
