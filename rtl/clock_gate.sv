// clock_gate -- latch-based clock gating cell.
//
// The enable is captured by a latch that is transparent while clk is low,
// so it can only change between rising edges, and the gated clock is
// clk AND the latched enable. An enable raised in one clock cycle lets the
// next rising edge through; an enable dropped in one cycle suppresses the
// next rising edge. No glitch reaches gclk because en_l is frozen while clk
// is high. The latch is the intended storage element of this cell.
//
// Interface:  clk   free-running input clock
//             en    enable, must settle before the rising edge of clk
//             gclk  gated clock
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
