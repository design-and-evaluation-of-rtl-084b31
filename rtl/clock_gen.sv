// clock_gen -- clock generation: global clock gating and the divide-by-N bit clock.
//
// The free-running input clock clk is gated by a latch-based cell. The gate
// is open while the receive state machine is busy (run) and for the one
// cycle in which the start of a frame is detected (wake); in the Idle state
// neither is true and every flip-flop behind gclk stops. gclk drives a
// CLK_DIV-state counter whose top bit is RX_CLK, the bit-rate clock of the
// receive shift register.
//
// Phase: the first gclk edge of a frame is the one at which the state
// machine leaves Idle; it loads the counter with 1 (not 0) so that RX_CLK
// rises CLK_DIV/2 - 1 edges later. With the two-stage synchroniser and edge
// detector in front, the first RX_CLK rising edge then lands about half a
// bit after the falling edge of the start bit, and every later one a whole
// bit further on, i.e. near each bit's centre. Loading a value below CLK_DIV/2
// also means that waking up never makes a spurious RX_CLK rising edge.
// tick is high in the gclk cycle that ends with an RX_CLK rising edge. The
// counter bits are data-dependent clock-gated flip-flops (nc2mos_dff).
//
// The gating of the clock in Idle and the divide-by-eight clock follow the
// original design; the counter phase and the tick output are this
// implementation's choices.
//
// Interface:  clk    free-running input clock, CLK_DIV x baud rate
//             rst_n  asynchronous reset, active low
//             run    state machine not Idle
//             wake   start bit detected (from rx_detect)
//             gclk   gated clock, off while Idle
//             rx_clk bit clock, gclk / CLK_DIV
//             tick   next gclk edge is an rx_clk rising edge
module clock_gen #(
  parameter int unsigned CLK_DIV = uart_pkg::DEF_CLK_DIV
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  input  logic wake,
  output logic gclk,
  output logic rx_clk,
  output logic tick
);

  localparam int unsigned CW = $clog2(CLK_DIV);

  logic [CW-1:0] cnt;

  clock_gate u_cg (
    .clk  (clk),
    .en   (run | wake),
    .gclk (gclk)
  );

  logic [CW-1:0] cnt_nx, ff_lclk_en;

  // first gated edge of a frame (still Idle): set the phase
  assign cnt_nx = run ? cnt + CW'(1) : CW'(1);

  nc2mos_dff #(.WIDTH(CW)) u_ff (
    .clk     (gclk),
    .set     (1'b0),
    .clr     (!rst_n),
    .d       (cnt_nx),
    .q       (cnt),
    .lclk_en (ff_lclk_en)
  );

  assign rx_clk = cnt[CW-1];
  assign tick   = (cnt == CW'(CLK_DIV / 2 - 1));

endmodule
