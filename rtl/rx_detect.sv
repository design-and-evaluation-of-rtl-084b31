// rx_detect -- receive detection: RX synchroniser and start-bit detector.
//
// Apart from the host-side status logic, these are the only flip-flops of
// the deserializer that see the input clock at all times, so that the start
// of a frame can be noticed while the rest of the circuit has its clock
// gated off. RX is passed through two
// flip-flops to resolve metastability (rx_s is the second), and a third
// flip-flop keeps the previous synchronised value; a high-to-low step
// between them is a falling edge, reported as a one-cycle rx_fall pulse.
// All three reset to 1, the idle level of the line, so reset never looks
// like a start bit. They are data-dependent clock-gated flip-flops
// (nc2mos_dff), so on an idle line they take no internal clock pulses even
// though their clock never stops.
//
// That this block runs on the ungated clock follows the original design;
// the synchroniser depth and the edge detector are this implementation's
// choices.
//
// Interface:  clk     free-running input clock
//             rst_n   asynchronous reset, active low
//             rx      serial input, asynchronous
//             rx_s    synchronised RX, two clk cycles late
//             rx_fall one-cycle pulse in the cycle in which rx_s is first low
module rx_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic rx,
  output logic rx_s,
  output logic rx_fall
);

  logic s1, s2, s3;
  logic [2:0] ff_lclk_en;

  // Data-dependent clock-gated flip-flops, set to the idle level by reset.
  nc2mos_dff #(.WIDTH(3)) u_ff (
    .clk     (clk),
    .set     (!rst_n),
    .clr     (1'b0),
    .d       ({s2, s1, rx}),
    .q       ({s3, s2, s1}),
    .lclk_en (ff_lclk_en)
  );

  assign rx_s    = s2;
  assign rx_fall = s3 & ~s2;

endmodule
