// rsr -- receive shift register.
//
// On every rising edge of the bit clock RX_CLK the synchronised RX line is
// shifted in at the top and the register moves one place towards bit 0.
// Because the line carries the least-significant bit first, after the start
// bit and DATA_BITS data bits have been shifted in, the start bit has left
// the register and data[0] holds the first data bit received. The storage is
// made of data-dependent clock-gated flip-flops, so a bit whose neighbour
// holds the same value takes no internal clock pulse. RX_CLK stops with the
// rest of the internal clock while the line is idle.
//
// The shift register and its bit clock follow the original design; the
// shift direction is chosen to match the LSb-first frame, and the reset
// value (all zeros) is this implementation's choice.
//
// Interface:  clk    RX_CLK, rising edge near the centre of each bit
//             rst_n  asynchronous reset, active low
//             rx_s   synchronised serial input
//             data   received bits, data[0] is the earliest data bit
module rsr #(
  parameter int unsigned DATA_BITS = uart_pkg::DEF_DATA_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rx_s,
  output logic [DATA_BITS-1:0] data
);

  logic [DATA_BITS-1:0] lclk_en;

  nc2mos_dff #(.WIDTH(DATA_BITS)) u_ff (
    .clk     (clk),
    .set     (1'b0),
    .clr     (!rst_n),
    .d       ({rx_s, data[DATA_BITS-1:1]}),
    .q       (data),
    .lclk_en (lclk_en)
  );

endmodule
