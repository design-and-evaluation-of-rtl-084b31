// uart_deser -- low-power UART-protocol deserializer, top level.
//
// Receives 8-N-1 frames (start bit, eight data bits LSb first, stop bit, line
// idle high) with an input clock at CLK_DIV (8) times the baud rate, and
// hands each byte to a host through a hold register, a read strobe and two
// status flags. Power is saved at two levels:
//   * global clock gating: the receive state machine (RSM) gates the input
//     clock off in its Idle state, so only the three receive-detection
//     flip-flops and the status logic keep clocking while the line is idle;
//   * local clock gating: the RSR and RHR are built from data-dependent
//     clock-gated flip-flops that only pulse when their input differs from
//     their output.
//
// Structure (six parts): clock generation (clock_gen: gate plus
// divide-by-CLK_DIV bit clock RX_CLK), receive detection (rx_detect), the
// receive state machine (rsm), the receive shift register (rsr), the receive
// hold register (rhr) and status generation (status_gen).
//
// Operation: a falling edge on RX opens the clock gate and moves the RSM
// from Idle to Shift. RX_CLK then rises near the centre of every bit and
// shifts it into the RSR. After the eighth data bit the RSM spends one cycle
// in Load (RHR <- RSR, RXRDY set, OVERRUN set if RXRDY already was) and
// returns to Idle, which stops the internal clock. From the falling edge of
// the start bit to RXRDY takes 70 to 71 clk cycles (8.75 to 8.9 bit times at
// CLK_DIV = 8).
//
// Host side: while readn is low the RHR byte is to be driven on DATA; data
// is the byte and data_oe the output enable of the bidirectional pads, which
// are outside this core. A falling edge on readn clears RXRDY and OVERRUN.
//
// Ports:  clk      input clock, CLK_DIV x baud rate, free-running
//         rst_n    asynchronous reset, active low
//         rx       serial input
//         readn    read strobe, active low
//         data     received byte (RHR)
//         data_oe  drive DATA, = !readn
//         rxrdy    a byte is waiting
//         overrun  a byte was overwritten before it was read
//
// The block structure, the states, the frame format and the two clock
// gating schemes follow the original design. The reset pin, the output
// enable in place of three-state pads, sampling phase and flag clearing are
// this implementation's choices (see the individual modules).
module uart_deser

#(
  parameter int unsigned DATA_BITS = uart_pkg::DEF_DATA_BITS,
  parameter int unsigned CLK_DIV   = uart_pkg::DEF_CLK_DIV
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rx,
  input  logic                 readn,
  output logic [DATA_BITS-1:0] data,
  output logic                 data_oe,
  output logic                 rxrdy,
  output logic                 overrun
);

  logic       rx_s, rx_fall;
  logic       gclk, rx_clk, tick;
  logic       run, load;
  uart_pkg::rsm_state_t state;
  logic [DATA_BITS-1:0] rsr_data;

  rx_detect u_det (
    .clk     (clk),
    .rst_n   (rst_n),
    .rx      (rx),
    .rx_s    (rx_s),
    .rx_fall (rx_fall)
  );

  clock_gen #(.CLK_DIV(CLK_DIV)) u_clk (
    .clk    (clk),
    .rst_n  (rst_n),
    .run    (run),
    .wake   (rx_fall),
    .gclk   (gclk),
    .rx_clk (rx_clk),
    .tick   (tick)
  );

  rsm #(.DATA_BITS(DATA_BITS)) u_rsm (
    .clk   (gclk),
    .rst_n (rst_n),
    .wake  (rx_fall),
    .tick  (tick),
    .run   (run),
    .load  (load),
    .state (state)
  );

  rsr #(.DATA_BITS(DATA_BITS)) u_rsr (
    .clk   (rx_clk),
    .rst_n (rst_n),
    .rx_s  (rx_s),
    .data  (rsr_data)
  );

  rhr #(.DATA_BITS(DATA_BITS)) u_rhr (
    .clk      (gclk),
    .rst_n    (rst_n),
    .load     (load),
    .rsr_data (rsr_data),
    .readn    (readn),
    .data     (data),
    .data_oe  (data_oe)
  );

  status_gen u_stat (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (load),
    .readn   (readn),
    .rxrdy   (rxrdy),
    .overrun (overrun)
  );

endmodule
