// uart_pkg -- constants and types shared by the low-power UART deserializer.
//
// The frame format is fixed: one start bit (low), DATA_BITS data bits sent
// least-significant bit first, no parity, one stop bit (high); the line idles
// high. The input clock runs at CLK_DIV times the baud rate, and the bit-rate
// clock RX_CLK is that clock divided by CLK_DIV. Eight data bits and a
// divide-by-eight bit clock are the values of the original design; the state
// encoding is this implementation's own choice.
package uart_pkg;

  // Default data bits per frame (8-N-1 format).
  parameter int unsigned DEF_DATA_BITS = 8;

  // Default input clock cycles per bit; RX_CLK = input clock / CLK_DIV.
  parameter int unsigned DEF_CLK_DIV = 8;

  // Receive state machine states.
  typedef enum logic [1:0] {
    RSM_IDLE  = 2'd0,  // line idle, internal clock gated off
    RSM_SHIFT = 2'd1,  // start and data bits being shifted into the RSR
    RSM_LOAD  = 2'd2   // RSR copied into the RHR, RXRDY raised
  } rsm_state_t;

endpackage
