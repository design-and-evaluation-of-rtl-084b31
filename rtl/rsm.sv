// rsm -- receive state machine (Idle, Shift, Load).
//
// Idle:  the internal clock is off. The state machine only receives the gclk
//        edge that the start-bit detector lets through (wake); at that edge
//        it enters Shift and clears its bit counter.
// Shift: the start bit and the data bits are shifted into the RSR, one per
//        RX_CLK rising edge. tick marks the gclk cycle that ends with such an
//        edge; the state machine counts these, and after the sample of the
//        last data bit (DATA_BITS + 1 samples, the first being the start bit)
//        it enters Load.
// Load:  lasts one gclk cycle; load is high, the RHR takes the RSR contents
//        and the status logic raises RXRDY. The state machine then returns to
//        Idle, which drops run and switches the internal clock off again.
//
// State and bit counter are held in data-dependent clock-gated flip-flops
// (nc2mos_dff), as are all registers of the deserializer.
//
// The three states and their order follow the original design. The stop bit
// is not sampled: the frame is loaded as soon as the last data bit is in,
// and the detector needs a new falling edge, which only the next start bit
// provides, to leave Idle again. The bit counter and the one-cycle Load
// state are this implementation's choices.
//
// Interface:  clk    gated clock gclk
//             rst_n  asynchronous reset, active low
//             wake   start bit detected
//             tick   an RX_CLK rising edge ends this cycle
//             run    state is not Idle (keeps the clock gate open)
//             load   state is Load
//             state  current state
module rsm

#(
  parameter int unsigned DATA_BITS = uart_pkg::DEF_DATA_BITS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wake,
  input  logic       tick,
  output logic       run,
  output logic       load,
  output uart_pkg::rsm_state_t state
);

  localparam int unsigned BW = $clog2(DATA_BITS + 1);

  uart_pkg::rsm_state_t    state_nx;
  logic [BW-1:0] bits, bits_nx;

  always_comb begin
    state_nx = state;
    bits_nx  = bits;
    unique case (state)
      uart_pkg::RSM_IDLE: begin
        if (wake) begin
          state_nx = uart_pkg::RSM_SHIFT;
          bits_nx  = '0;
        end
      end
      uart_pkg::RSM_SHIFT: begin
        if (tick) begin
          if (bits == BW'(DATA_BITS)) state_nx = uart_pkg::RSM_LOAD;
          else                        bits_nx  = bits + BW'(1);
        end
      end
      uart_pkg::RSM_LOAD: state_nx = uart_pkg::RSM_IDLE;
      default:  state_nx = uart_pkg::RSM_IDLE;
    endcase
  end

  // State and bit counter live in data-dependent clock-gated flip-flops,
  // cleared (Idle, count 0) by reset.
  logic [1:0]      state_q;
  logic [BW+1:0]   ff_lclk_en;

  nc2mos_dff #(.WIDTH(BW + 2)) u_ff (
    .clk     (clk),
    .set     (1'b0),
    .clr     (!rst_n),
    .d       ({state_nx, bits_nx}),
    .q       ({state_q, bits}),
    .lclk_en (ff_lclk_en)
  );

  assign state = uart_pkg::rsm_state_t'(state_q);

  assign run  = (state != uart_pkg::RSM_IDLE);
  assign load = (state == uart_pkg::RSM_LOAD);

  // Load lasts exactly one cycle and is always followed by Idle.
  a_load_then_idle: assert property (@(posedge clk) disable iff (!rst_n)
    load |=> (state == uart_pkg::RSM_IDLE));

endmodule
