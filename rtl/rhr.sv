// rhr -- receive hold register and data bus driver.
//
// In the Load state of the receive state machine (load high at a gclk edge)
// the register takes the whole RSR word in parallel; otherwise its flip-flops
// see D equal to Q and, being data-dependent clock-gated flip-flops, take no
// internal clock pulse. The held word appears on DATA while the active-low
// READN is asserted: data_oe is the output enable for the bidirectional
// DATA pads, and the byte itself is always present on data.
//
// The parallel load in Load and the READN-controlled bus follow the original
// design. Presenting the bus as a data word plus an output enable (the pads
// do the three-state driving) and the reset value of zero are this
// implementation's choices.
//
// Interface:  clk      gated clock gclk
//             rst_n    asynchronous reset, active low
//             load     RSM is in the Load state
//             rsr_data word from the receive shift register
//             readn    read strobe, active low, asynchronous
//             data     held byte
//             data_oe  drive DATA (= !readn)
// Timing:     data changes at the gclk edge that ends the Load state; data_oe
//             follows readn combinationally.
module rhr #(
  parameter int unsigned DATA_BITS = uart_pkg::DEF_DATA_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [DATA_BITS-1:0] rsr_data,
  input  logic                 readn,
  output logic [DATA_BITS-1:0] data,
  output logic                 data_oe
);

  logic [DATA_BITS-1:0] lclk_en;

  nc2mos_dff #(.WIDTH(DATA_BITS)) u_ff (
    .clk     (clk),
    .set     (1'b0),
    .clr     (!rst_n),
    .d       (load ? rsr_data : data),
    .q       (data),
    .lclk_en (lclk_en)
  );

  assign data_oe = !readn;

endmodule
