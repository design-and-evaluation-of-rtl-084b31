// status_gen -- status signal generation: RXRDY and OVERRUN.
//
// RXRDY is raised when a received byte is loaded into the hold register
// (load, one cycle) and cleared when the host starts reading it, i.e. when
// the synchronised READN falls. OVERRUN is raised when a byte is loaded
// while RXRDY is still set, meaning the previous byte was overwritten before
// it was read, and is cleared by the next read as well. A load and the start
// of a read in the same cycle count as a read of the old byte followed by a
// new one: RXRDY stays set and OVERRUN is not raised.
//
// All its flip-flops are data-dependent clock-gated ones (nc2mos_dff), so
// with no load and READN steady they take no internal clock pulses.
// This block runs on the free-running input clock, because READN can arrive
// while the internal clock is gated off. The meaning of RXRDY and OVERRUN
// follows the original design; the READN synchroniser, clearing both flags
// on the falling edge of READN, and the same-cycle rule are this
// implementation's choices.
//
// Interface:  clk      free-running input clock
//             rst_n    asynchronous reset, active low
//             load     RSM Load state (one cycle)
//             readn    read strobe, active low, asynchronous
//             rxrdy    a byte is waiting in the RHR
//             overrun  a byte was overwritten before being read
// Timing:     rxrdy rises at the clk edge that ends Load; a READN fall clears
//             the flags three clk edges later (two synchroniser stages and an
//             edge detector).
module status_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic readn,
  output logic rxrdy,
  output logic overrun
);

  logic r1, r2, r3;
  logic rd_start;
  logic rxrdy_nx, overrun_nx;
  logic [2:0] sync_lclk_en;
  logic [1:0] flag_lclk_en;

  // READN synchroniser and edge detector, set to the inactive level by reset.
  nc2mos_dff #(.WIDTH(3)) u_sync (
    .clk     (clk),
    .set     (!rst_n),
    .clr     (1'b0),
    .d       ({r2, r1, readn}),
    .q       ({r3, r2, r1}),
    .lclk_en (sync_lclk_en)
  );

  assign rd_start = r3 & ~r2;

  always_comb begin
    rxrdy_nx   = rxrdy;
    overrun_nx = overrun;
    if (load)          rxrdy_nx = 1'b1;
    else if (rd_start) rxrdy_nx = 1'b0;
    if (load && rxrdy && !rd_start) overrun_nx = 1'b1;
    else if (rd_start)              overrun_nx = 1'b0;
  end

  // The flags, cleared by reset.
  nc2mos_dff #(.WIDTH(2)) u_flags (
    .clk     (clk),
    .set     (1'b0),
    .clr     (!rst_n),
    .d       ({rxrdy_nx, overrun_nx}),
    .q       ({rxrdy, overrun}),
    .lclk_en (flag_lclk_en)
  );

endmodule
