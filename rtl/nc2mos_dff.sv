// nc2mos_dff -- register built from data-dependent clock-gated flip-flops.
//
// Each bit models one NC2MOS flip-flop: a master/slave pair whose internal
// clock pulse is produced only when a comparator sees the D input differ
// from the Q output. When D equals Q the local clock stays off, so a bit
// that does not change costs no internal clock power. As in the original
// cell, the flip-flop is positive-edge triggered and has an asynchronous set
// and an asynchronous clear.
//
// At the register-transfer level the comparator becomes a per-bit enable,
// lclk_en = D xor Q, and the pulse generator becomes the clock edge that the
// enable lets through. The stored value is therefore the same as that of a
// plain D flip-flop; what differs is which bits receive an internal clock
// pulse, and lclk_en exposes that so a testbench or power estimate can count
// the pulses. The WIDTH parameter (one flip-flop per bit) and the priority of
// clear over set are this implementation's choices.
//
// Interface:  clk  clock, rising edge
//             set  asynchronous set of every bit, active high
//             clr  asynchronous clear of every bit, active high, wins over set
//             d/q  data in / data out
//             lclk_en  per bit: a local clock pulse fires at the next edge
// Timing:     q takes d at the rising edge of clk; set/clr act at once.
module nc2mos_dff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             set,
  input  logic             clr,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] lclk_en
);

  // Comparator: a local clock pulse is needed only where D differs from Q.
  assign lclk_en = d ^ q;

  // Set and clear share one asynchronous load whose value is 1 only for a
  // set without a clear.
  logic aload;
  assign aload = set | clr;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    always_ff @(posedge clk or posedge aload) begin
      if (aload)           q[i] <= !clr;
      else if (lclk_en[i]) q[i] <= d[i];
    end
  end

endmodule
