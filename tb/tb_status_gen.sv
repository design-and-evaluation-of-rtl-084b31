// tb_status_gen -- test of the RXRDY and OVERRUN flags.
//
// load pulses and READN strobes are applied at random. A model synchronises
// READN through three samples as the block does, sets RXRDY on load, sets
// OVERRUN on a load while RXRDY is set, and clears both on the sampled
// falling edge of READN (a load in the same cycle wins for RXRDY and raises
// no OVERRUN). The outputs are compared every cycle.
`timescale 1ns/1ps
module tb_status_gen;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, readn = 1'b1;
  logic rxrdy, overrun;
  int checks = 0, failures = 0, ovs = 0, clears = 0;

  status_gen dut (.clk(clk), .rst_n(rst_n), .load(load), .readn(readn),
                  .rxrdy(rxrdy), .overrun(overrun));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] h;
    bit rdy_m, ov_m, rd;
    int hold;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    h = 3'b111; rdy_m = 0; ov_m = 0; hold = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = ($urandom % 12) == 0;
      if (hold == 0) begin readn = ($urandom % 4) != 0; hold = $urandom_range(0, 10); end
      else hold--;
      @(posedge clk);
      rd = h[2] & ~h[1];           // sampled falling edge, before this edge
      if (load && rdy_m && !rd) ov_m = 1;
      else if (rd) ov_m = 0;
      if (load) rdy_m = 1;
      else if (rd) rdy_m = 0;
      h = {h[1:0], readn};
      #1;
      check(rxrdy == rdy_m, "RXRDY vs model");
      check(overrun == ov_m, "OVERRUN vs model");
      if (overrun) ovs++;
      if (rd) clears++;
    end
    check(ovs > 0 && clears > 0, "overrun and read exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
