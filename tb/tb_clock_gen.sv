// tb_clock_gen -- test of global clock gating and the divide-by-8 bit clock.
//
// With run and wake low no gated-clock edge may appear. A one-cycle wake
// followed by run must open the gate at the next edge; RX_CLK must then rise
// on the 4th gated edge (the phase that centres it in the bit), every 8
// edges after that, with tick high in exactly the cycle before each rising
// edge. When run drops the gate must close at once, and a new wake must
// restart the same phase.
`timescale 1ns/1ps
module tb_clock_gen;

  localparam int DIV = 8;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, wake = 1'b0;
  logic gclk, rx_clk, tick;
  int checks = 0, failures = 0;
  int gedges = 0;

  clock_gen dut (.clk(clk), .rst_n(rst_n), .run(run), .wake(wake),
                 .gclk(gclk), .rx_clk(rx_clk), .tick(tick));

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g0;
    logic prev_rx, prev_tick;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      g0 = gedges;
      repeat (10 + f * 7) @(posedge clk);
      check(gedges == g0, "gate closed while idle");
      @(negedge clk) wake = 1'b1;
      @(negedge clk) begin wake = 1'b0; run = 1'b1; end
      check(gedges == g0 + 1, "wake lets the next edge through");
      // gated edges 2 .. 4 + 8*9: RX_CLK rises on edge 4, 12, 20 ...
      for (int e = 2; e <= 4 + 8 * 9; e++) begin
        prev_rx   = rx_clk;
        prev_tick = tick;
        @(posedge clk); #1;
        check(gedges == g0 + e, "gate open while running");
        check((!prev_rx && rx_clk) == ((e % 8) == 4),
              $sformatf("rx_clk rising edge at gated edge %0d", e));
        check(prev_tick == ((e % 8) == 4), $sformatf("tick before gated edge %0d", e));
      end
      @(negedge clk) run = 1'b0;
      g0 = gedges;
      repeat (5) @(posedge clk);
      #1 check(gedges == g0, "gate closes when run drops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
