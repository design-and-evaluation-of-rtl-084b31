// tb_rsm -- test of the receive state machine.
//
// The state machine is clocked directly (standing in for the gated clock)
// with tick high every 8th cycle, as the clock generator makes it. After a
// wake it must stay in Shift for exactly 9 ticks (start bit plus 8 data
// bits), spend one cycle in Load with load high, and return to Idle with run
// low. wake while Shift is busy must be ignored, and no tick may move it out
// of Idle.
`timescale 1ns/1ps
module tb_rsm;

  logic clk = 1'b0, rst_n = 1'b0, wake = 1'b0, tick = 1'b0;
  logic run, load;
  uart_pkg::rsm_state_t state;
  int checks = 0, failures = 0;

  rsm dut (.clk(clk), .rst_n(rst_n), .wake(wake), .tick(tick),
           .run(run), .load(load), .state(state));

  always #5 clk = ~clk;

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
    int ticks;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 check(state == uart_pkg::RSM_IDLE && !run && !load, "idle after reset");
    for (int f = 0; f < 6; f++) begin
      // ticks while idle do nothing
      tick = 1'b1; @(posedge clk); #1 tick = 1'b0;
      check(state == uart_pkg::RSM_IDLE, "tick ignored in Idle");
      wake = 1'b1; @(posedge clk); #1 wake = 1'b0;
      check(state == uart_pkg::RSM_SHIFT && run && !load, "wake enters Shift");
      ticks = 0;
      // cycle counter c: the clock generator's counter starts at 1 and
      // raises tick when it is 3, so the first tick is 2 cycles in
      for (int c = 2; state == uart_pkg::RSM_SHIFT && c < 200; c++) begin
        tick = ((c % 8) == 3);
        wake = (c == 20);               // a spurious wake mid-frame
        @(posedge clk); #1;
        if (tick) ticks++;
        tick = 1'b0;
        wake = 1'b0;
      end
      check(ticks == 9, $sformatf("Shift lasted %0d ticks, expected 9", ticks));
      check(state == uart_pkg::RSM_LOAD && load && run, "Load after 9 ticks");
      @(posedge clk); #1;
      check(state == uart_pkg::RSM_IDLE && !load && !run, "back to Idle after Load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
