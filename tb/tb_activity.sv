// tb_activity -- activity-rate sweep of the UART deserializer.
//
// The activity rate is the fraction of time the RX line carries frames:
// alpha = active / (active + idle). For alpha = 0, 15, 30, 40, 60 and 75 %
// this testbench sends a stream of 8-N-1 frames (10 bit times = 80 clock
// cycles each) separated by the idle time that gives that rate, reads every
// byte, and counts the input clock cycles, the gated internal clock edges,
// the RX_CLK edges and the hold-register flip-flop clock pulses. Checked:
// every byte, RXRDY and no OVERRUN; exactly 69 gated clock edges and 9 RX_CLK
// edges per frame, and none while the line is idle. The printed table shows
// how the share of clocked cycles falls with the activity rate, which is the
// effect the global clock gating is for.
`timescale 1ns/1ps
module tb_activity;

  localparam int CLK_NS = 10;
  localparam int DIV    = 8;
  localparam int FRAME  = 10 * DIV;   // clock cycles per frame
  localparam int NFR    = 12;         // frames per activity rate
  localparam int GCLK_PER_FRAME = 69;

  logic clk = 1'b0, rst_n = 1'b1, rx = 1'b1, readn = 1'b1;
  logic [7:0] data;
  logic data_oe, rxrdy, overrun;
  int checks = 0, failures = 0;

  int clk_n = 0, gclk_n = 0, rxclk_n = 0, ff_pulses = 0;

  uart_deser dut (.clk(clk), .rst_n(rst_n), .rx(rx), .readn(readn), .data(data),
                  .data_oe(data_oe), .rxrdy(rxrdy), .overrun(overrun));

  always #(CLK_NS/2) clk = ~clk;
  always @(posedge clk) clk_n++;
  always @(posedge dut.rx_clk) rxclk_n++;
  always @(posedge dut.gclk) begin
    gclk_n++;
    ff_pulses += $countones(dut.u_rhr.lclk_en);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame(input logic [7:0] b);
    rx = 1'b0;
    repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = b[i];
      repeat (DIV) @(posedge clk);
    end
    rx = 1'b1;
    repeat (DIV) @(posedge clk);
  endtask

  initial begin
    int rates[6] = '{0, 15, 30, 40, 60, 75};
    int idle, c0, g0, r0, p0, gi, nfr;
    logic [7:0] b;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    $display(" alpha  clk_cycles  gclk_edges  clocked_share  rhr_ff_pulses");
    foreach (rates[k]) begin
      #2;   // start edges away from the clock edge
      // idle cycles per frame for this rate; alpha = 0 is a long idle line
      idle = (rates[k] == 0) ? 0 : (FRAME * (100 - rates[k])) / rates[k];
      nfr  = (rates[k] == 0) ? 0 : NFR;
      c0 = clk_n; g0 = gclk_n; r0 = rxclk_n; p0 = ff_pulses;
      if (nfr == 0) begin
        repeat (NFR * FRAME) @(posedge clk);
      end
      for (int f = 0; f < nfr; f++) begin
        int gf, rf;
        gf = gclk_n; rf = rxclk_n;
        b = 8'($urandom);
        send_frame(b);
        check(rxrdy && !overrun, "RXRDY set, no OVERRUN");
        check(data == b, $sformatf("byte %02h expected %02h", data, b));
        // read during the idle time (or right away for short gaps)
        readn = 1'b0;
        repeat (4) @(posedge clk);
        readn = 1'b1;
        check(!rxrdy, "RXRDY cleared by read");
        check(gclk_n - gf == GCLK_PER_FRAME, $sformatf("gated edges per frame %0d", gclk_n - gf));
        check(rxclk_n - rf == 9, $sformatf("RX_CLK edges per frame %0d", rxclk_n - rf));
        gi = gclk_n;
        if (idle > 4) repeat (idle - 4) @(posedge clk);
        check(gclk_n == gi, "internal clock off while idle");
      end
      if (nfr == 0) check(gclk_n == g0, "no internal clock at alpha = 0");
      $display(" %3d%%   %9d  %10d      %5.1f%%     %8d", rates[k], clk_n - c0, gclk_n - g0,
               100.0 * real'(gclk_n - g0) / real'(clk_n - c0), ff_pulses - p0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
