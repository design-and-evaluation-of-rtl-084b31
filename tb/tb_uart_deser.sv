// tb_uart_deser -- end-to-end test of the low-power UART deserializer.
//
// Runs the top level with its default parameters (8 data bits, clock at
// eight times the baud rate). A serial source sends random bytes as 8-N-1
// frames with random idle gaps (including back-to-back frames) and a random
// sub-cycle phase of the start edge; a host model reads some bytes and
// leaves others unread so that overruns happen. A reference model of RXRDY
// and OVERRUN is updated frame by frame and compared with the outputs, the
// byte on DATA is compared with what was sent, and the latency from the
// start edge to RXRDY (70 to 71 clock cycles) and the RX_CLK period (8
// clock cycles, 9 rising edges per frame) are checked. While the line is
// idle after a frame no gated-clock edge may occur.
//
// Mechanisms counted (each must happen at least once): frames received,
// back-to-back frames, idle cycles with the internal clock gated off,
// hold-register bit clocks suppressed by local gating, reads, overruns.
`timescale 1ns/1ps
module tb_uart_deser;

  localparam int CLK_NS = 10;
  localparam int DIV    = 8;
  localparam int NBITS  = 8;
  localparam int FRAMES = 60;

  logic             clk = 1'b0;
  logic             rst_n = 1'b1;
  logic             rx = 1'b1;
  logic             readn = 1'b1;
  logic [NBITS-1:0] data;
  logic             data_oe, rxrdy, overrun;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_frames = 0, n_b2b = 0, n_gated_idle = 0, n_local_skip = 0;
  int n_reads = 0, n_overruns = 0;

  uart_deser dut (
    .clk     (clk),
    .rst_n   (rst_n),
    .rx      (rx),
    .readn   (readn),
    .data    (data),
    .data_oe (data_oe),
    .rxrdy   (rxrdy),
    .overrun (overrun)
  );

  always #(CLK_NS/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gated-clock edges, RX_CLK edges and skipped local clock pulses
  int gclk_edges = 0;
  int rxclk_edges = 0;
  int rxclk_last = 0;
  int rxclk_bad_period = 0;
  bit rxclk_in_frame = 1'b0;
  int clk_cnt = 0;
  always @(posedge clk) clk_cnt++;
  always @(posedge dut.gclk) begin
    gclk_edges++;
    for (int i = 0; i < NBITS; i++)
      if (!dut.u_rhr.lclk_en[i]) n_local_skip++;
  end
  always @(posedge dut.rx_clk) begin
    if (rxclk_in_frame && (clk_cnt - rxclk_last) != DIV)
      rxclk_bad_period++;
    rxclk_in_frame = 1'b1;
    rxclk_edges++;
    rxclk_last = clk_cnt;
  end

  // Reference model
  bit rdy_m = 0, ov_m = 0;

  // Send one frame; returns when the stop bit has ended. Checks latency.
  task automatic send_frame(input logic [NBITS-1:0] b);
    int t0, e0, lat;
    bit seen;
    t0 = clk_cnt;
    e0 = rxclk_edges;
    rxclk_in_frame = 1'b0;           // period measured within a frame
    rx = 1'b0;                       // start bit
    fork
      begin : lat_mon
        seen = 0;
        // rdy may already be 1 from an unread byte: wait for the load pulse
        while (!(dut.load)) @(posedge clk);
        @(posedge clk);
        lat = clk_cnt - t0;
        check(lat >= 70 && lat <= 71, $sformatf("latency start->RXRDY %0d cycles", lat));
        check(rxrdy == 1'b1, "RXRDY set after load");
        seen = 1;
      end
      begin
        #(DIV*CLK_NS);
        for (int i = 0; i < NBITS; i++) begin
          rx = b[i];
          #(DIV*CLK_NS);
        end
        rx = 1'b1;                   // stop bit
        #(DIV*CLK_NS);
      end
    join
    check(seen, "load seen in frame");
    check(rxclk_edges - e0 == NBITS + 1, $sformatf("RX_CLK rising edges per frame %0d", rxclk_edges - e0));
    n_frames++;
    ov_m  = ov_m | rdy_m;
    rdy_m = 1'b1;
    check(data == b, $sformatf("DATA %02h expected %02h", data, b));
    check(rxrdy == rdy_m, "RXRDY vs model");
    check(overrun == ov_m, "OVERRUN vs model");
    if (overrun) n_overruns++;
  endtask

  task automatic host_read(input logic [NBITS-1:0] b);
    readn = 1'b0;
    #1;
    check(data_oe == 1'b1, "data_oe during read");
    check(data == b, "DATA during read");
    repeat (5) @(posedge clk);
    #1;
    check(rxrdy == 1'b0, "RXRDY cleared by read");
    check(overrun == 1'b0, "OVERRUN cleared by read");
    rdy_m = 0;
    ov_m  = 0;
    readn = 1'b1;
    #1;
    check(data_oe == 1'b0, "data_oe released");
    n_reads++;
  endtask

  initial begin
    logic [NBITS-1:0] b;
    int gap, g0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    gclk_edges = 0;
    repeat (20) @(posedge clk);
    check(rxrdy == 1'b0 && overrun == 1'b0, "flags clear after reset");
    check(gclk_edges == 0, "internal clock off after reset");

    for (int f = 0; f < FRAMES; f++) begin
      b = NBITS'($urandom);
      if (f == 0) b = 8'h00;
      if (f == 1) b = 8'hFF;
      if (f == 2) b = 8'hA5;
      // random phase of the start edge relative to clk
      #($urandom_range(0, CLK_NS - 1));
      send_frame(b);
      // host reads about two thirds of the bytes
      if (($urandom % 3) != 0) host_read(b);
      // idle gap, counted in bit times; 0 = back-to-back frame
      gap = (f % 5 == 4) ? 0 : int'($urandom_range(1, 20));
      if (gap == 0) n_b2b++;
      g0 = gclk_edges;
      repeat (gap * DIV) @(posedge clk);
      if (gap > 0) begin
        check(gclk_edges == g0, "no internal clock edge while idle");
        if (gclk_edges == g0) n_gated_idle += gap * DIV;
      end
      @(negedge clk);
    end

    check(rxclk_bad_period == 0, $sformatf("RX_CLK period != %0d clk cycles: %0d times", DIV, rxclk_bad_period));
    // every mechanism must have occurred
    check(n_frames == FRAMES, "all frames received");
    check(n_b2b > 0, "back-to-back frames occurred");
    check(n_gated_idle > 0, "global clock gating occurred");
    check(n_local_skip > 0, "local clock gating occurred");
    check(n_reads > 0, "reads occurred");
    check(n_overruns > 0, "overruns occurred");
    $display("frames=%0d back_to_back=%0d gated_idle_cycles=%0d local_skips=%0d reads=%0d overruns=%0d",
             n_frames, n_b2b, n_gated_idle, n_local_skip, n_reads, n_overruns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
