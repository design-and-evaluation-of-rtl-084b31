// tb_two_frames -- two consecutive transmissions at the maximum rate.
//
// The input clock runs at 333.3 MHz (3 ns period) and the line at 41.67 Mbaud
// (8 clocks per bit). Two bytes are sent with a short gap and the first is
// not read. Checked: after the first frame RXRDY is set, OVERRUN is clear and
// DATA holds the first byte; after the second OVERRUN is set and DATA holds
// the second byte; after the second frame the internal clock and RX_CLK stay
// off; a read then clears both flags and enables the data bus.
`timescale 1ns/1ps
module tb_two_frames;

  localparam real CLK_NS = 3.0;
  localparam int  DIV    = 8;

  logic clk = 1'b0, rst_n = 1'b1, rx = 1'b1, readn = 1'b1;
  logic [7:0] data;
  logic data_oe, rxrdy, overrun;
  int checks = 0, failures = 0;
  int gclk_n = 0, rxclk_n = 0;

  uart_deser dut (.clk(clk), .rst_n(rst_n), .rx(rx), .readn(readn), .data(data),
                  .data_oe(data_oe), .rxrdy(rxrdy), .overrun(overrun));

  always #(CLK_NS / 2.0) clk = ~clk;
  always @(posedge dut.gclk) gclk_n++;
  always @(posedge dut.rx_clk) rxclk_n++;

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
    int g0, r0;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    #0.5;
    send_frame(8'h5A);
    check(rxrdy && !overrun, "first byte: RXRDY set, OVERRUN clear");
    check(data == 8'h5A, "first byte in RHR");
    repeat (2 * DIV) @(posedge clk);
    #0.5;
    send_frame(8'hC3);
    check(rxrdy && overrun, "second byte: OVERRUN set");
    check(data == 8'hC3, "second byte overwrote the first");
    g0 = gclk_n; r0 = rxclk_n;
    repeat (20 * DIV) @(posedge clk);
    check(gclk_n == g0 && rxclk_n == r0, "internal clock and RX_CLK off after the second frame");
    readn = 1'b0;
    #0.1 check(data_oe, "DATA driven while READN low");
    repeat (4) @(posedge clk);
    check(!rxrdy && !overrun, "read clears RXRDY and OVERRUN");
    readn = 1'b1;
    #0.1 check(!data_oe, "DATA released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
