// tb_rx_detect -- test of the RX synchroniser and start-edge detector.
//
// RX is driven with random levels (held for random numbers of cycles) just
// after each clock edge. A model keeps the last three sampled values: rx_s
// must equal the value sampled two edges back and rx_fall must be high
// exactly when that value is low and the one before it was high. Reset must
// leave the detector idle-high with no edge reported.
`timescale 1ns/1ps
module tb_rx_detect;

  logic clk = 1'b0, rst_n = 1'b0, rx = 1'b1;
  logic rx_s, rx_fall;
  int checks = 0, failures = 0, falls = 0;

  rx_detect dut (.clk(clk), .rst_n(rst_n), .rx(rx), .rx_s(rx_s), .rx_fall(rx_fall));

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
    logic [2:0] h;   // h[0] newest sample
    int hold;
    rx = 1'b0;       // line low during reset must not matter
    repeat (2) @(posedge clk);
    #1 check(rx_s == 1'b1 && rx_fall == 1'b0, "idle after reset");
    rx = 1'b1;
    rst_n = 1'b1;
    h = 3'b111;
    hold = 0;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk);
      h = {h[1:0], rx};
      #1;
      check(rx_s == h[1], "rx_s is RX two edges late");
      check(rx_fall == (h[2] & ~h[1]), "rx_fall on falling edge");
      if (rx_fall) falls++;
      if (hold == 0) begin
        rx = $urandom_range(0, 1);
        hold = $urandom_range(0, 5);
      end else hold--;
    end
    check(falls > 20, "falling edges exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
