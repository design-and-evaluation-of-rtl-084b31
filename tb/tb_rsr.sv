// tb_rsr -- test of the receive shift register.
//
// Random bits are presented on rx_s and clocked in; after each clock edge
// the register must hold the last 8 bits with the newest in bit 7, so that
// after a start bit and 8 LSb-first data bits it holds the data byte in
// order. Reset must clear it.
`timescale 1ns/1ps
module tb_rsr;

  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b1, rx_s = 1'b1;
  logic [W-1:0] data;
  int checks = 0, failures = 0;

  rsr dut (.clk(clk), .rst_n(rst_n), .rx_s(rx_s), .data(data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input logic bitv);
    rx_s = bitv;
    #40 clk = 1'b1;
    #40 clk = 1'b0;
  endtask

  initial begin
    logic [W-1:0] m, b;
    #1 rst_n = 1'b0;
    #9 check(data == '0, "cleared by reset");
    rst_n = 1'b1;
    m = '0;
    for (int i = 0; i < 200; i++) begin
      logic v;
      v = $urandom_range(0, 1);
      pulse(v);
      m = {v, m[W-1:1]};
      check(data == m, $sformatf("data %02h exp %02h", data, m));
    end
    // whole frames: start bit then 8 data bits LSb first
    for (int f = 0; f < 20; f++) begin
      b = W'($urandom);
      pulse(1'b0);
      for (int i = 0; i < W; i++) pulse(b[i]);
      check(data == b, $sformatf("frame byte %02h exp %02h", data, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
