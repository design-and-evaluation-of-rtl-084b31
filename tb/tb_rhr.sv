// tb_rhr -- test of the receive hold register and data bus enable.
//
// Random words are offered on rsr_data every cycle; only in cycles with load
// high may the register take them, otherwise it must keep its word. data_oe
// must follow the inverse of readn at once, independent of the clock.
`timescale 1ns/1ps
module tb_rhr;

  localparam int W = 8;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, readn = 1'b1;
  logic [W-1:0] rsr_data = '0, data;
  logic data_oe;
  int checks = 0, failures = 0, loads = 0;

  rhr dut (.clk(clk), .rst_n(rst_n), .load(load), .rsr_data(rsr_data),
           .readn(readn), .data(data), .data_oe(data_oe));

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
    logic [W-1:0] m;
    repeat (2) @(posedge clk);
    #1 check(data == '0, "cleared by reset");
    rst_n = 1'b1;
    m = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      rsr_data = W'($urandom);
      load = ($urandom % 5) == 0;
      readn = $urandom_range(0, 1);
      #1 check(data_oe == !readn, "data_oe follows readn");
      @(posedge clk);
      if (load) begin m = rsr_data; loads++; end
      #1 check(data == m, $sformatf("data %02h exp %02h", data, m));
    end
    check(loads > 50, "loads exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
