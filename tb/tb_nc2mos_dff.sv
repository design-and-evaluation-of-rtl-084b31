// tb_nc2mos_dff -- test of the data-dependent clock-gated flip-flop register.
//
// An 8-bit instance gets random data on each rising edge; before the edge
// the local clock enables must equal D xor Q, after it Q must equal the old
// D. The asynchronous set and clear are pulsed between clock edges and must
// act at once, with clear winning when both are high.
`timescale 1ns/1ps
module tb_nc2mos_dff;

  localparam int W = 8;

  logic         clk = 1'b0, set = 1'b0, clr = 1'b1;
  logic [W-1:0] d = '0, q, lclk_en;
  int checks = 0, failures = 0;

  nc2mos_dff #(.WIDTH(W)) dut (.clk(clk), .set(set), .clr(clr), .d(d), .q(q), .lclk_en(lclk_en));

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

  initial begin
    logic [W-1:0] exp_q, dn;
    #1 check(q == '0, "clear while clr held");
    clr = 1'b0;
    exp_q = '0;
    for (int i = 0; i < 300; i++) begin
      dn = (i % 4 == 0) ? exp_q : W'($urandom);   // some cycles with D == Q
      d = dn;
      #1 check(lclk_en == (d ^ exp_q), $sformatf("lclk_en %02h exp %02h", lclk_en, d ^ exp_q));
      clk = 1'b1;
      #1 exp_q = dn;
      check(q == exp_q, $sformatf("q %02h exp %02h", q, exp_q));
      check(lclk_en == '0, "no pulse pending after capture");
      #3 clk = 1'b0;
      #3;
      if (i % 37 == 5) begin
        set = 1'b1; #1 check(q == '1, "async set"); exp_q = '1;
        set = 1'b0; #1;
      end
      if (i % 41 == 7) begin
        clr = 1'b1; #1 check(q == '0, "async clear"); exp_q = '0;
        set = 1'b1; #1 check(q == '0, "clear wins over set");
        set = 1'b0; clr = 1'b0; #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
