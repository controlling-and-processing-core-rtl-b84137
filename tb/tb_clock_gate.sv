// tb_clock_gate: drives a 100 MHz clock and an enable that changes at random moments in both
// clock phases. Expected: during each high phase gclk equals the enable value present when
// clk rose (the latch holds it), and gclk is low whenever clk is low; so no pulse is cut short.
`timescale 1ns/1ps
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  clock_gate dut (.clk, .en, .gclk);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic en_at_rise;
  int pulses = 0, expected = 0;
  initial begin
    for (int i = 0; i < 400; i++) begin
      #5 clk = 1'b1; en_at_rise = en;
      if (en_at_rise) expected++;
      #1 check(gclk == en_at_rise, "gclk follows the enable sampled at the rising edge");
      if ($urandom_range(0, 2) == 0) en = $urandom_range(0, 1);   // change while clk high
      #3 check(gclk == en_at_rise, "enable change while clk high does not cut the pulse");
      #1 clk = 1'b0;
      #1 check(gclk == 1'b0, "gclk low while clk low");
      if ($urandom_range(0, 2) == 0) en = $urandom_range(0, 1);   // change while clk low
      #3 check(gclk == 1'b0, "gclk low while clk low");
    end
    check(pulses == expected, $sformatf("pulse count %0d expected %0d", pulses, expected));
    check(expected > 50, "enough enabled cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge gclk) pulses++;
  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
