// tb_clk_manager: checks the clock manager at its default ratios from a 100 MHz reference:
// ADC clock period 50 ns, high clock 500 ns, low clock 5 us, each measured over many cycles,
// and that the rising edges of the three clocks never coincide (the low clock rises while the
// high clock is high).
`timescale 1ns/1ps
module tb_clk_manager;
  logic clk_ref = 1'b0, rst_n = 1'b1;
  logic clk_adc, clk_hi, clk_lo;
  always #5 clk_ref = ~clk_ref;

  clk_manager dut (.clk_ref, .rst_n, .clk_adc, .clk_hi, .clk_lo);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  realtime t_adc = 0, t_hi = 0, t_lo = 0;
  int n_adc = 0, n_hi = 0, n_lo = 0;
  bit run = 0;
  always @(posedge clk_adc) if (run) begin
    if (n_adc > 0) check($realtime - t_adc == 50.0, "ADC clock period 50 ns");
    check($realtime != t_hi && $realtime != t_lo, "ADC clock edge apart from controller clocks");
    t_adc = $realtime; n_adc++;
  end
  always @(posedge clk_hi) if (run) begin
    if (n_hi > 0) check($realtime - t_hi == 500.0, "high clock period 500 ns");
    t_hi = $realtime; n_hi++;
  end
  always @(posedge clk_lo) if (run) begin
    if (n_lo > 0) check($realtime - t_lo == 5000.0, "low clock period 5 us");
    check(clk_hi === 1'b1 && $realtime != t_hi, "low clock rises inside a high-clock high phase");
    t_lo = $realtime; n_lo++;
  end

  initial begin
    #1 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    run = 1'b1;
    #(100_000);
    check(n_lo >= 19 && n_lo <= 21, $sformatf("low clock edges in 100 us: %0d", n_lo));
    check(n_hi >= 199 && n_hi <= 201, $sformatf("high clock edges in 100 us: %0d", n_hi));
    check(n_adc >= 1999 && n_adc <= 2001, $sformatf("ADC clock edges in 100 us: %0d", n_adc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
