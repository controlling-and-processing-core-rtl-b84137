// tb_mode_ctrl: operation-mode state machine with DC_ON = 5 and DC_OFF = 7 low-clock cycles.
// Walks continuous -> duty cycle -> sleep -> duty cycle -> continuous -> sleep -> continuous and
// checks, cycle by cycle, the mode, the duty-cycle window (on for 5 cycles from entry, then off
// for 7, repeating), tx_enable and adc_power against a count kept by the testbench.
`timescale 1ns/1ps
module tb_mode_ctrl;
  import telem_pkg::*;
  logic clk_lo = 1'b0, rst_n = 1'b1;
  logic [1:0] mode_sel = 2'd0;
  op_mode_t mode;
  logic duty_on, tx_enable, adc_power;
  always #50 clk_lo = ~clk_lo;

  mode_ctrl #(.DC_ON(5), .DC_OFF(7)) dut (.clk_lo, .rst_n, .mode_sel, .mode, .duty_on, .tx_enable, .adc_power);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int in_duty = 0;     // cycles since duty-cycle mode was entered
  int offs = 0, switches = 0;
  task automatic run(input logic [1:0] sel, input int cycles);
    op_mode_t exp_mode;
    mode_sel = sel;
    exp_mode = (sel == 2'd0) ? MODE_CONT : (sel == 2'd1) ? MODE_DUTY : MODE_SLEEP;
    in_duty = 0;
    switches++;
    for (int i = 0; i < cycles; i++) begin
      logic exp_on;
      @(posedge clk_lo) #1;
      exp_on = (exp_mode != MODE_DUTY) || ((in_duty % 12) < 5);
      check(mode == exp_mode, "mode follows mode_sel after one edge");
      check(duty_on == exp_on, $sformatf("duty window at cycle %0d of duty mode", in_duty));
      check(tx_enable == (exp_mode == MODE_CONT || (exp_mode == MODE_DUTY && exp_on)), "tx_enable");
      check(adc_power == tx_enable, "adc_power");
      if (exp_mode == MODE_DUTY && (in_duty % 12) == 5) offs++;
      if (exp_mode == MODE_DUTY) in_duty++;
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #10;
    check(mode == MODE_CONT, "continuous after reset");
    rst_n = 1'b1;
    run(2'd0, 5);
    run(2'd1, 30);
    run(2'd2, 6);
    run(2'd1, 8);
    run(2'd0, 4);
    run(2'd3, 4);
    run(2'd0, 3);
    check(offs >= 3, $sformatf("duty-cycle off windows: %0d", offs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
