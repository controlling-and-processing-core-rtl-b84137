// tb_clk_enable_gen: high clock 2 MHz and low clock 200 kHz with the low clock rising inside
// the high clock's high phase, random sleep and wake requests. Reference behaviour: on a high
// clock edge with sleep_req and clock_enable set, clock_enable clears; on a low clock edge with
// wake_req and clock_enable clear, it sets; otherwise it holds. After reset it is set.
`timescale 1ns/1ps
module tb_clk_enable_gen;
  logic clk_hi = 1'b0, clk_lo = 1'b0, rst_n = 1'b1;
  logic sleep_req = 1'b0, wake_req = 1'b0;
  logic clk_enable, sleep_state;

  clk_enable_gen dut (.clk_hi, .clk_lo, .rst_n, .sleep_req, .wake_req, .clk_enable, .sleep_state);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // clk_hi: 500 ns period starting high at 100 ns; clk_lo: 5 us period rising 200 ns later
  initial begin
    #100;
    forever begin clk_hi = 1'b1; #250 clk_hi = 1'b0; #250; end
  end
  initial begin
    #300;
    forever begin clk_lo = 1'b1; #2500 clk_lo = 1'b0; #2500; end
  end

  logic model = 1'b1;
  int n_sleep = 0, n_wake = 0;
  always @(posedge clk_hi) if (rst_n) begin
    if (sleep_req && model) begin model <= 1'b0; n_sleep++; end
  end
  always @(posedge clk_lo) if (rst_n) begin
    if (wake_req && !model) begin model <= 1'b1; n_wake++; end
  end

  // change requests in the middle of the high clock's low phase; check just after each edge
  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    check(clk_enable == 1'b1, "enabled after reset");
    for (int i = 0; i < 400; i++) begin
      @(negedge clk_hi);
      #100;
      sleep_req = ($urandom_range(0, 3) == 0);
      wake_req  = ($urandom_range(0, 1) == 0);
      @(posedge clk_hi) #20;
      check(clk_enable == model, "clock_enable after a high-clock edge");
      check(sleep_state == !clk_enable, "sleep_state is the inverse");
    end
    check(n_sleep > 10 && n_wake > 10, $sformatf("sleeps %0d wakes %0d", n_sleep, n_wake));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk_lo) if (rst_n) #20 check(clk_enable == model, "clock_enable after a low-clock edge");
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
