// tb_rx_timer: receive-phase counter with RX_PERIOD = 10 and RX_WINDOW = 3. Expected: after the
// k-th low-clock edge following reset (k = 1, 2, ...) the phase is open exactly when
// (k - 1) mod 10 < 3, so phases open every 10 edges and last 3 edges.
`timescale 1ns/1ps
module tb_rx_timer;
  logic clk_lo = 1'b0, rst_n = 1'b1, rx_phase;
  always #50 clk_lo = ~clk_lo;

  rx_timer #(.RX_PERIOD(10), .RX_WINDOW(3)) dut (.clk_lo, .rst_n, .rx_phase);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int opens = 0;
  initial begin
    #1 rst_n = 1'b0;
    #10;
    check(rx_phase == 1'b0, "closed in reset");
    rst_n = 1'b1;
    for (int k = 1; k <= 95; k++) begin
      @(posedge clk_lo) #1;
      check(rx_phase == (((k - 1) % 10) < 3), $sformatf("phase after edge %0d", k));
      if (((k - 1) % 10) == 0) opens++;
    end
    check(opens == 10, "ten phases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
