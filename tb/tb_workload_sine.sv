// tb_workload_sine: bench workload of the core at its default sizes. A 20 kHz full-scale sine
// drives ADC channel 0 while channels 1 and 2 sit at mid-scale; the ADC runs at 200 kS/s with
// its three-channel sequencer, so each channel is sampled at 66.7 kS/s, above the 40 kS/s the
// 20 kHz signal needs. The 256 words of FIFO 0's first readout are collected and analysed:
//   - every word equals the sine sampled at 15 us spacing (up to +-1 code of rounding), with
//     the phase taken from the first word;
//   - the largest bin of their discrete Fourier transform (N = 256, mean removed) is the one
//     nearest 20 kHz (bin 76.8 of 256 at 66.7 kS/s);
//   - channels 1 and 2 read out as constant mid-scale with no such component.
`timescale 1ns/1ps
module tb_workload_sine;
  import telem_pkg::*;

  localparam int unsigned N = 256;

  logic clk_ref = 1'b0;
  logic rst_n   = 1'b1;
  logic [1:0] mode_sel = 2'd0;
  logic send_req = 1'b0;

  logic        adc_dclk, adc_convst, adc_power, adc_drdy, adc_busy;
  logic [15:0] adc_do;
  logic [3:0]  adc_channel;
  logic        send_packet, tx_ack, rx_radio, duty_on, clk_enable, sleep_state, clk_lo, gclk;
  logic [SAMPLE_W-1:0] fifo_dout [NUM_CH];
  logic [NUM_CH-1:0]   fifo_valid, fifo_full, fifo_reading;
  ctrl_state_t state;
  op_mode_t    mode;

  always #5 clk_ref = ~clk_ref;

  telemetry_core dut (
    .clk_ref, .rst_n, .mode_sel, .send_req,
    .adc_dclk, .adc_convst, .adc_power, .adc_do, .adc_drdy, .adc_channel,
    .send_packet, .tx_ack, .rx_radio, .fifo_dout, .fifo_valid,
    .fifo_full, .state, .mode, .duty_on, .clk_enable, .sleep_state, .fifo_reading,
    .clk_lo, .clk_hi_gated(gclk)
  );

  xadc_model #(.CONV_CYCLES(78), .NCH(NUM_CH), .SINE_HZ(20_000.0)) u_adc (
    .dclk(adc_dclk), .rst_n, .convst(adc_convst),
    .drdy(adc_drdy), .channel(adc_channel), .dout(adc_do), .busy(adc_busy)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int x [N];
  int got [NUM_CH];
  int other_bad = 0;
  bit run = 0;
  always @(posedge adc_dclk) if (run) begin
    if (fifo_valid[0] && got[0] < N) begin x[got[0]] = int'(fifo_dout[0]); got[0]++; end
    for (int k = 1; k < NUM_CH; k++) if (fifo_valid[k]) begin
      got[k]++;
      if (fifo_dout[k] != 12'd2048) other_bad++;
    end
  end

  initial begin
    real re, im, p, best, mean, ph0, err, maxerr;
    int  best_bin;
    for (int k = 0; k < NUM_CH; k++) got[k] = 0;
    #1 rst_n = 1'b0;
    repeat (20) @(posedge clk_ref);
    rst_n = 1'b1;
    run = 1'b1;
    wait (got[0] == N);
    #1;
    // spacing and amplitude: phase from the first word, then compare each word
    ph0 = $asin((real'(x[0]) - 2047.5) / 2047.5);
    if (x[1] < x[0]) ph0 = 3.14159265358979 - ph0;   // falling slope
    maxerr = 0.0;
    for (int n = 0; n < N; n++) begin
      err = real'(x[n]) - (2047.5 + 2047.5 * $sin(ph0 + 2.0 * 3.14159265358979 * 20_000.0 * 15.0e-6 * n));
      if (err < 0) err = -err;
      if (err > maxerr) maxerr = err;
    end
    check(maxerr < 40.0, $sformatf("samples follow a 20 kHz sine at 15 us spacing (max error %0.1f codes)", maxerr));
    // DFT
    mean = 0.0;
    for (int n = 0; n < N; n++) mean += x[n];
    mean = mean / N;
    best = 0.0; best_bin = 0;
    for (int b = 1; b < N / 2; b++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < N; n++) begin
        re += (x[n] - mean) * $cos(2.0 * 3.14159265358979 * b * n / N);
        im -= (x[n] - mean) * $sin(2.0 * 3.14159265358979 * b * n / N);
      end
      p = re * re + im * im;
      if (p > best) begin best = p; best_bin = b; end
    end
    $display("peak bin %0d of %0d = %0.0f Hz", best_bin, N, best_bin * (200_000.0 / 3.0) / N);
    check(best_bin == 77 || best_bin == 76, $sformatf("spectrum peak at 20 kHz (bin %0d)", best_bin));
    check(got[1] > 0 && got[2] > 0 && other_bad == 0, "channels 1 and 2 constant mid-scale");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
