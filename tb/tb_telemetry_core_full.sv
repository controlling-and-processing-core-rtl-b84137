// tb_telemetry_core_full: the telemetry core at its default sizes (256-word FIFOs, receive
// phase every 10 ms, 200 kHz / 2 MHz / 20 MHz clocks from 100 MHz) through one complete
// operation in continuous mode: the three FIFOs fill from the ADC model, each is read out as a
// whole when full, with send_packet, and the first two receive phases (at 5 us and at 10 ms)
// are acknowledged. Checks: the first readout of each FIFO streams exactly 256 words, equal to
// the ADC's samples of that channel in order; the first full flag appears after 3 x 256
// acquisition passes, i.e. about 3.84 ms plus the time of the receive window; receive phases
// open 10 ms apart with one acknowledge each; outside receive phases a convert start comes every
// 5 us (the 200 kS/s sampling rate) with exactly four gated-clock pulses per pass. After the
// second receive phase a send request starts a readout of every FIFO, and a switch to sleep
// mode then stops the gated clock and the conversions for the last 90 us.
`timescale 1ns/1ps
module tb_telemetry_core_full;
  import telem_pkg::*;

  localparam int unsigned DEPTH = 256;

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

  xadc_model #(.CONV_CYCLES(78), .NCH(NUM_CH)) u_adc (
    .dclk(adc_dclk), .rst_n, .convst(adc_convst),
    .drdy(adc_drdy), .channel(adc_channel), .dout(adc_do), .busy(adc_busy)
  );

  bit run = 0;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // scoreboard and per-FIFO count of the words of the first readout
  logic [11:0] exp_q [NUM_CH][$];
  int words [NUM_CH];
  int bursts [NUM_CH];
  logic [NUM_CH-1:0] reading_q = '0;
  always @(posedge adc_dclk) begin
    if (run) begin
      if (adc_drdy) exp_q[adc_channel].push_back(adc_do[15:4]);
      for (int k = 0; k < NUM_CH; k++) begin
        if (fifo_valid[k]) begin
          if (bursts[k] == 1) words[k]++;
          if (exp_q[k].size() == 0) check(1'b0, "FIFO output with no sample pending");
          else check(fifo_dout[k] == exp_q[k].pop_front(), "FIFO output equals ADC sample");
        end
        if (fifo_reading[k] && !reading_q[k]) bursts[k]++;
      end
      reading_q <= fifo_reading;
    end
  end

  realtime t_first_full = 0;
  int daq_passes = 0, daq_at_full = 0;
  always @(negedge gclk) if (run && state == ST_DAQ) daq_passes++;
  always @(posedge fifo_full[0]) if (run && t_first_full == 0) begin
    t_first_full = $realtime;
    daq_at_full  = daq_passes;
  end

  // pacing: interval between convert starts and gated-clock pulses per acquisition pass
  realtime t_conv = 0;
  int gpulses = 0, pace_ok = 0, pace_bad = 0, pass_ok = 0, pass_bad = 0;
  always @(posedge gclk) if (run) gpulses++;
  always @(posedge adc_convst) if (run) begin
    if (t_conv != 0 && !dut.u_rx.rx_phase) begin
      if ($realtime - t_conv == 5000.0) begin
        pace_ok++;
        if (gpulses == 4) pass_ok++; else pass_bad++;
      end else if ($realtime - t_conv > 200_000.0 || $realtime - t_conv < 5000.0) pace_bad++;
    end
    t_conv  = $realtime;
    gpulses = 0;
  end

  realtime t_phase [$];
  int acks = 0;
  always @(posedge dut.u_rx.rx_phase) if (run) t_phase.push_back($realtime);
  always @(negedge gclk) if (run && tx_ack) acks++;

  initial begin
    for (int k = 0; k < NUM_CH; k++) begin words[k] = 0; bursts[k] = 0; end
    #1 rst_n = 1'b0;
    repeat (20) @(posedge clk_ref);
    rst_n = 1'b1;
    run = 1'b1;
    // a little over 10 ms: two receive phases and the first readout of every FIFO
    #(10_150_000);
    // send request: every non-empty FIFO is read out
    begin
      int b0 [NUM_CH];
      for (int k = 0; k < NUM_CH; k++) b0[k] = bursts[k];
      send_req = 1'b1;
      @(posedge send_packet);
      #1 send_req = 1'b0;
      #(2000);
      for (int k = 0; k < NUM_CH; k++)
        check(bursts[k] == b0[k] + 1, $sformatf("send request reads out FIFO %0d", k));
    end
    // sleep mode: no pass without a receive phase
    mode_sel = 2'd2;
    #(10_000);
    begin
      int c0, g0;
      c0 = pace_ok + pace_bad; g0 = gpulses;
      #(90_000);
      check(pace_ok + pace_bad == c0 && !adc_power, "no conversion in sleep mode");
      check(gpulses == g0 && !clk_enable, "gated clock stopped in sleep mode");
    end
    check(pace_ok > 1500 && pace_bad == 0, $sformatf("convert start every 5 us (%0d ok, %0d off)", pace_ok, pace_bad));
    check(pass_ok == pace_ok && pass_bad == 0, $sformatf("four gated pulses per pass (%0d ok, %0d off)", pass_ok, pass_bad));
    for (int k = 0; k < NUM_CH; k++) begin
      check(bursts[k] >= 1, $sformatf("FIFO %0d was read out", k));
      check(words[k] == DEPTH, $sformatf("FIFO %0d first readout: %0d words", k, words[k]));
    end
    // FIFO 0 is full after its 256th sample: conversion 3*255+1 of the sequence
    check(daq_at_full >= 3 * (DEPTH - 1) + 1 && daq_at_full <= 3 * (DEPTH - 1) + 2,
          $sformatf("FIFO 0 full after %0d acquisition passes", daq_at_full));
    check(t_first_full > 3_800_000.0 && t_first_full < 4_000_000.0,
          $sformatf("FIFO 0 full at %0.0f ns", t_first_full));
    check(t_phase.size() == 2, $sformatf("two receive phases (%0d)", t_phase.size()));
    if (t_phase.size() == 2) check(t_phase[1] - t_phase[0] == 10_000_000.0, "receive phases 10 ms apart");
    check(acks == 2, $sformatf("one TX acknowledge per receive phase (%0d)", acks));
    $display("first full at %0.0f ns after %0d passes; words %0d %0d %0d",
             t_first_full, daq_at_full, words[0], words[1], words[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20_000_000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
