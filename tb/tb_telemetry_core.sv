// tb_telemetry_core: end-to-end test of the telemetry core with an ADC model, at reduced
// timer and FIFO sizes (8-word FIFOs, a receive phase of 4 low-clock cycles every 40, duty
// cycle 30 on / 50 off) and the real clock ratios (100 MHz reference, 20 MHz, 2 MHz, 200 kHz).
// It runs continuous mode (FIFO-full readouts, a base-station send request, receive phases),
// then duty-cycle mode, then sleep mode, and back to continuous.
// Checked independently of the design:
//   - clock periods: ADC clock 50 ns, low clock 5 us, high clock 500 ns while enabled;
//   - every controller state transition is one of the reference state diagram's;
//   - a data-acquisition pass is Data Acq. -> Main -> Sleep and uses 4 high-clock pulses;
//     in continuous mode outside receive phases a pass starts every 5 us;
//   - each FIFO streams out exactly the samples the ADC produced for its channel, in order;
//   - readout only when a FIFO is full or on a send request, always with send_packet;
//   - one TX acknowledge per receive phase with the radio switched on; radio off after it;
//   - no acquisition in the duty-cycle off time or in sleep mode; an on window holds
//     DC_ON low-clock cycles.
// Each mechanism must be seen at least once.
`timescale 1ns/1ps
module tb_telemetry_core;
  import telem_pkg::*;

  localparam int unsigned DEPTH  = 8;
  localparam int unsigned RXP    = 40;
  localparam int unsigned RXW    = 4;
  localparam int unsigned DCON   = 30;
  localparam int unsigned DCOFF  = 50;

  logic clk_ref = 1'b0;
  logic rst_n   = 1'b1;   // falls at 1 ns so the asynchronous resets see an edge
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

  always #5 clk_ref = ~clk_ref;   // 100 MHz

  telemetry_core #(
    .FIFO_DEPTH(DEPTH), .RX_PERIOD(RXP), .RX_WINDOW(RXW), .DC_ON(DCON), .DC_OFF(DCOFF)
  ) dut (
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

  bit run = 0;    // set once reset has been released
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_daq = 0, n_rx_first = 0, n_rx_other = 0, n_read_full = 0, n_read_req = 0;
  int n_gate_off = 0, n_duty_off = 0, n_sleep_rx = 0, n_words = 0, n_radio_off = 0;
  int n_cont = 0, n_duty = 0, n_sleepm = 0;

  // ---------------- clock periods ----------------
  realtime t_lo = 0, t_dclk = 0, t_g = 0;
  int lo_edges = 0, dclk_edges = 0;
  always @(posedge clk_lo) begin
    if (run && lo_edges > 0) check(($realtime - t_lo) == 5000.0, "low clock period 5 us");
    t_lo = $realtime; lo_edges++;
  end
  always @(posedge adc_dclk) begin
    if (run && dclk_edges > 0 && dclk_edges < 200) check(($realtime - t_dclk) == 50.0, "ADC clock period 50 ns");
    t_dclk = $realtime; dclk_edges++;
  end

  // ---------------- state transitions and passes ----------------
  ctrl_state_t prev = ST_INIT;
  int pulses_in_pass = 0;
  bit in_daq_pass = 0;
  realtime t_last_daq = 0;
  bit last_daq_valid = 0;
  always @(negedge gclk) begin
    if (run) begin
      if (pulses_in_pass > 0)
        check(($realtime - t_g) == 500.0, "high clock period 500 ns inside a pass");
      t_g = $realtime;
      pulses_in_pass++;
      unique case (prev)
        ST_INIT:  check(state == ST_SLEEP, "Init -> Sleep");
        ST_SLEEP: check(state inside {ST_SLEEP, ST_DAQ, ST_RX}, "Sleep -> Sleep/DAQ/RX");
        ST_DAQ:   check(state == ST_MAIN, "Data Acq. -> Main");
        ST_RX:    check(state inside {ST_MAIN, ST_SLEEP}, "RX -> Main/Sleep");
        ST_MAIN:  check(state == ST_SLEEP, "Main -> Sleep");
        default:  check(1'b0, "illegal state");
      endcase
      if (state == ST_DAQ) begin
        n_daq++;
        in_daq_pass = 1;
        pulses_in_pass = 1;
        check(mode == MODE_CONT || (mode == MODE_DUTY && duty_on), "acquisition only when allowed");
        check(!dut.u_rx.rx_phase, "no acquisition in a receive phase");
        if (mode == MODE_CONT && last_daq_valid && !dut.u_rx.rx_phase && prev_lo_was_daq)
          check(($realtime - t_last_daq) == 5000.0, "one acquisition pass every 5 us");
        t_last_daq = $realtime; last_daq_valid = 1;
      end
      if (prev == ST_RX && state == ST_MAIN) n_rx_first++;
      if (prev == ST_RX && state == ST_SLEEP) n_rx_other++;
      if (state == ST_RX && mode == MODE_SLEEP) n_sleep_rx++;
      prev = state;
      // clock gating: the pulse during which clock_enable falls is the last of a pass
      if (!clk_enable) begin
        n_gate_off++;
        if (in_daq_pass) check(pulses_in_pass == 4, $sformatf("acquisition pass uses 4 high-clock pulses (%0d)", pulses_in_pass));
        in_daq_pass = 0;
        pulses_in_pass = 0;
      end
    end
  end

  // was the previous low-clock period also an acquisition period (for the rate check)
  bit prev_lo_was_daq = 0, cur_lo_daq = 0;
  always @(posedge clk_lo) begin
    prev_lo_was_daq = cur_lo_daq;
    cur_lo_daq = 0;
  end
  always @(negedge gclk) if (state == ST_DAQ) cur_lo_daq = 1;

  // ---------------- scoreboard of samples ----------------
  logic [11:0] exp_q [NUM_CH][$];
  always @(posedge adc_dclk) begin
    if (run && adc_drdy) exp_q[adc_channel].push_back(adc_do[15:4]);
    for (int k = 0; k < NUM_CH; k++) begin
      if (run && fifo_valid[k]) begin
        n_words++;
        if (exp_q[k].size() == 0) check(1'b0, "FIFO output with no sample pending");
        else begin
          logic [11:0] e;
          e = exp_q[k].pop_front();
          check(fifo_dout[k] == e, $sformatf("FIFO %0d word %h expected %h", k, fifo_dout[k], e));
        end
      end
    end
  end

  // ---------------- readout decisions ----------------
  logic [NUM_CH-1:0] full_at_send;
  always @(posedge gclk) begin
    full_at_send <= fifo_full;    // sampled with the FSM's own view
  end
  always @(negedge gclk) begin
    if (run && send_packet) begin
      if (full_at_send != '0) begin
        n_read_full++;
        check(dut.u_fsm.rd_en == full_at_send, "read enables the full FIFOs");
      end else begin
        n_read_req++;
        check(send_req, "read without full FIFO only on a send request");
        check(dut.u_fsm.rd_en != '0, "send request reads the non-empty FIFOs");
      end
    end
    if (run && dut.u_fsm.rd_en != '0) check(send_packet, "read enable comes with send_packet");
  end

  // ---------------- receive phases ----------------
  int acks_in_phase = 0;
  bit phase_prev = 0;
  always @(posedge clk_lo) begin
    if (run) begin
      if (phase_prev && !dut.u_rx.rx_phase) begin
        check(acks_in_phase == 1, $sformatf("one TX ack per receive phase (%0d)", acks_in_phase));
        acks_in_phase = 0;
      end
      phase_prev = dut.u_rx.rx_phase;
    end
  end
  always @(negedge gclk) if (run && tx_ack) begin
    acks_in_phase++;
    check(dut.u_rx.rx_phase, "TX ack inside a receive phase");
    check(rx_radio, "radio receiver on with the TX ack");
  end
  always @(negedge rx_radio) if (run) begin
    n_radio_off++;
    check(!dut.u_rx.rx_phase, "radio switched off only after the receive phase");
  end

  // ---------------- duty cycle ----------------
  int on_len = 0;
  always @(posedge clk_lo) begin
    if (run && mode == MODE_DUTY) begin
      if (duty_on) on_len++;
      else if (on_len != 0) begin
        n_duty_off++;
        check(on_len == DCON, $sformatf("duty-cycle on window %0d cycles", on_len));
        on_len = 0;
      end
    end else on_len = 0;
    if (run) begin
      if (mode == MODE_CONT) n_cont++;
      if (mode == MODE_DUTY) n_duty++;
      if (mode == MODE_SLEEP) n_sleepm++;
      check(adc_power == (mode == MODE_CONT || (mode == MODE_DUTY && duty_on)), "ADC power follows acquisition");
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    #1 rst_n = 1'b0;
    repeat (20) @(posedge clk_ref);
    rst_n = 1'b1;
    run = 1'b1;
    // continuous mode: several FIFO-full readouts and receive phases
    repeat (150) @(posedge clk_lo);
    // send request while the FIFOs are partly filled
    wait (fifo_full == '0 && dut.u_bank.empty != '1 && !dut.u_rx.rx_phase);
    @(posedge clk_lo);
    send_req = 1'b1;
    repeat (3) @(posedge clk_lo);
    send_req = 1'b0;
    repeat (60) @(posedge clk_lo);
    // duty-cycle mode: two on/off cycles
    mode_sel = 2'd1;
    repeat (2 * (DCON + DCOFF) + 10) @(posedge clk_lo);
    // sleep mode
    mode_sel = 2'd2;
    repeat (3 * RXP) @(posedge clk_lo);
    // back to continuous
    mode_sel = 2'd0;
    repeat (100) @(posedge clk_lo);

    check(n_daq > 100,      "acquisition passes happened");
    check(n_rx_first >= 3,  "first-receive passes (RX -> Main) happened");
    check(n_rx_other >= 3,  "later receive passes (RX -> Sleep) happened");
    check(n_read_full >= 3, "FIFO-full readouts happened");
    check(n_read_req >= 1,  "send-request readout happened");
    check(n_gate_off > 100, "high clock gated off");
    check(n_duty_off >= 2,  "duty-cycle off windows happened");
    check(n_sleep_rx >= 2,  "receive passes in sleep mode happened");
    check(n_radio_off >= 3, "radio switched off after receive phases");
    check(n_cont > 0 && n_duty > 0 && n_sleepm > 0, "all three modes visited");
    check(n_words > 10 * DEPTH, "FIFO words streamed out");
    $display("mechanisms: daq=%0d rx_first=%0d rx_other=%0d read_full=%0d read_req=%0d gate_off=%0d duty_off=%0d sleep_rx=%0d radio_off=%0d words=%0d",
             n_daq, n_rx_first, n_rx_other, n_read_full, n_read_req, n_gate_off, n_duty_off, n_sleep_rx, n_radio_off, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (10_000_000) @(posedge clk_ref);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
