// tb_ctrl_fsm: function state machine driven by a free-running clock that the testbench stops
// the way the clock gate would: a pass is clocked until an edge at which sleep_req is high, and
// then no more edges are given until the next pass. The state after every edge of a pass is
// recorded and compared with the sequence of the reference state diagram and flowchart:
//   after reset           Sleep                     (Initialization left at once)
//   acquisition pass      Data Acq., Main, Sleep, Sleep   adc_en high in Data Acq.
//   with a FIFO full      the same, rd_en = the full FIFOs and send_packet after Main
//   send request          rd_en = the non-empty FIFOs, send_packet
//   first receive pass    RX, Main, Sleep, Sleep      tx_ack pulse, radio on
//   later receive pass    RX, Sleep, Sleep            radio stays on
//   after the phase       Sleep, Sleep                radio off
//   nothing to do         Sleep, Sleep
`timescale 1ns/1ps
module tb_ctrl_fsm;
  import telem_pkg::*;
  logic gclk = 1'b0, rst_n = 1'b1;
  logic tx_enable = 1'b0, rx_phase = 1'b0, send_req = 1'b0;
  logic [2:0] fifo_full = '0, fifo_empty = '1;
  ctrl_state_t state;
  logic adc_en, send_packet, tx_ack, rx_radio, sleep_req, wake_req;
  logic [2:0] rd_en;

  ctrl_fsm dut (.gclk, .rst_n, .tx_enable, .rx_phase, .send_req, .fifo_full, .fifo_empty,
                .state, .adc_en, .rd_en, .send_packet, .tx_ack, .rx_radio, .sleep_req, .wake_req);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  ctrl_state_t seen [$];
  int adc_seen, ack_seen, send_seen;
  logic [2:0] rd_seen;

  // clock one pass; stop after the edge that sees sleep_req
  task automatic pass();
    bit stop;
    seen.delete();
    adc_seen = 0; ack_seen = 0; send_seen = 0; rd_seen = '0;
    stop = 0;
    for (int i = 0; i < 10 && !stop; i++) begin
      stop = sleep_req;
      #10 gclk = 1'b1;
      #1;
      seen.push_back(state);
      if (adc_en) begin
        adc_seen++;
        check(state == ST_DAQ, "adc_en only in Data Acq.");
      end
      if (tx_ack) ack_seen++;
      if (send_packet) send_seen++;
      rd_seen |= rd_en;
      #9 gclk = 1'b0;
    end
    check(stop, "pass ended with sleep_req");
  endtask

  task automatic expect_seq(input ctrl_state_t e [$], input string name);
    check(seen == e, $sformatf("%s: state sequence (%0d states)", name, seen.size()));
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #5;
    check(state == ST_INIT, "Initialization in reset");
    rst_n = 1'b1;
    pass();
    expect_seq('{ST_SLEEP, ST_SLEEP}, "initialization");

    // plain acquisition pass
    tx_enable = 1'b1; fifo_empty = 3'b000;
    #1 check(wake_req, "wake requested when acquisition is allowed");
    pass();
    expect_seq('{ST_DAQ, ST_MAIN, ST_SLEEP, ST_SLEEP}, "acquisition");
    check(adc_seen == 1 && send_seen == 0 && rd_seen == '0, "acquisition: one ADC enable, no read");

    // FIFO 1 full
    fifo_full = 3'b010;
    pass();
    expect_seq('{ST_DAQ, ST_MAIN, ST_SLEEP, ST_SLEEP}, "full");
    check(rd_seen == 3'b010 && send_seen == 1, "full: read FIFO 1 with send_packet");
    fifo_full = 3'b000;

    // send request with FIFO 0 empty
    send_req = 1'b1; fifo_empty = 3'b001;
    pass();
    check(rd_seen == 3'b110 && send_seen == 1, "send request: read non-empty FIFOs");
    // send request with all empty: nothing to send
    fifo_empty = 3'b111;
    pass();
    check(rd_seen == 3'b000 && send_seen == 0, "send request with empty memories: no send");
    send_req = 1'b0; fifo_empty = 3'b000;

    // receive phase
    rx_phase = 1'b1;
    pass();
    expect_seq('{ST_RX, ST_MAIN, ST_SLEEP, ST_SLEEP}, "first receive");
    check(ack_seen == 1 && rx_radio && adc_seen == 0, "first receive: ack, radio on, no acquisition");
    pass();
    expect_seq('{ST_RX, ST_SLEEP, ST_SLEEP}, "later receive");
    check(ack_seen == 0 && rx_radio, "later receive: no ack, radio still on");
    rx_phase = 1'b0; tx_enable = 1'b0;
    #1 check(wake_req, "wake requested to switch the radio off");
    pass();
    expect_seq('{ST_SLEEP, ST_SLEEP}, "radio off");
    check(!rx_radio, "radio off after the phase");
    check(!wake_req, "no wake request with nothing to do");

    // next phase is acknowledged again
    rx_phase = 1'b1;
    pass();
    expect_seq('{ST_RX, ST_MAIN, ST_SLEEP, ST_SLEEP}, "second phase first receive");
    check(ack_seen == 1, "second phase acknowledged");
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
