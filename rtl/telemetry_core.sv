// telemetry_core: digital controlling and processing core of a wireless implantable telemetry
// system. It samples three analog channels (blood pressure, blood volume and the base-station
// command channel) through an external ADC, buffers the samples in one FIFO per channel,
// decides when the buffered data are read out and handed to the radio, opens periodic receive
// windows for base-station commands, and keeps power low by gating its own processing clock.
//
// Structure (all blocks follow the reference architecture of clock manager, controller unit
// and memory bank):
//   clk_manager    100 MHz reference -> 20 MHz ADC/FIFO clock, 2 MHz high clock, 200 kHz low clock
//   mode_ctrl      continuous / duty-cycle / sleep mode and the duty-cycle counters (low clock)
//   rx_timer       receive-phase interval counter (low clock)
//   clk_enable_gen clock_enable: cleared by the high clock on sleep, set by the low clock on wake
//   clock_gate     gated high clock for the function state machine
//   ctrl_fsm       Initialization / Data Acq. / RX / Main / Sleep state machine (gated clock)
//   fifo_bank      channel demultiplexer and three FIFOs (ADC clock)
// Each low-clock period (5 us, the ADC sampling period) that has work wakes the high clock;
// the controller runs a short pass (Data Acq. -> Main -> Sleep, or RX -> Main -> Sleep, or
// RX -> Sleep) and stops the high clock again. In Data Acq. it raises adc_convst, the ADC's
// event-mode convert start; the ADC's sequencer returns one conversion per start, channel by
// channel, which fifo_bank files by channel number. When a FIFO is full, or the base station
// has asked with send_req, Main pulses the FIFOs' read requests with send_packet, and the bank
// streams the FIFO contents out on fifo_dout/fifo_valid towards the radio link.
//
// The ADC, the serial link to the RF front end and the decoding of base-station commands lie
// outside this module: their signals are ports. mode_sel carries the requested operation mode
// (0 continuous, 1 duty cycle, 2/3 sleep). All resets are asynchronous, active low.
// The only latch in the design is the enable latch of clock_gate, which is intended.
module telemetry_core
  import telem_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 256,          // words of 12 bits per channel FIFO
  parameter int unsigned RX_PERIOD  = 2000,         // low-clock cycles between receive phases (10 ms)
  parameter int unsigned RX_WINDOW  = 20,           // low-clock cycles per receive phase
  parameter int unsigned DC_ON      = 12_000_000,   // duty-cycle on time, low-clock cycles (1 min)
  parameter int unsigned DC_OFF     = 84_000_000,   // duty-cycle off time, low-clock cycles (7 min)
  parameter int unsigned ADC_DIV    = 5,            // reference / ADC clock
  parameter int unsigned MID_DIV    = 10,           // reference / 10 MHz tick
  parameter int unsigned HI_DIV     = 5,            // 10 MHz / high clock
  parameter int unsigned LO_DIV     = 50            // 10 MHz / low clock
) (
  input  logic                  clk_ref,       // 100 MHz reference oscillator
  input  logic                  rst_n,
  input  logic [1:0]            mode_sel,      // operation mode request
  input  logic                  send_req,      // base-station send request
  // ADC
  output logic                  adc_dclk,      // ADC interface clock (20 MHz)
  output logic                  adc_convst,    // convert start (ADC enable)
  output logic                  adc_power,     // ADC power enable
  input  logic [ADC_WORD_W-1:0] adc_do,        // conversion result, 12-bit sample in [15:4]
  input  logic                  adc_drdy,      // conversion result valid (one adc_dclk cycle)
  input  logic [ADC_CHAN_W-1:0] adc_channel,   // channel of the result
  // radio / transmit path
  output logic                  send_packet,
  output logic                  tx_ack,
  output logic                  rx_radio,
  output logic [SAMPLE_W-1:0]   fifo_dout  [NUM_CH],
  output logic [NUM_CH-1:0]     fifo_valid,
  // status
  output logic [NUM_CH-1:0]     fifo_full,
  output ctrl_state_t           state,
  output op_mode_t              mode,
  output logic                  duty_on,
  output logic                  clk_enable,
  output logic                  sleep_state,   // high clock stopped
  output logic [NUM_CH-1:0]     fifo_reading,  // FIFO readout in progress
  output logic                  clk_lo,        // 200 kHz low-frequency clock
  output logic                  clk_hi_gated   // gated 2 MHz high-frequency clock
);

  logic              clk_hi;
  logic              tx_enable, rx_phase;
  logic              sleep_req, wake_req;
  logic [NUM_CH-1:0] fifo_empty, fifo_rd_req;

  clk_manager #(
    .ADC_DIV(ADC_DIV), .MID_DIV(MID_DIV), .HI_DIV(HI_DIV), .LO_DIV(LO_DIV)
  ) u_clk (
    .clk_ref(clk_ref), .rst_n(rst_n),
    .clk_adc(adc_dclk), .clk_hi(clk_hi), .clk_lo(clk_lo)
  );

  mode_ctrl #(.DC_ON(DC_ON), .DC_OFF(DC_OFF)) u_mode (
    .clk_lo(clk_lo), .rst_n(rst_n), .mode_sel(mode_sel),
    .mode(mode), .duty_on(duty_on), .tx_enable(tx_enable), .adc_power(adc_power)
  );

  rx_timer #(.RX_PERIOD(RX_PERIOD), .RX_WINDOW(RX_WINDOW)) u_rx (
    .clk_lo(clk_lo), .rst_n(rst_n), .rx_phase(rx_phase)
  );

  clk_enable_gen u_cen (
    .clk_hi(clk_hi), .clk_lo(clk_lo), .rst_n(rst_n),
    .sleep_req(sleep_req), .wake_req(wake_req),
    .clk_enable(clk_enable), .sleep_state(sleep_state)
  );

  clock_gate u_cg (.clk(clk_hi), .en(clk_enable), .gclk(clk_hi_gated));

  ctrl_fsm #(.NCH(NUM_CH)) u_fsm (
    .gclk(clk_hi_gated), .rst_n(rst_n),
    .tx_enable(tx_enable), .rx_phase(rx_phase),
    .send_req(send_req), .fifo_full(fifo_full), .fifo_empty(fifo_empty),
    .state(state), .adc_en(adc_convst), .rd_en(fifo_rd_req),
    .send_packet(send_packet), .tx_ack(tx_ack), .rx_radio(rx_radio),
    .sleep_req(sleep_req), .wake_req(wake_req)
  );

  fifo_bank #(.NCH(NUM_CH), .DEPTH(FIFO_DEPTH)) u_bank (
    .clk(adc_dclk), .rst_n(rst_n),
    .adc_dout(adc_do), .adc_drdy(adc_drdy), .adc_channel(adc_channel),
    .rd_req(fifo_rd_req), .full(fifo_full), .empty(fifo_empty), .reading(fifo_reading),
    .dout(fifo_dout), .valid(fifo_valid)
  );

  // The high clock is never stopped in the middle of a pass.
  a_stop_in_sleep: assert property (@(posedge clk_hi) disable iff (!rst_n)
                                    (clk_enable && sleep_req) |-> (state == ST_SLEEP));

endmodule
