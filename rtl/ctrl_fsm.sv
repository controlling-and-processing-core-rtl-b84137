// ctrl_fsm: function state machine of the controller (Initialization, Data Acquisition,
// Receiving, Main, Sleep). It runs on the gated high-frequency clock: every pass starts when the
// low-clock domain has woken the clock and ends in Sleep, after which the clock is stopped
// again until the next low-clock edge that brings work.
//
// One pass, in gated-clock cycles:
//   Sleep (woken) -> Data Acq.  when acquisition is allowed (tx_enable) and no receive phase
//                                is open; adc_en (the ADC convert-start) is high in Data Acq.
//   Data Acq.     -> Main       Main decides on transmission (below)
//   Sleep (woken) -> RX         when a receive phase is open
//   RX            -> Main       on the first receive pass of the phase, else -> Sleep
//   Main          -> Sleep      after its flowchart:
//       receive phase open: send the TX acknowledge pulse, switch the radio receiver on;
//       else, if (send request and some FIFO not empty) or some FIFO full: pulse the read
//       enable of the FIFOs concerned (the full ones; on a send request all non-empty ones)
//       together with send_packet.
//   Sleep (pass done) -> Sleep with sleep_req high: the clock enable is cleared on this edge.
// A flag remembers that the current receive phase has been acknowledged; it is cleared by the
// first wake after the phase has closed. rd_en, send_packet and tx_ack are one gated-clock
// cycle long. rx_radio stays on while the
// receive phase lasts; the first wake after the phase has closed switches it off (wake_req
// asks for that wake). Initialization is left on the first clock after reset.
//
// The five states, the conditions that guard them (receive phase, transmit phase, first
// receiving) and the Main flowchart follow the reference design, as does Data Acq. -> Main.
// Initialization is entered only at reset: the reference state diagram links Main and
// Initialization without a printed condition, and no such step is built here. The pass-done
// and acknowledged flags, the output pulse lengths and the radio
// switch-off wake are this design's choices. All inputs must be stable around gated-clock edges
// (they come from the low-clock and ADC-clock domains, whose edges are placed away from the
// high clock's by clk_manager).
module ctrl_fsm
  import telem_pkg::*;
#(
  parameter int unsigned NCH = NUM_CH
) (
  input  logic            gclk,        // gated high-frequency clock
  input  logic            rst_n,
  // from the low-clock domain
  input  logic            tx_enable,   // acquisition allowed (mode_ctrl)
  input  logic            rx_phase,    // receive phase open (rx_timer)
  // from the base station and the memory bank
  input  logic            send_req,
  input  logic [NCH-1:0]  fifo_full,
  input  logic [NCH-1:0]  fifo_empty,
  // outputs
  output ctrl_state_t     state,
  output logic            adc_en,      // ADC convert start
  output logic [NCH-1:0]  rd_en,       // read request per FIFO
  output logic            send_packet,
  output logic            tx_ack,
  output logic            rx_radio,
  output logic            sleep_req,   // to clk_enable_gen: stop the high clock
  output logic            wake_req     // to clk_enable_gen: work for the next pass
);

  ctrl_state_t    nxt;
  logic           pass_done;
  logic           rx_acked;    // this receive phase has been acknowledged
  logic           do_read;
  logic [NCH-1:0] read_sel;

  // Main-state transmit decision (flowchart of the Main state).
  always_comb begin
    if (send_req && (fifo_empty != '1)) read_sel = ~fifo_empty;
    else                                read_sel = fifo_full;
    do_read = (read_sel != '0);
  end

  always_comb begin
    nxt = state;
    unique case (state)
      ST_INIT:  nxt = ST_SLEEP;
      ST_SLEEP: begin
        if (!pass_done) begin
          if (rx_phase)       nxt = ST_RX;
          else if (tx_enable) nxt = ST_DAQ;
        end
      end
      ST_DAQ:   nxt = ST_MAIN;
      ST_RX:    nxt = rx_acked ? ST_SLEEP : ST_MAIN;
      ST_MAIN:  nxt = ST_SLEEP;
      default:  nxt = ST_INIT;
    endcase
  end

  assign sleep_req = (state == ST_SLEEP) && pass_done;
  assign wake_req  = rx_phase || tx_enable || (rx_radio && !rx_phase);

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_INIT;
      pass_done   <= 1'b0;
      adc_en      <= 1'b0;
      rd_en       <= '0;
      send_packet <= 1'b0;
      tx_ack      <= 1'b0;
      rx_radio    <= 1'b0;
      rx_acked    <= 1'b0;
    end else begin
      state       <= nxt;
      adc_en      <= (nxt == ST_DAQ);
      rd_en       <= '0;
      send_packet <= 1'b0;
      tx_ack      <= 1'b0;
      unique case (state)
        ST_INIT: pass_done <= 1'b1;
        ST_SLEEP: begin
          if (pass_done) begin
            pass_done <= 1'b0;           // clock stops after this edge
          end else begin
            if (!rx_phase) begin                             // receive phase is over
              rx_radio <= 1'b0;
              rx_acked <= 1'b0;
            end
            if (nxt == ST_SLEEP) pass_done <= 1'b1;         // woken, nothing to do
          end
        end
        ST_RX: if (nxt == ST_SLEEP) pass_done <= 1'b1;
        ST_MAIN: begin
          pass_done <= 1'b1;
          if (rx_phase) begin
            tx_ack   <= 1'b1;
            rx_radio <= 1'b1;
            rx_acked <= 1'b1;
          end else if (do_read) begin
            rd_en       <= read_sel;
            send_packet <= 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  // A read is only ever requested together with send_packet.
  a_read_with_send: assert property (@(posedge gclk) disable iff (!rst_n)
                                     (rd_en != '0) |-> send_packet);
  // The clock is only released in Sleep.
  a_sleep_only: assert property (@(posedge gclk) disable iff (!rst_n)
                                 sleep_req |-> (state == ST_SLEEP));

endmodule
