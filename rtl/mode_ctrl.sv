// mode_ctrl: operation-mode state machine of the controller (continuous, duty cycle, sleep),
// clocked by the always-running low-frequency clock.
//   - Continuous: data are acquired on every low-clock cycle (tx_enable = 1).
//   - Duty cycle: acquisition runs for DC_ON cycles, then stops for DC_OFF cycles, counted by
//     two independent counters; duty_on shows the on window.
//   - Sleep: no acquisition; only the receive phases of rx_timer wake the controller.
// Any mode can be entered from any other. The requested mode arrives on mode_sel (two
// switches in the prototype, or a decoded base-station command) and is taken over on the next
// clk_lo edge; entering duty-cycle mode starts a fresh on window. adc_power is low whenever
// acquisition is off, so the ADC can be powered down during the duty-cycle off time and in
// sleep mode. mode_sel encoding: 0 continuous, 1 duty cycle, 2 or 3 sleep (own choice).
//
// Defaults follow the reference example of 1 minute on and 7 minutes off (12.5 % duty cycle)
// at 200 kHz.
module mode_ctrl
  import telem_pkg::*;
#(
  parameter int unsigned DC_ON  = 12_000_000,  // low-clock cycles of acquisition (1 min)
  parameter int unsigned DC_OFF = 84_000_000   // low-clock cycles without acquisition (7 min)
) (
  input  logic       clk_lo,
  input  logic       rst_n,
  input  logic [1:0] mode_sel,
  output op_mode_t   mode,
  output logic       duty_on,     // duty-cycle window open (1 outside duty-cycle mode)
  output logic       tx_enable,   // acquisition and transmit phase allowed
  output logic       adc_power    // ADC supply enable
);

  localparam int unsigned ONW  = (DC_ON  > 1) ? $clog2(DC_ON)  : 1;
  localparam int unsigned OFFW = (DC_OFF > 1) ? $clog2(DC_OFF) : 1;

  op_mode_t        req_mode;
  logic [ONW-1:0]  on_cnt;
  logic [OFFW-1:0] off_cnt;
  logic            in_on;

  always_comb begin
    unique case (mode_sel)
      2'd0:    req_mode = MODE_CONT;
      2'd1:    req_mode = MODE_DUTY;
      default: req_mode = MODE_SLEEP;
    endcase
  end

  always_ff @(posedge clk_lo or negedge rst_n) begin
    if (!rst_n) begin
      mode    <= MODE_CONT;
      in_on   <= 1'b1;
      on_cnt  <= '0;
      off_cnt <= '0;
    end else begin
      mode <= req_mode;
      if (req_mode != MODE_DUTY || mode != MODE_DUTY) begin
        // outside duty-cycle mode, or just entering it: start with a fresh on window
        in_on   <= 1'b1;
        on_cnt  <= '0;
        off_cnt <= '0;
      end else if (in_on) begin
        if (on_cnt == ONW'(DC_ON - 1)) begin
          in_on  <= 1'b0;
          on_cnt <= '0;
        end else begin
          on_cnt <= on_cnt + 1'b1;
        end
      end else begin
        if (off_cnt == OFFW'(DC_OFF - 1)) begin
          in_on   <= 1'b1;
          off_cnt <= '0;
        end else begin
          off_cnt <= off_cnt + 1'b1;
        end
      end
    end
  end

  assign duty_on   = (mode != MODE_DUTY) || in_on;
  assign tx_enable = (mode == MODE_CONT) || (mode == MODE_DUTY && in_on);
  assign adc_power = tx_enable;

endmodule
