// clk_enable_gen: makes the clock_enable signal that gates the high-frequency controller clock.
// As in the reference clock-gating circuit, it is built from two flip-flops, one clocked by the
// high-frequency clock and one by the low-frequency clock, whose outputs are combined into
// clock_enable:
//   - when the controller has finished its transmit or receive work it raises sleep_req; the
//     high-clock flip-flop then clears clock_enable on the next rising edge of clk_hi;
//   - while clock_enable is clear, a wake_req seen on a rising edge of clk_lo sets it again.
// Each flip-flop toggles to record its event and clock_enable is their equality
// (this design's own realisation of the two-flip-flop scheme), so each edge has a single
// owner and no flip-flop is ever reset from the other clock domain. After reset both are 0 and
// clock_enable is 1, so the controller runs its initialization state. sleep_state is the
// inverse of clock_enable: the high clock is stopped.
//
// The clocks must come from one source with clk_lo's rising edges away from clk_hi's (see
// clk_manager), so each flip-flop samples the other's output when it is stable.
module clk_enable_gen (
  input  logic clk_hi,
  input  logic clk_lo,
  input  logic rst_n,
  input  logic sleep_req,    // controller has finished, stop the high clock
  input  logic wake_req,     // low-clock domain has work, restart the high clock
  output logic clk_enable,
  output logic sleep_state
);

  logic hi_tgl;   // toggles on each sleep event (high-clock domain)
  logic lo_tgl;   // toggles on each wake event  (low-clock domain)

  always_ff @(posedge clk_hi or negedge rst_n) begin
    if (!rst_n)                       hi_tgl <= 1'b0;
    else if (sleep_req && clk_enable) hi_tgl <= ~hi_tgl;
  end

  always_ff @(posedge clk_lo or negedge rst_n) begin
    if (!rst_n)                       lo_tgl <= 1'b0;
    else if (wake_req && !clk_enable) lo_tgl <= ~lo_tgl;
  end

  assign clk_enable  = ~(hi_tgl ^ lo_tgl);
  assign sleep_state = ~clk_enable;

endmodule
