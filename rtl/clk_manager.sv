// clk_manager: time-management module of the core. From one reference clock it derives
//   clk_adc - the ADC sample/interface clock, also used by the FIFO memory bank (20 MHz),
//   clk_hi  - the high-frequency controller clock for main processing, transmit and
//             receive (2 MHz),
//   clk_lo  - the low-frequency controller clock for data acquisition, equal to the ADC
//             sampling rate (200 kHz).
// A 100 MHz reference is divided by ADC_DIV for clk_adc and by MID_DIV for an internal 10 MHz
// tick; the 10 MHz tick is divided by HI_DIV and LO_DIV by two counters, as in the reference
// prototype, where a frequency synthesizer made 20 MHz and 10 MHz and two counters divided the
// 10 MHz clock down. Here the synthesizer itself is replaced by integer division, since every
// ratio is an integer. All outputs are flip-flop outputs in the reference domain, so they are
// glitch free and mutually synchronous.
//
// Phasing (this design's choice): clk_adc rises one reference cycle after a 10 MHz tick, so
// its rising edges never coincide with those of clk_hi or clk_lo; clk_lo rises LO_PHASE ticks
// after clk_hi, i.e. while clk_hi is high, so the low-clock wake-up edge never coincides with
// a high-clock edge either. LO_DIV must be a multiple of HI_DIV and LO_PHASE not a multiple of
// HI_DIV for that to hold.
module clk_manager #(
  parameter int unsigned ADC_DIV  = 5,    // 100 MHz / 5  = 20 MHz
  parameter int unsigned MID_DIV  = 10,   // 100 MHz / 10 = 10 MHz
  parameter int unsigned HI_DIV   = 5,    // 10 MHz / 5   = 2 MHz
  parameter int unsigned LO_DIV   = 50,   // 10 MHz / 50  = 200 kHz
  parameter int unsigned LO_PHASE = 2     // clk_lo rising edge, in 10 MHz ticks after clk_hi's
) (
  input  logic clk_ref,
  input  logic rst_n,
  output logic clk_adc,
  output logic clk_hi,
  output logic clk_lo
);

  localparam int unsigned AW = (ADC_DIV > 1) ? $clog2(ADC_DIV) : 1;
  localparam int unsigned MW = (MID_DIV > 1) ? $clog2(MID_DIV) : 1;
  localparam int unsigned HW = (HI_DIV  > 1) ? $clog2(HI_DIV)  : 1;
  localparam int unsigned LW = (LO_DIV  > 1) ? $clog2(LO_DIV)  : 1;

  logic [AW-1:0] adc_cnt, adc_nxt;
  logic [MW-1:0] mid_cnt, mid_nxt;
  logic [HW-1:0] hi_cnt,  hi_nxt;
  logic [LW-1:0] lo_cnt,  lo_nxt;
  logic          tick;    // one reference cycle per 10 MHz period

  always_comb begin
    adc_nxt = (adc_cnt == AW'(ADC_DIV - 1)) ? '0 : adc_cnt + 1'b1;
    mid_nxt = (mid_cnt == MW'(MID_DIV - 1)) ? '0 : mid_cnt + 1'b1;
    tick    = (mid_nxt == '0);
    hi_nxt  = hi_cnt;
    lo_nxt  = lo_cnt;
    if (tick) begin
      hi_nxt = (hi_cnt == HW'(HI_DIV - 1)) ? '0 : hi_cnt + 1'b1;
      lo_nxt = (lo_cnt == LW'(LO_DIV - 1)) ? '0 : lo_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      adc_cnt <= '0;
      mid_cnt <= '0;
      hi_cnt  <= HW'(HI_DIV - 1);
      lo_cnt  <= LW'(LO_DIV - 1);
      clk_adc <= 1'b0;
      clk_hi  <= 1'b0;
      clk_lo  <= 1'b0;
    end else begin
      adc_cnt <= adc_nxt;
      mid_cnt <= mid_nxt;
      hi_cnt  <= hi_nxt;
      lo_cnt  <= lo_nxt;
      // clk_adc high for the counts 1 .. ADC_DIV/2 : rises when the counter reaches 1.
      clk_adc <= (adc_nxt >= AW'(1)) && (adc_nxt <= AW'(ADC_DIV / 2));
      // clk_hi high for the first half (rounded up) of its period: rises at count 0.
      clk_hi  <= (hi_nxt < HW'((HI_DIV + 1) / 2));
      // clk_lo high for half its period starting at LO_PHASE.
      clk_lo  <= (lo_nxt >= LW'(LO_PHASE)) && (lo_nxt < LW'(LO_PHASE + LO_DIV / 2));
    end
  end

endmodule
