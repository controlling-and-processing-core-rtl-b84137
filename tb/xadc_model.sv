// xadc_model: behavioural model of the on-chip ADC used by the core, in event-driven mode with
// its channel sequencer (testbench only, not synthesizable intent). Each rising edge of convst,
// seen on dclk, starts one conversion of the next channel of the sequence 0, 1, 2, 0, ...;
// CONV_CYCLES dclk cycles later (26 ADC-clock cycles of 3 dclk each by default, which fits in
// one 5 us sampling period at 20 MHz) it presents the result on dout with the channel number
// and pulses drdy for one dclk cycle. A start that arrives while busy is ignored.
// The result is a pattern the testbench can recognise: 12-bit sample = {channel[1:0],
// running conversion count of that channel[9:0]}, placed in bits 15..4; bits 3..0 carry the
// channel again as filler.
// With SINE_HZ above 0, channel 0 instead converts a full-scale unipolar sine of that frequency
// (code 2047.5 + 2047.5 sin(2 pi f t), t = time of the convert-start edge), as in a bench test
// with a signal generator on the first input; the other channels convert mid-scale (2048).
module xadc_model #(
  parameter int unsigned CONV_CYCLES = 78,
  parameter int unsigned NCH         = 3,
  parameter real         SINE_HZ     = 0.0
) (
  input  logic        dclk,
  input  logic        rst_n,
  input  logic        convst,
  output logic        drdy,
  output logic [3:0]  channel,
  output logic [15:0] dout,
  output logic        busy
);

  logic        convst_q;
  int unsigned timer;
  int unsigned seq;
  int unsigned conv_count [NCH];
  logic [11:0] held;       // sample taken at the convert-start edge

  function automatic logic [11:0] sine_code(input realtime t_ns);
    real v;
    v = 2047.5 + 2047.5 * $sin(2.0 * 3.14159265358979 * SINE_HZ * t_ns * 1.0e-9);
    return 12'($rtoi(v + 0.5) > 4095 ? 4095 : $rtoi(v + 0.5));
  endfunction

  always_ff @(posedge dclk or negedge rst_n) begin
    if (!rst_n) begin
      convst_q <= 1'b0;
      timer    <= 0;
      seq      <= 0;
      busy     <= 1'b0;
      drdy     <= 1'b0;
      channel  <= '0;
      dout     <= '0;
      held     <= '0;
      for (int k = 0; k < NCH; k++) conv_count[k] <= 0;
    end else begin
      convst_q <= convst;
      drdy     <= 1'b0;
      if (busy) begin
        if (timer == CONV_CYCLES - 1) begin
          busy    <= 1'b0;
          drdy    <= 1'b1;
          channel <= 4'(seq);
          if (SINE_HZ > 0.0) dout <= {(seq == 0) ? held : 12'd2048, 4'h0};
          else               dout <= {2'(seq), 10'(conv_count[seq]), 4'(seq)};
          conv_count[seq] <= conv_count[seq] + 1;
          seq     <= (seq == NCH - 1) ? 0 : seq + 1;
        end else begin
          timer <= timer + 1;
        end
      end else if (convst && !convst_q) begin
        busy  <= 1'b1;
        held  <= sine_code($realtime);
        timer <= 0;
      end
    end
  end

endmodule
