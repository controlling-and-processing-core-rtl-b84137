// adc_demux: routes each converted ADC word to the FIFO of its analog channel. When the ADC
// flags a finished conversion (data_valid, the ADC's data-ready/end-of-conversion strobe) it
// compares the reported channel number with CH_ID of each FIFO, puts the 12-bit sample on that
// FIFO's din and raises its wr_en for one clock. The sample is the 12 most significant bits of
// the ADC's 16-bit status-register word (bits 15..4); bits 3..0 are extra resolution that the
// memory bank does not store. A conversion of a channel that no FIFO serves is dropped.
//
// The inputs are registered once in the ADC clock domain (this design's choice), so din and
// wr_en appear one clock after data_valid. The channel numbers in CH_ID are an assumption: the
// reference does not list the sequencer's channel codes.
module adc_demux
  import telem_pkg::*;
#(
  parameter int unsigned NCH = NUM_CH,
  parameter logic [NCH*ADC_CHAN_W-1:0] CH_ID = {4'd2, 4'd1, 4'd0}   // channel of FIFO k at [4k+3:4k]
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [ADC_WORD_W-1:0] adc_dout,
  input  logic                  data_valid,
  input  logic [ADC_CHAN_W-1:0] channel_out,
  output logic [SAMPLE_W-1:0]   din   [NCH],
  output logic [NCH-1:0]        wr_en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en <= '0;
      for (int k = 0; k < NCH; k++) din[k] <= '0;
    end else begin
      for (int k = 0; k < NCH; k++) begin
        wr_en[k] <= data_valid && (channel_out == CH_ID[k*ADC_CHAN_W +: ADC_CHAN_W]);
        if (data_valid && (channel_out == CH_ID[k*ADC_CHAN_W +: ADC_CHAN_W]))
          din[k] <= adc_dout[ADC_WORD_W-1 -: SAMPLE_W];
      end
    end
  end

  a_one_hot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(wr_en));

endmodule
