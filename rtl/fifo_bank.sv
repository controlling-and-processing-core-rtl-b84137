// fifo_bank: memory bank of the core. Converted ADC samples are demultiplexed by channel
// (adc_demux) into one sync_fifo per analog channel, all clocked by the ADC clock. The
// controller reads the bank out through rd_req, one request line per FIFO: a rising edge on
// rd_req[k] starts a readout of FIFO k that reads one word per clock until the FIFO is empty,
// with standard-read timing (dout[k] and valid[k] one clock after each read). The words go to
// the transmit path (dout/valid), and full/empty report each FIFO's state to the controller.
// Samples that arrive during a readout are written as usual and read out by it as well.
//
// rd_req comes from the gated high-frequency clock domain, whose edges clk_manager keeps away
// from the ADC clock's; it is sampled once and edge-detected here. Reading a whole FIFO per
// request is this design's reading of "the data are read from the FIFOs when they are full or
// when requested"; the reference gives no burst length.
module fifo_bank
  import telem_pkg::*;
#(
  parameter int unsigned NCH   = NUM_CH,
  parameter int unsigned DEPTH = 256,
  parameter logic [NCH*ADC_CHAN_W-1:0] CH_ID = {4'd2, 4'd1, 4'd0}
) (
  input  logic                  clk,          // ADC / memory clock
  input  logic                  rst_n,
  // ADC side
  input  logic [ADC_WORD_W-1:0] adc_dout,
  input  logic                  adc_drdy,
  input  logic [ADC_CHAN_W-1:0] adc_channel,
  // controller side
  input  logic [NCH-1:0]        rd_req,
  output logic [NCH-1:0]        full,
  output logic [NCH-1:0]        empty,
  output logic [NCH-1:0]        reading,      // readout in progress
  // transmit side
  output logic [SAMPLE_W-1:0]   dout  [NCH],
  output logic [NCH-1:0]        valid
);

  logic [SAMPLE_W-1:0] din [NCH];
  logic [NCH-1:0]      wr_en;
  logic [NCH-1:0]      rd_en;
  logic [NCH-1:0]      rd_req_q;

  adc_demux #(.NCH(NCH), .CH_ID(CH_ID)) u_demux (
    .clk        (clk),
    .rst_n      (rst_n),
    .adc_dout   (adc_dout),
    .data_valid (adc_drdy),
    .channel_out(adc_channel),
    .din        (din),
    .wr_en      (wr_en)
  );

  for (genvar k = 0; k < NCH; k++) begin : g_fifo
    sync_fifo #(.WIDTH(SAMPLE_W), .DEPTH(DEPTH)) u_fifo (
      .clk  (clk),
      .rst_n(rst_n),
      .din  (din[k]),
      .wr_en(wr_en[k]),
      .rd_en(rd_en[k]),
      .dout (dout[k]),
      .full (full[k]),
      .empty(empty[k]),
      .valid(valid[k])
    );
  end

  assign rd_en = reading & ~empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_req_q <= '0;
      reading  <= '0;
    end else begin
      rd_req_q <= rd_req;
      for (int k = 0; k < NCH; k++) begin
        if (rd_req[k] && !rd_req_q[k]) reading[k] <= 1'b1;
        else if (empty[k])             reading[k] <= 1'b0;
      end
    end
  end

endmodule
