// tb_adc_demux: random ADC results on random channels (0 to 5, so some belong to no FIFO),
// with data_valid high about half the time. Expected, one clock later: wr_en has the bit of the
// FIFO whose channel matches (none for channels 3 to 5) and that FIFO's din holds bits 15..4 of
// the ADC word.
`timescale 1ns/1ps
module tb_adc_demux;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [15:0] adc_dout = '0;
  logic data_valid = 1'b0;
  logic [3:0] channel_out = '0;
  logic [11:0] din [3];
  logic [2:0] wr_en;
  always #25 clk = ~clk;

  adc_demux dut (.clk, .rst_n, .adc_dout, .data_valid, .channel_out, .din, .wr_en);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int writes [3] = '{0, 0, 0};
  int dropped = 0;
  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      logic [15:0] w;
      logic [3:0]  c;
      logic        v;
      @(negedge clk);
      w = 16'($urandom); c = 4'($urandom_range(0, 5)); v = 1'($urandom_range(0, 1));
      adc_dout = w; channel_out = c; data_valid = v;
      @(posedge clk) #1;
      for (int k = 0; k < 3; k++) begin
        check(wr_en[k] == (v && c == k), $sformatf("wr_en[%0d] for channel %0d valid %0b", k, c, v));
        if (v && c == k) begin
          check(din[k] == w[15:4], "din carries the 12 most significant bits");
          writes[k]++;
        end
      end
      if (v && c > 2) dropped++;
    end
    check(writes[0] > 20 && writes[1] > 20 && writes[2] > 20 && dropped > 20, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
