// tb_fifo_bank: memory bank with 8-word FIFOs fed by ADC results on channels 0, 1, 2 in
// sequence (one every 4 clocks). When a FIFO reports full, the testbench raises its read
// request for a few clocks, as the controller would; channel 2 is also read once before it is
// full. Checked: each FIFO's output stream equals the samples of its channel in order, a
// readout runs until the FIFO is empty at one word per clock, full is reported after 8
// samples, and no read happens without a request.
`timescale 1ns/1ps
module tb_fifo_bank;
  localparam int D = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [15:0] adc_dout = '0;
  logic adc_drdy = 1'b0;
  logic [3:0] adc_channel = '0;
  logic [2:0] rd_req = '0, full, empty, reading, valid;
  logic [11:0] dout [3];
  always #25 clk = ~clk;

  fifo_bank #(.DEPTH(D)) dut (.clk, .rst_n, .adc_dout, .adc_drdy, .adc_channel, .rd_req,
                              .full, .empty, .reading, .dout, .valid);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [11:0] q [3][$];
  int stored [3] = '{0, 0, 0};
  int words [3] = '{0, 0, 0};
  int bursts [3] = '{0, 0, 0};
  logic [2:0] valid_q = '0;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 3; k++) begin
      if (valid[k]) begin
        words[k]++;
        if (q[k].size() == 0) check(1'b0, "output with nothing stored");
        else check(dout[k] == q[k].pop_front(), $sformatf("FIFO %0d output in order", k));
        if (valid_q[k] == 1'b0) bursts[k]++;
      end
    end
    valid_q <= valid;
  end

  int seq = 0, sample = 0;
  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      adc_drdy = 1'b0;
      rd_req = '0;
      if (i % 4 == 0) begin
        adc_channel = 4'(seq);
        adc_dout = {12'(sample), 4'hf};
        adc_drdy = 1'b1;
        q[seq].push_back(12'(sample));
        stored[seq]++;
        seq = (seq == 2) ? 0 : seq + 1;
        sample++;
      end
      for (int k = 0; k < 3; k++) if (full[k]) rd_req[k] = 1'b1;
      if (i == 30) rd_req[2] = 1'b1;
    end
    repeat (20) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      check(bursts[k] >= 3, $sformatf("FIFO %0d read out several times (%0d)", k, bursts[k]));
      check(q[k].size() < D, "FIFO backlog below its depth");
      check(long_runs[k] >= 2, $sformatf("FIFO %0d full readouts of 8 words in a row (%0d)", k, long_runs[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a readout streams one word per clock: count runs of consecutive valid words of full length
  int run_len [3] = '{0, 0, 0};
  int long_runs [3] = '{0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 3; k++) begin
      if (valid[k]) run_len[k]++;
      else begin
        if (run_len[k] >= D) long_runs[k]++;
        run_len[k] = 0;
      end
    end
  end
  // full when 8 samples are stored (the model also counts a sample still in the demultiplexer)
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < 3; k++) begin
      if (full[k]) check(q[k].size() >= D, "full only with 8 samples stored");
      else         check(q[k].size() <= D, "not full below 8 samples stored");
    end
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
