// tb_sync_fifo: an 8-word FIFO under random writes and reads, compared with a queue model:
// full and empty flags, standard-read timing (a read accepted on an edge gives dout and valid
// after that edge), reads on empty and writes on full ignored. Phases of mostly-writes and
// mostly-reads make the FIFO fill up and drain many times.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int D = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [11:0] din = '0, dout;
  logic wr_en = 1'b0, rd_en = 1'b0, full, empty, valid;
  always #25 clk = ~clk;

  sync_fifo #(.WIDTH(12), .DEPTH(D)) dut (.clk, .rst_n, .din, .wr_en, .rd_en, .dout, .full, .empty, .valid);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [11:0] q [$];
  int n_full = 0, n_empty_rd = 0, n_full_wr = 0;
  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    check(empty && !full && !valid, "empty after reset");
    for (int i = 0; i < 2000; i++) begin
      bit w, r, acc_w, acc_r;
      logic [11:0] exp_d;
      int wp;
      wp = ((i / 100) % 2 == 0) ? 80 : 20;      // percent chance of a write
      @(negedge clk);
      check(full == (q.size() == D), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (full) n_full++;
      w = ($urandom_range(0, 99) < wp);
      r = ($urandom_range(0, 99) < 100 - wp);
      din = 12'($urandom); wr_en = w; rd_en = r;
      acc_r = r && q.size() != 0;
      acc_w = w && q.size() != D;
      if (r && !acc_r) n_empty_rd++;
      if (w && !acc_w) n_full_wr++;
      if (acc_r) exp_d = q.pop_front();
      if (acc_w) q.push_back(din);
      @(posedge clk) #1;
      check(valid == acc_r, "valid one clock after an accepted read");
      if (acc_r) check(dout == exp_d, $sformatf("dout %h expected %h", dout, exp_d));
    end
    check(n_full > 10 && n_empty_rd > 10 && n_full_wr > 10, "full, empty read and full write seen");
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
