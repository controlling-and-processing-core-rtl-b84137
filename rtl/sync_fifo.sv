// sync_fifo: single-clock FIFO used for each channel of the memory bank, with the interface of
// the reference design: Din/Dout, Wr_en, Rd_en, Full, Empty, Valid, and standard (not
// first-word fall-through) read: a read accepted on a rising clock edge puts the word on dout
// after that edge and raises valid for one cycle. A read while empty is ignored (valid stays
// low); a write while full is ignored. A simultaneous read and write are both accepted when
// the FIFO is neither empty (read) nor full (write).
//
// Storage is a register array of DEPTH words addressed by wrapping pointers, with an occupancy
// counter for the flags. Default size: 256 words of 12 bits, i.e. 384 bytes, taken to be the
// 384-byte memory block of the reference chip (the reference does not give the depth
// directly).
module sync_fifo #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  input  logic             wr_en,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic             valid
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      dout   <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= do_rd;
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) begin
        dout   <= mem[rd_ptr];
        rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      end
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= (AW+1)'(DEPTH));

endmodule
