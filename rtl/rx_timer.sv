// rx_timer: receive-state counter of the controller, clocked by the low-frequency clock.
// A free-running counter of RX_PERIOD low-clock cycles opens a receive phase at the start of
// every period and keeps it open for RX_WINDOW cycles. During the receive phase the function
// state machine goes to its receive state instead of acquiring data; on its first receive pass
// of the phase the controller acknowledges to the base station and switches the radio on.
//
// Defaults: a receive phase every 10 ms (2000 cycles of 200 kHz), as the reference gives;
// the window length is not given and is this design's choice (20 cycles = 100 us). The first
// phase opens on the first clk_lo edge after reset.
//
// The output is decoded from the counter register and changes only after clk_lo rising edges.
module rx_timer #(
  parameter int unsigned RX_PERIOD = 2000,  // low-clock cycles between receive phases
  parameter int unsigned RX_WINDOW = 20     // low-clock cycles a receive phase lasts
) (
  input  logic clk_lo,
  input  logic rst_n,
  output logic rx_phase    // receive phase open
);

  localparam int unsigned CW = (RX_PERIOD > 1) ? $clog2(RX_PERIOD) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk_lo or negedge rst_n) begin
    if (!rst_n)                            cnt <= CW'(RX_PERIOD - 1);
    else if (cnt == CW'(RX_PERIOD - 1))    cnt <= '0;
    else                                   cnt <= cnt + 1'b1;
  end

  assign rx_phase = (32'(cnt) < RX_WINDOW);

  initial begin
    assert (RX_WINDOW < RX_PERIOD) else $error("rx_timer: RX_WINDOW must be below RX_PERIOD");
  end

endmodule
