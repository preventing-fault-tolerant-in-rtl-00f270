// Test-initiation counter of one FIFO buffer.
// Counts clock cycles spent in normal mode and, after TEST_PERIOD of them, raises
// start for one cycle so that the buffer is switched into test mode whatever it
// holds at that moment. While the test runs (test_mode=1) or periodic test is
// disabled (en=0) the count is held at zero, so the next request comes TEST_PERIOD
// normal-mode cycles after the end of the previous session. That a counter starts
// the test regardless of the buffer's state follows the original scheme; the period of
// 1024 cycles is this design's choice.
module test_init_counter #(
  parameter int unsigned TEST_PERIOD = 1024,
  localparam int unsigned CW = $clog2(TEST_PERIOD + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic test_mode,
  output logic start
);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n || !en || test_mode || start) cnt <= '0;
    else                                     cnt <= cnt + 1'b1;
  end

  assign start = en && !test_mode && (cnt == CW'(TEST_PERIOD - 1));

endmodule
