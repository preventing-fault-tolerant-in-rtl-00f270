// Self-checking testbench for test_init_counter: with a short period, checks
// that start pulses exactly every TEST_PERIOD normal-mode cycles, that the count
// is held during a (simulated) test session and restarts after it, and that no
// request comes while en is low.
module tb_test_init_counter;
  localparam int unsigned P = 13;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, test_mode = 1'b0, start;
  int checks = 0, failures = 0;

  test_init_counter #(.TEST_PERIOD(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count normal-mode cycles since the last request, compare at each start
  int since = 0;
  always @(negedge clk) begin
    if (rst_n && en && !test_mode) begin
      since++;
      if (start) begin
        checks++;
        if (since != P) begin failures++; $display("start after %0d cycles, exp %0d", since, P); end
        since = 0;
      end
    end else begin
      if (start) begin failures++; $display("start while disabled or testing"); end
      if (!en || test_mode) since = 0;
    end
  end

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (40) @(posedge clk);       // en low: no start expected
    en <= 1'b1;
    for (int s = 0; s < 6; s++) begin
      n = 0;
      while (!start) begin @(negedge clk); n++; end
      @(posedge clk);
      test_mode <= 1'b1;               // controller enters test mode
      repeat (1 + ($urandom % 20)) @(posedge clk);
      test_mode <= 1'b0;
    end
    repeat (3 * P) @(posedge clk);
    checks++;
    if (since >= P) begin failures++; $display("no start after period"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
