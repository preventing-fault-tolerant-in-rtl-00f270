// Self-checking testbench for fifo_test_channel (short test period of 60 cycles).
//  - Random traffic: every flit leaves in order and unchanged across many test
//    sessions, so the transparent test leaves the buffered flits intact.
//  - Each session: both flit ports stalled for exactly 8*n + 2 cycles, n being
//    the number of flits held when it began; sessions start TEST_PERIOD
//    normal-mode cycles apart; no fault reported on a fault-free buffer.
//  - Fault: the testbench then holds one SRAM cell at 1 (stuck-at-1, bit 3 of
//    location 5) by rewriting it every cycle, and keeps the buffer full; the next
//    session covering location 5 while it holds a 0 there must report the fault
//    with that address and a syndrome of 1000.
module tb_fifo_test_channel;
  import fifo_test_pkg::*;
  localparam int unsigned DATA_W = 4;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned PERIOD = 60;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0, test_en = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0, in_ready, out_valid;
  logic [DATA_W-1:0] in_data = '0, out_data;
  logic test_mode, test_done, fault;
  logic [AW-1:0] fault_addr;
  logic [DATA_W-1:0] fault_syndrome;
  logic [FAULT_CNT_W-1:0] fault_count;
  int checks = 0, failures = 0;

  fifo_test_channel #(.DATA_W(DATA_W), .DEPTH(DEPTH), .TEST_PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DATA_W-1:0] q [$];
  bit data_check = 1;
  bit inject = 0;
  int p_in = 50, p_out = 50;
  int sessions = 0, tm_len = 0, tm_n = 0, normal_len = 0, stalls = 0;
  bit tm_prev = 0;

  // stuck-at-1 cell: bit 3 of location 5
  always @(negedge clk) if (inject) dut.u_fifo.u_sram.mem[5][3] = 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (test_mode && !tm_prev) begin
      tm_n = q.size(); tm_len = 0;
      if (sessions > 0 && test_en) begin
        checks++;
        if (normal_len != PERIOD) begin failures++; $display("normal mode lasted %0d cycles", normal_len); end
      end
    end
    if (test_mode) tm_len++;
    else           normal_len++;
    if (!test_mode && tm_prev) begin
      sessions++;
      checks++;
      if (tm_len != 8 * tm_n + 2) begin failures++; $display("session with %0d flits took %0d cycles", tm_n, tm_len); end
      normal_len = 1;  // this sample is the first normal-mode cycle
    end
    if (test_mode && (in_ready || out_valid)) begin failures++; $display("ports not stalled"); end
    if (test_mode && in_valid) stalls++;
    tm_prev = test_mode;
    if (out_valid && out_ready) begin
      if (data_check) begin
        checks++;
        if (out_data !== q[0]) begin failures++; $display("out %h exp %h", out_data, q[0]); end
      end
      void'(q.pop_front());
    end
    if (in_valid && in_ready) q.push_back(in_data);
  end

  always @(negedge clk) begin
    if (!(in_valid && !in_ready)) begin
      in_valid = ($urandom % 100) < p_in;
      in_data  = DATA_W'($urandom);
    end
    out_ready = ($urandom % 100) < p_out;
  end

  initial begin
    int waited;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    test_en <= 1'b1;
    for (int ph = 0; ph < 12; ph++) begin
      p_in  = (ph % 4 == 0) ? 0 : (ph % 4 == 1) ? 95 : 50;
      p_out = (ph % 4 == 1) ? 5 : 60;
      repeat (400) @(negedge clk);
    end
    checks++;
    if (sessions < 50) begin failures++; $display("only %0d sessions", sessions); end
    checks++;
    if (fault || fault_count != 0) begin failures++; $display("false fault report"); end
    checks++;
    if (stalls == 0) begin failures++; $display("no incoming flit was ever stalled"); end
    // fault injection
    data_check = 0;
    inject = 1;
    p_in = 100; p_out = 0;
    waited = 0;
    while (!fault && waited < 20 * PERIOD) begin
      @(negedge clk); waited++;
      if (waited % (3 * PERIOD) == 0) begin p_out = 100; repeat (3) @(negedge clk); p_out = 0; end
    end
    checks++;
    if (!fault) begin failures++; $display("stuck-at-1 not detected"); end
    else begin
      checks++;
      if (fault_addr != AW'(5) || fault_syndrome != 4'b1000) begin
        failures++; $display("fault at %0d syndrome %b", fault_addr, fault_syndrome);
      end
    end
    $display("sessions=%0d stalls=%0d", sessions, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
