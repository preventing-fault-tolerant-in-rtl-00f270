// Throughput of a saturated input channel against the test period.
// Four fifo_test_channel instances see the same saturating traffic (a flit
// offered every cycle, the output always ready): test periods of 32, 256 and
// 1024 cycles, and one with periodic test disabled. Over 20000 cycles the
// testbench measures delivered flits per cycle and checks for each channel that
//  - every flit arrives in order and unchanged;
//  - test-mode cycles equal the sum of 8*n + 2 over the sessions (n = flits held);
//  - in normal mode a flit leaves every cycle except one restart cycle after each
//    session;
//  - throughput falls as the test period shrinks: testing often costs bandwidth,
//    testing rarely costs almost none.
module tb_test_period_throughput;
  import fifo_test_pkg::*;
  localparam int unsigned DATA_W = 4;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned N      = 4;
  localparam int unsigned CYCLES = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] test_en = '0;
  logic in_valid = 1'b0, out_ready = 1'b0;
  logic [DATA_W-1:0] in_data [N];
  logic [N-1:0] in_ready, out_valid, test_mode, test_done, fault;
  logic [DATA_W-1:0] out_data [N], fault_syndrome [N];
  logic [AW-1:0] fault_addr [N];
  logic [FAULT_CNT_W-1:0] fault_count [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fifo_test_channel #(.DATA_W(DATA_W), .DEPTH(DEPTH), .TEST_PERIOD(32)) u_p32 (
    .clk, .rst_n, .test_en(test_en[0]), .in_valid, .in_data(in_data[0]), .in_ready(in_ready[0]),
    .out_valid(out_valid[0]), .out_data(out_data[0]), .out_ready, .test_mode(test_mode[0]),
    .test_done(test_done[0]), .fault(fault[0]), .fault_addr(fault_addr[0]),
    .fault_syndrome(fault_syndrome[0]), .fault_count(fault_count[0]));
  fifo_test_channel #(.DATA_W(DATA_W), .DEPTH(DEPTH), .TEST_PERIOD(256)) u_p256 (
    .clk, .rst_n, .test_en(test_en[1]), .in_valid, .in_data(in_data[1]), .in_ready(in_ready[1]),
    .out_valid(out_valid[1]), .out_data(out_data[1]), .out_ready, .test_mode(test_mode[1]),
    .test_done(test_done[1]), .fault(fault[1]), .fault_addr(fault_addr[1]),
    .fault_syndrome(fault_syndrome[1]), .fault_count(fault_count[1]));
  fifo_test_channel #(.DATA_W(DATA_W), .DEPTH(DEPTH), .TEST_PERIOD(1024)) u_p1024 (
    .clk, .rst_n, .test_en(test_en[2]), .in_valid, .in_data(in_data[2]), .in_ready(in_ready[2]),
    .out_valid(out_valid[2]), .out_data(out_data[2]), .out_ready, .test_mode(test_mode[2]),
    .test_done(test_done[2]), .fault(fault[2]), .fault_addr(fault_addr[2]),
    .fault_syndrome(fault_syndrome[2]), .fault_count(fault_count[2]));
  fifo_test_channel #(.DATA_W(DATA_W), .DEPTH(DEPTH), .TEST_PERIOD(1024)) u_off (
    .clk, .rst_n, .test_en(test_en[3]), .in_valid, .in_data(in_data[3]), .in_ready(in_ready[3]),
    .out_valid(out_valid[3]), .out_data(out_data[3]), .out_ready, .test_mode(test_mode[3]),
    .test_done(test_done[3]), .fault(fault[3]), .fault_addr(fault_addr[3]),
    .fault_syndrome(fault_syndrome[3]), .fault_count(fault_count[3]));

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DATA_W-1:0] q [N][$];
  logic [DATA_W-1:0] seq [N];
  int flits [N], tm_cycles [N], tm_expect [N], normal_cycles [N], sessions [N];
  bit tm_prev [N];
  bit measure = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (test_mode[i] && !tm_prev[i] && measure) begin
        sessions[i]++;
        tm_expect[i] += 8 * q[i].size() + 2;
      end
      if (measure) begin
        if (test_mode[i]) tm_cycles[i]++;
        else              normal_cycles[i]++;
      end
      tm_prev[i] = test_mode[i];
      if (out_valid[i] && out_ready) begin
        checks++;
        if (q[i].size() == 0 || out_data[i] !== q[i][0]) begin failures++; $display("channel %0d: wrong flit", i); end
        if (q[i].size() != 0) void'(q[i].pop_front());
        if (measure) flits[i]++;
      end
      if (in_valid && in_ready[i]) begin
        q[i].push_back(in_data[i]);
        seq[i] = seq[i] + 1'b1;
      end
    end
  end

  // each channel gets its own numbered flit sequence
  always_comb for (int i = 0; i < N; i++) in_data[i] = seq[i];

  initial begin
    real thr [N];
    for (int i = 0; i < N; i++) begin
      seq[i] = '0; flits[i] = 0; tm_cycles[i] = 0; tm_expect[i] = 0;
      normal_cycles[i] = 0; sessions[i] = 0; tm_prev[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    test_en <= 4'b0111;
    @(negedge clk);
    in_valid = 1'b1; out_ready = 1'b1;
    repeat (20) @(negedge clk);
    measure = 1;
    repeat (CYCLES) @(negedge clk);
    measure = 0;
    // let any session in progress finish before comparing its length
    for (int i = 0; i < N; i++) begin
      thr[i] = real'(flits[i]) / real'(CYCLES);
      $display("channel %0d: sessions=%0d test cycles=%0d flits=%0d throughput=%f",
               i, sessions[i], tm_cycles[i], flits[i], thr[i]);
      checks++;
      if (tm_cycles[i] > tm_expect[i] || tm_cycles[i] + 8 * DEPTH + 2 < tm_expect[i]) begin
        failures++; $display("channel %0d: %0d test cycles, sessions add up to %0d", i, tm_cycles[i], tm_expect[i]);
      end
      checks++;
      if (flits[i] > normal_cycles[i] || flits[i] + 2 * sessions[i] + 2 < normal_cycles[i]) begin
        failures++; $display("channel %0d: %0d flits in %0d normal cycles", i, flits[i], normal_cycles[i]);
      end
    end
    checks++;
    if (!(thr[0] < thr[1] && thr[1] < thr[2] && thr[2] < thr[3])) begin
      failures++; $display("throughput does not rise with the test period");
    end
    checks++;
    if (sessions[3] != 0 || thr[3] < 0.99) begin failures++; $display("untested channel lost bandwidth"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
