// Self-checking testbench for fifo_buffer.
//  - Random valid/ready traffic against a reference queue: every flit leaves in
//    order and unchanged, in_ready is low only when the buffer holds DEPTH flits.
//  - Streaming: with both sides always ready, one flit per cycle gets through.
//  - Test mode, entered at random moments: in_ready and out_valid go low at once;
//    through the t_* port the testbench reads every occupied location from head
//    (count of them) and compares with the reference queue, writes the complement,
//    reads it back and restores the word. Traffic then resumes without loss.
module tb_fifo_buffer;
  localparam int unsigned DATA_W = 4;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0, test_mode = 1'b0;
  logic in_valid = 1'b0, out_ready = 1'b0, in_ready, out_valid;
  logic [DATA_W-1:0] in_data = '0, out_data;
  logic [AW-1:0] head;
  logic [AW:0] count;
  logic t_we = 1'b0, t_re = 1'b0;
  logic [AW-1:0] t_waddr = '0, t_raddr = '0;
  logic [DATA_W-1:0] t_wdata = '0, t_rdata;
  int checks = 0, failures = 0;
  int tests = 0, full_seen = 0, stream_flits = 0;

  fifo_buffer #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DATA_W-1:0] q [$];
  int traffic_on = 0;
  int p_in = 50, p_out = 50;

  // scoreboard, sampled at each rising edge
  always @(posedge clk) if (rst_n) begin
    if (test_mode && (in_ready || out_valid)) begin
      failures++; $display("flit port active in test mode");
    end
    if (!test_mode) begin
      checks++;
      if (in_ready !== (q.size() < DEPTH)) begin failures++; $display("in_ready %0d with %0d flits", in_ready, q.size()); end
      if (q.size() == DEPTH) full_seen++;
    end
    if (out_valid && out_ready) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("flit out of empty FIFO"); end
      else begin
        if (out_data !== q[0]) begin failures++; $display("out %h exp %h", out_data, q[0]); end
        void'(q.pop_front());
      end
      stream_flits++;
    end
    if (in_valid && in_ready) q.push_back(in_data);
  end

  // random stimulus, driven after each edge
  always @(negedge clk) if (traffic_on != 0) begin
    if (!(in_valid && !in_ready) || test_mode) begin
      in_valid = ($urandom % 100) < p_in;
      in_data  = DATA_W'($urandom);
    end
    out_ready = ($urandom % 100) < p_out;
  end

  task automatic run_test_mode();
    int n;
    int a;
    logic [DATA_W-1:0] w;
    @(negedge clk);
    test_mode = 1'b1;
    @(negedge clk);
    n = int'(count);
    checks++;
    if (n != q.size()) begin failures++; $display("count %0d, reference holds %0d", n, q.size()); end
    for (int i = 0; i < n && i < q.size(); i++) begin
      a = (int'(head) + i) % DEPTH;
      t_re = 1'b1; t_raddr = AW'(a);
      @(negedge clk); t_re = 1'b0;
      checks++;
      if (t_rdata !== q[i]) begin failures++; $display("loc %0d holds %h exp %h", a, t_rdata, q[i]); end
      w = t_rdata;
      t_we = 1'b1; t_waddr = AW'(a); t_wdata = ~w;
      @(negedge clk); t_we = 1'b0;
      t_re = 1'b1;
      @(negedge clk); t_re = 1'b0;
      checks++;
      if (t_rdata !== ~w) begin failures++; $display("complement not stored at %0d", a); end
      t_we = 1'b1; t_wdata = w;
      @(negedge clk); t_we = 1'b0;
    end
    test_mode = 1'b0;
    tests++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // streaming throughput
    in_valid = 1'b1; out_ready = 1'b1; in_data = 4'h1;
    repeat (3) @(negedge clk);
    stream_flits = 0;
    for (int i = 0; i < 40; i++) begin
      in_data = DATA_W'(i);
      @(negedge clk);
    end
    checks++;
    if (stream_flits != 40) begin failures++; $display("streaming: %0d flits in 40 cycles", stream_flits); end
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    // random traffic, with test mode entered at random moments
    traffic_on = 1;
    for (int ph = 0; ph < 30; ph++) begin
      p_in  = (ph % 3 == 0) ? 90 : 50;
      p_out = (ph % 3 == 0) ? 20 : 60;
      repeat (20 + $urandom % 40) @(negedge clk);
      run_test_mode();
    end
    traffic_on = 0;
    in_valid = 1'b0; out_ready = 1'b1;
    repeat (20) @(negedge clk);
    checks++;
    if (q.size() != 0 || out_valid) begin failures++; $display("FIFO did not drain: %0d left", q.size()); end
    checks++;
    if (full_seen == 0 || tests != 30) begin failures++; $display("full never reached or tests missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
