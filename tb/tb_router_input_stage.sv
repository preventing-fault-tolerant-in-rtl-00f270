// End-to-end testbench for router_input_stage at its default parameters
// (5 ports, 4-bit flits, 8-flit buffers, a test session every 1024 normal-mode
// cycles). Each port carries bursty random traffic with its own load pattern and
// is checked against a reference queue. The testbench counts, per port, and
// requires at least once:
//   - a test session (both flit ports stalled for 8*n + 2 cycles, n = flits held);
//   - an incoming flit held off by a session;
//   - a session on an empty buffer and one on a full buffer;
//   - a session while a flit was waiting at the output (it must still leave
//     intact afterwards);
//   - every location of every buffer tested at least once: sessions cover only
//     the occupied locations, but the occupied window moves with the traffic.
// Port 4 has its periodic test disabled for a while: no session may start then.
// At the end a stuck-at-1 cell (bit 3 of location 2 of port 1) is emulated by
// rewriting that cell every cycle; that port must report it with address 2 and
// syndrome 1000, while the other ports stay fault-free.
module tb_router_input_stage;
  import fifo_test_pkg::*;
  localparam int unsigned PORTS  = 5;
  localparam int unsigned DATA_W = 4;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned PERIOD = 1024;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PORTS-1:0] test_en = '0, in_valid = '0, out_ready = '0;
  logic [PORTS-1:0][DATA_W-1:0] in_data = '0;
  logic [PORTS-1:0] in_ready, out_valid, test_mode, test_done, fault;
  logic [PORTS-1:0][DATA_W-1:0] out_data, fault_syndrome;
  logic [PORTS-1:0][AW-1:0] fault_addr;
  logic [PORTS-1:0][FAULT_CNT_W-1:0] fault_count;
  int checks = 0, failures = 0;

  router_input_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DATA_W-1:0] q [PORTS][$];
  int  p_in [PORTS], p_out [PORTS];
  bit  data_check [PORTS];
  bit  inject = 0;
  bit  en_window = 0;       // port 4 test disabled
  int  sessions [PORTS], stalls [PORTS], empty_tests [PORTS], full_tests [PORTS];
  int  held_tests [PORTS], tm_len [PORTS], tm_n [PORTS], flits [PORTS];
  bit  tm_prev [PORTS], ov_prev [PORTS];

  // locations that had their complement written during a session, per port
  bit [DEPTH-1:0] tested_loc [PORTS];
  for (genvar gp = 0; gp < PORTS; gp++) begin : g_cov
    always @(posedge clk)
      if (rst_n && dut.g_port[gp].u_ch.u_ctrl.t_we && dut.g_port[gp].u_ch.u_ctrl.state == T_WR_NX)
        tested_loc[gp][dut.g_port[gp].u_ch.u_ctrl.t_waddr] <= 1'b1;
  end

  // stuck-at-1 cell in port 1's buffer
  always @(negedge clk) if (inject) dut.g_port[1].u_ch.u_fifo.u_sram.mem[2][3] = 1'b1;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < PORTS; p++) begin
      if (test_mode[p] && !tm_prev[p]) begin
        tm_n[p] = q[p].size(); tm_len[p] = 0;
        if (tm_n[p] == 0)     empty_tests[p]++;
        if (tm_n[p] == DEPTH) full_tests[p]++;
        if (ov_prev[p] && !out_ready[p]) held_tests[p]++;
        if (p == 4 && en_window) begin failures++; $display("session on a disabled port"); end
      end
      if (test_mode[p]) tm_len[p]++;
      if (!test_mode[p] && tm_prev[p]) begin
        sessions[p]++;
        checks++;
        if (tm_len[p] != 8 * tm_n[p] + 2) begin
          failures++; $display("port %0d: session with %0d flits took %0d cycles", p, tm_n[p], tm_len[p]);
        end
      end
      if (test_mode[p] && (in_ready[p] || out_valid[p])) begin failures++; $display("port %0d not stalled", p); end
      if (test_mode[p] && in_valid[p]) stalls[p]++;
      tm_prev[p] = test_mode[p];
      ov_prev[p] = out_valid[p];
      if (out_valid[p] && out_ready[p]) begin
        flits[p]++;
        if (data_check[p]) begin
          checks++;
          if (q[p].size() == 0 || out_data[p] !== q[p][0]) begin
            failures++; $display("port %0d: out %h exp %h", p, out_data[p], (q[p].size() != 0) ? q[p][0] : '0);
          end
        end
        if (q[p].size() != 0) void'(q[p].pop_front());
      end
      if (in_valid[p] && in_ready[p]) q[p].push_back(in_data[p]);
    end
  end

  always @(negedge clk) begin
    for (int p = 0; p < PORTS; p++) begin
      if (!(in_valid[p] && !in_ready[p])) begin
        in_valid[p] = ($urandom % 100) < p_in[p];
        in_data[p]  = DATA_W'($urandom);
      end
      out_ready[p] = ($urandom % 100) < p_out[p];
    end
  end

  function automatic void require(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    for (int p = 0; p < PORTS; p++) begin
      p_in[p] = 0; p_out[p] = 0; data_check[p] = 1; tested_loc[p] = '0;
      sessions[p] = 0; stalls[p] = 0; empty_tests[p] = 0; full_tests[p] = 0;
      held_tests[p] = 0; flits[p] = 0; tm_prev[p] = 0; ov_prev[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    test_en <= '1;
    // bursty traffic: each port alternates idle, congested and flowing phases
    for (int ph = 0; ph < 20; ph++) begin
      for (int p = 0; p < PORTS; p++) begin
        case ((ph + p) % 4)
          0: begin p_in[p] = 0;  p_out[p] = 80; end   // idle: buffer drains
          1: begin p_in[p] = 95; p_out[p] = 0;  end   // congested: buffer fills
          2: begin p_in[p] = 60; p_out[p] = 60; end
          default: begin p_in[p] = 90; p_out[p] = 90; end
        endcase
      end
      if (ph == 10) begin en_window = 1; test_en[4] = 1'b0; end
      if (ph == 14) begin en_window = 0; test_en[4] = 1'b1; end
      repeat (1100) @(negedge clk);   // longer than one test period
    end
    for (int p = 0; p < PORTS; p++) begin
      require(sessions[p] >= 5, $sformatf("port %0d: %0d sessions", p, sessions[p]));
      require(stalls[p] > 0, $sformatf("port %0d: no flit held off by a test", p));
      require(empty_tests[p] > 0, $sformatf("port %0d: no session on an empty buffer", p));
      require(full_tests[p] > 0, $sformatf("port %0d: no session on a full buffer", p));
      require(held_tests[p] > 0, $sformatf("port %0d: no session with a flit waiting at the output", p));
      require(!fault[p] && fault_count[p] == 0, $sformatf("port %0d: false fault", p));
      require(&tested_loc[p], $sformatf("port %0d: locations tested %b", p, tested_loc[p]));
    end
    // stuck-at fault in port 1: keep its buffer full so location 2 holds flits
    data_check[1] = 0;
    inject = 1;
    p_in[1] = 100; p_out[1] = 0;
    repeat (3 * PERIOD) begin
      @(negedge clk);
      if (fault[1]) break;
    end
    require(fault[1], "port 1: stuck-at-1 not detected");
    require(fault_addr[1] == AW'(2) && fault_syndrome[1] == 4'b1000,
            $sformatf("port 1: fault at %0d syndrome %b", fault_addr[1], fault_syndrome[1]));
    for (int p = 0; p < PORTS; p++)
      if (p != 1) require(!fault[p], $sformatf("port %0d: false fault", p));
    for (int p = 0; p < PORTS; p++)
      $display("port %0d: flits=%0d sessions=%0d stalls=%0d empty=%0d full=%0d held=%0d locations=%b",
               p, flits[p], sessions[p], stalls[p], empty_tests[p], full_tests[p], held_tests[p], tested_loc[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
