// Self-checking testbench for tsoa_mats_ctrl.
// The controller drives a behavioural SRAM model in this testbench that can hold
// stuck-at-0/1 cells. Each session is started with a chosen head and count, and
// the testbench checks:
//  - session length: test_mode high for 8*count + 2 cycles, done in the last one;
//  - the operation sequence at each occupied location, in order from head with
//    wrap-around: read, write of the complement of the word read, read, write of
//    the original word, read; and no access outside the occupied range;
//  - that the memory holds its original words afterwards (transparency);
//  - fault reports: none on a fault-free array, a stuck-at-1 in the MSB of the word
//    1010 found in the invert phase (syndrome 1000), a stuck-at-0 found in the
//    restore phase, no report for a faulty cell outside the occupied range.
module tb_tsoa_mats_ctrl;
  import fifo_test_pkg::*;
  localparam int unsigned DATA_W = 4;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [AW-1:0] head = '0;
  logic [AW:0]   count = '0;
  logic test_mode, done, t_we, t_re, fault;
  logic [AW-1:0] t_waddr, t_raddr, fault_addr;
  logic [DATA_W-1:0] t_wdata, t_rdata, fault_syndrome;
  logic [FAULT_CNT_W-1:0] fault_count;
  int checks = 0, failures = 0;

  tsoa_mats_ctrl #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // behavioural SRAM with stuck-at cells
  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] sa1 [DEPTH];
  logic [DATA_W-1:0] sa0 [DEPTH];
  always_ff @(posedge clk) begin
    if (t_we) mem[t_waddr] <= (t_wdata | sa1[t_waddr]) & ~sa0[t_waddr];
    if (t_re) t_rdata <= mem[t_raddr];
  end

  // operation trace of the current session
  typedef struct packed { logic w; logic [AW-1:0] a; logic [DATA_W-1:0] d; } op_t;
  op_t trace [$];
  int  tm_cycles;
  always @(posedge clk) begin
    if (test_mode) tm_cycles++;
    if (t_we) trace.push_back('{1'b1, t_waddr, t_wdata});
    if (t_re) trace.push_back('{1'b0, t_raddr, '0});
    if (t_we && t_re) begin failures++; $display("read and write in one cycle"); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // Run one session and check length, sequence and restoration.
  task automatic session(input int h, input int n, input bit expect_clean);
    logic [DATA_W-1:0] prior [DEPTH];
    int dones = 0;
    int a;
    prior = mem;
    trace.delete();
    tm_cycles = 0;
    @(negedge clk);
    head = AW'(h); count = (AW+1)'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (test_mode) begin
      if (done) dones++;
      @(negedge clk);
    end
    check(tm_cycles == 8 * n + 2, $sformatf("session of %0d locations took %0d cycles", n, tm_cycles));
    check(dones == 1, "done pulses once");
    check(trace.size() == 5 * n, $sformatf("%0d operations for %0d locations", trace.size(), n));
    for (int i = 0; i < n && trace.size() >= 5 * n; i++) begin
      a = (h + i) % DEPTH;
      check(!trace[5*i].w   && trace[5*i].a   == AW'(a), "r x");
      check( trace[5*i+1].w && trace[5*i+1].a == AW'(a) && trace[5*i+1].d == ~prior[a], "w ~x");
      check(!trace[5*i+2].w && trace[5*i+2].a == AW'(a), "r ~x");
      check( trace[5*i+3].w && trace[5*i+3].a == AW'(a) && trace[5*i+3].d == prior[a], "w x");
      check(!trace[5*i+4].w && trace[5*i+4].a == AW'(a), "r x (restore)");
    end
    if (expect_clean) begin
      for (int k = 0; k < DEPTH; k++) check(mem[k] == prior[k], $sformatf("word %0d restored", k));
    end
  endtask

  initial begin
    for (int k = 0; k < DEPTH; k++) begin
      mem[k] = DATA_W'($urandom); sa1[k] = '0; sa0[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!test_mode && !fault, "idle after reset");

    // fault-free sessions, including an empty and a full FIFO, with wrap-around
    session(0, 0, 1);
    session(2, 3, 1);
    session(6, 5, 1);
    session(5, DEPTH, 1);
    for (int r = 0; r < 10; r++) session($urandom % DEPTH, $urandom % (DEPTH + 1), 1);
    check(!fault && fault_count == 0, "no fault on a fault-free array");

    // faulty cell outside the occupied range: not reported
    mem[1] = 4'b1010; sa1[1] = 4'b1000;
    session(3, 4, 1);
    check(!fault, "fault outside the tested range is not reported");

    // stuck-at-1 in the MSB of a stored 1010, invert phase detects it
    session(0, 3, 0);
    check(fault, "stuck-at-1 detected");
    check(fault_addr == AW'(1), $sformatf("fault address %0d", fault_addr));
    check(fault_syndrome == 4'b1000, $sformatf("syndrome %b", fault_syndrome));
    check(fault_count == 1, $sformatf("fault count %0d", fault_count));

    // stuck-at-0 in bit 0 of a word holding 1 there: only the restore phase sees it
    sa1[1] = '0; mem[1] = 4'b1010;
    mem[6] = 4'b0011; sa0[6] = 4'b0001;
    session(6, 1, 0);
    check(fault_count == 2, $sformatf("restore-phase fault counted, count %0d", fault_count));
    check(fault_addr == AW'(1) && fault_syndrome == 4'b1000, "first fault kept");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
