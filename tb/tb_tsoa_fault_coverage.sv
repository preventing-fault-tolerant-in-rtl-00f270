// Fault-coverage run of the transparent SOA-MATS++ controller (tsoa_mats_ctrl).
// A behavioural SRAM in this testbench holds one faulty bit cell at a time, of
// one of the fault types the test is meant to catch:
//   SA0 / SA1   stuck-at-0 / stuck-at-1
//   TF_UP/TF_DN transition fault: the cell cannot rise / cannot fall
//   RDF         read-disturb: a read flips the cell and returns the flipped value
//   IRF         incorrect read: a read returns the inverted bit, the cell is intact
// For every fault type, every location, every bit and both stored values of that
// bit (other bits random), a session over a full buffer must report the fault at
// the right location with the faulty bit set in the syndrome. Fault-free sessions
// must report nothing and leave the memory as it was.
module tb_tsoa_fault_coverage;
  import fifo_test_pkg::*;
  localparam int unsigned DATA_W = 4;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned AW     = $clog2(DEPTH);

  typedef enum int {F_NONE, F_SA0, F_SA1, F_TF_UP, F_TF_DN, F_RDF, F_IRF} fkind_e;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [AW-1:0] head = '0;
  logic [AW:0]   count = '0;
  logic test_mode, done, t_we, t_re, fault;
  logic [AW-1:0] t_waddr, t_raddr, fault_addr;
  logic [DATA_W-1:0] t_wdata, t_rdata, fault_syndrome;
  logic [FAULT_CNT_W-1:0] fault_count;
  int checks = 0, failures = 0;
  int detected [7];

  tsoa_mats_ctrl #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  logic [DATA_W-1:0] mem [DEPTH];
  fkind_e fk = F_NONE;
  int fa = 0, fb = 0;

  always @(posedge clk) begin
    logic [DATA_W-1:0] w, r;
    if (t_we) begin
      w = t_wdata;
      if (t_waddr == AW'(fa)) begin
        case (fk)
          F_SA0:   w[fb] = 1'b0;
          F_SA1:   w[fb] = 1'b1;
          F_TF_UP: if (!mem[fa][fb] && w[fb]) w[fb] = 1'b0;
          F_TF_DN: if (mem[fa][fb] && !w[fb]) w[fb] = 1'b1;
          default: ;
        endcase
      end
      mem[t_waddr] <= w;
    end
    if (t_re) begin
      r = mem[t_raddr];
      if (t_raddr == AW'(fa)) begin
        if (fk == F_RDF) begin r[fb] = ~r[fb]; mem[fa][fb] <= r[fb]; end
        if (fk == F_IRF) r[fb] = ~r[fb];
      end
      t_rdata <= r;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic session(input int h);
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    head = AW'(h); count = (AW+1)'(DEPTH); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (test_mode) @(negedge clk);
  endtask

  initial begin
    logic [DATA_W-1:0] prior [DEPTH];
    repeat (2) @(negedge clk);
    // fault-free: nothing reported, contents restored
    for (int r = 0; r < 20; r++) begin
      fk = F_NONE;
      for (int k = 0; k < DEPTH; k++) mem[k] = DATA_W'($urandom);
      prior = mem;
      session($urandom % DEPTH);
      checks++;
      if (fault) begin failures++; $display("false fault report"); end
      for (int k = 0; k < DEPTH; k++) begin
        checks++;
        if (mem[k] !== prior[k]) begin failures++; $display("word %0d not restored", k); end
      end
    end
    // every fault type, location, bit and stored value
    for (int t = int'(F_SA0); t <= int'(F_IRF); t++) begin
      detected[t] = 0;
      for (int a = 0; a < DEPTH; a++)
        for (int b = 0; b < DATA_W; b++)
          for (int v = 0; v < 2; v++) begin
            for (int k = 0; k < DEPTH; k++) mem[k] = DATA_W'($urandom);
            mem[a][b] = 1'(v);
            fk = fkind_e'(t); fa = a; fb = b;
            if (fk == F_SA0) mem[a][b] = 1'b0;
            if (fk == F_SA1) mem[a][b] = 1'b1;
            session($urandom % DEPTH);
            checks++;
            if (fault && fault_addr == AW'(a) && fault_syndrome[b]) detected[t]++;
            else begin
              failures++;
              $display("fault type %0d at %0d bit %0d value %0d: fault=%0d addr=%0d syn=%b",
                       t, a, b, v, fault, fault_addr, fault_syndrome);
            end
          end
    end
    for (int t = int'(F_SA0); t <= int'(F_IRF); t++)
      $display("fault type %s: %0d of %0d detected", fkind_e'(t), detected[t], 2 * DEPTH * DATA_W);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
