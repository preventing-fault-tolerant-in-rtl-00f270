// Self-checking testbench for fifo_sram: fills the array, then issues random
// reads and writes (also both in one cycle) and checks each read word, one cycle
// after the read, against a reference array. Also checks that rdata holds its
// value while no read is issued.
module tb_fifo_sram;
  localparam int unsigned DATA_W = 4;
  localparam int unsigned DEPTH  = 8;
  localparam int unsigned AW     = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic [DATA_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  fifo_sram #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] exp;
    logic [DATA_W-1:0] held;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = DATA_W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      re = 1'($urandom); raddr = AW'($urandom);
      we = 1'($urandom); waddr = AW'($urandom); wdata = DATA_W'($urandom);
      exp = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      if (re) begin
        checks++;
        if (rdata !== exp) begin
          failures++;
          $display("read mismatch addr %0d got %h exp %h", raddr, rdata, exp);
        end
      end
      held = rdata;
      re = 1'b0; we = 1'b0;
      @(negedge clk);
      checks++;
      if (rdata !== held) begin failures++; $display("rdata not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
