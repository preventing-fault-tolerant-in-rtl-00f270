// SRAM storage of a router input FIFO.
// DEPTH words of DATA_W bits with one write port and one synchronous read port,
// as an SRAM macro offers them. A read issued in cycle t (re=1) shows its word on
// rdata from cycle t+1; rdata holds its value while no read is issued. A read and a
// write to the same address in the same cycle return the old word. The FIFO the
// design tests is SRAM based; the port set and read latency are this design's choice.
module fifo_sram #(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned DEPTH  = 8,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

endmodule
