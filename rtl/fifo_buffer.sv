// SRAM-based circular FIFO of a router input channel, with a normal and a test mode.
//
// Normal mode: flits enter on a valid/ready port and are written at wr_ptr. The
// SRAM read is synchronous, so the word at the head is prefetched into the SRAM's
// output register and offered on out_valid/out_data; a flit leaves when
// out_valid && out_ready. A location is freed (rd_ptr advances) only when its flit
// leaves, so the flit waiting at the output is still held in the SRAM. fe_ptr is the
// next location to prefetch. Sustained throughput is one flit per cycle.
//
// Test mode (test_mode=1): in_ready and out_valid are forced low in the same cycle,
// so no flit moves, and the SRAM ports are taken over by the t_* signals of the
// test controller. The prefetched output word is dropped and fe_ptr rewinds to
// rd_ptr, so when normal mode returns the head is read again from the (restored)
// SRAM. head and count tell the controller which locations hold flits.
//
// Following the original scheme: SRAM storage, buffering at the router input, two modes,
// incoming flits held off during test. The handshake, the prefetch and the rewind
// are this design's choices.
module fifo_buffer #(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned DEPTH  = 8,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_mode,
  // write side
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              in_ready,
  // read side
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  input  logic              out_ready,
  // occupancy, for the test controller
  output logic [AW-1:0]     head,
  output logic [AW:0]       count,
  // SRAM access in test mode
  input  logic              t_we,
  input  logic [AW-1:0]     t_waddr,
  input  logic [DATA_W-1:0] t_wdata,
  input  logic              t_re,
  input  logic [AW-1:0]     t_raddr,
  output logic [DATA_W-1:0] t_rdata
);

  // Pointers carry one wrap bit so that full and empty can be told apart.
  logic [AW:0] wr_ptr, rd_ptr, fe_ptr;
  logic        ov_q;            // SRAM output register holds the head flit
  logic        push, pop, fetch;
  logic        full;

  logic              m_we, m_re;
  logic [AW-1:0]     m_waddr, m_raddr;
  logic [DATA_W-1:0] m_wdata, m_rdata;

  // Index of a pointer inside the array (DEPTH need not be a power of two).
  function automatic logic [AW:0] ptr_inc(input logic [AW:0] p);
    logic [AW:0] n;
    if (p[AW-1:0] == AW'(DEPTH - 1)) n = {~p[AW], {AW{1'b0}}};
    else                             n = p + 1'b1;
    return n;
  endfunction

  always_comb begin
    full      = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
    if (wr_ptr[AW] == rd_ptr[AW]) count = wr_ptr[AW-1:0] - rd_ptr[AW-1:0];
    else                          count = (AW+1)'(DEPTH) - rd_ptr[AW-1:0] + wr_ptr[AW-1:0];
    head      = rd_ptr[AW-1:0];
    in_ready  = !test_mode && !full;
    out_valid = !test_mode && ov_q;
    push      = in_valid && in_ready;
    pop       = out_valid && out_ready;
    fetch     = !test_mode && (fe_ptr != wr_ptr) && (!ov_q || out_ready);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      fe_ptr <= '0;
      ov_q   <= 1'b0;
    end else begin
      if (push) wr_ptr <= ptr_inc(wr_ptr);
      if (pop)  rd_ptr <= ptr_inc(rd_ptr);
      if (test_mode) begin
        fe_ptr <= rd_ptr;
        ov_q   <= 1'b0;
      end else begin
        if (fetch) fe_ptr <= ptr_inc(fe_ptr);
        if (fetch)    ov_q <= 1'b1;
        else if (pop) ov_q <= 1'b0;
      end
    end
  end

  // SRAM port: flit traffic in normal mode, test controller in test mode.
  always_comb begin
    if (test_mode) begin
      m_we    = t_we;
      m_waddr = t_waddr;
      m_wdata = t_wdata;
      m_re    = t_re;
      m_raddr = t_raddr;
    end else begin
      m_we    = push;
      m_waddr = wr_ptr[AW-1:0];
      m_wdata = in_data;
      m_re    = fetch;
      m_raddr = fe_ptr[AW-1:0];
    end
  end

  fifo_sram #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_sram (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (m_we),
    .waddr (m_waddr),
    .wdata (m_wdata),
    .re    (m_re),
    .raddr (m_raddr),
    .rdata (m_rdata)
  );

  assign out_data = m_rdata;
  assign t_rdata  = m_rdata;

  // Flow-control rules.
  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) full |-> !push);
  a_no_move_test: assert property (@(posedge clk) disable iff (!rst_n) test_mode |-> !push && !pop);
  a_count_range:  assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
