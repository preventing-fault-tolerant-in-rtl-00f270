// One router input channel with on-line FIFO test.
//
// Combines the SRAM FIFO (fifo_buffer), the counter that starts a test session
// every TEST_PERIOD normal-mode cycles (test_init_counter) and the transparent
// SOA-MATS++ controller (tsoa_mats_ctrl). In normal mode flits pass through the
// FIFO on valid/ready ports. When the counter fires, the controller takes the
// channel into test mode for 8*count + 2 cycles: both flit ports stall
// (in_ready=0, out_valid=0), every occupied SRAM location is inverted, checked and
// restored, and the channel then resumes with its contents unchanged. Faults are
// reported on the fault_* outputs. Stalling incoming flits during the test follows
// the original scheme; the handshake and the status ports are this design's choices.
module fifo_test_channel
  import fifo_test_pkg::*;
#(
  parameter int unsigned DATA_W      = 4,
  parameter int unsigned DEPTH       = 8,
  parameter int unsigned TEST_PERIOD = 1024,
  localparam int unsigned AW         = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   test_en,
  input  logic                   in_valid,
  input  logic [DATA_W-1:0]      in_data,
  output logic                   in_ready,
  output logic                   out_valid,
  output logic [DATA_W-1:0]      out_data,
  input  logic                   out_ready,
  output logic                   test_mode,
  output logic                   test_done,
  output logic                   fault,
  output logic [AW-1:0]          fault_addr,
  output logic [DATA_W-1:0]      fault_syndrome,
  output logic [FAULT_CNT_W-1:0] fault_count
);

  logic              start;
  logic [AW-1:0]     head;
  logic [AW:0]       count;
  logic              t_we, t_re;
  logic [AW-1:0]     t_waddr, t_raddr;
  logic [DATA_W-1:0] t_wdata, t_rdata;

  test_init_counter #(.TEST_PERIOD(TEST_PERIOD)) u_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (test_en),
    .test_mode (test_mode),
    .start     (start)
  );

  tsoa_mats_ctrl #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (start),
    .head           (head),
    .count          (count),
    .test_mode      (test_mode),
    .done           (test_done),
    .t_we           (t_we),
    .t_waddr        (t_waddr),
    .t_wdata        (t_wdata),
    .t_re           (t_re),
    .t_raddr        (t_raddr),
    .t_rdata        (t_rdata),
    .fault          (fault),
    .fault_addr     (fault_addr),
    .fault_syndrome (fault_syndrome),
    .fault_count    (fault_count)
  );

  fifo_buffer #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .test_mode (test_mode),
    .in_valid  (in_valid),
    .in_data   (in_data),
    .in_ready  (in_ready),
    .out_valid (out_valid),
    .out_data  (out_data),
    .out_ready (out_ready),
    .head      (head),
    .count     (count),
    .t_we      (t_we),
    .t_waddr   (t_waddr),
    .t_wdata   (t_wdata),
    .t_re      (t_re),
    .t_raddr   (t_raddr),
    .t_rdata   (t_rdata)
  );

endmodule
