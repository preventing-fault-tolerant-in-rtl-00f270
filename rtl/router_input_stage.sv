// Input stage of a mesh NoC router with on-line tested FIFO buffers.
//
// A mesh router buffers flits only at its input channels, so these buffers are
// where latent SRAM faults accumulate. This stage holds one fifo_test_channel per
// router port (PORTS=5: north, east, south, west, local). Each channel is tested
// on its own schedule: every TEST_PERIOD normal-mode cycles it stalls, runs the
// transparent SOA-MATS++ march over the flits it holds, restores them and resumes.
// The buffered flits go out on out_valid/out_data/out_ready towards the router's
// switch, which is not part of this design. All per-port signals are packed arrays
// indexed by port. Buffering at the inputs and per-buffer periodic testing follow
// the original scheme; the port count and sizes are this design's choices, except the
// 4-bit word, which is the example width of the original scheme.
module router_input_stage
  import fifo_test_pkg::*;
#(
  parameter int unsigned PORTS       = 5,
  parameter int unsigned DATA_W      = 4,
  parameter int unsigned DEPTH       = 8,
  parameter int unsigned TEST_PERIOD = 1024,
  localparam int unsigned AW         = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [PORTS-1:0]                     test_en,
  input  logic [PORTS-1:0]                     in_valid,
  input  logic [PORTS-1:0][DATA_W-1:0]         in_data,
  output logic [PORTS-1:0]                     in_ready,
  output logic [PORTS-1:0]                     out_valid,
  output logic [PORTS-1:0][DATA_W-1:0]         out_data,
  input  logic [PORTS-1:0]                     out_ready,
  output logic [PORTS-1:0]                     test_mode,
  output logic [PORTS-1:0]                     test_done,
  output logic [PORTS-1:0]                     fault,
  output logic [PORTS-1:0][AW-1:0]             fault_addr,
  output logic [PORTS-1:0][DATA_W-1:0]         fault_syndrome,
  output logic [PORTS-1:0][FAULT_CNT_W-1:0]    fault_count
);

  for (genvar p = 0; p < PORTS; p++) begin : g_port
    fifo_test_channel #(
      .DATA_W      (DATA_W),
      .DEPTH       (DEPTH),
      .TEST_PERIOD (TEST_PERIOD)
    ) u_ch (
      .clk            (clk),
      .rst_n          (rst_n),
      .test_en        (test_en[p]),
      .in_valid       (in_valid[p]),
      .in_data        (in_data[p]),
      .in_ready       (in_ready[p]),
      .out_valid      (out_valid[p]),
      .out_data       (out_data[p]),
      .out_ready      (out_ready[p]),
      .test_mode      (test_mode[p]),
      .test_done      (test_done[p]),
      .fault          (fault[p]),
      .fault_addr     (fault_addr[p]),
      .fault_syndrome (fault_syndrome[p]),
      .fault_count    (fault_count[p])
    );
  end

endmodule
