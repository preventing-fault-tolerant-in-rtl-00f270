// Transparent SOA-MATS++ test controller for one SRAM FIFO.
//
// A start pulse opens a test session. test_mode rises in the next cycle (T_SETUP)
// and freezes the FIFO; the controller then latches the occupied range (head,
// count) and applies the transparent march element
//     (r x, w ~x, r ~x, w x, r x)
// to each occupied location in turn, from the oldest flit upward (wrapping at
// DEPTH). The first read copies the stored word x into temp and backs it up in
// original. The complement of temp is written, read back into temp, and
// temp ^ original must be all ones. Then original is written back, read into temp,
// and temp ^ original must be all zeros. The flit data is thus restored and no
// external test pattern is needed. Stuck-at, transition and read-disturb faults in
// the inverted or restored word show up as a failing bit in the syndrome.
//
// Timing: one memory operation per cycle, each read's data one cycle later, so a
// location takes 8 cycles and a session 8*count + 2 cycles from the cycle after
// start until test_mode falls (done is high in the last test-mode cycle). An empty
// FIFO gives a 2-cycle session.
//
// Fault report: fault is sticky until reset, fault_addr/fault_syndrome hold the
// first failing compare, fault_count counts every failing compare (saturating).
//
// The march element, temp/original registers and XOR check follow the original scheme;
// the order of visits, the second (all-zeros) compare, the cycle timing and the
// fault report are this design's choices.
module tsoa_mats_ctrl
  import fifo_test_pkg::*;
#(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned DEPTH  = 8,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [AW-1:0]          head,
  input  logic [AW:0]            count,
  output logic                   test_mode,
  output logic                   done,
  // SRAM access
  output logic                   t_we,
  output logic [AW-1:0]          t_waddr,
  output logic [DATA_W-1:0]      t_wdata,
  output logic                   t_re,
  output logic [AW-1:0]          t_raddr,
  input  logic [DATA_W-1:0]      t_rdata,
  // fault report
  output logic                   fault,
  output logic [AW-1:0]          fault_addr,
  output logic [DATA_W-1:0]      fault_syndrome,
  output logic [FAULT_CNT_W-1:0] fault_count
);

  tstate_e           state, state_n;
  logic [AW-1:0]     addr;          // location under test (j)
  logic [AW:0]       left;          // locations still to test, this one included
  logic [DATA_W-1:0] temp, original;

  logic              cmp_check, cmp_inv, mismatch;
  logic [DATA_W-1:0] syndrome;

  always_comb begin
    state_n = state;
    unique case (state)
      T_IDLE:   if (start) state_n = T_SETUP;
      T_SETUP:  state_n = (count == '0) ? T_FINISH : T_RD_X;
      T_RD_X:   state_n = T_CAP_X;
      T_CAP_X:  state_n = T_WR_NX;
      T_WR_NX:  state_n = T_RD_NX;
      T_RD_NX:  state_n = T_CMP_NX;
      T_CMP_NX: state_n = T_WR_X;
      T_WR_X:   state_n = T_RD_X2;
      T_RD_X2:  state_n = T_CMP_X;
      T_CMP_X:  state_n = (left == (AW+1)'(1)) ? T_FINISH : T_RD_X;
      T_FINISH: state_n = T_IDLE;
      default:  state_n = T_IDLE;
    endcase
  end

  always_comb begin
    test_mode = (state != T_IDLE);
    done      = (state == T_FINISH);
    t_re      = (state == T_RD_X) || (state == T_RD_NX) || (state == T_RD_X2);
    t_raddr   = addr;
    t_we      = (state == T_WR_NX) || (state == T_WR_X);
    t_waddr   = addr;
    t_wdata   = (state == T_WR_NX) ? ~temp : original;
    cmp_check = (state == T_CMP_NX) || (state == T_CMP_X);
    cmp_inv   = (state == T_CMP_NX);
  end

  // temp holds the word just read, so the check looks at the read data directly.
  tsoa_comparator #(.DATA_W(DATA_W)) u_cmp (
    .check           (cmp_check),
    .expect_inverted (cmp_inv),
    .temp            (t_rdata),
    .original        (original),
    .mismatch        (mismatch),
    .syndrome        (syndrome)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      addr     <= '0;
      left     <= '0;
      temp     <= '0;
      original <= '0;
    end else begin
      state <= state_n;
      unique case (state)
        T_SETUP: begin
          addr <= head;
          left <= count;
        end
        T_CAP_X: begin
          temp     <= t_rdata;
          original <= t_rdata;
        end
        T_CMP_NX: temp <= t_rdata;
        T_CMP_X: begin
          temp <= t_rdata;
          left <= left - 1'b1;
          addr <= (addr == AW'(DEPTH - 1)) ? '0 : addr + 1'b1;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fault          <= 1'b0;
      fault_addr     <= '0;
      fault_syndrome <= '0;
      fault_count    <= '0;
    end else if (mismatch) begin
      if (!fault) begin
        fault          <= 1'b1;
        fault_addr     <= addr;
        fault_syndrome <= syndrome;
      end
      if (fault_count != '1) fault_count <= fault_count + 1'b1;
    end
  end

  a_no_start_in_test: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == T_IDLE || state == T_FINISH);
  a_one_op:           assert property (@(posedge clk) disable iff (!rst_n) !(t_we && t_re));

endmodule
