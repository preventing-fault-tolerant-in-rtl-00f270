// Shared types for the on-line tested NoC input FIFO.
// The test controller walks each occupied FIFO location through the transparent
// SOA-MATS++ march element (r x, w ~x, r ~x, w x, r x). tstate_e names one state per
// memory operation plus the cycle in which a read's data comes back. The encoding
// is this design's own choice.
package fifo_test_pkg;

  // Test controller states, in the order one location is visited.
  typedef enum logic [3:0] {
    T_IDLE,     // normal mode
    T_SETUP,    // FIFO frozen: latch the occupied range
    T_RD_X,     // r x   : issue read of the location under test
    T_CAP_X,    //         data back: temp <= x, original <= x
    T_WR_NX,    // w ~x  : write complement of temp
    T_RD_NX,    // r ~x  : issue read
    T_CMP_NX,   //         temp <= data, expect temp ^ original == all ones
    T_WR_X,     // w x   : restore original
    T_RD_X2,    // r x   : issue read
    T_CMP_X,    //         temp <= data, expect temp ^ original == all zeros
    T_FINISH    // session done, back to normal mode
  } tstate_e;

  // Width of the fault counter.
  localparam int unsigned FAULT_CNT_W = 16;

endpackage
