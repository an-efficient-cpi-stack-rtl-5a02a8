// cpi_pkg: shared constants and types of the FIFO-sFMT branch-misprediction
// counter. The entry count (64) is the configuration evaluated for the
// counter hardware; the 4-wide dispatch/commit bandwidth matches the 4-wide
// out-of-order core the counters are meant for. Timestamp and counter widths
// are this design's own choice.
package cpi_pkg;

  localparam int unsigned DEF_DEPTH = 64;  // FIFO-sFMT entries
  localparam int unsigned DEF_WIDTH = 4;   // branches dispatched/committed per cycle
  localparam int unsigned DEF_TS_W  = 32;  // timestamp bits (wraps; penalties use modulo subtraction)
  localparam int unsigned DEF_CNT_W = 64;  // width of the accumulated CPI component counters

  // State of the single branch miss handler.
  //   BMH_IDLE     : no misprediction outstanding (mispredict bit clear)
  //   BMH_RESOLVED : a misprediction was resolved; neither its commit nor the
  //                  first correct-path dispatch has been seen yet
  //   BMH_CASE_A   : the mispredicted branch committed first; its dispatch
  //                  timestamp waits in the handler for the first correct-path dispatch
  //   BMH_CASE_B   : correct-path instructions dispatched first; their dispatch
  //                  time and the FIFO tail wait in the handler for the commit
  typedef enum logic [1:0] {
    BMH_IDLE     = 2'd0,
    BMH_RESOLVED = 2'd1,
    BMH_CASE_A   = 2'd2,
    BMH_CASE_B   = 2'd3
  } bmh_state_e;

endpackage
