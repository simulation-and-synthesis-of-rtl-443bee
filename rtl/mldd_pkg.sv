// mldd_pkg: states of the decoder/detector control unit.
//   MLDD_IDLE   - nothing loaded (after reset)
//   MLDD_DETECT - the first DETECT_CYCLES decoding cycles, check sums watched
//   MLDD_DECODE - an error was seen: N further decoding cycles
//   MLDD_DONE   - finish high, the decoded word is on the output
package mldd_pkg;
  typedef enum logic [1:0] {
    MLDD_IDLE   = 2'd0,
    MLDD_DETECT = 2'd1,
    MLDD_DECODE = 2'd2,
    MLDD_DONE   = 2'd3
  } mldd_state_e;
endpackage
