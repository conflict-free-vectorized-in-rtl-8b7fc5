// bp_pkg: types and constants shared by the vectorized belief-propagation
// polar decoder.
//
// The decoder stores log-likelihood ratios (LLRs) as signed fixed-point
// integers with symmetric saturation.  The min-sum check-node function is
// scaled by 0.9 as in the scaled min-sum rule; in hardware the factor is
// approximated by SCALE_NUM / 2**SCALE_SHIFT = 29/32 = 0.906 (this design's
// choice, the algorithm only names 0.9).
//
// bp_op_e tells the datapath which of the three kinds of stage an issued
// vector belongs to:
//   OP_RIGHT  right-bound stage, CU computes R messages, result is transposed
//   OP_LEFT   left-bound stage, CU computes L messages, result is transposed
//   OP_FINAL  last left-bound stage, CU computes L at the leftmost column and
//             the hard decisions are written to the output memory
package bp_pkg;

  localparam int unsigned SCALE_NUM   = 29;
  localparam int unsigned SCALE_SHIFT = 5;

  typedef enum logic [1:0] {
    OP_RIGHT = 2'd0,
    OP_LEFT  = 2'd1,
    OP_FINAL = 2'd2
  } bp_op_e;

  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_INIT  = 3'd1,
    ST_ISSUE = 3'd2,
    ST_DRAIN = 3'd3,
    ST_DONE  = 3'd4
  } bp_state_e;

endpackage
