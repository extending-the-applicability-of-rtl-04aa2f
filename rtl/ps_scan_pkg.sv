// ps_scan_pkg: types shared by the parallel-serial scan design.
//
// scan_op_e is the per-cycle operation that every scan chain performs:
//   SCAN_HOLD      all scan cells keep their value
//   SCAN_PARALLEL  broadcast (parallel) mode: every chain shifts by one cell,
//                  its head cell loading the common scan-input value
//   SCAN_SERIAL    serial mode: only the head cells shift, along the path
//                  scan-in -> head of chain 0 -> head of chain 1 -> ...;
//                  all other cells hold
//   SCAN_CAPTURE   functional capture: every cell loads the circuit's
//                  next-state value
// scan_ctrl_t bundles the operation with the data bit it uses, which is how the
// stream decoder drives the scan array.
package ps_scan_pkg;

  typedef enum logic [1:0] {
    SCAN_HOLD     = 2'd0,
    SCAN_PARALLEL = 2'd1,
    SCAN_SERIAL   = 2'd2,
    SCAN_CAPTURE  = 2'd3
  } scan_op_e;

  typedef struct packed {
    scan_op_e op;
    logic     data;
  } scan_ctrl_t;

endpackage
