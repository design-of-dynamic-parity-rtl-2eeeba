// Shared constants and types of the two dynamic-priority output arbiters.
//
// N_REQ  : number of requesters competing for one output channel. Both arbiters
//          are shown with four (req1..req4), so 4 is the default everywhere.
// PRIO_W : width of a programmed priority of the matrix arbiter (priority1..4 are
//          4-bit buses).
// DP_T   : threshold / modulo of the round robin variant. The scheme names a
//          threshold T but gives no value; 2 is this design's choice.
// HADDR_W: width of the bus address carried by the round robin scheduler (32).
//
// Requester k (req<k>, out_en<k>) is always bit k-1 of a vector, so grant
// 4'b0001 means requester 1, as on the hmaster bus of the round robin scheduler.
package dp_arbiter_pkg;

  localparam int unsigned N_REQ   = 4;
  localparam int unsigned PRIO_W  = 4;
  localparam int unsigned DP_T    = 2;
  localparam int unsigned HADDR_W = 32;

  // Decision of the packet control circuit for the current cycle.
  typedef enum logic [1:0] {
    PCC_IDLE   = 2'd0,  // no request
    PCC_BYPASS = 2'd1,  // exactly one request: delivered without arbitration
    PCC_HIGH   = 2'd2,  // round robin among the high-priority requests only
    PCC_ALL    = 2'd3   // round robin among all requests
  } pcc_mode_e;

endpackage
