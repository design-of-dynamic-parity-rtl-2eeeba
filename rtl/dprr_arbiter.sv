// Dynamic-priority round robin arbiter (one output channel).
//
// Packets carry a one-bit dynamic priority (dp_in, one bit per requester) that
// the upstream router raised because it was congested. The arbiter is built
// from four parts, as in the scheme's block diagram:
//   * dp_generator   - raises dp_out for the downstream router when more than
//                      T requests compete here;
//   * packet_control - single-request bypass, or selection of the high-priority
//                      requests (while its modulo-T counter is non-zero) or of
//                      all requests for the round robin arbiter;
//   * rr_arbiter     - a round robin arbiter; is_priority picks one of its two
//                      pointers (high-priority rounds / ordinary rounds); it
//                      could be swapped for another arbiter with the same ports;
//   * output mux     - grant = request_in on a bypass, else the round robin
//                      grant.
// grant and dp_out are combinational in request_in/dp_in. change_rr_priority_in
// is the strobe that accepts the current grant: on that clock edge the round
// robin pointer and the priority counter advance. is_priority shows that the
// current grant was chosen among high-priority requests only.
// The selector of the output multiplexer (the bypass condition) is this
// design's reading of "delivered without arbitration".
module dprr_arbiter
  import dp_arbiter_pkg::*;
#(
  parameter int unsigned N = N_REQ,
  parameter int unsigned T = DP_T
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] request_in,
  input  logic [N-1:0] dp_in,
  input  logic         change_rr_priority_in,
  output logic [N-1:0] grant,
  output logic         dp_out,
  output logic         is_priority,
  output pcc_mode_e    mode,
  output logic [((T > 1) ? $clog2(T) : 1)-1:0] prio_cnt
);

  logic [N-1:0]  request_in_rr;
  logic [N-1:0]  grant_rr;
  logic          change_rr_priority;
  logic          bypass;

  dp_generator #(.N(N), .T(T)) u_dp_generator (
    .request_in (request_in),
    .dp_out     (dp_out)
  );

  packet_control #(.N(N), .T(T)) u_packet_control (
    .clk                   (clk),
    .rst_n                 (rst_n),
    .request_in            (request_in),
    .dp_in                 (dp_in),
    .change_rr_priority_in (change_rr_priority_in),
    .request_in_rr         (request_in_rr),
    .change_rr_priority    (change_rr_priority),
    .is_priority           (is_priority),
    .bypass                (bypass),
    .mode                  (mode),
    .prio_cnt              (prio_cnt)
  );

  rr_arbiter #(.N(N)) u_rr_arbiter (
    .clk         (clk),
    .rst_n       (rst_n),
    .req         (request_in_rr),
    .is_priority (is_priority),
    .update      (change_rr_priority),
    .grant       (grant_rr)
  );

  assign grant = bypass ? request_in : grant_rr;

endmodule
