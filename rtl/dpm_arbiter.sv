// Dynamic-priority matrix arbiter (one output channel, E_DynamicMatrix).
//
// Four requesters (req[k-1] = req<k>), each with a programmed 4-bit priority
// (prio[k-1] = priority<k>), compete for one output. Three blocks in a loop:
//   dynamic priority box -> DP1..DP4 -> comparator -> CP1..CP4 ->
//   priority reducer / restorer -> (next priorities) -> dynamic priority box.
// The comparator grants the requesting input with the highest dynamic
// priority (ties to the lower-numbered input); the reducer lowers the winner's
// dynamic priority by one; once the requesting inputs have none left, the
// programmed priorities are restored. The grants therefore rotate, and under
// full load input k receives priority<k> grants out of every sum-of-priorities
// cycles. A programmed priority of zero is served only when no requesting
// input with credit competes, so it starves under full load.
//
// Timing: out_en is registered; a grant appears one clock after the requests
// and priorities it was computed from. One grant per clock.
// The port list (priority1..4[3:0], clk, req1..4, out_en1..4) is the published
// one, plus rst_n; the reduce-by-one / restore rule and the tie rule are this
// design's choices. The comparator's priority matrix (beats) is kept as a
// named internal signal for inspection only; lint reports it as unused.
module dpm_arbiter
  import dp_arbiter_pkg::*;
#(
  parameter int unsigned N  = N_REQ,
  parameter int unsigned PW = PRIO_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0][PW-1:0] prio,
  output logic [N-1:0]         out_en
);

  logic [N-1:0]         dp_req;
  logic [N-1:0][PW-1:0] dp_val;
  logic [N-1:0][PW-1:0] dp_next;
  logic                 restore;
  logic [N-1:0][N-1:0]  beats;
  logic [N-1:0]         cp;

  dpm_priority_box #(.N(N), .PW(PW)) u_priority_box (
    .clk     (clk),
    .rst_n   (rst_n),
    .req     (req),
    .prio_in (prio),
    .dp_next (dp_next),
    .restore (restore),
    .dp_req  (dp_req),
    .dp_val  (dp_val)
  );

  dpm_comparator #(.N(N), .PW(PW)) u_comparator (
    .dp_req (dp_req),
    .dp_val (dp_val),
    .beats  (beats),
    .cp     (cp)
  );

  dpm_reducer_restorer #(.N(N), .PW(PW)) u_reducer_restorer (
    .clk     (clk),
    .rst_n   (rst_n),
    .cp      (cp),
    .dp_req  (dp_req),
    .dp_val  (dp_val),
    .dp_next (dp_next),
    .restore (restore),
    .out_en  (out_en)
  );

endmodule
