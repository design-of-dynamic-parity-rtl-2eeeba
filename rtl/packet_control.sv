// Packet control circuit of the dynamic-priority round robin arbiter.
//
// Decides, each cycle, which requests the round robin arbiter sees:
//   * no request               -> PCC_IDLE, nothing is arbitrated;
//   * exactly one request      -> PCC_BYPASS, the request is delivered without
//                                 arbitration (the output multiplexer passes
//                                 request_in straight to grant);
//   * a high-priority request  -> PCC_HIGH when the priority counter is not
//     (request & dp_in) exists    zero: only high-priority requests reach the
//                                 round robin arbiter (is_priority = 1);
//   * otherwise                -> PCC_ALL, all requests are arbitrated.
// The priority counter counts modulo T. It advances by one on every accepted
// arbitration (change_rr_priority_in high, mode HIGH or ALL) in which at least
// one high-priority request was present, so high-priority packets win T-1 of
// every T such arbitrations and ordinary packets are not starved. A bypass or
// an idle cycle leaves the counter and the round robin pointer untouched.
//
// change_rr_priority_in marks the cycle in which the grant is taken;
// change_rr_priority passes it to the round robin arbiter only when an
// arbitration actually took place. Outputs are combinational; the counter is
// the only state and resets to zero.
//
// From the scheme: single-request bypass, round robin among high-priority
// requests, a priority counter modulo T, falling back to round robin over all
// requests when none is high priority or the counter is zero. This design's
// choices: counting also in the zero state (otherwise the counter could never
// leave zero), and the gating of change_rr_priority.
module packet_control
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
  output logic [N-1:0] request_in_rr,
  output logic         change_rr_priority,
  output logic         is_priority,
  output logic         bypass,
  output pcc_mode_e    mode,
  output logic [((T > 1) ? $clog2(T) : 1)-1:0] prio_cnt
);

  logic [N-1:0] high;
  int unsigned  n_active;
  logic         arbitrated;

  always_comb begin
    high     = request_in & dp_in;
    n_active = 0;
    for (int unsigned i = 0; i < N; i++) begin
      if (request_in[i]) n_active++;
    end

    if (n_active == 0)                  mode = PCC_IDLE;
    else if (n_active == 1)             mode = PCC_BYPASS;
    else if (|high && prio_cnt != '0)   mode = PCC_HIGH;
    else                                mode = PCC_ALL;

    unique case (mode)
      PCC_HIGH: request_in_rr = high;
      PCC_ALL:  request_in_rr = request_in;
      default:  request_in_rr = '0;
    endcase

    arbitrated         = (mode == PCC_HIGH) || (mode == PCC_ALL);
    is_priority        = (mode == PCC_HIGH);
    bypass             = (mode == PCC_BYPASS);
    change_rr_priority = change_rr_priority_in && arbitrated;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio_cnt <= '0;
    end else if (change_rr_priority && |high) begin
      prio_cnt <= (int'(prio_cnt) >= T - 1) ? '0 : prio_cnt + 1'b1;
    end
  end

endmodule
