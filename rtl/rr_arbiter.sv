// Round robin arbiter with two pointer sets.
//
// A pointer names the requester with the highest priority; the grant goes to
// the first active request found from the pointer upwards, wrapping around.
// When `update` is high at a rising clock edge and a grant was given, the
// pointer moves to the requester just after the one served, so the request
// just served has the lowest priority in the next round.
//
// Two such pointers are kept and `is_priority` chooses between them: one for
// rounds among the high-priority requests only, one for rounds among all
// requests. With a single shared pointer, two high-priority requesters that
// alternate with ordinary rounds would keep pulling the pointer back to
// themselves and starve the others; separate pointers keep each kind of round
// fair on its own. Tie is_priority low and this is a conventional round robin
// arbiter.
//
// grant is combinational (one-hot or zero) from req, is_priority and the
// pointers; both pointers reset to requester 1 (bit 0).
module rr_arbiter
  import dp_arbiter_pkg::*;
#(
  parameter int unsigned N = N_REQ
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         is_priority,
  input  logic         update,
  output logic [N-1:0] grant
);

  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  logic [1:0][PW-1:0] ptr_q;
  logic [PW-1:0]      ptr;
  logic [PW-1:0]      winner;
  logic               found;

  always_comb begin
    ptr    = ptr_q[is_priority];
    grant  = '0;
    winner = ptr;
    found  = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      logic [PW:0]   sum;
      logic [PW-1:0] idx;
      sum = {1'b0, ptr} + (PW+1)'(k);
      idx = (sum >= (PW+1)'(N)) ? PW'(sum - (PW+1)'(N)) : sum[PW-1:0];
      if (!found && req[idx]) begin
        found      = 1'b1;
        winner     = idx;
        grant[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
    end else if (update && found) begin
      ptr_q[is_priority] <= (int'(winner) == N - 1) ? '0 : winner + 1'b1;
    end
  end

  always_comb begin
    assert ((grant & (grant - 1'b1)) == '0) else $error("rr_arbiter: grant not one-hot");
    assert ((grant & ~req) == '0) else $error("rr_arbiter: grant without request");
  end

endmodule
