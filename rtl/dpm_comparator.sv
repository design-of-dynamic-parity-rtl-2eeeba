// Comparator of the dynamic-priority matrix arbiter.
//
// Builds a priority matrix from the dynamic priorities: entry (i, j) says that
// requester i beats requester j, which holds when dp_val[i] > dp_val[j], or when
// the two are equal and i < j (requester 1 wins ties). Requester i is chosen
// (cp[i], the CP<i+1> line) when it requests and beats every other requester
// that requests. The result is one-hot, or zero when nobody requests.
//
// Purely combinational. Forming an N x N matrix from the priorities follows the
// matrix-arbiter idea; the tie rule is this design's choice.
module dpm_comparator
  import dp_arbiter_pkg::*;
#(
  parameter int unsigned N  = N_REQ,
  parameter int unsigned PW = PRIO_W
) (
  input  logic [N-1:0]         dp_req,
  input  logic [N-1:0][PW-1:0] dp_val,
  output logic [N-1:0][N-1:0]  beats,
  output logic [N-1:0]         cp
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        if (i == j)      beats[i][j] = 1'b0;
        else if (i < j)  beats[i][j] = (dp_val[i] >= dp_val[j]);
        else             beats[i][j] = (dp_val[i] >  dp_val[j]);
      end
    end
    for (int unsigned i = 0; i < N; i++) begin
      cp[i] = dp_req[i];
      for (int unsigned j = 0; j < N; j++) begin
        if (j != i && dp_req[j] && !beats[i][j]) cp[i] = 1'b0;
      end
    end
  end

  always_comb begin
    assert ((cp & (cp - 1'b1)) == '0) else $error("dpm_comparator: CP not one-hot");
    assert ((|cp) == (|dp_req)) else $error("dpm_comparator: no winner");
  end

endmodule
