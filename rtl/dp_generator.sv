// DP generator of the dynamic-priority round robin arbiter.
//
// Counts the active bits of the request vector and raises dp_out when that
// count is larger than the threshold T. dp_out is sent to the downstream
// router, where it arrives as the DP (high-priority) flag of the packets that
// leave this output: a congested router marks its traffic as urgent.
//
// Purely combinational: dp_out follows request_in in the same cycle. The
// comparison "number of requests larger than T" is the scheme's; the value of
// T (default 2) is this design's choice.
module dp_generator
  import dp_arbiter_pkg::*;
#(
  parameter int unsigned N = N_REQ,
  parameter int unsigned T = DP_T
) (
  input  logic [N-1:0] request_in,
  output logic         dp_out
);

  int unsigned n_active;

  always_comb begin
    n_active = 0;
    for (int unsigned i = 0; i < N; i++) begin
      if (request_in[i]) n_active++;
    end
    dp_out = (n_active > T);
  end

endmodule
