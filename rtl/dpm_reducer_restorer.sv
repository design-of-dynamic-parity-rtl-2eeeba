// Priority reducer / restorer of the dynamic-priority matrix arbiter.
//
// Takes the comparator's choice (cp) and turns it into the registered grant
// out_en (out_en[k-1] = out_en<k>). It also computes the next dynamic
// priorities that go back to the priority box: the winner's priority is
// reduced by one (not below zero), the others keep theirs. When, after that
// reduction, no requesting input has any priority left, it asks the box to
// restore all programmed priorities instead. With all inputs requesting, each
// requester is therefore granted as many times per round as its programmed
// priority value, the higher values first.
//
// Timing: dp_next and restore are combinational; out_en is a flip-flop output,
// valid one clock after the request. rst_n is asynchronous, active low.
// Reducing by one and restoring when the requesters are exhausted is this
// design's reading of the block's name; no more of its insides is given.
module dpm_reducer_restorer
  import dp_arbiter_pkg::*;
#(
  parameter int unsigned N  = N_REQ,
  parameter int unsigned PW = PRIO_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         cp,
  input  logic [N-1:0]         dp_req,
  input  logic [N-1:0][PW-1:0] dp_val,
  output logic [N-1:0][PW-1:0] dp_next,
  output logic                 restore,
  output logic [N-1:0]         out_en
);

  always_comb begin
    restore = 1'b1;
    for (int unsigned i = 0; i < N; i++) begin
      dp_next[i] = (cp[i] && dp_val[i] != '0) ? dp_val[i] - 1'b1 : dp_val[i];
      if (dp_req[i] && dp_next[i] != '0) restore = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_en <= '0;
    else        out_en <= cp;
  end

endmodule
