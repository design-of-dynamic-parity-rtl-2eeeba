// Dynamic priority box of the dynamic-priority matrix arbiter.
//
// Holds the current (dynamic) priority of every requester and presents, as
// DP1..DP4, each request together with its dynamic priority to the comparator.
// The dynamic priorities come back every clock from the priority reducer /
// restorer: either reduced values (dp_next) or a restore request. After reset
// and after a restore the box presents the programmed priorities (prio_in)
// directly, so a restore always picks up the values on priority1..4 at that
// time; otherwise it presents its registers.
//
// Interface: req[k-1] and prio_in[k-1] are req<k> and priority<k>; dp_req and
// dp_val are the DP<k> bundles. Registers update on every rising clock edge;
// rst_n is asynchronous and active low. Keeping the programmed priority live
// until the first reduction is this design's choice.
module dpm_priority_box
  import dp_arbiter_pkg::*;
#(
  parameter int unsigned N  = N_REQ,
  parameter int unsigned PW = PRIO_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0][PW-1:0] prio_in,
  input  logic [N-1:0][PW-1:0] dp_next,
  input  logic                 restore,
  output logic [N-1:0]         dp_req,
  output logic [N-1:0][PW-1:0] dp_val
);

  logic [N-1:0][PW-1:0] dp_q;
  logic                 held_q;   // 1: dp_q holds reduced priorities

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_q   <= '0;
      held_q <= 1'b0;
    end else if (restore) begin
      held_q <= 1'b0;
    end else begin
      dp_q   <= dp_next;
      held_q <= 1'b1;
    end
  end

  assign dp_req = req;
  assign dp_val = held_q ? dp_q : prio_in;

endmodule
