// Two routers in a row, each with a dynamic-priority round robin arbiter on
// one output. The upstream arbiter's dp_out travels with the packets it
// forwards and arrives as dp_in of the downstream input they enter (input 1).
//   Phase 1: upstream lightly loaded (2 requests, not more than T = 2): the
//            downstream input 1 is ordinary and receives 1 of every 4 grants
//            when all four downstream inputs compete.
//   Phase 2: upstream congested (4 requests): dp_out rises, input 1 becomes
//            high priority downstream and, with T = 2, wins every
//            high-priority round plus its share of the ordinary rounds:
//            5 of every 8 grants. The other inputs still get 1 each.
// Counts are checked over 32 accepted arbitrations per phase.
module tb_dprr_chain;
  import dp_arbiter_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n;
  logic [3:0] up_req, up_grant, dn_req, dn_grant;
  logic       up_dp_out, dn_dp_out, up_isp, dn_isp;
  pcc_mode_e  up_mode, dn_mode;
  logic [0:0] up_cnt, dn_cnt;

  dprr_arbiter upstream (
    .clk, .rst_n, .request_in(up_req), .dp_in(4'b0000), .change_rr_priority_in(1'b1),
    .grant(up_grant), .dp_out(up_dp_out), .is_priority(up_isp), .mode(up_mode), .prio_cnt(up_cnt));

  dprr_arbiter downstream (
    .clk, .rst_n, .request_in(dn_req), .dp_in({3'b000, up_dp_out}), .change_rr_priority_in(1'b1),
    .grant(dn_grant), .dp_out(dn_dp_out), .is_priority(dn_isp), .mode(dn_mode), .prio_cnt(dn_cnt));

  task automatic cmp(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  task automatic run_phase(input logic [3:0] upstream_load, input int exp1, input int exp_other,
                           input string name);
    int cnt[4];
    foreach (cnt[i]) cnt[i] = 0;
    up_req = upstream_load;
    dn_req = 4'b1111;
    // settle pointer/counter into the new load, then count one aligned window
    repeat (8) @(posedge clk);
    for (int n = 0; n < 32; n++) begin
      #1;
      for (int i = 0; i < 4; i++) if (dn_grant[i]) cnt[i]++;
      @(posedge clk);
    end
    $display("%s: downstream grants %0d %0d %0d %0d (upstream dp_out=%0b)",
             name, cnt[0], cnt[1], cnt[2], cnt[3], up_dp_out);
    cmp(cnt[0], exp1, {name, " input 1 share"});
    for (int i = 1; i < 4; i++) cmp(cnt[i], exp_other, $sformatf("%s input %0d share", name, i + 1));
  endtask

  initial begin
    rst_n = 0; up_req = 0; dn_req = 0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    run_phase(4'b0011, 8, 8, "light upstream load");
    #1;
    cmp(int'(up_dp_out), 0, "no congestion flag at 2 requests");
    run_phase(4'b1111, 20, 4, "congested upstream");
    #1;
    cmp(int'(up_dp_out), 1, "congestion flag at 4 requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
