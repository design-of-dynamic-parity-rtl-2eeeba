// Self-checking test of packet_control, for the default T = 2 and for T = 3.
// A reference model with its own modulo-T counter predicts the mode, the
// request vector handed to the round robin arbiter, is_priority, the bypass
// and the gated pointer-update strobe under random requests, dynamic
// priorities and accept strobes. It also counts that every mode occurred.
module tb_packet_control;
  import dp_arbiter_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n;
  logic [3:0] request_in, dp_in;
  logic       change_in;

  logic [3:0] rr2, rr3;
  logic       chg2, chg3, isp2, isp3, byp2, byp3;
  pcc_mode_e  mode2, mode3;
  logic [0:0] cnt2;
  logic [1:0] cnt3;

  packet_control dut2 (
    .clk, .rst_n, .request_in, .dp_in, .change_rr_priority_in(change_in),
    .request_in_rr(rr2), .change_rr_priority(chg2), .is_priority(isp2),
    .bypass(byp2), .mode(mode2), .prio_cnt(cnt2));
  packet_control #(.N(4), .T(3)) dut3 (
    .clk, .rst_n, .request_in, .dp_in, .change_rr_priority_in(change_in),
    .request_in_rr(rr3), .change_rr_priority(chg3), .is_priority(isp3),
    .bypass(byp3), .mode(mode3), .prio_cnt(cnt3));

  int ref_cnt2, ref_cnt3;
  int seen[4];

  function automatic int popc(input logic [3:0] v);
    int c = 0;
    for (int i = 0; i < 4; i++) c += v[i];
    return c;
  endfunction

  // Reference decision: 0 idle, 1 bypass, 2 high only, 3 all.
  function automatic int ref_mode(input logic [3:0] r, input logic [3:0] d, input int cnt);
    if (popc(r) == 0) return 0;
    if (popc(r) == 1) return 1;
    if ((r & d) != 0 && cnt != 0) return 2;
    return 3;
  endfunction

  task automatic cmp(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d req=%b dp=%b", what, got, exp, request_in, dp_in);
    end
  endtask

  task automatic check_one(input int t, input int cnt, input int m_got, input logic [3:0] rr_got,
                           input logic isp_got, input logic byp_got, input logic chg_got,
                           input int cnt_got, output int cnt_next);
    int m;
    logic [3:0] rr_exp;
    m = ref_mode(request_in, dp_in, cnt);
    rr_exp = (m == 2) ? (request_in & dp_in) : (m == 3) ? request_in : 4'b0;
    cmp(cnt_got, cnt, $sformatf("T=%0d counter", t));
    cmp(m_got, m, $sformatf("T=%0d mode", t));
    cmp(int'(rr_got), int'(rr_exp), $sformatf("T=%0d request_in_rr", t));
    cmp(int'(isp_got), int'(m == 2), $sformatf("T=%0d is_priority", t));
    cmp(int'(byp_got), int'(m == 1), $sformatf("T=%0d bypass", t));
    cmp(int'(chg_got), int'(change_in && m >= 2), $sformatf("T=%0d change_rr_priority", t));
    cnt_next = cnt;
    if (change_in && m >= 2 && (request_in & dp_in) != 0) cnt_next = (cnt + 1) % t;
    if (t == 2) seen[m]++;
  endtask

  initial begin
    int n2, n3;
    rst_n = 0; request_in = 0; dp_in = 0; change_in = 0;
    ref_cnt2 = 0; ref_cnt3 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      request_in = 4'($urandom); dp_in = 4'($urandom); change_in = ($urandom % 4) != 0;
      #1;
      check_one(2, ref_cnt2, int'(mode2), rr2, isp2, byp2, chg2, int'(cnt2), n2);
      check_one(3, ref_cnt3, int'(mode3), rr3, isp3, byp3, chg3, int'(cnt3), n3);
      @(posedge clk);
      ref_cnt2 = n2; ref_cnt3 = n3;
      #1;
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL mode %0d never seen", m); end
    end
    $display("modes seen: idle=%0d bypass=%0d high=%0d all=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
