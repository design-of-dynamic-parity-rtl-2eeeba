// Self-checking test of dpm_arbiter (E_DynamicMatrix).
// 1. Published scenario: all four requesting with priority1..4 = 0001, 0011,
//    0110, 0010. Worked out by hand, each round of 1+3+6+2 = 12 grants is
//       3 3 3 2 3 2 3 4 1 2 3 4
//    (requester numbers), so each requester k gets priority<k> grants per
//    round. Checked for three rounds, one grant per clock.
// 2. priority1 -> 0011 and priority2 -> 0111 as in the published waveform: the
//    new values take effect at the next restore; the following full round of
//    3+7+6+2 = 18 grants must split 3/7/6/2.
// 3. Random requests and priorities against a reference model.
module tb_dpm_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic            rst_n;
  logic [3:0]      req;
  logic [3:0][3:0] prio;
  logic [3:0]      out_en;

  dpm_arbiter dut (.clk, .rst_n, .req, .prio, .out_en);

  // reference model
  int r_dp[4];
  bit r_held;
  logic [3:0] r_out;

  task automatic model_step();
    int v[4], best;
    bit rest;
    for (int i = 0; i < 4; i++) v[i] = r_held ? r_dp[i] : int'(prio[i]);
    best = -1;
    for (int i = 0; i < 4; i++) if (req[i] && (best < 0 || v[i] > v[best])) best = i;
    if (best >= 0 && v[best] > 0) v[best]--;
    rest = 1;
    for (int i = 0; i < 4; i++) if (req[i] && v[i] != 0) rest = 0;
    if (rest) r_held = 0;
    else begin r_held = 1; r_dp = v; end
    r_out = (best < 0) ? 4'b0 : 4'b1 << best;
  endtask

  task automatic cmp(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  // one clock: model and DUT advance together; returns the granted requester (1..4, 0 none)
  task automatic cycle(output int who);
    model_step();
    @(posedge clk);
    #1;
    cmp(out_en, r_out, "out_en vs model");
    who = 0;
    for (int i = 0; i < 4; i++) if (out_en[i]) who = i + 1;
  endtask

  localparam int SEQ [12] = '{3, 3, 3, 2, 3, 2, 3, 4, 1, 2, 3, 4};

  initial begin
    int who, cnt[5];
    rst_n = 0; req = 0; prio = {4'b0010, 4'b0110, 4'b0011, 4'b0001};
    r_held = 0; r_out = 0;
    foreach (r_dp[i]) r_dp[i] = 0;
    repeat (2) @(posedge clk);
    #1;
    cmp(out_en, 0, "no grant in reset");
    rst_n = 1;
    // 1. published scenario
    req = 4'b1111;
    for (int round = 0; round < 3; round++) begin
      foreach (cnt[k]) cnt[k] = 0;
      for (int i = 0; i < 12; i++) begin
        cycle(who);
        cmp(who, SEQ[i], $sformatf("round %0d grant %0d", round, i));
        cnt[who]++;
      end
      for (int k = 1; k <= 4; k++) cmp(cnt[k], int'(prio[k-1]), $sformatf("share of requester %0d", k));
    end
    // 2. new programmed priorities, mid-round
    for (int i = 0; i < 5; i++) cycle(who);
    prio[0] = 4'b0011; prio[1] = 4'b0111;
    for (int i = 0; i < 7; i++) cycle(who);      // rest of the running round
    foreach (cnt[k]) cnt[k] = 0;
    for (int i = 0; i < 18; i++) begin
      cycle(who);
      cnt[who]++;
    end
    cmp(cnt[1], 3, "share 1 after change");
    cmp(cnt[2], 7, "share 2 after change");
    cmp(cnt[3], 6, "share 3 after change");
    cmp(cnt[4], 2, "share 4 after change");
    // requests released: no grant
    req = 4'b0000;
    cycle(who);
    cmp(who, 0, "no request, no grant");
    // 3. random
    for (int n = 0; n < 3000; n++) begin
      if ($urandom % 8 == 0) req = 4'($urandom);
      if ($urandom % 32 == 0) prio = {4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom)};
      cycle(who);
    end
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
