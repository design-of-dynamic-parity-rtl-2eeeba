// End-to-end test of dp_arbiter_top at its default parameters (4 requesters,
// T = 2, 32-bit address, 4-bit priorities). Both arbiters run at once:
//   round robin side - the published full-load scenario (grant 1,2,3,4,1),
//                      then mixed traffic with dynamic priorities, lone
//                      requests and wait states;
//   matrix side      - the published priorities 1,3,6,2 under full load, then
//                      random requests and priority changes.
// Every output is compared each clock with reference models kept in this
// file. The test also counts how often each mechanism occurred and fails if
// one never did: single-request bypass, high-priority round, ordinary round,
// priority counter wrap, dp_out raised, wait-state hold (round robin side);
// priority reduction, restore, tie broken by input number, new programmed
// priorities taken at a restore (matrix side).
module tb_dp_arbiter_top;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic            rst_n;
  logic [31:0]     rr_haddr, rr_output_data;
  logic            rr_hburst, rr_hready, rr_htrans, rr_dp_out;
  logic [3:0]      rr_req, rr_dp_in, rr_hmaster, rr_out_en;
  logic [3:0]      ma_req, ma_out_en;
  logic [3:0][3:0] ma_prio;

  dp_arbiter_top dut (.*);

  // mechanism counters
  int n_bypass, n_high, n_all, n_wrap, n_dp_out, n_hold;
  int n_reduce, n_restore, n_tie, n_reload;

  // round robin reference
  int          r_cnt, r_ptr[2];
  logic [3:0]  r_grant_q;
  logic [31:0] r_data_q;
  // matrix reference
  int          m_dp[4];
  bit          m_held;
  logic [3:0]  m_out;
  logic [3:0][3:0] m_prio_at_restore;

  function automatic int popc(input logic [3:0] v);
    int c = 0;
    for (int i = 0; i < 4; i++) c += v[i];
    return c;
  endfunction

  task automatic cmp(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  // model both sides for the inputs now applied, clock, compare
  task automatic cycle();
    logic [3:0] cand, g;
    int sel, win, v[4], best;
    bit arb, rest, slot;
    #1;
    // round robin side
    cmp(rr_dp_out, popc(rr_req) > 2, "rr_dp_out");
    if (popc(rr_req) > 2) n_dp_out++;
    slot = rr_hready && rr_htrans;
    arb = 0; sel = 0; cand = 0; g = 0; win = -1;
    if (popc(rr_req) == 1) begin
      g = rr_req;
      if (slot) n_bypass++;
    end else if (popc(rr_req) > 1) begin
      arb = 1;
      if ((rr_req & rr_dp_in) != 0 && r_cnt != 0) begin sel = 1; cand = rr_req & rr_dp_in; end
      else cand = rr_req;
      for (int k = 0; k < 4; k++)
        if (win < 0 && cand[(r_ptr[sel] + k) % 4]) win = (r_ptr[sel] + k) % 4;
      g = 4'b1 << win;
    end
    if (!slot) n_hold++;
    // matrix side
    for (int i = 0; i < 4; i++) v[i] = m_held ? m_dp[i] : int'(ma_prio[i]);
    if (!m_held && ma_prio != m_prio_at_restore && ma_req != 0) n_reload++;
    best = -1;
    for (int i = 0; i < 4; i++) begin
      if (ma_req[i] && best >= 0 && v[i] == v[best]) n_tie++;
      if (ma_req[i] && (best < 0 || v[i] > v[best])) best = i;
    end
    if (best >= 0 && v[best] > 0) begin v[best]--; n_reduce++; end
    rest = 1;
    for (int i = 0; i < 4; i++) if (ma_req[i] && v[i] != 0) rest = 0;
    if (!m_held) m_prio_at_restore = ma_prio;
    if (rest) begin
      m_held = 0;
      if (ma_req != 0) n_restore++;
    end else begin m_held = 1; m_dp = v; end
    m_out = (best < 0) ? 4'b0 : 4'b1 << best;

    @(posedge clk);
    if (slot) begin
      r_grant_q = g;
      if (g != 0) r_data_q = rr_haddr;
      if (arb) begin
        r_ptr[sel] = (win + 1) % 4;
        if (sel) n_high++; else n_all++;
        if ((rr_req & rr_dp_in) != 0) begin
          if (r_cnt == 1) n_wrap++;
          r_cnt = (r_cnt + 1) % 2;
        end
      end
    end
    #1;
    cmp(rr_hmaster, r_grant_q, "rr_hmaster");
    cmp(rr_out_en, r_grant_q, "rr_out_en");
    cmp(rr_output_data, r_data_q, "rr_output_data");
    cmp(ma_out_en, m_out, "ma_out_en");
  endtask

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  localparam logic [31:0] ADDR = 32'b00001111000011111111100001110000;

  initial begin
    rst_n = 0;
    rr_haddr = 0; rr_hburst = 0; rr_hready = 0; rr_htrans = 0; rr_req = 0; rr_dp_in = 0;
    ma_req = 0; ma_prio = {4'b0010, 4'b0110, 4'b0011, 4'b0001};
    r_cnt = 0; r_ptr[0] = 0; r_ptr[1] = 0; r_grant_q = 0; r_data_q = 0;
    foreach (m_dp[i]) m_dp[i] = 0;
    m_held = 0; m_out = 0; m_prio_at_restore = ma_prio;
    repeat (3) @(posedge clk);
    #1;
    rst_n = 1;
    // published scenarios on both sides
    rr_req = 4'b1111; rr_hready = 1; rr_htrans = 1; rr_hburst = 1; rr_haddr = ADDR;
    ma_req = 4'b1111;
    for (int i = 0; i < 24; i++) begin
      cycle();
      if (i < 5) cmp(rr_hmaster, 4'b0001 << (i % 4), $sformatf("rr rotation %0d", i));
    end
    // priorities changed as in the published matrix waveform
    ma_prio[0] = 4'b0011; ma_prio[1] = 4'b0111;
    rr_dp_in = 4'b0011;
    for (int i = 0; i < 40; i++) cycle();
    // mixed traffic
    for (int n = 0; n < 5000; n++) begin
      rr_req    = ($urandom % 4 == 0) ? 4'b1 << ($urandom % 4) : 4'($urandom);
      rr_dp_in  = 4'($urandom);
      rr_hready = ($urandom % 5) != 0;
      rr_htrans = ($urandom % 5) != 0;
      rr_hburst = 1'($urandom);
      rr_haddr  = $urandom;
      if ($urandom % 8 == 0)  ma_req = 4'($urandom);
      if ($urandom % 64 == 0) ma_prio = {4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom)};
      cycle();
    end
    $display("mechanisms:");
    need(n_bypass,  "rr bypass (lone request)");
    need(n_high,    "rr high-priority round");
    need(n_all,     "rr ordinary round");
    need(n_wrap,    "rr priority counter wrap");
    need(n_dp_out,  "rr dp_out raised");
    need(n_hold,    "rr wait-state hold");
    need(n_reduce,  "ma priority reduced");
    need(n_restore, "ma priorities restored");
    need(n_tie,     "ma tie by input number");
    need(n_reload,  "ma new priorities loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
