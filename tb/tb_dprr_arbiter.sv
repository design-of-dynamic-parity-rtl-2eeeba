// Self-checking test of dprr_arbiter (DP generator + packet control + round
// robin arbiter + output multiplexer), default N = 4, T = 2.
// Directed part: all four requesting with requesters 1 and 2 marked high
// priority; the grant sequence below was worked out by hand from the rules
// (ordinary and high-priority rounds alternate, each with its own pointer):
//   0001 0001 0010 0010 0100 0001 1000 0010
// and a single request is granted without touching any state.
// Random part: a reference model predicts grant, dp_out and is_priority.
module tb_dprr_arbiter;
  import dp_arbiter_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n;
  logic [3:0] request_in, dp_in;
  logic       change_in;
  logic [3:0] grant;
  logic       dp_out, is_priority;
  pcc_mode_e  mode;
  logic [0:0] prio_cnt;

  dprr_arbiter dut (
    .clk, .rst_n, .request_in, .dp_in, .change_rr_priority_in(change_in),
    .grant, .dp_out, .is_priority, .mode, .prio_cnt);

  int r_cnt, r_ptr[2];

  function automatic int popc(input logic [3:0] v);
    int c = 0;
    for (int i = 0; i < 4; i++) c += v[i];
    return c;
  endfunction

  task automatic cmp(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d req=%b dp=%b", what, got, exp, request_in, dp_in);
    end
  endtask

  // Apply one cycle, compare with the model, advance the model.
  task automatic cycle(input logic [3:0] r, input logic [3:0] d, input logic chg);
    logic [3:0] cand, exp_g;
    int sel, win;
    bit arb;
    request_in = r; dp_in = d; change_in = chg;
    #1;
    arb = 0; sel = 0; cand = 0; exp_g = 0; win = -1;
    if (popc(r) == 1) exp_g = r;
    else if (popc(r) > 1) begin
      arb = 1;
      if ((r & d) != 0 && r_cnt != 0) begin sel = 1; cand = r & d; end
      else cand = r;
      for (int k = 0; k < 4; k++)
        if (win < 0 && cand[(r_ptr[sel] + k) % 4]) win = (r_ptr[sel] + k) % 4;
      exp_g = 4'b1 << win;
    end
    cmp(int'(grant), int'(exp_g), "grant");
    cmp(int'(dp_out), int'(popc(r) > 2), "dp_out");
    cmp(int'(is_priority), sel, "is_priority");
    @(posedge clk);
    if (chg && arb) begin
      r_ptr[sel] = (win + 1) % 4;
      if ((r & d) != 0) r_cnt = (r_cnt + 1) % 2;
    end
    #1;
  endtask

  localparam logic [3:0] EXPECT [8] = '{4'b0001, 4'b0001, 4'b0010, 4'b0010,
                                        4'b0100, 4'b0001, 4'b1000, 4'b0010};

  initial begin
    rst_n = 0; request_in = 0; dp_in = 0; change_in = 0;
    r_cnt = 0; r_ptr[0] = 0; r_ptr[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 8; i++) begin
      request_in = 4'b1111; dp_in = 4'b0011; #1;
      cmp(int'(grant), int'(EXPECT[i]), $sformatf("directed step %0d", i));
      cycle(4'b1111, 4'b0011, 1'b1);
    end
    // bypass: a lone request is granted, state unchanged
    cycle(4'b0100, 4'b0000, 1'b1);
    cycle(4'b0100, 4'b0100, 1'b1);
    cmp(int'(prio_cnt), r_cnt, "counter after bypass");
    // random
    for (int i = 0; i < 3000; i++)
      cycle(4'($urandom), 4'($urandom), ($urandom % 3) != 0);
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
