// Self-checking test of dpm_reducer_restorer: random one-hot choices, requests
// and dynamic priorities. Checks the reduced priorities (winner minus one, not
// below zero), the restore request (no requesting input left with priority)
// and the registered grant one clock later.
module tb_dpm_reducer_restorer;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic            rst_n;
  logic [3:0]      cp, dp_req;
  logic [3:0][3:0] dp_val, dp_next;
  logic            restore;
  logic [3:0]      out_en;

  dpm_reducer_restorer dut (.clk, .rst_n, .cp, .dp_req, .dp_val, .dp_next, .restore, .out_en);

  task automatic cmp(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0d exp=%0d", what, got, exp); end
  endtask

  initial begin
    logic [3:0] prev_cp;
    rst_n = 0; cp = 0; dp_req = 0; dp_val = '0;
    repeat (2) @(posedge clk);
    #1;
    cmp(out_en, 0, "out_en in reset");
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int w;
      bit rest;
      w = $urandom % 5;
      cp = (w == 4) ? 4'b0 : 4'b1 << w;
      dp_req = 4'($urandom) | cp;
      for (int i = 0; i < 4; i++) dp_val[i] = 4'($urandom % 3);
      #1;
      rest = 1;
      for (int i = 0; i < 4; i++) begin
        int e;
        e = (cp[i] && dp_val[i] != 0) ? dp_val[i] - 1 : dp_val[i];
        cmp(dp_next[i], e, $sformatf("dp_next[%0d]", i));
        if (dp_req[i] && e != 0) rest = 0;
      end
      cmp(restore, rest, "restore");
      prev_cp = cp;
      @(posedge clk);
      #1;
      cmp(out_en, prev_cp, "registered grant");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
