// Self-checking test of dpm_priority_box: after reset and after a restore it
// presents the programmed priorities (following them live), otherwise the
// values fed back on the previous clock; requests pass through unchanged.
module tb_dpm_priority_box;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic            rst_n;
  logic [3:0]      req, dp_req;
  logic [3:0][3:0] prio_in, dp_next, dp_val;
  logic            restore;

  dpm_priority_box dut (.clk, .rst_n, .req, .prio_in, .dp_next, .restore, .dp_req, .dp_val);

  task automatic cmp(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got=%0h exp=%0h", what, got, exp); end
  endtask

  initial begin
    bit held;
    logic [3:0][3:0] stored;
    rst_n = 0; req = 0; prio_in = {4'd2, 4'd6, 4'd3, 4'd1}; dp_next = '0; restore = 0;
    repeat (2) @(posedge clk);
    #1;
    cmp(dp_val, {4'd2, 4'd6, 4'd3, 4'd1}, "programmed priorities after reset");
    prio_in = {4'd2, 4'd6, 4'd7, 4'd3};
    #1;
    cmp(dp_val, {4'd2, 4'd6, 4'd7, 4'd3}, "programmed priorities followed live");
    rst_n = 1;
    held = 0; stored = '0;
    for (int n = 0; n < 3000; n++) begin
      req = 4'($urandom);
      prio_in = {4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom)};
      dp_next = {4'($urandom), 4'($urandom), 4'($urandom), 4'($urandom)};
      restore = ($urandom % 4) == 0;
      #1;
      cmp(dp_req, req, "dp_req");
      cmp(dp_val, held ? stored : prio_in, "dp_val");
      @(posedge clk);
      if (restore) held = 0;
      else begin held = 1; stored = dp_next; end
      #1;
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
