// Self-checking test of dp_generator: every request pattern of four
// requesters, for the default threshold T = 2 and for T = 0 and T = 3, is
// compared with a reference count "more than T requests".
module tb_dp_generator;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] req;
  logic dp_t2, dp_t0, dp_t3;

  dp_generator                   dut_t2 (.request_in(req), .dp_out(dp_t2));
  dp_generator #(.N(4), .T(0))   dut_t0 (.request_in(req), .dp_out(dp_t0));
  dp_generator #(.N(4), .T(3))   dut_t3 (.request_in(req), .dp_out(dp_t3));

  function automatic int count(input logic [3:0] v);
    int c = 0;
    for (int i = 0; i < 4; i++) c += v[i];
    return c;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s req=%b got=%0b exp=%0b", what, req, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      req = 4'(v);
      @(posedge clk);
      check(dp_t2, count(req) > 2, "T=2");
      check(dp_t0, count(req) > 0, "T=0");
      check(dp_t3, count(req) > 3, "T=3");
    end
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
