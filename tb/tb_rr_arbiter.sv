// Self-checking test of rr_arbiter. A reference model with its own two
// pointers predicts every grant under random requests, pointer choice and
// update strobes; a directed part checks the 1, 2, 3, 4, 1 rotation under full
// load and that each pointer set rotates independently.
module tb_rr_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n;
  logic [3:0] req;
  logic       is_priority, update;
  logic [3:0] grant;

  rr_arbiter dut (.clk, .rst_n, .req, .is_priority, .update, .grant);

  int ref_ptr[2];

  function automatic logic [3:0] model_grant(input logic [3:0] r, input int p);
    for (int k = 0; k < 4; k++) if (r[(p + k) % 4]) return 4'b1 << ((p + k) % 4);
    return 4'b0;
  endfunction

  function automatic int onehot_index(input logic [3:0] g);
    for (int i = 0; i < 4; i++) if (g[i]) return i;
    return -1;
  endfunction

  task automatic step_and_check(input logic [3:0] r, input logic sel, input logic upd);
    logic [3:0] exp;
    req = r; is_priority = sel; update = upd;
    #1;
    exp = model_grant(r, ref_ptr[sel]);
    checks++;
    if (grant !== exp) begin
      failures++;
      $display("FAIL req=%b sel=%0b ptr=%0d grant=%b exp=%b", r, sel, ref_ptr[sel], grant, exp);
    end
    @(posedge clk);
    if (upd && exp != 0) ref_ptr[sel] = (onehot_index(exp) + 1) % 4;
    #1;
  endtask

  initial begin
    rst_n = 0; req = 0; is_priority = 0; update = 0;
    ref_ptr[0] = 0; ref_ptr[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // full load, ordinary pointer: 0001 0010 0100 1000 0001
    for (int i = 0; i < 5; i++) begin
      req = 4'b1111; is_priority = 1'b0; #1;
      checks++;
      if (grant !== 4'b0001 << (i % 4)) begin
        failures++;
        $display("FAIL rotation step %0d grant=%b", i, grant);
      end
      step_and_check(4'b1111, 1'b0, 1'b1);
    end
    // the high-priority pointer has not moved: starts at requester 1
    step_and_check(4'b1111, 1'b1, 1'b1);
    checks++;
    if (ref_ptr[1] != 1) begin failures++; $display("FAIL pointer sets not independent"); end
    // no update: grant holds
    step_and_check(4'b0110, 1'b0, 1'b0);
    step_and_check(4'b0110, 1'b0, 1'b0);
    // random
    for (int i = 0; i < 2000; i++)
      step_and_check(4'($urandom), 1'($urandom), 1'($urandom));
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
