// Self-checking test of dpm_comparator: random requests and 4-bit dynamic
// priorities (with many ties) against a reference "highest priority wins,
// lower-numbered requester wins a tie", plus the pairwise matrix itself.
module tb_dpm_comparator;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0]            dp_req;
  logic [3:0][3:0]       dp_val;
  logic [3:0][3:0]       beats;
  logic [3:0]            cp;

  dpm_comparator dut (.dp_req, .dp_val, .beats, .cp);

  function automatic logic [3:0] model(input logic [3:0] r, input logic [3:0][3:0] v);
    int best = -1;
    for (int i = 0; i < 4; i++)
      if (r[i] && (best < 0 || v[i] > v[best])) best = i;
    return (best < 0) ? 4'b0 : 4'b1 << best;
  endfunction

  initial begin
    // literal case: priorities 1,3,6,2, all requesting -> requester 3
    dp_req = 4'b1111;
    dp_val = {4'd2, 4'd6, 4'd3, 4'd1};
    #1;
    checks++;
    if (cp !== 4'b0100) begin failures++; $display("FAIL literal cp=%b", cp); end
    for (int n = 0; n < 5000; n++) begin
      dp_req = 4'($urandom);
      for (int i = 0; i < 4; i++) dp_val[i] = 4'($urandom % ((n % 2) ? 16 : 3));
      @(posedge clk);
      checks++;
      if (cp !== model(dp_req, dp_val)) begin
        failures++;
        $display("FAIL req=%b val=%h cp=%b exp=%b", dp_req, dp_val, cp, model(dp_req, dp_val));
      end
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          logic e;
          e = (i != j) && ((dp_val[i] > dp_val[j]) || (dp_val[i] == dp_val[j] && i < j));
          checks++;
          if (beats[i][j] !== e) begin failures++; $display("FAIL beats[%0d][%0d]", i, j); end
        end
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
