// Self-checking test of dprr_scheduler.
// 1. The published scenario: all four masters requesting, hready, htrans and
//    hburst high, no dynamic priority, a fixed address. hmaster / out_en must
//    step 0001, 0010, 0100, 1000, 0001 one clock apart, and output_data must
//    carry haddr, one clock after the requests (registered outputs).
// 2. Wait states: with hready low the outputs hold.
// 3. Random traffic against a reference model of the whole scheduler.
module tb_dprr_scheduler;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n;
  logic [31:0] haddr;
  logic        hburst, hready, htrans;
  logic [3:0]  req, dp_in;
  logic        dp_out;
  logic [3:0]  hmaster, out_en;
  logic [31:0] output_data;

  dprr_scheduler dut (.clk, .rst_n, .haddr, .hburst, .hready, .htrans, .req, .dp_in,
                      .dp_out, .hmaster, .output_data, .out_en);

  // reference model state
  int          r_cnt, r_ptr[2];
  logic [3:0]  r_grant_q;
  logic [31:0] r_data_q;

  function automatic int popc(input logic [3:0] v);
    int c = 0;
    for (int i = 0; i < 4; i++) c += v[i];
    return c;
  endfunction

  task automatic cmp(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  task automatic cycle(input logic [3:0] r, input logic [3:0] d, input logic rdy,
                       input logic trn, input logic [31:0] a);
    logic [3:0] cand, g;
    int sel, win;
    bit arb;
    req = r; dp_in = d; hready = rdy; htrans = trn; haddr = a; hburst = 1'($urandom);
    #1;
    cmp(dp_out, popc(r) > 2, "dp_out");
    arb = 0; sel = 0; cand = 0; g = 0; win = -1;
    if (popc(r) == 1) g = r;
    else if (popc(r) > 1) begin
      arb = 1;
      if ((r & d) != 0 && r_cnt != 0) begin sel = 1; cand = r & d; end
      else cand = r;
      for (int k = 0; k < 4; k++)
        if (win < 0 && cand[(r_ptr[sel] + k) % 4]) win = (r_ptr[sel] + k) % 4;
      g = 4'b1 << win;
    end
    @(posedge clk);
    if (rdy && trn) begin
      r_grant_q = g;
      if (g != 0) r_data_q = a;
      if (arb) begin
        r_ptr[sel] = (win + 1) % 4;
        if ((r & d) != 0) r_cnt = (r_cnt + 1) % 2;
      end
    end
    #1;
    cmp(hmaster, r_grant_q, "hmaster");
    cmp(out_en, r_grant_q, "out_en");
    cmp(output_data, r_data_q, "output_data");
  endtask

  localparam logic [31:0] ADDR = 32'b00001111000011111111100001110000;

  initial begin
    rst_n = 0; req = 0; dp_in = 0; hready = 0; htrans = 0; hburst = 0; haddr = 0;
    r_cnt = 0; r_ptr[0] = 0; r_ptr[1] = 0; r_grant_q = 0; r_data_q = 0;
    repeat (2) @(posedge clk);
    #1;
    cmp(out_en, 0, "out_en in reset");
    rst_n = 1;
    // 1. published scenario, with literal expectations
    for (int i = 0; i < 5; i++) begin
      cycle(4'b1111, 4'b0000, 1'b1, 1'b1, ADDR);
      cmp(hmaster, 4'b0001 << (i % 4), $sformatf("rotation step %0d", i));
      cmp(output_data, ADDR, "output_data = haddr");
    end
    // 2. wait states hold the outputs
    cycle(4'b1111, 4'b0000, 1'b0, 1'b1, 32'h1234_5678);
    cmp(hmaster, 4'b0001, "hold on hready low");
    cycle(4'b1111, 4'b0000, 1'b1, 1'b0, 32'h1234_5678);
    cmp(hmaster, 4'b0001, "hold on htrans low");
    cmp(output_data, ADDR, "data holds");
    // 3. random traffic
    for (int i = 0; i < 3000; i++)
      cycle(4'($urandom), 4'($urandom), ($urandom % 4) != 0, ($urandom % 4) != 0, $urandom);
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
