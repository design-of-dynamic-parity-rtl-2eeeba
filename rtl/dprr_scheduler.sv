// Bus-side scheduler built around the dynamic-priority round robin arbiter.
//
// Four masters (req[0] = req1 ... req[3] = req4) compete for one output. On
// every rising clock edge of a transfer slot (hready and htrans both high) the
// arbiter's grant is registered: out_en[k-1] enables output k, hmaster shows the
// granted master one-hot (4'b0001 = master 1 ... 4'b1000 = master 4) and
// output_data takes haddr when some master was granted. The same slot strobe
// accepts the grant inside the arbiter, so with every master requesting and no
// dynamic priority the grant walks 1, 2, 3, 4, 1, ... one step per slot. When
// hready or htrans is low the registered outputs hold.
//
// Timing: outputs are flip-flops, one clock after the requests they answer.
// Reset (rst_n, asynchronous, active low) clears all outputs.
//
// The port names haddr, hburst, hready, htrans, req1..4, hmaster, output_data
// and out_en1..4 and their widths follow the scheduler's published pin list.
// dp_in, dp_out and rst_n are added here so that the dynamic priority and
// reset can reach the arbiter. hburst is accepted for pin compatibility but
// has no effect: no function is given for it, and the published waveform shows
// the grant rotating with hburst high. The arbiter's is_priority, mode and
// prio_cnt status outputs are likewise left unused here (no pin for them in
// the published list), which lint reports as unused signals.
module dprr_scheduler
  import dp_arbiter_pkg::*;
#(
  parameter int unsigned N  = N_REQ,
  parameter int unsigned T  = DP_T,
  parameter int unsigned AW = HADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] haddr,
  input  logic          hburst,
  input  logic          hready,
  input  logic          htrans,
  input  logic [N-1:0]  req,
  input  logic [N-1:0]  dp_in,
  output logic          dp_out,
  output logic [N-1:0]  hmaster,
  output logic [AW-1:0] output_data,
  output logic [N-1:0]  out_en
);

  logic          slot;
  logic [N-1:0]  grant;
  logic          is_priority;
  pcc_mode_e     mode;
  logic [((T > 1) ? $clog2(T) : 1)-1:0] prio_cnt;
  logic [N-1:0]  grant_q;
  logic [AW-1:0] data_q;

  assign slot = hready && htrans;

  dprr_arbiter #(.N(N), .T(T)) u_arbiter (
    .clk                   (clk),
    .rst_n                 (rst_n),
    .request_in            (req),
    .dp_in                 (dp_in),
    .change_rr_priority_in (slot),
    .grant                 (grant),
    .dp_out                (dp_out),
    .is_priority           (is_priority),
    .mode                  (mode),
    .prio_cnt              (prio_cnt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant_q <= '0;
      data_q  <= '0;
    end else if (slot) begin
      grant_q <= grant;
      if (|grant) data_q <= haddr;
    end
  end

  assign out_en      = grant_q;
  assign hmaster     = grant_q;
  assign output_data = data_q;

  always_ff @(posedge clk) begin
    if (slot) begin
      assert ((grant & ~req) == '0) else $error("dprr_scheduler: grant to an idle master");
      assert ((|req) == (|grant)) else $error("dprr_scheduler: requests left ungranted");
    end
  end

endmodule
