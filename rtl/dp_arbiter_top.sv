// Both dynamic-priority output arbiters side by side.
//
// The two arbiters are alternative answers to the same problem (several
// packets asking for one output channel of a NoC router) and share nothing
// but the clock and reset; each keeps its own ports:
//   rr_*  - the dynamic-priority round robin scheduler (dprr_scheduler):
//           bus-style inputs, 1-bit dynamic priority per master, registered
//           one-hot grant on rr_out_en / rr_hmaster and registered data.
//   ma_*  - the dynamic-priority matrix arbiter (dpm_arbiter): 4-bit programmed
//           priority per requester, registered one-hot grant on ma_out_en.
// Timing and behaviour are those of the two blocks; see their headers.
module dp_arbiter_top
  import dp_arbiter_pkg::*;
#(
  parameter int unsigned N  = N_REQ,
  parameter int unsigned T  = DP_T,
  parameter int unsigned AW = HADDR_W,
  parameter int unsigned PW = PRIO_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // dynamic-priority round robin scheduler
  input  logic [AW-1:0]        rr_haddr,
  input  logic                 rr_hburst,
  input  logic                 rr_hready,
  input  logic                 rr_htrans,
  input  logic [N-1:0]         rr_req,
  input  logic [N-1:0]         rr_dp_in,
  output logic                 rr_dp_out,
  output logic [N-1:0]         rr_hmaster,
  output logic [AW-1:0]        rr_output_data,
  output logic [N-1:0]         rr_out_en,
  // dynamic-priority matrix arbiter
  input  logic [N-1:0]         ma_req,
  input  logic [N-1:0][PW-1:0] ma_prio,
  output logic [N-1:0]         ma_out_en
);

  dprr_scheduler #(.N(N), .T(T), .AW(AW)) u_rr_scheduler (
    .clk         (clk),
    .rst_n       (rst_n),
    .haddr       (rr_haddr),
    .hburst      (rr_hburst),
    .hready      (rr_hready),
    .htrans      (rr_htrans),
    .req         (rr_req),
    .dp_in       (rr_dp_in),
    .dp_out      (rr_dp_out),
    .hmaster     (rr_hmaster),
    .output_data (rr_output_data),
    .out_en      (rr_out_en)
  );

  dpm_arbiter #(.N(N), .PW(PW)) u_matrix_arbiter (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (ma_req),
    .prio   (ma_prio),
    .out_en (ma_out_en)
  );

endmodule
