// roc_top: ROC, a rank-switching, open-row DRAM controller for
// time-predictable multi-requestor systems.
//
// NR ranks share one command bus and one data bus; each rank serves M
// requestors and each requestor owns one private bank of its rank. The
// front end of a requestor turns a request into PRE/ACT/CAS commands,
// leaving its row open (roc_front_end). The back end (roc_back_end) queues
// them and issues one command per cycle through three arbitration levels:
// CAS before PRE/ACT (Level 1), alternation among ranks (Level 2) and among
// the requestors of a rank (Level 3). Alternating CAS commands among ranks
// replaces the long write-to-read turnaround of one rank by the short
// rank-to-rank gap of the data bus. The data path (roc_data_path) moves the
// bursts and reports each finished request.
//
// Interface: per requestor g (rank g/M, bank g%M) a valid/ready request
// port with direction, row, column and a write line; one shared response
// port; the DDR3 command bus (cmd_o, one command or NOP per cycle) and the
// two halves of the data bus (dq_out/dq_oe toward the device, dq_in back),
// DQ_W bits at double data rate. Event strobes report row hits and misses,
// rank switches between consecutive CASes, CASes that overtook a waiting
// rank, and PRE/ACTs held back by a CAS.
//
// Timing: a request that is a row hit puts its CAS on the command bus three
// cycles after it is taken at the earliest (front end, queue, command
// register); its response comes one cycle after the last data beat.
// Defaults: four ranks, two requestors per rank (eight requestors), a
// 64-bit data bus and DDR3-1333H timing. Refresh is not modelled.
module roc_top
  import roc_pkg::*;
#(
  parameter int unsigned NR     = 4,
  parameter int unsigned M      = 2,
  parameter int unsigned QDEPTH = 4,
  parameter int unsigned DQ_W   = 64,
  parameter timing_t     T      = DDR3_1333H,
  localparam int unsigned N      = NR * M,
  localparam int unsigned REQ_W  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned LINE_W = 2 * DQ_W * T.tBUS
) (
  input  logic              clk,
  input  logic              rst_n,
  // requestors
  input  logic [N-1:0]      req_valid,
  output logic [N-1:0]      req_ready,
  input  logic [N-1:0]      req_we,
  input  logic [ROW_W-1:0]  req_row   [N],
  input  logic [COL_W-1:0]  req_col   [N],
  input  logic [LINE_W-1:0] req_wdata [N],
  output logic              resp_valid,
  output logic [REQ_W-1:0]  resp_req,
  output logic              resp_we,
  output logic [LINE_W-1:0] resp_rdata,
  // DRAM device
  output bus_cmd_t          cmd_o,
  output logic [2*DQ_W-1:0] dq_out,
  output logic              dq_oe,
  input  logic [2*DQ_W-1:0] dq_in,
  // events
  output logic [N-1:0]      ev_hit,
  output logic [N-1:0]      ev_miss,
  output logic              ev_rank_switch,
  output logic              ev_reorder,
  output logic              ev_pa_deferred
);
  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1;

  logic [N-1:0]                   q_push;
  qcmd_t                          q_din  [N];
  logic [$clog2(QDEPTH+1)-1:0]    q_free [N];
  logic [LINE_W-1:0]              wdata  [N];
  logic [IW-1:0]                  cmd_idx;

  for (genvar g = 0; g < N; g++) begin : g_fe
    roc_front_end #(.LINE_W(LINE_W)) u_fe (
      .clk, .rst_n,
      .req_valid(req_valid[g]), .req_ready(req_ready[g]), .req_we(req_we[g]),
      .req_row(req_row[g]), .req_col(req_col[g]), .req_wdata(req_wdata[g]),
      .done(resp_valid && resp_req == REQ_W'(g)),
      .q_push(q_push[g]), .q_din(q_din[g]), .q_free(3'(q_free[g])),
      .wdata(wdata[g]), .hit(ev_hit[g]), .miss(ev_miss[g])
    );
  end

  roc_back_end #(.NR(NR), .M(M), .QDEPTH(QDEPTH), .T(T)) u_be (
    .clk, .rst_n, .q_push, .q_din, .q_free, .cmd_o, .cmd_idx,
    .rank_switch(ev_rank_switch), .reorder(ev_reorder), .pa_deferred(ev_pa_deferred)
  );

  roc_data_path #(.N(N), .DQ_W(DQ_W), .T(T)) u_dp (
    .clk, .rst_n, .cmd(cmd_o), .cmd_req(REQ_W'(int'(cmd_o.rank) * M + int'(cmd_idx))),
    .wdata, .dq_out, .dq_oe, .dq_in,
    .resp_valid, .resp_req, .resp_we, .resp_rdata
  );
endmodule
