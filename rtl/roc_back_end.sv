// roc_back_end: the ROC controller back end.
//
// Holds one command queue per requestor, grouped by rank (requestor
// g = r*M + m lives in rank r and owns bank m of it). Every cycle:
//   1. each rank's timing state and the shared data-bus state mark which
//      queue heads may legally issue now;
//   2. Level 3 picks, inside each rank, one ready PRE/ACT and one ready CAS
//      by round robin among the rank's requestors (a CAS whose turn it is
//      and that waits only for the data bus holds the rank's CAS back);
//   3. Level 2 picks one PRE/ACT and one CAS among the ranks, by round
//      robin among ranks, skipping ranks whose CAS is held by their own
//      timing (rank switching) but waiting while the rank whose turn it is
//      waits only for the data bus;
//   4. Level 1 gives the CAS priority over the PRE/ACT.
// The winner is popped from its queue, updates the timing state and is
// registered onto the command bus (cmd_o), so it reaches the device one
// cycle after arbitration. All constraints are counted from that cycle.
//
// Interface: q_push/q_din/q_free per requestor from the front ends; cmd_o
// to the device; rank_switch, reorder and pa_deferred are one-cycle event
// strobes aligned with cmd_o (a CAS to a different rank than the previous
// CAS; a CAS that overtook a waiting rank; a PRE/ACT held back by a CAS).
// The queue depth and the registered command bus are this design's choices.
module roc_back_end
  import roc_pkg::*;
#(
  parameter int unsigned NR     = 4,
  parameter int unsigned M      = 2,
  parameter int unsigned QDEPTH = 4,
  parameter timing_t     T      = DDR3_1333H
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic  [NR*M-1:0]                   q_push,
  input  qcmd_t                              q_din  [NR*M],
  output logic  [$clog2(QDEPTH+1)-1:0]       q_free [NR*M],
  output bus_cmd_t                           cmd_o,
  output logic  [(M>1?$clog2(M):1)-1:0]      cmd_idx,
  output logic                               rank_switch,
  output logic                               reorder,
  output logic                               pa_deferred
);
  localparam int unsigned N  = NR * M;
  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1;

  // ---------------------------------------------------------------- queues
  qcmd_t        head       [N];
  logic [N-1:0] head_valid;
  logic [N-1:0] pop;

  for (genvar g = 0; g < N; g++) begin : g_q
    roc_cmd_queue #(.DEPTH(QDEPTH)) u_q (
      .clk, .rst_n, .push(q_push[g]), .din(q_din[g]), .pop(pop[g]),
      .head(head[g]), .head_valid(head_valid[g]), .free(q_free[g])
    );
  end

  // ------------------------------------------------------- chosen command
  logic              issue, issue_cas;
  logic [RANK_W-1:0] issue_rank;
  logic [IW-1:0]     issue_idx;
  logic              pa_taken, cas_taken, pa_def;
  qcmd_t             issue_cmd;
  logic [$clog2(N)-1:0] issue_g;   // global index of the chosen requestor

  assign issue_g   = $clog2(N)'(issue_rank * M) + $clog2(N)'(issue_idx);
  assign issue_cmd = head[issue_g];

  // ------------------------------------------------------ timing trackers
  logic [NR-1:0] bus_rd_ok, bus_wr_ok;

  roc_bus_timing #(.NR(NR), .T(T)) u_bus (
    .clk, .rst_n, .issue(issue && issue_cas), .issue_wr(issue_cmd.kind == CMD_WR),
    .issue_rank, .rd_ok(bus_rd_ok), .wr_ok(bus_wr_ok)
  );

  logic [NR-1:0]     pa_cand, cas_cand, cas_pend, cas_bwait;
  logic [IW-1:0]     pa_idx_r  [NR];
  logic [IW-1:0]     cas_idx_r [NR];
  logic              l2_pa_valid, l2_cas_valid;
  logic [RANK_W-1:0] l2_pa_rank, l2_cas_rank;

  for (genvar r = 0; r < NR; r++) begin : g_rank
    logic [M-1:0] act_ok, pre_ok, rd_ok, wr_ok, hv;
    cmd_e         hk [M];
    for (genvar m = 0; m < M; m++) begin : g_head
      assign hv[m] = head_valid[r*M+m];
      assign hk[m] = head[r*M+m].kind;
    end

    roc_rank_timing #(.NB(M), .T(T)) u_timing (
      .clk, .rst_n,
      .issue(issue && issue_rank == RANK_W'(r)), .issue_kind(issue_cmd.kind),
      .issue_bank(BANK_W'(issue_idx)),
      .act_ok, .pre_ok, .rd_ok, .wr_ok
    );

    roc_l3_arbiter #(.M(M)) u_l3 (
      .clk, .rst_n, .head_valid(hv), .head_kind(hk),
      .act_ok, .pre_ok, .rd_ok, .wr_ok,
      .bus_rd_ok(bus_rd_ok[r]), .bus_wr_ok(bus_wr_ok[r]),
      .pa_taken (pa_taken  && l2_pa_rank  == RANK_W'(r)),
      .cas_taken(cas_taken && l2_cas_rank == RANK_W'(r)),
      .pa_valid(pa_cand[r]), .pa_idx(pa_idx_r[r]),
      .cas_valid(cas_cand[r]), .cas_idx(cas_idx_r[r]),
      .cas_pending(cas_pend[r]), .cas_bus_wait(cas_bwait[r])
    );
  end

  logic l2_reorder;

  roc_l2_arbiter #(.NR(NR)) u_l2 (
    .clk, .rst_n, .pa_cand, .cas_cand, .cas_pending(cas_pend), .cas_bus_wait(cas_bwait),
    .pa_taken, .cas_taken,
    .pa_valid(l2_pa_valid), .pa_rank(l2_pa_rank),
    .cas_valid(l2_cas_valid), .cas_rank(l2_cas_rank),
    .reorder(l2_reorder)
  );

  roc_l1_arbiter #(.IDX_W(IW)) u_l1 (
    .pa_valid(l2_pa_valid), .pa_rank(l2_pa_rank), .pa_idx(pa_idx_r[l2_pa_rank]),
    .cas_valid(l2_cas_valid), .cas_rank(l2_cas_rank), .cas_idx(cas_idx_r[l2_cas_rank]),
    .issue, .issue_cas, .issue_rank, .issue_idx,
    .pa_taken, .cas_taken, .pa_deferred(pa_def)
  );

  always_comb begin
    pop = '0;
    if (issue) pop[issue_g] = 1'b1;
  end

  // ------------------------------------------------- command bus register
  logic              last_cas_valid;
  logic [RANK_W-1:0] last_cas_rank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd_o          <= '0;
      cmd_idx        <= '0;
      rank_switch    <= 1'b0;
      reorder        <= 1'b0;
      pa_deferred    <= 1'b0;
      last_cas_valid <= 1'b0;
      last_cas_rank  <= '0;
    end else begin
      cmd_o.valid <= issue;
      cmd_o.kind  <= issue ? issue_cmd.kind : CMD_NOP;
      cmd_o.rank  <= issue_rank;
      cmd_o.bank  <= BANK_W'(issue_idx);
      cmd_o.row   <= issue_cmd.row;
      cmd_o.col   <= issue_cmd.col;
      cmd_idx     <= issue_idx;
      rank_switch <= issue && issue_cas && last_cas_valid && (last_cas_rank != issue_rank);
      reorder     <= l2_reorder;
      pa_deferred <= pa_def;
      if (issue && issue_cas) begin
        last_cas_valid <= 1'b1;
        last_cas_rank  <= issue_rank;
      end
    end
  end
endmodule
