// roc_l3_arbiter: Level 3 arbitration, inside one rank.
//
// The rank's requestors each present the head of their command queue. A
// head is ready when the rank's timing state (and, for a CAS, the shared
// data bus) allows it this cycle. Two independent round-robin arbiters pick
// among the ready heads: the P/A arbiter among PRE/ACT commands and the CAS
// arbiter among RD/WR commands, so the rank offers Level 2 at most one
// candidate of each class. An arbiter's pointer moves past a requestor only
// when that requestor's command actually issues, which makes Level 3
// alternate among the requestors of the rank.
//
// Interface: inputs are per requestor of the rank (index = private bank);
// pa_taken/cas_taken say that this rank's P/A or CAS candidate issued this
// cycle. cas_pending says some head is a CAS, ready or not (used by Level 2
// to notice a rank that is skipped while it waits, e.g. for write-to-read).
// cas_bus_wait says the CAS arbiter has a head that the rank's own timing
// would allow and only the shared data bus holds back.
//
// Hold (this design's choice, not described in the document): when the
// requestor at the CAS pointer has a CAS that the rank's timing allows but
// the bus does not, the rank offers no CAS at all, rather than letting
// another requestor's CAS take the bus first. Without it a write (whose
// data starts two cycles before a read's would) can lose the bus to reads
// of the same rank indefinitely.
module roc_l3_arbiter
  import roc_pkg::*;
#(
  parameter int unsigned M = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [M-1:0]                 head_valid,
  input  cmd_e                         head_kind [M],
  input  logic [M-1:0]                 act_ok,
  input  logic [M-1:0]                 pre_ok,
  input  logic [M-1:0]                 rd_ok,
  input  logic [M-1:0]                 wr_ok,
  input  logic                         bus_rd_ok,
  input  logic                         bus_wr_ok,
  input  logic                         pa_taken,
  input  logic                         cas_taken,
  output logic                         pa_valid,
  output logic [(M>1?$clog2(M):1)-1:0] pa_idx,
  output logic                         cas_valid,
  output logic [(M>1?$clog2(M):1)-1:0] cas_idx,
  output logic                         cas_pending,
  output logic                         cas_bus_wait
);
  localparam int unsigned W = (M > 1) ? $clog2(M) : 1;

  logic [M-1:0] pa_req, cas_req, cas_head, cas_rank_ok;
  logic [W-1:0] pa_ptr, cas_ptr;

  always_comb begin
    for (int i = 0; i < M; i++) begin
      pa_req[i]   = head_valid[i] &&
                    ((head_kind[i] == CMD_PRE && pre_ok[i]) ||
                     (head_kind[i] == CMD_ACT && act_ok[i]));
      cas_head[i] = head_valid[i] && (head_kind[i] == CMD_RD || head_kind[i] == CMD_WR);
      cas_rank_ok[i] = head_valid[i] &&
                       ((head_kind[i] == CMD_RD && rd_ok[i]) ||
                        (head_kind[i] == CMD_WR && wr_ok[i]));
      cas_req[i]  = cas_rank_ok[i] &&
                    ((head_kind[i] == CMD_RD && bus_rd_ok) ||
                     (head_kind[i] == CMD_WR && bus_wr_ok));
    end
  end
  logic cas_any, ptr_bus_wait;
  assign ptr_bus_wait = cas_rank_ok[cas_ptr] && !cas_req[cas_ptr];
  assign cas_pending  = |cas_head;
  assign cas_bus_wait = ptr_bus_wait || ((|cas_rank_ok) && !(|cas_req));
  assign cas_valid    = cas_any && !ptr_bus_wait;

  roc_rr_arbiter #(.N(M)) u_pa_arb (
    .clk, .rst_n, .req(pa_req), .advance(pa_taken),
    .gnt_valid(pa_valid), .gnt_idx(pa_idx), .ptr(pa_ptr)
  );

  roc_rr_arbiter #(.N(M)) u_cas_arb (
    .clk, .rst_n, .req(cas_req), .advance(cas_taken),
    .gnt_valid(cas_any), .gnt_idx(cas_idx), .ptr(cas_ptr)
  );
endmodule
