// roc_l2_arbiter: Level 2 arbitration, across ranks.
//
// Each rank's Level 3 offers at most one PRE/ACT and one CAS candidate.
// Two round-robin arbiters over the ranks pick one of each class; their
// pointers move past a rank only when its command issues, so Level 2
// alternates among ranks. Because a rank's latency then depends only on
// the number of ranks and on its own requestors, ranks are isolated from
// one another.
//
// CAS rank switching: a rank whose turn it is but whose CAS is held back
// by its own timing (typically its write-to-read time) is skipped; the
// next rank with a ready CAS issues instead, possibly more than once while
// the waiting rank keeps its turn. A rank whose CAS is held back only by
// the shared data bus is not skipped: no CAS issues until the bus lets it
// go. Without that hold, reads (whose data comes later than write data)
// from other ranks could keep the bus too busy for a write ever to fit,
// and the worst case of a write would be unbounded. `reorder` pulses when
// a CAS overtakes the rank whose turn it is.
//
// Interface: per-rank candidate valids in, winning rank indices out;
// pa_taken/cas_taken report that the winner really issued (Level 1).
module roc_l2_arbiter
  import roc_pkg::*;
#(
  parameter int unsigned NR = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NR-1:0]     pa_cand,
  input  logic [NR-1:0]     cas_cand,
  input  logic [NR-1:0]     cas_pending,
  input  logic [NR-1:0]     cas_bus_wait,
  input  logic              pa_taken,
  input  logic              cas_taken,
  output logic              pa_valid,
  output logic [RANK_W-1:0] pa_rank,
  output logic              cas_valid,
  output logic [RANK_W-1:0] cas_rank,
  output logic              reorder
);
  localparam int unsigned W = (NR > 1) ? $clog2(NR) : 1;

  logic [W-1:0] pa_idx, cas_idx, pa_ptr, cas_ptr;

  roc_rr_arbiter #(.N(NR)) u_pa_arb (
    .clk, .rst_n, .req(pa_cand), .advance(pa_taken),
    .gnt_valid(pa_valid), .gnt_idx(pa_idx), .ptr(pa_ptr)
  );

  logic cas_any;
  logic hold;

  roc_rr_arbiter #(.N(NR)) u_cas_arb (
    .clk, .rst_n, .req(cas_cand), .advance(cas_taken),
    .gnt_valid(cas_any), .gnt_idx(cas_idx), .ptr(cas_ptr)
  );

  // The rank whose turn it is waits only for the data bus: hold all CASes.
  assign hold      = cas_bus_wait[cas_ptr];
  assign cas_valid = cas_any && !hold;

  assign pa_rank  = RANK_W'(pa_idx);
  assign cas_rank = RANK_W'(cas_idx);
  assign reorder  = cas_taken && cas_valid && (cas_idx != cas_ptr) &&
                    cas_pending[cas_ptr] && !cas_cand[cas_ptr];
endmodule
