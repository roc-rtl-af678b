// roc_l1_arbiter: Level 1 command arbitration.
//
// One command can go on the command bus per cycle. Level 1 takes the CAS
// candidate of Level 2 if there is one and the PRE/ACT candidate otherwise:
// CAS commands have priority because they compete for the data bus, and
// delaying them costs data-bus time, while a PRE/ACT that loses only waits
// a cycle. `pa_deferred` pulses when a ready PRE/ACT loses to a CAS.
//
// Interface: candidate (valid, rank, requestor index in the rank) of each
// class in; the chosen command and the taken strobes back to Level 2 and
// Level 3 out. Purely combinational; the back end registers the command.
module roc_l1_arbiter
  import roc_pkg::*;
#(
  parameter int unsigned IDX_W = 1
) (
  input  logic              pa_valid,
  input  logic [RANK_W-1:0] pa_rank,
  input  logic [IDX_W-1:0]  pa_idx,
  input  logic              cas_valid,
  input  logic [RANK_W-1:0] cas_rank,
  input  logic [IDX_W-1:0]  cas_idx,
  output logic              issue,
  output logic              issue_cas,
  output logic [RANK_W-1:0] issue_rank,
  output logic [IDX_W-1:0]  issue_idx,
  output logic              pa_taken,
  output logic              cas_taken,
  output logic              pa_deferred
);
  assign issue       = cas_valid || pa_valid;
  assign issue_cas   = cas_valid;
  assign issue_rank  = cas_valid ? cas_rank : pa_rank;
  assign issue_idx   = cas_valid ? cas_idx  : pa_idx;
  assign cas_taken   = cas_valid;
  assign pa_taken    = pa_valid && !cas_valid;
  assign pa_deferred = pa_valid && cas_valid;
endmodule
