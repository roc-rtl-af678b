// roc_rank_timing: DDR3 timing state of one rank.
//
// Keeps one countdown per constraint. A countdown is loaded when a command
// that starts the constraint is issued to this rank and counts down by one
// per cycle; the command it guards is legal while it is zero. Loading keeps
// the later of the old and new deadline (roc_pkg::cnt_next).
//
//   per bank:  ACT allowed  after tRP (from PRE) and tRC (from ACT)
//              CAS allowed  after tRCD (from ACT)
//              PRE allowed  after tRAS (from ACT), tRTP (from RD),
//                           tWL+tBUS+tWR (from WR)
//   per rank:  ACT allowed  after tRRD (from any ACT) and when fewer than
//                           four ACTs fall in the last tFAW cycles
//              RD allowed   after tWL+tBUS+tWTR (from WR), tCCD (from RD)
//              WR allowed   after tRL+tBUS+2-tWL (from RD), tCCD (from WR)
//
// The write-to-read constraint is per rank: it is what makes the rank
// switching of the back end pay off, since a CAS of another rank only has
// to respect the much shorter rank-to-rank gap (roc_bus_timing).
//
// Interface: issue/issue_kind/issue_bank describe the command put on the
// command bus in this cycle if it targets this rank; the *_ok outputs say,
// per bank, which command kinds may issue in the current cycle. Banks are
// numbered 0..NB-1 and belong one each to the rank's requestors.
module roc_rank_timing
  import roc_pkg::*;
#(
  parameter int unsigned NB = 2,
  parameter timing_t     T  = DDR3_1333H
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          issue,
  input  cmd_e          issue_kind,
  input  logic [BANK_W-1:0] issue_bank,
  output logic [NB-1:0] act_ok,
  output logic [NB-1:0] pre_ok,
  output logic [NB-1:0] rd_ok,
  output logic [NB-1:0] wr_ok
);
  localparam int unsigned T_WR_PRE = T.tWL + T.tBUS + T.tWR;
  localparam int unsigned T_WTR    = T.tWL + T.tBUS + T.tWTR;
  localparam int unsigned T_RTW    = T.tRL + T.tBUS + 2 - T.tWL;

  logic [CNT_W-1:0] c_act [NB];
  logic [CNT_W-1:0] c_cas [NB];
  logic [CNT_W-1:0] c_pre [NB];
  logic [CNT_W-1:0] c_rrd, c_rd, c_wr;
  logic [CNT_W-1:0] c_faw [4];
  logic [1:0]       faw_ptr;   // oldest of the last four ACTs

  logic is_act, is_pre, is_rd, is_wr;
  assign is_act = issue && (issue_kind == CMD_ACT);
  assign is_pre = issue && (issue_kind == CMD_PRE);
  assign is_rd  = issue && (issue_kind == CMD_RD);
  assign is_wr  = issue && (issue_kind == CMD_WR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NB; b++) begin
        c_act[b] <= '0;
        c_cas[b] <= '0;
        c_pre[b] <= '0;
      end
      for (int f = 0; f < 4; f++) c_faw[f] <= '0;
      faw_ptr <= '0;
      c_rrd   <= '0;
      c_rd    <= '0;
      c_wr    <= '0;
    end else begin
      for (int b = 0; b < NB; b++) begin
        logic here;
        here = (issue_bank == BANK_W'(b));
        // At most one command issues per cycle, so each countdown has at
        // most one load, whose delay depends on the command kind.
        c_act[b] <= cnt_next(c_act[b], here && (is_pre || is_act),
                             is_pre ? T.tRP : T.tRC);
        c_cas[b] <= cnt_next(c_cas[b], here && is_act, T.tRCD);
        c_pre[b] <= cnt_next(c_pre[b], here && (is_act || is_rd || is_wr),
                             is_act ? T.tRAS : (is_rd ? T.tRTP : T_WR_PRE));
      end
      c_rrd <= cnt_next(c_rrd, is_act, T.tRRD);
      c_rd  <= cnt_next(c_rd, is_wr || is_rd, is_wr ? T_WTR : T.tCCD);
      c_wr  <= cnt_next(c_wr, is_rd || is_wr, is_rd ? T_RTW : T.tCCD);
      for (int f = 0; f < 4; f++)
        c_faw[f] <= cnt_next(c_faw[f], is_act && (faw_ptr == 2'(f)), T.tFAW);
      if (is_act) faw_ptr <= faw_ptr + 1'b1;
    end
  end

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      act_ok[b] = (c_act[b] == '0) && (c_rrd == '0) && (c_faw[faw_ptr] == '0);
      pre_ok[b] = (c_pre[b] == '0);
      rd_ok[b]  = (c_cas[b] == '0) && (c_rd == '0);
      wr_ok[b]  = (c_cas[b] == '0) && (c_wr == '0);
    end
  end
endmodule
