// roc_bus_timing: occupancy of the data bus shared by all ranks.
//
// A CAS issued at cycle t moves data from t+tRL (read) or t+tWL (write) for
// tBUS cycles. Data bursts must not overlap, and two bursts of different
// ranks need tRTR idle cycles between them (rank-to-rank switch). Between
// bursts of the same rank no gap is needed here: the same-rank turnarounds
// (write-to-read, read-to-write) are kept by roc_rank_timing.
//
// State: `busy` counts the cycles until the bus is free (end of the last
// scheduled burst, relative to now) and `last_rank` is the rank of that
// burst. A CAS of rank r with data latency L may issue now when
//   L >= busy + (r != last_rank ? tRTR : 0).
//
// Interface: issue/issue_wr/issue_rank describe a CAS issued this cycle;
// rd_ok[r]/wr_ok[r] say whether a read/write CAS of rank r may issue now.
module roc_bus_timing
  import roc_pkg::*;
#(
  parameter int unsigned NR = 4,
  parameter timing_t     T  = DDR3_1333H
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              issue,
  input  logic              issue_wr,
  input  logic [RANK_W-1:0] issue_rank,
  output logic [NR-1:0]     rd_ok,
  output logic [NR-1:0]     wr_ok
);
  logic [CNT_W-1:0]  busy;
  logic [RANK_W-1:0] last_rank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= '0;
      last_rank <= '0;
    end else begin
      busy <= cnt_next(busy, issue, issue_wr ? T.tWL + T.tBUS : T.tRL + T.tBUS);
      if (issue) last_rank <= issue_rank;
    end
  end

  always_comb begin
    for (int r = 0; r < NR; r++) begin
      logic [CNT_W:0] need;
      need     = {1'b0, busy} + ((RANK_W'(r) != last_rank) ? (CNT_W+1)'(T.tRTR) : '0);
      rd_ok[r] = (CNT_W+1)'(T.tRL) >= need;
      wr_ok[r] = (CNT_W+1)'(T.tWL) >= need;
    end
  end
endmodule
