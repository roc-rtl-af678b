// tb_roc_bus_timing: random CAS streams (reads and writes of four ranks)
// into the data-bus tracker. Every cycle rd_ok/wr_ok of each rank are
// compared with a reference that keeps the absolute end of the last burst:
// a CAS of rank r and latency L may issue at t when
// t+L >= end + (r differs from the last burst's rank ? tRTR : 0).
module tb_roc_bus_timing;
  import roc_pkg::*;
  localparam int unsigned NR = 4;
  localparam timing_t T = DDR3_1333H;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic issue = 1'b0, issue_wr = 1'b0;
  logic [RANK_W-1:0] issue_rank = '0;
  logic [NR-1:0] rd_ok, wr_ok;

  roc_bus_timing #(.NR(NR), .T(T)) dut (.clk, .rst_n, .issue, .issue_wr, .issue_rank, .rd_ok, .wr_ok);

  int checks = 0, failures = 0, rtr_blocks = 0, back_to_back = 0;
  longint bus_end = 0;
  int last_rank = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (longint now = 0; now < 20000; now++) begin
      int cr [$];
      logic cw [$];
      cr.delete();
      cw.delete();
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        longint need;
        logic er, ew;
        need = bus_end + ((r != last_rank) ? T.tRTR : 0);
        er = now + T.tRL >= need;
        ew = now + T.tWL >= need;
        if (now + T.tRL >= bus_end && !er) rtr_blocks++;
        checks++;
        if (rd_ok[r] != er || wr_ok[r] != ew) begin
          failures++;
          if (failures < 10) $display("FAIL: cycle %0d rank %0d rd_ok %0d wr_ok %0d expected %0d %0d",
                                      now, r, rd_ok[r], wr_ok[r], er, ew);
        end
        if (er) begin cr.push_back(r); cw.push_back(1'b0); end
        if (ew) begin cr.push_back(r); cw.push_back(1'b1); end
      end
      issue = 1'b0;
      if (cr.size() > 0 && ($urandom % 100) < 60) begin
        int p;
        longint start;
        p = int'($urandom % cr.size());
        issue = 1'b1; issue_wr = cw[p]; issue_rank = RANK_W'(cr[p]);
        start = now + (cw[p] ? T.tWL : T.tRL);
        if (start == bus_end) back_to_back++;
        bus_end = start + T.tBUS;
        last_rank = cr[p];
      end
    end
    checks++;
    if (rtr_blocks == 0 || back_to_back == 0) begin
      failures++;
      $display("FAIL: rank-to-rank gap or back-to-back bursts never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
