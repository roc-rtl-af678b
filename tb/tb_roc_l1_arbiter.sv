// tb_roc_l1_arbiter: all combinations of candidate valids with random
// ranks and indices; checks that a CAS always wins over a PRE/ACT, that
// the taken strobes and the deferral strobe follow, and that the chosen
// rank and index are those of the winner.
module tb_roc_l1_arbiter;
  import roc_pkg::*;

  logic pa_valid, cas_valid, issue, issue_cas, pa_taken, cas_taken, pa_deferred;
  logic [RANK_W-1:0] pa_rank, cas_rank, issue_rank;
  logic [1:0] pa_idx, cas_idx, issue_idx;

  roc_l1_arbiter #(.IDX_W(2)) dut (.pa_valid, .pa_rank, .pa_idx, .cas_valid, .cas_rank, .cas_idx,
    .issue, .issue_cas, .issue_rank, .issue_idx, .pa_taken, .cas_taken, .pa_deferred);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      pa_valid = logic'(i % 2); cas_valid = logic'((i / 2) % 2);
      pa_rank = RANK_W'($urandom); cas_rank = RANK_W'($urandom);
      pa_idx = 2'($urandom); cas_idx = 2'($urandom);
      #1;
      check("issue", issue == (pa_valid || cas_valid));
      check("cas priority", issue_cas == cas_valid && cas_taken == cas_valid &&
                            pa_taken == (pa_valid && !cas_valid));
      check("deferred", pa_deferred == (pa_valid && cas_valid));
      if (cas_valid) check("cas chosen", issue_rank == cas_rank && issue_idx == cas_idx);
      else if (pa_valid) check("pa chosen", issue_rank == pa_rank && issue_idx == pa_idx);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
