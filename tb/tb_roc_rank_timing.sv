// tb_roc_rank_timing: random legal command streams into one rank's timing
// tracker. Every cycle each *_ok output is compared with legality worked
// out from absolute timestamps of past commands (tRP, tRC, tRRD, tFAW,
// tRAS, tRTP, write recovery, tRCD, tCCD, write-to-read, read-to-write).
// Commands are then picked at random among those the reference allows, so
// the stream stays legal and pushes against every constraint.
module tb_roc_rank_timing;
  import roc_pkg::*;
  localparam int unsigned NB = 4;
  localparam timing_t T = DDR3_1333H;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic issue = 1'b0;
  cmd_e issue_kind = CMD_NOP;
  logic [BANK_W-1:0] issue_bank = '0;
  logic [NB-1:0] act_ok, pre_ok, rd_ok, wr_ok;

  roc_rank_timing #(.NB(NB), .T(T)) dut (.clk, .rst_n, .issue, .issue_kind, .issue_bank,
                                        .act_ok, .pre_ok, .rd_ok, .wr_ok);

  int checks = 0, failures = 0;
  longint t_act [NB], t_pre [NB], t_rd [NB], t_wr [NB];
  longint t_acts [$];
  longint t_cas = -100, t_wr_r = -100, t_rd_r = -100;
  int blocked [4] = '{0, 0, 0, 0};
  int faw_blocks = 0, wtr_blocks = 0;

  function automatic logic ref_ok(cmd_e k, int b, longint now);
    case (k)
      CMD_ACT: return now - t_pre[b] >= T.tRP && now - t_act[b] >= T.tRC &&
                      (t_acts.size() == 0 || now - t_acts[$] >= T.tRRD) &&
                      (t_acts.size() < 4 || now - t_acts[t_acts.size()-4] >= T.tFAW);
      CMD_PRE: return now - t_act[b] >= T.tRAS && now - t_rd[b] >= T.tRTP &&
                      now - t_wr[b] >= T.tWL + T.tBUS + T.tWR;
      CMD_RD:  return now - t_act[b] >= T.tRCD && now - t_cas >= T.tCCD &&
                      now - t_wr_r >= T.tWL + T.tBUS + T.tWTR;
      CMD_WR:  return now - t_act[b] >= T.tRCD && now - t_cas >= T.tCCD &&
                      now - t_rd_r >= T.tRL + T.tBUS + 2 - T.tWL;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    for (int b = 0; b < NB; b++) begin t_act[b] = -100; t_pre[b] = -100; t_rd[b] = -100; t_wr[b] = -100; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (longint now = 0; now < 20000; now++) begin
      cmd_e cands_k [$];
      int   cands_b [$];
      cands_k.delete();
      cands_b.delete();
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        logic [3:0] dut_ok, exp_ok;
        dut_ok = {wr_ok[b], rd_ok[b], pre_ok[b], act_ok[b]};
        exp_ok = {ref_ok(CMD_WR, b, now), ref_ok(CMD_RD, b, now),
                  ref_ok(CMD_PRE, b, now), ref_ok(CMD_ACT, b, now)};
        checks++;
        if (dut_ok != exp_ok) begin
          failures++;
          if (failures < 10) $display("FAIL: cycle %0d bank %0d ok=%b expected %b", now, b, dut_ok, exp_ok);
        end
        for (int k = 0; k < 4; k++) if (!exp_ok[k]) blocked[k]++;
        if (t_acts.size() >= 4 && now - t_acts[t_acts.size()-4] < T.tFAW &&
            now - t_acts[$] >= T.tRRD) faw_blocks++;
        if (now - t_wr_r < T.tWL + T.tBUS + T.tWTR && now - t_cas >= T.tCCD) wtr_blocks++;
        if (exp_ok[0]) begin cands_k.push_back(CMD_ACT); cands_b.push_back(b); end
        if (exp_ok[1]) begin cands_k.push_back(CMD_PRE); cands_b.push_back(b); end
        if (exp_ok[2]) begin cands_k.push_back(CMD_RD);  cands_b.push_back(b); end
        if (exp_ok[3]) begin cands_k.push_back(CMD_WR);  cands_b.push_back(b); end
      end
      issue = 1'b0;
      if (cands_k.size() > 0 && ($urandom % 100) < 70) begin
        int pick, b;
        pick = int'($urandom % cands_k.size());
        b = cands_b[pick];
        issue = 1'b1; issue_kind = cands_k[pick]; issue_bank = BANK_W'(b);
        case (issue_kind)
          CMD_ACT: begin t_act[b] = now; t_acts.push_back(now); end
          CMD_PRE: t_pre[b] = now;
          CMD_RD:  begin t_rd[b] = now; t_rd_r = now; t_cas = now; end
          CMD_WR:  begin t_wr[b] = now; t_wr_r = now; t_cas = now; end
          default: ;
        endcase
      end
    end
    checks++;
    if (faw_blocks == 0 || wtr_blocks == 0 || blocked[0] == 0 || blocked[1] == 0 ||
        blocked[2] == 0 || blocked[3] == 0) begin
      failures++;
      $display("FAIL: a constraint was never exercised (tFAW %0d, WtR %0d)", faw_blocks, wtr_blocks);
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
