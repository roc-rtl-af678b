// tb_roc_l3_arbiter: random queue heads and timing permissions for one
// rank of four requestors. A reference model with its own round-robin
// pointers predicts both grants (P/A and CAS), cas_pending and
// cas_bus_wait every cycle, including the hold (no CAS offered while the
// requestor at the CAS pointer waits only for the bus); grants are then
// randomly taken, which moves the pointers. Also checks that, with every requestor always ready, the
// CAS grants visit all requestors in turn.
module tb_roc_l3_arbiter;
  import roc_pkg::*;
  localparam int unsigned M = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0] head_valid, act_ok, pre_ok, rd_ok, wr_ok;
  cmd_e         head_kind [M];
  logic         bus_rd_ok, bus_wr_ok, pa_taken, cas_taken;
  logic         pa_valid, cas_valid, cas_pending, cas_bus_wait;
  logic [1:0]   pa_idx, cas_idx;

  roc_l3_arbiter #(.M(M)) dut (.clk, .rst_n, .head_valid, .head_kind, .act_ok, .pre_ok, .rd_ok, .wr_ok,
    .bus_rd_ok, .bus_wr_ok, .pa_taken, .cas_taken, .pa_valid, .pa_idx, .cas_valid, .cas_idx,
    .cas_pending, .cas_bus_wait);

  int checks = 0, failures = 0;
  int pa_ptr = 0, cas_ptr = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int rr(logic [M-1:0] req, int ptr);
    for (int k = 0; k < M; k++) if (req[(ptr + k) % M]) return (ptr + k) % M;
    return -1;
  endfunction

  initial begin
    head_valid = '0; act_ok = '0; pre_ok = '0; rd_ok = '0; wr_ok = '0;
    bus_rd_ok = 1'b0; bus_wr_ok = 1'b0; pa_taken = 1'b0; cas_taken = 1'b0;
    for (int i = 0; i < M; i++) head_kind[i] = CMD_NOP;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      logic [M-1:0] pa_req, cas_req, cas_rk, cas_h;
      int gp, gc;
      logic full, hold;
      full = (cyc >= 5000);   // last part: everything always ready
      @(negedge clk);
      for (int i = 0; i < M; i++) begin
        head_valid[i] = full ? 1'b1 : logic'($urandom % 4 != 0);
        head_kind[i]  = full ? CMD_RD : cmd_e'(3'($urandom % 4 + 1));
        act_ok[i] = full || ($urandom % 2); pre_ok[i] = full || ($urandom % 2);
        rd_ok[i]  = full || ($urandom % 2); wr_ok[i]  = full || ($urandom % 2);
      end
      bus_rd_ok = full || ($urandom % 3 != 0);
      bus_wr_ok = full || ($urandom % 3 != 0);
      for (int i = 0; i < M; i++) begin
        pa_req[i]  = head_valid[i] && ((head_kind[i] == CMD_PRE && pre_ok[i]) ||
                                       (head_kind[i] == CMD_ACT && act_ok[i]));
        cas_h[i]   = head_valid[i] && (head_kind[i] == CMD_RD || head_kind[i] == CMD_WR);
        cas_rk[i]  = head_valid[i] && ((head_kind[i] == CMD_RD && rd_ok[i]) ||
                                       (head_kind[i] == CMD_WR && wr_ok[i]));
        cas_req[i] = cas_rk[i] && ((head_kind[i] == CMD_RD && bus_rd_ok) ||
                                   (head_kind[i] == CMD_WR && bus_wr_ok));
      end
      gp = rr(pa_req, pa_ptr);
      gc = rr(cas_req, cas_ptr);
      hold = cas_rk[cas_ptr] && !cas_req[cas_ptr];
      if (hold) gc = -1;
      #1;
      check("pa grant", pa_valid == (gp >= 0) && (gp < 0 || int'(pa_idx) == gp));
      check("cas grant", cas_valid == (gc >= 0) && (gc < 0 || int'(cas_idx) == gc));
      check("cas_pending", cas_pending == (|cas_h));
      check("cas_bus_wait", cas_bus_wait == (hold || ((|cas_rk) && !(|cas_req))));
      if (full && gc >= 0) check("CAS turns rotate", gc == cas_ptr);
      pa_taken  = (gp >= 0) && ($urandom % 2);
      cas_taken = (gc >= 0) && ($urandom % 2 || full);
      if (pa_taken)  pa_ptr  = (gp + 1) % M;
      if (cas_taken) cas_ptr = (gc + 1) % M;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
