// tb_roc_l2_arbiter: random per-rank candidates for four ranks. A
// reference predicts the P/A and CAS winners (round robin with pointers
// that move only when the winner is taken), the hold while the rank whose
// turn it is waits only for the data bus, and the reorder strobe when a
// CAS overtakes that rank while it waits on its own timing.
module tb_roc_l2_arbiter;
  import roc_pkg::*;
  localparam int unsigned NR = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NR-1:0]     pa_cand, cas_cand, cas_pending, cas_bus_wait;
  logic              pa_taken, cas_taken, pa_valid, cas_valid, reorder;
  logic [RANK_W-1:0] pa_rank, cas_rank;

  roc_l2_arbiter #(.NR(NR)) dut (.clk, .rst_n, .pa_cand, .cas_cand, .cas_pending, .cas_bus_wait,
    .pa_taken, .cas_taken, .pa_valid, .pa_rank, .cas_valid, .cas_rank, .reorder);

  int checks = 0, failures = 0, n_hold = 0, n_reorder = 0;
  int pa_ptr = 0, cas_ptr = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int rr(logic [NR-1:0] req, int ptr);
    for (int k = 0; k < NR; k++) if (req[(ptr + k) % NR]) return (ptr + k) % NR;
    return -1;
  endfunction

  initial begin
    pa_cand = '0; cas_cand = '0; cas_pending = '0; cas_bus_wait = '0;
    pa_taken = 1'b0; cas_taken = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      int gp, gc;
      logic hold, exp_reorder;
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        cas_pending[r]  = ($urandom % 4 != 0);
        cas_cand[r]     = cas_pending[r] && ($urandom % 2);
        cas_bus_wait[r] = cas_pending[r] && !cas_cand[r] && ($urandom % 3 == 0);
        pa_cand[r]      = ($urandom % 2);
      end
      gp   = rr(pa_cand, pa_ptr);
      gc   = rr(cas_cand, cas_ptr);
      hold = cas_bus_wait[cas_ptr];
      cas_taken = (gc >= 0) && !hold;   // Level 1 always takes a CAS
      pa_taken  = (gp >= 0) && !cas_taken;
      exp_reorder = cas_taken && gc != cas_ptr && cas_pending[cas_ptr] && !cas_cand[cas_ptr];
      #1;
      check("pa grant", pa_valid == (gp >= 0) && (gp < 0 || int'(pa_rank) == gp));
      check("cas grant", cas_valid == ((gc >= 0) && !hold) && (!cas_valid || int'(cas_rank) == gc));
      check("reorder", reorder == exp_reorder);
      if (gc >= 0 && hold) n_hold++;
      if (exp_reorder) n_reorder++;
      if (pa_taken)  pa_ptr  = (gp + 1) % NR;
      if (cas_taken) cas_ptr = (gc + 1) % NR;
    end
    check("hold and reorder both exercised", n_hold > 0 && n_reorder > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
