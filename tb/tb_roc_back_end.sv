// tb_roc_back_end: the back end at its default size (four ranks, two
// requestors per rank) fed directly with command sequences such as the
// front ends produce (CAS; ACT,CAS; PRE,ACT,CAS). The ddr3_model device
// checks every DRAM rule on the command bus. The testbench checks that
// each requestor's commands come out exactly once and in order, and, in a
// saturated phase where every requestor streams row-hit reads, that the
// CASes rotate over the ranks (Level 2), alternate between the two
// requestors of a rank (Level 3), and follow each other every tBUS+tRTR
// cycles, i.e. with only the rank-to-rank gap between data bursts. With
// every requestor backlogged with row-hit reads and writes (20% writes),
// no two data bursts are further apart than tRTR. A last
// phase mixes one writer into rank 0, with only rank 3 otherwise busy, so
// that CAS reordering (a rank skipped while it waits for write-to-read)
// must occur.
module tb_roc_back_end;
  import roc_pkg::*;
  localparam int unsigned NR = 4, M = 2, N = NR * M;
  localparam timing_t T = DDR3_1333H;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] q_push;
  qcmd_t        q_din  [N];
  logic [2:0]   q_free [N];
  bus_cmd_t     cmd;
  logic         cmd_idx, rank_switch, reorder, pa_deferred;

  roc_back_end dut (.clk, .rst_n, .q_push, .q_din, .q_free, .cmd_o(cmd), .cmd_idx,
                    .rank_switch, .reorder, .pa_deferred);

  logic [127:0] dq_in;
  int violations, n_act, n_pre, n_rd, n_wr;
  longint last_data;
  ddr3_model #(.NR(NR), .DQ_W(64), .T(T)) u_dram (.clk, .rst_n, .cmd, .dq_out('0), .dq_oe(1'b1), .dq_in,
    .violations, .n_act, .n_pre, .n_rd, .n_wr, .last_data_cycle(last_data));

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  qcmd_t pend [N][$];
  qcmd_t expq [N][$];
  logic  open_v [N];
  int    open_r [N];

  // Command sequence of one request, as the front end builds it.
  task automatic request(int g, logic we, int row, int col);
    if (!open_v[g] || open_r[g] != row) begin
      if (open_v[g]) pend[g].push_back('{kind: CMD_PRE, row: ROW_W'(row), col: COL_W'(col)});
      pend[g].push_back('{kind: CMD_ACT, row: ROW_W'(row), col: COL_W'(col)});
    end
    pend[g].push_back('{kind: we ? CMD_WR : CMD_RD, row: ROW_W'(row), col: COL_W'(col)});
    open_v[g] = 1'b1;
    open_r[g] = row;
  endtask

  // Push at the falling edge whenever the queue has room.
  always @(negedge clk) begin
    for (int g = 0; g < N; g++) begin
      q_push[g] = 1'b0;
      if (rst_n && pend[g].size() > 0 && q_free[g] != 0) begin
        q_push[g] = 1'b1;
        q_din[g]  = pend[g].pop_front();
        expq[g].push_back(q_din[g]);
      end
    end
  end

  // Command bus monitor.
  logic   sat = 1'b0;
  longint cyc = 0;
  longint last_cas_t = -1;
  int     last_cas_rank = -1;
  int     last_bank_of [NR];
  int     sat_cas = 0;
  // Backlogged mixed reads and writes: gap between data bursts.
  logic   mix = 1'b0;
  int     mix_cas = 0;
  longint last_data_end = -1;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && cmd.valid) begin
      int g;
      qcmd_t e;
      g = int'(cmd.rank) * M + int'(cmd.bank);
      checks++;
      if (expq[g].size() == 0) begin
        failures++; $display("FAIL: command for requestor %0d it did not queue", g);
      end else begin
        e = expq[g].pop_front();
        if (e.kind != cmd.kind || e.row != cmd.row || e.col != cmd.col) begin
          failures++; $display("FAIL: requestor %0d command out of order", g);
        end
      end
      if (cmd.kind == CMD_RD || cmd.kind == CMD_WR) begin
        if (sat) begin
          sat_cas++;
          if (sat_cas > 8) begin
            check("rank rotation", int'(cmd.rank) == (last_cas_rank + 1) % NR);
            check("requestor alternation in a rank", int'(cmd.bank) != last_bank_of[cmd.rank]);
            check("CAS spacing tBUS+tRTR", cyc - last_cas_t == T.tBUS + T.tRTR);
          end
        end
        if (mix) begin
          longint start;
          start = cyc + longint'((cmd.kind == CMD_RD) ? T.tRL : T.tWL);
          mix_cas++;
          if (mix_cas > 8)
            check("backlogged: data gap at most tRTR", start - last_data_end - 1 <= T.tRTR);
          last_data_end = start + T.tBUS - 1;
        end
        last_cas_t = cyc;
        last_cas_rank = int'(cmd.rank);
        last_bank_of[cmd.rank] = int'(cmd.bank);
      end
    end
  end

  function automatic int outstanding();
    int s = 0;
    for (int g = 0; g < N; g++) s += pend[g].size() + expq[g].size();
    return s;
  endfunction

  int n_reorder = 0, n_defer = 0, n_switch = 0;
  always @(posedge clk) if (rst_n) begin
    n_reorder += int'(reorder); n_defer += int'(pa_deferred); n_switch += int'(rank_switch);
  end

  initial begin
    q_push = '0;
    for (int g = 0; g < N; g++) begin q_din[g] = '0; open_v[g] = 1'b0; open_r[g] = 0; end
    for (int r = 0; r < NR; r++) last_bank_of[r] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Phase 1: random requests, 20% writes, three rows per bank.
    for (int i = 0; i < 300; i++) begin
      for (int g = 0; g < N; g++)
        request(g, logic'($urandom % 5 == 0), int'($urandom % 3), int'($urandom % 128) * 8);
      while (outstanding() > 4 * N) @(posedge clk);
    end
    while (outstanding() != 0) @(posedge clk);
    repeat (50) @(posedge clk);
    // Phase 2: every requestor streams row-hit reads.
    for (int g = 0; g < N; g++) request(g, 1'b0, open_r[g], 0);
    while (outstanding() != 0) @(posedge clk);
    repeat (50) @(posedge clk);
    @(negedge clk);
    sat = 1'b1;
    for (int i = 0; i < 30; i++)
      for (int g = 0; g < N; g++) request(g, 1'b0, open_r[g], (i % 64) * 8);
    while (outstanding() != 0) @(posedge clk);
    sat = 1'b0;
    repeat (50) @(posedge clk);
    // Phase 2b: every requestor backlogged with row hits, 20% writes.
    @(negedge clk);
    mix = 1'b1;
    for (int i = 0; i < 30; i++)
      for (int g = 0; g < N; g++) request(g, logic'($urandom % 5 == 0), open_r[g], (i % 64) * 8);
    while (outstanding() != 0) @(posedge clk);
    mix = 1'b0;
    repeat (50) @(posedge clk);
    // Phase 3: in rank 0 one requestor writes while the other reads, so the
    // read waits for write-to-read; only the last rank streams reads
    // meanwhile, so Level 2 comes back to rank 0 before that wait is over
    // and skips it.
    for (int i = 0; i < 20; i++) begin
      request(0, 1'b1, open_r[0], i * 8);
      request(1, 1'b0, open_r[1], i * 8);
      repeat (4) @(posedge clk);
      for (int k = 0; k < 3; k++)
        for (int g = N - M; g < N; g++) request(g, 1'b0, open_r[g], (i * 3 + k) * 8);
      while (outstanding() != 0) @(posedge clk);
    end
    repeat (50) @(posedge clk);
    check("no DRAM rule violations", violations == 0);
    check("saturated phase ran", sat_cas == 30 * N);
    check("mixed backlogged phase ran", mix_cas == 30 * N);
    check("reorder, deferral and rank switch seen", n_reorder > 0 && n_defer > 0 && n_switch > 0);
    $display("back end: ACT %0d PRE %0d RD %0d WR %0d, reorders %0d", n_act, n_pre, n_rd, n_wr, n_reorder);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
