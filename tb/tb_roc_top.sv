// tb_roc_top: end-to-end test of the ROC controller at its default size
// (four ranks, two requestors per rank, 64-bit data bus, DDR3-1333H).
//
// The controller drives the ddr3_model device, which checks every DRAM
// rule independently and stores the data. The test has three phases:
//   1. Open one row in each rank with a write from requestor 0 of the rank.
//   2. The write-read-write-read example: with those rows open, ranks 0..3
//      issue W, R, W, R at once. Alternating the CASes among four ranks,
//      the last data beat must end 29 cycles after the first CAS (the
//      four-rank figure of the design; tRL=9, tWL=7, tBUS=4, tRTR=2).
//   3. Random traffic from all eight requestors (20% writes, a few rows per
//      bank so both row hits and row misses occur); every read is checked
//      against a reference memory.
// It counts how often each mechanism occurred (row hit, row miss with
// PRE/ACT, rank switch between CASes, CAS overtaking a waiting rank,
// PRE/ACT held back by a CAS) and fails any that never did.
module tb_roc_top;
  import roc_pkg::*;

  localparam int unsigned NR = 4, M = 2, N = NR * M, DQ_W = 64;
  localparam timing_t     T  = DDR3_1333H;
  localparam int unsigned LINE_W = 2 * DQ_W * T.tBUS;
  localparam int unsigned REQ_W  = $clog2(N);
  localparam int          RAND_REQS = 400;   // per requestor

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]      req_valid, req_ready, req_we;
  logic [ROW_W-1:0]  req_row   [N];
  logic [COL_W-1:0]  req_col   [N];
  logic [LINE_W-1:0] req_wdata [N];
  logic              resp_valid, resp_we;
  logic [REQ_W-1:0]  resp_req;
  logic [LINE_W-1:0] resp_rdata;
  bus_cmd_t          cmd;
  logic [2*DQ_W-1:0] dq_out, dq_in;
  logic              dq_oe;
  logic [N-1:0]      ev_hit, ev_miss;
  logic              ev_rank_switch, ev_reorder, ev_pa_deferred;

  roc_top dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_row, .req_col, .req_wdata,
    .resp_valid, .resp_req, .resp_we, .resp_rdata,
    .cmd_o(cmd), .dq_out, .dq_oe, .dq_in,
    .ev_hit, .ev_miss, .ev_rank_switch, .ev_reorder, .ev_pa_deferred
  );

  int     violations, n_act, n_pre, n_rd, n_wr;
  longint last_data_cycle;

  ddr3_model #(.NR(NR), .DQ_W(DQ_W), .T(T)) u_dram (
    .clk, .rst_n, .cmd, .dq_out, .dq_oe, .dq_in,
    .violations, .n_act, .n_pre, .n_rd, .n_wr, .last_data_cycle
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------- reference memory
  logic [LINE_W-1:0] ref_mem [longint];
  function automatic longint lkey(int g, int row, int col);
    return (longint'(g) << 32) | (longint'(row) << 12) | longint'(col);
  endfunction
  function automatic logic [LINE_W-1:0] expect_line(int g, int row, int col);
    logic [LINE_W-1:0] l;
    if (ref_mem.exists(lkey(g, row, col))) return ref_mem[lkey(g, row, col)];
    for (int j = 0; j < int'(T.tBUS); j++)
      l[j*2*DQ_W +: 2*DQ_W] = (2*DQ_W)'(roc_tb_pkg::init_beat(g / M, g % M, row, col, j));
    return l;
  endfunction
  function automatic logic [LINE_W-1:0] rand_line();
    logic [LINE_W-1:0] l;
    for (int i = 0; i < int'(LINE_W / 32); i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  // ------------------------------------------------- response checking
  logic              out_v   [N];
  logic              out_we  [N];
  int                out_row [N], out_col [N];
  longint            out_t   [N];
  logic [LINE_W-1:0] out_exp [N];
  int                done_cnt [N];
  longint            max_lat = 0;

  always @(posedge clk) if (rst_n && resp_valid) begin
    int g;
    g = int'(resp_req);
    checks++;
    if (!out_v[g] || out_we[g] != resp_we) begin
      failures++;
      $display("FAIL: unexpected response for requestor %0d", g);
    end else if (!resp_we && resp_rdata != out_exp[g]) begin
      failures++;
      $display("FAIL: read data mismatch, requestor %0d row %0d col %0d", g, out_row[g], out_col[g]);
    end
    if (cyc - out_t[g] > max_lat) max_lat = cyc - out_t[g];
    out_v[g] = 1'b0;
    done_cnt[g]++;
  end

  // Issue one request from requestor g and return when it is accepted.
  // Inputs change and req_ready is sampled at the falling edge, away from
  // the rising edge at which the controller takes the request.
  task automatic issue(int g, logic we, int row, int col);
    @(negedge clk);
    req_we[g]    = we;
    req_row[g]   = ROW_W'(row);
    req_col[g]   = COL_W'(col);
    req_wdata[g] = rand_line();
    req_valid[g] = 1'b1;
    while (!req_ready[g]) @(negedge clk);
    out_v[g]   = 1'b1;
    out_we[g]  = we;
    out_row[g] = row;
    out_col[g] = col;
    out_t[g]   = cyc;
    out_exp[g] = expect_line(g, row, col);
    if (we) ref_mem[lkey(g, row, col)] = req_wdata[g];
    @(negedge clk);   // taken at the rising edge just passed
    req_valid[g] = 1'b0;
  endtask

  task automatic wait_idle();
    int busy;
    do begin
      @(posedge clk);
      busy = 0;
      for (int g = 0; g < N; g++) if (out_v[g] || req_valid[g]) busy++;
    end while (busy != 0);
    repeat (40) @(posedge clk);
  endtask

  // ------------------------------------------------------ event counters
  int c_hit = 0, c_miss = 0, c_switch = 0, c_reorder = 0, c_defer = 0;
  always @(posedge clk) if (rst_n) begin
    c_hit     += $countones(ev_hit);
    c_miss    += $countones(ev_miss);
    c_switch  += int'(ev_rank_switch);
    c_reorder += int'(ev_reorder);
    c_defer   += int'(ev_pa_deferred);
  end

  // First CAS seen on the command bus after `mark` is armed.
  logic   mark = 1'b0;
  longint first_cas = -1;
  always @(posedge clk)
    if (mark && first_cas < 0 && cmd.valid && (cmd.kind == CMD_RD || cmd.kind == CMD_WR))
      first_cas = cyc + 1;  // edge number, as the device model counts

  int finished = 0;
  task automatic requestor(int g);
    for (int i = 0; i < RAND_REQS; i++) begin
      logic we;
      int   row, col;
      we  = ($urandom % 5) == 0;
      row = int'($urandom % 3);
      col = int'($urandom % 8) * 8;
      repeat ($urandom % 6) @(posedge clk);
      issue(g, we, row, col);
      while (out_v[g]) @(posedge clk);
    end
    finished++;
  endtask

  initial begin
    for (int g = 0; g < N; g++) begin
      req_valid[g] = 1'b0; req_we[g] = 1'b0; req_row[g] = '0; req_col[g] = '0;
      req_wdata[g] = '0; out_v[g] = 1'b0; out_t[g] = 0; done_cnt[g] = 0;
      out_row[g] = 0; out_col[g] = 0; out_we[g] = 1'b0; out_exp[g] = '0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // Phase 1: open row 5 in bank 0 of every rank.
    fork
      issue(0, 1'b1, 5, 0);
      issue(2, 1'b1, 5, 0);
      issue(4, 1'b1, 5, 0);
      issue(6, 1'b1, 5, 0);
    join
    wait_idle();

    // Phase 2: W, R, W, R on ranks 0..3, all row hits, requested together.
    mark = 1'b1;
    fork
      issue(0, 1'b1, 5, 8);
      issue(2, 1'b0, 5, 0);
      issue(4, 1'b1, 5, 8);
      issue(6, 1'b0, 5, 0);
    join
    wait_idle();
    checks++;
    if (last_data_cycle - first_cas + 1 != 29) begin
      failures++;
      $display("FAIL: write-read-write-read on four ranks took %0d cycles, expected 29",
               last_data_cycle - first_cas + 1);
    end else $display("four-rank W-R-W-R example: 29 cycles from first CAS to end of data");

    // Phase 3: random traffic from every requestor.
    fork
      for (int g = 0; g < N; g++) begin
        automatic int gg = g;
        fork requestor(gg); join_none
      end
    join
    wait (finished == N);
    wait_idle();

    for (int g = 0; g < N; g++) begin
      checks++;
      if (done_cnt[g] != RAND_REQS + ((g % M == 0) ? 2 : 0)) begin
        failures++;
        $display("FAIL: requestor %0d completed %0d requests", g, done_cnt[g]);
      end
    end
    checks++;
    if (violations != 0) begin
      failures++;
      $display("FAIL: %0d DRAM rule violations", violations);
    end
    $display("commands: ACT %0d PRE %0d RD %0d WR %0d; max request latency %0d cycles",
             n_act, n_pre, n_rd, n_wr, max_lat);
    $display("events: row hit %0d, row miss %0d, rank switch %0d, CAS reorder %0d, PRE/ACT deferred %0d",
             c_hit, c_miss, c_switch, c_reorder, c_defer);
    checks += 5;
    if (c_hit == 0)     begin failures++; $display("FAIL: no row hit"); end
    if (c_miss == 0 || n_pre == 0) begin failures++; $display("FAIL: no row miss"); end
    if (c_switch == 0)  begin failures++; $display("FAIL: no rank switch"); end
    if (c_reorder == 0) begin failures++; $display("FAIL: no CAS reorder"); end
    if (c_defer == 0)   begin failures++; $display("FAIL: no PRE/ACT deferred by a CAS"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    for (int g = 0; g < N; g++) $display("  requestor %0d: %0d done, outstanding %0d, ready %0d", g, done_cnt[g], out_v[g], req_ready[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
