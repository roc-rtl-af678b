// roc_top_run: one complete controller (roc_top) at a chosen configuration,
// with a ddr3_model device and its own clock, running a fixed scenario.
// Used by tb_roc_configs to run several configurations side by side.
//
// Scenario:
//   1. every requestor opens a row with one write;
//   2. if EX_CYCLES > 0: four requestors EX0..EX3 issue write, read, write,
//      read at once, all row hits; the cycles from the first CAS to the end
//      of the last data burst must equal EX_CYCLES;
//   3. N_REQ random requests per requestor, WR_PCT percent writes, HIT_PCT
//      percent of them to the row left open (the others to another row).
// Every read line is checked against a reference memory and the device
// must see no rule violation. Results are reported through the outputs
// when `done` rises; the latency figures are in controller cycles from the
// request being taken to its response.
module roc_top_run
  import roc_pkg::*;
#(
  parameter int unsigned NR = 4,
  parameter int unsigned M = 2,
  parameter int unsigned DQ_W = 64,
  parameter timing_t     T = DDR3_1333H,
  parameter int unsigned HIT_PCT = 50,
  parameter int unsigned WR_PCT = 20,
  parameter int unsigned N_REQ = 100,
  parameter int          EX_CYCLES = 0,
  parameter int          EX0 = 0, EX1 = 1, EX2 = 2, EX3 = 3
) (
  output logic   done,
  output int     checks,
  output int     failures,
  output longint max_lat,
  output longint sum_lat,
  output int     n_lat,
  output longint ex_cycles,
  output int     n_hit,
  output int     n_miss
);
  localparam int unsigned N = NR * M;
  localparam int unsigned LINE_W = 2 * DQ_W * T.tBUS;
  localparam int unsigned REQ_W  = (N > 1) ? $clog2(N) : 1;

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

  roc_top #(.NR(NR), .M(M), .DQ_W(DQ_W), .T(T)) dut (
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

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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

  logic              out_v   [N];
  logic              out_we  [N];
  longint            out_t   [N];
  logic [LINE_W-1:0] out_exp [N];
  int                done_cnt [N];
  int                cur_row [N];

  always @(posedge clk) if (rst_n && resp_valid) begin
    int g;
    g = int'(resp_req);
    checks++;
    if (!out_v[g] || out_we[g] != resp_we) begin
      failures++;
      $display("FAIL: NR=%0d M=%0d: unexpected response for requestor %0d", NR, M, g);
    end else if (!resp_we && resp_rdata != out_exp[g]) begin
      failures++;
      $display("FAIL: NR=%0d M=%0d: read data mismatch, requestor %0d", NR, M, g);
    end
    if (cyc - out_t[g] > max_lat) max_lat = cyc - out_t[g];
    sum_lat += cyc - out_t[g];
    n_lat++;
    out_v[g] = 1'b0;
    done_cnt[g]++;
  end

  always @(posedge clk) if (rst_n) begin
    n_hit  += $countones(ev_hit);
    n_miss += $countones(ev_miss);
  end

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
    out_t[g]   = cyc;
    out_exp[g] = expect_line(g, row, col);
    if (we) ref_mem[lkey(g, row, col)] = req_wdata[g];
    cur_row[g] = row;
    @(negedge clk);
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

  logic   mark = 1'b0;
  longint first_cas = -1;
  always @(posedge clk)
    if (mark && first_cas < 0 && cmd.valid && (cmd.kind == CMD_RD || cmd.kind == CMD_WR))
      first_cas = cyc + 1;

  int finished = 0;
  task automatic requestor(int g);
    for (int i = 0; i < int'(N_REQ); i++) begin
      logic we;
      int   row;
      we  = ($urandom % 100) < WR_PCT;
      row = (($urandom % 100) < HIT_PCT) ? cur_row[g] : (cur_row[g] + 1 + int'($urandom % 3)) % 4;
      repeat ($urandom % 4) @(posedge clk);
      issue(g, we, row, int'($urandom % 128) * 8);
      while (out_v[g]) @(posedge clk);
    end
    finished++;
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; max_lat = 0; sum_lat = 0; n_lat = 0;
    ex_cycles = 0; n_hit = 0; n_miss = 0;
    for (int g = 0; g < N; g++) begin
      req_valid[g] = 1'b0; req_we[g] = 1'b0; req_row[g] = '0; req_col[g] = '0;
      req_wdata[g] = '0; out_v[g] = 1'b0; out_t[g] = 0; done_cnt[g] = 0;
      out_we[g] = 1'b0; out_exp[g] = '0; cur_row[g] = 0;
    end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int g = 0; g < N; g++) begin
      automatic int gg = g;
      fork issue(gg, 1'b1, 0, 1000); join_none
    end
    wait_idle();
    if (EX_CYCLES > 0) begin
      mark = 1'b1;
      fork
        issue(EX0, 1'b1, 0, 8);
        issue(EX1, 1'b0, 0, 16);
        issue(EX2, 1'b1, 0, 8);
        issue(EX3, 1'b0, 0, 16);
      join
      wait_idle();
      ex_cycles = last_data_cycle - first_cas + 1;
      checks++;
      if (ex_cycles != EX_CYCLES) begin
        failures++;
        $display("FAIL: NR=%0d M=%0d: write-read-write-read took %0d cycles, expected %0d",
                 NR, M, ex_cycles, EX_CYCLES);
      end
    end
    max_lat = 0; sum_lat = 0; n_lat = 0; n_hit = 0; n_miss = 0;
    for (int g = 0; g < N; g++) begin
      automatic int gg = g;
      fork requestor(gg); join_none
    end
    wait (finished == N);
    wait_idle();
    checks++;
    if (violations != 0) begin
      failures++;
      $display("FAIL: NR=%0d M=%0d: %0d DRAM rule violations", NR, M, violations);
    end
    checks++;
    if (n_lat != N * N_REQ) begin
      failures++;
      $display("FAIL: NR=%0d M=%0d: %0d of %0d random requests completed", NR, M, n_lat, N * N_REQ);
    end
    done = 1'b1;
  end
endmodule
