// tb_roc_front_end: drives requests into one front end and checks the
// command sequence it pushes: CAS only on a row hit, ACT+CAS on an idle
// bank, PRE+ACT+CAS on a row miss; one command per cycle starting the
// cycle after the request is taken; no new request taken until `done`;
// no request taken while the queue has fewer than three free slots.
module tb_roc_front_end;
  import roc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_valid = 1'b0, req_ready, req_we = 1'b0, done = 1'b0;
  logic [ROW_W-1:0]  req_row = '0;
  logic [COL_W-1:0]  req_col = '0;
  logic [511:0]      req_wdata = '0, wdata;
  logic              q_push, hit, miss;
  qcmd_t             q_din;
  logic [2:0]        q_free = 3'd4;

  roc_front_end dut (.clk, .rst_n, .req_valid, .req_ready, .req_we, .req_row, .req_col,
                     .req_wdata, .done, .q_push, .q_din, .q_free, .wdata, .hit, .miss);

  int checks = 0, failures = 0;
  int n_hit = 0, n_idle = 0, n_miss = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic             ref_open = 1'b0;
  logic [ROW_W-1:0] ref_row  = '0;

  task automatic one_request(logic we, int row, int col);
    cmd_e exp [$];
    logic [511:0] wd;
    wd = {16{$urandom}};
    @(negedge clk);
    req_valid = 1'b1; req_we = we; req_row = ROW_W'(row); req_col = COL_W'(col); req_wdata = wd;
    #1;
    check("ready when idle", req_ready);
    check("hit/miss flag", hit == (ref_open && ref_row == ROW_W'(row)) && miss == !hit);
    if (ref_open && ref_row == ROW_W'(row)) n_hit++;
    else if (ref_open) begin exp.push_back(CMD_PRE); n_miss++; end
    else n_idle++;
    if (!(ref_open && ref_row == ROW_W'(row))) exp.push_back(CMD_ACT);
    exp.push_back(we ? CMD_WR : CMD_RD);
    ref_open = 1'b1; ref_row = ROW_W'(row);
    @(negedge clk);
    req_valid = 1'b0;
    foreach (exp[k]) begin
      check("push each cycle", q_push);
      check("command kind", q_din.kind == exp[k]);
      check("row/col", q_din.row == ROW_W'(row) && q_din.col == COL_W'(col));
      check("not ready while busy", !req_ready);
      @(negedge clk);
    end
    check("no extra push", !q_push);
    check("write data held", wdata == wd);
    repeat ($urandom % 5) begin
      check("waits for done", !req_ready && !q_push);
      @(negedge clk);
    end
    done = 1'b1;
    @(negedge clk);
    done = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++)
      one_request(logic'($urandom % 2), int'($urandom % 3), int'($urandom % 1024));
    // back-pressure: fewer than three free queue slots
    @(negedge clk);
    q_free = 3'd2;
    req_valid = 1'b1;
    #1;
    check("not ready with two free slots", !req_ready && !q_push);
    q_free = 3'd4;
    req_valid = 1'b0;
    check("all three sequences seen", n_hit > 0 && n_idle > 0 && n_miss > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
