// tb_roc_data_path: sends RD and WR commands for random requestors on the
// command bus, spaced as the back end may space them (a burst may follow
// the previous one directly, or after a rank-to-rank gap). Acting as the
// device, it checks that write beats appear on dq_out, enabled, exactly
// tWL..tWL+tBUS-1 cycles after the WR and drives read beats so that they
// are sampled tRL..tRL+tBUS-1 cycles after the RD. It checks that each
// response comes one cycle after the last beat, with the right requestor,
// direction and read line.
module tb_roc_data_path;
  import roc_pkg::*;
  localparam int unsigned N = 8, DQ_W = 64;
  localparam timing_t T = DDR3_1333H;
  localparam int unsigned LINE_W = 2 * DQ_W * T.tBUS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_cmd_t          cmd;
  logic [2:0]        cmd_req;
  logic [LINE_W-1:0] wdata [N];
  logic [2*DQ_W-1:0] dq_out, dq_in;
  logic              dq_oe, resp_valid, resp_we;
  logic [2:0]        resp_req;
  logic [LINE_W-1:0] resp_rdata;

  roc_data_path #(.N(N), .DQ_W(DQ_W), .T(T)) dut (.clk, .rst_n, .cmd, .cmd_req, .wdata,
    .dq_out, .dq_oe, .dq_in, .resp_valid, .resp_req, .resp_we, .resp_rdata);

  int checks = 0, failures = 0;
  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // Per edge: expected bus activity and expected response.
  typedef struct { logic v; logic we; int req; logic [LINE_W-1:0] line; int beat; } slot_t;
  slot_t  bus_at  [longint];
  slot_t  resp_at [longint];
  longint cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (bus_at.exists(cyc)) begin
        slot_t s;
        s = bus_at[cyc];
        if (s.we) begin
          check("write beat enabled", dq_oe);
          check("write beat data", dq_out == s.line[s.beat*2*DQ_W +: 2*DQ_W]);
        end else check("bus not driven on a read", !dq_oe);
        bus_at.delete(cyc);
      end else check("bus idle", !dq_oe);
      if (resp_at.exists(cyc)) begin
        slot_t s;
        s = resp_at[cyc];
        check("response valid", resp_valid);
        check("response requestor/direction", int'(resp_req) == s.req && resp_we == s.we);
        if (!s.we) check("read line", resp_rdata == s.line);
        resp_at.delete(cyc);
      end else check("no response", !resp_valid);
      // device: present read data for the next edge
      if (bus_at.exists(cyc + 1) && !bus_at[cyc + 1].we)
        dq_in <= bus_at[cyc + 1].line[bus_at[cyc + 1].beat*2*DQ_W +: 2*DQ_W];
      else dq_in <= '0;
    end
  end

  function automatic logic [LINE_W-1:0] rand_line();
    logic [LINE_W-1:0] l;
    for (int i = 0; i < int'(LINE_W / 32); i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  longint bus_end = 0;
  int n_sent = 0;

  initial begin
    cmd = '0; cmd_req = '0; dq_in = '0;
    for (int g = 0; g < N; g++) wdata[g] = rand_line();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    while (n_sent < 600) begin
      logic we;
      int g, lat;
      longint t;
      @(negedge clk);
      cmd = '0;
      we  = logic'($urandom % 2);
      g   = int'($urandom % N);
      lat = we ? int'(T.tWL) : int'(T.tRL);
      t   = cyc + 1;   // edge at which the command is seen
      if (t + lat >= bus_end + (($urandom % 2) ? int'(T.tRTR) : 0) && ($urandom % 3 != 0)) begin
        logic [LINE_W-1:0] line;
        line = we ? wdata[g] : rand_line();
        cmd.valid = 1'b1; cmd.kind = we ? CMD_WR : CMD_RD;
        cmd.rank = RANK_W'(g / 2); cmd.bank = BANK_W'(g % 2);
        cmd_req = 3'(g);
        for (int j = 0; j < int'(T.tBUS); j++)
          bus_at[t + lat + j] = '{v: 1'b1, we: we, req: g, line: line, beat: j};
        resp_at[t + lat + T.tBUS] = '{v: 1'b1, we: we, req: g, line: line, beat: 0};
        bus_end = t + lat + T.tBUS;
        n_sent++;
      end else if ($urandom % 2) begin
        cmd.valid = 1'b1; cmd.kind = ($urandom % 2) ? CMD_ACT : CMD_PRE;   // no data
      end
    end
    @(negedge clk);
    cmd = '0;
    repeat (30) @(posedge clk);
    check("all bursts and responses seen", bus_at.size() == 0 && resp_at.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
