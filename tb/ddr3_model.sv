// ddr3_model: behavioural model of a multi-rank DDR3 device, for
// simulation only (not synthesizable).
//
// It executes the commands it receives on the command bus (one per cycle)
// and checks, with absolute cycle timestamps kept independently of the
// controller's own countdowns, every rule the controller must obey:
// row state (ACT only to a closed bank, CAS only to the open row, PRE only
// to an open bank) and the timing constraints tRCD, tRP, tRAS, tRC, tRRD,
// tFAW, tCCD, tWTR, tRTP, write recovery, read-to-write turnaround, data
// bus overlap and the rank-to-rank gap tRTR. Each broken rule increments
// `violations` and is printed.
//
// Data: a WR at cycle t samples dq_out (which must be enabled) at cycles
// t+tWL .. t+tWL+tBUS-1, one double-rate beat pair per cycle; a RD at t
// presents read data so that it is sampled at t+tRL .. t+tRL+tBUS-1.
// Locations never written read as roc_tb_pkg::init_beat.
module ddr3_model
  import roc_pkg::*;
#(
  parameter int unsigned NR   = 4,
  parameter int unsigned DQ_W = 64,
  parameter timing_t     T    = DDR3_1333H
) (
  input  logic              clk,
  input  logic              rst_n,   // commands are ignored while low
  input  bus_cmd_t          cmd,
  input  logic [2*DQ_W-1:0] dq_out,
  input  logic              dq_oe,
  output logic [2*DQ_W-1:0] dq_in,
  output int                violations,
  output int                n_act,
  output int                n_pre,
  output int                n_rd,
  output int                n_wr,
  output longint            last_data_cycle
);
  localparam int NB = 8;
  localparam longint NEVER = -1000;

  longint cyc = 0;
  logic              open_v   [NR][NB];
  logic [ROW_W-1:0]  open_row [NR][NB];
  longint t_act [NR][NB], t_pre [NR][NB], t_rd [NR][NB], t_wr [NR][NB];
  longint t_act_rank [NR][$];
  longint t_cas_rank [NR], t_wr_rank [NR], t_rd_rank [NR];
  longint bus_end;        // first free cycle after the last burst
  int     bus_rank;
  logic   bus_was_rd;

  logic [2*DQ_W-1:0] mem   [longint];
  logic [2*DQ_W-1:0] rd_at [longint];
  longint            wr_at [longint];

  function automatic longint key(int r, int b, int row, int col, int beat);
    return (longint'(r) << 40) | (longint'(b) << 36) | (longint'(row) << 16) |
           (longint'(col) << 4) | longint'(beat);
  endfunction

  task automatic fail(string what);
    violations++;
    if (violations <= 20) $display("ddr3_model: cycle %0d: %s", cyc, what);
  endtask

  initial begin
    violations = 0; n_act = 0; n_pre = 0; n_rd = 0; n_wr = 0;
    last_data_cycle = 0;
    dq_in = '0;
    bus_end = 0; bus_rank = 0; bus_was_rd = 1'b0;
    for (int r = 0; r < NR; r++) begin
      t_cas_rank[r] = NEVER; t_wr_rank[r] = NEVER; t_rd_rank[r] = NEVER;
      for (int b = 0; b < NB; b++) begin
        open_v[r][b] = 1'b0; open_row[r][b] = '0;
        t_act[r][b] = NEVER; t_pre[r][b] = NEVER; t_rd[r][b] = NEVER; t_wr[r][b] = NEVER;
      end
    end
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && cmd.valid && cmd.kind != CMD_NOP) begin
      int r, b;
      r = int'(cmd.rank);
      b = int'(cmd.bank);
      case (cmd.kind)
        CMD_ACT: begin
          n_act++;
          if (open_v[r][b])                          fail("ACT to an open bank");
          if (cyc - t_pre[r][b] < T.tRP)             fail("tRP");
          if (cyc - t_act[r][b] < T.tRC)             fail("tRC");
          if (t_act_rank[r].size() > 0 && cyc - t_act_rank[r][$] < T.tRRD) fail("tRRD");
          if (t_act_rank[r].size() >= 4 && cyc - t_act_rank[r][t_act_rank[r].size()-4] < T.tFAW)
            fail("tFAW");
          t_act_rank[r].push_back(cyc);
          if (t_act_rank[r].size() > 4) void'(t_act_rank[r].pop_front());
          open_v[r][b] = 1'b1; open_row[r][b] = cmd.row; t_act[r][b] = cyc;
        end
        CMD_PRE: begin
          n_pre++;
          if (!open_v[r][b])                              fail("PRE to a closed bank");
          if (cyc - t_act[r][b] < T.tRAS)                 fail("tRAS");
          if (cyc - t_rd[r][b] < T.tRTP)                  fail("tRTP");
          if (cyc - (t_wr[r][b] + T.tWL + T.tBUS) < T.tWR) fail("tWR");
          open_v[r][b] = 1'b0; t_pre[r][b] = cyc;
        end
        CMD_RD, CMD_WR: begin
          longint start;
          logic   is_wr;
          is_wr = (cmd.kind == CMD_WR);
          if (is_wr) n_wr++; else n_rd++;
          if (!open_v[r][b])                         fail("CAS to a closed bank");
          else if (open_row[r][b] != cmd.row)        fail("CAS to a row that is not open");
          if (cyc - t_act[r][b] < T.tRCD)            fail("tRCD");
          if (cyc - t_cas_rank[r] < T.tCCD)          fail("tCCD");
          if (!is_wr && cyc - (t_wr_rank[r] + T.tWL + T.tBUS) < T.tWTR) fail("tWTR");
          start = cyc + (is_wr ? T.tWL : T.tRL);
          if (start < bus_end)                       fail("data bus overlap");
          if (bus_rank != r && start < bus_end + T.tRTR) fail("tRTR");
          if (is_wr && bus_rank == r && bus_was_rd && start < bus_end + 2)
            fail("read-to-write turnaround");
          bus_end = start + T.tBUS; bus_rank = r; bus_was_rd = !is_wr;
          t_cas_rank[r] = cyc;
          if (is_wr) begin t_wr[r][b] = cyc; t_wr_rank[r] = cyc; end
          else       begin t_rd[r][b] = cyc; t_rd_rank[r] = cyc; end
          for (int j = 0; j < int'(T.tBUS); j++) begin
            longint k;
            k = key(r, b, int'(open_row[r][b]), int'(cmd.col), j);
            if (is_wr) wr_at[start + j] = k;
            else rd_at[start + j] = mem.exists(k) ? mem[k] :
                 (2*DQ_W)'(roc_tb_pkg::init_beat(r, b, int'(open_row[r][b]), int'(cmd.col), j));
          end
        end
        default: ;
      endcase
    end
    // write data sampled this edge
    if (wr_at.exists(cyc)) begin
      if (!dq_oe) fail("write data not driven");
      mem[wr_at[cyc]] = dq_out;
      wr_at.delete(cyc);
      last_data_cycle = cyc;
    end
    if (rd_at.exists(cyc)) begin
      rd_at.delete(cyc);
      last_data_cycle = cyc;
    end
    // read data for the next edge
    dq_in <= rd_at.exists(cyc + 1) ? rd_at[cyc + 1] : '0;
  end
endmodule
