// roc_data_path: data-bus side of the controller.
//
// Every CAS the back end puts on the command bus is followed by a data
// burst of tBUS cycles: tWL cycles after a WR the controller drives the
// requestor's write data, tRL cycles after a RD it captures the device's
// read data. The data bus carries two beats of DQ_W bits per cycle (double
// data rate), so one burst moves a line of LINE_W = 2*DQ_W*tBUS bits
// (64 bytes for a 64-bit bus and burst length 8).
//
// A delay line of depth tRL+tBUS remembers, for each of the last cycles,
// whether a CAS issued then and for which requestor. Entry d describes the
// command sent d+1 cycles ago, so beat j of a burst belongs to entry
// lat-1+j. The back end never lets two bursts overlap, so at most one entry
// owns the bus in a cycle (asserted).
//
// Interface: cmd/cmd_req are the command bus and the global requestor index
// of its command; wdata holds each requestor's write line. dq_out/dq_oe go
// to the device, dq_in comes back. resp_* pulses for one cycle with the
// requestor, the direction and the read line when the last beat of a burst
// has moved, which ends that request. Line assembly, the response format
// and the single shared response port are this design's choices.
module roc_data_path
  import roc_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned DQ_W = 64,
  parameter timing_t     T    = DDR3_1333H,
  localparam int unsigned LINE_W = 2 * DQ_W * T.tBUS,
  localparam int unsigned REQ_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  bus_cmd_t          cmd,
  input  logic [REQ_W-1:0]  cmd_req,
  input  logic [LINE_W-1:0] wdata [N],
  output logic [2*DQ_W-1:0] dq_out,
  output logic              dq_oe,
  input  logic [2*DQ_W-1:0] dq_in,
  output logic              resp_valid,
  output logic [REQ_W-1:0]  resp_req,
  output logic              resp_we,
  output logic [LINE_W-1:0] resp_rdata
);
  localparam int unsigned D = T.tRL + T.tBUS;
  localparam int unsigned B = 2 * DQ_W;

  typedef struct packed {
    logic             valid;
    logic             we;
    logic [REQ_W-1:0] req;
  } slot_t;

  slot_t            pipe [D];
  logic [LINE_W-1:0] rbuf;

  // Which burst owns the bus in this cycle, and which beat it is at.
  logic             wr_act, rd_act, last_beat;
  logic [REQ_W-1:0] act_req;
  int unsigned      beat;

  always_comb begin
    wr_act    = 1'b0;
    rd_act    = 1'b0;
    last_beat = 1'b0;
    act_req   = '0;
    beat      = 0;
    for (int unsigned j = 0; j < T.tBUS; j++) begin
      if (pipe[T.tWL-1+j].valid && pipe[T.tWL-1+j].we) begin
        wr_act = 1'b1; act_req = pipe[T.tWL-1+j].req; beat = j;
        last_beat = (j == T.tBUS - 1);
      end
      if (pipe[T.tRL-1+j].valid && !pipe[T.tRL-1+j].we) begin
        rd_act = 1'b1; act_req = pipe[T.tRL-1+j].req; beat = j;
        last_beat = (j == T.tBUS - 1);
      end
    end
  end

  assign dq_oe  = wr_act;
  assign dq_out = wr_act ? wdata[act_req][beat*B +: B] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < D; d++) pipe[d] <= '0;
      rbuf       <= '0;
      resp_valid <= 1'b0;
      resp_req   <= '0;
      resp_we    <= 1'b0;
      resp_rdata <= '0;
    end else begin
      pipe[0].valid <= cmd.valid && (cmd.kind == CMD_RD || cmd.kind == CMD_WR);
      pipe[0].we    <= cmd.kind == CMD_WR;
      pipe[0].req   <= cmd_req;
      for (int d = 1; d < D; d++) pipe[d] <= pipe[d-1];

      if (rd_act) rbuf[beat*B +: B] <= dq_in;

      resp_valid <= (wr_act || rd_act) && last_beat;
      if ((wr_act || rd_act) && last_beat) begin
        resp_req   <= act_req;
        resp_we    <= wr_act;
        resp_rdata <= '0;
        if (rd_act) begin
          resp_rdata <= rbuf;
          resp_rdata[beat*B +: B] <= dq_in;
        end
      end
    end
  end

  a_one_burst: assert property (@(posedge clk) disable iff (!rst_n) !(wr_act && rd_act));
endmodule
