// roc_front_end: front end of one requestor, open-row policy on a private
// bank.
//
// Each requestor owns one bank, so no other requestor can close the row it
// left open. The front end remembers that row. For each request it pushes
// into the requestor's command queue:
//   - row hit  (the requested row is open):  CAS only
//   - bank idle (no row open, after reset):  ACT, CAS
//   - row miss (another row is open):        PRE, ACT, CAS
// The CAS is RD or WR. The row stays open after the access (open-row
// policy); nothing precharges it until a request for another row arrives.
//
// Interface: a request is taken when req_valid and req_ready are both high.
// The requestor then has one request outstanding: req_ready stays low until
// `done` reports that the data transfer of that request is over. Write data
// is held in wdata for the data path until then. The first command is
// pushed the cycle after the request is taken and the others in the
// following cycles, one per cycle (a constant front-end delay).
// hit/miss pulse for one cycle when a request is taken.
//
// One outstanding request per requestor and the command sequencing are this
// design's choices; the open-row policy and private banks are the design's.
module roc_front_end
  import roc_pkg::*;
#(
  parameter int unsigned LINE_W = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  // requestor side
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [ROW_W-1:0]  req_row,
  input  logic [COL_W-1:0]  req_col,
  input  logic [LINE_W-1:0] req_wdata,
  input  logic              done,
  // command queue side
  output logic              q_push,
  output qcmd_t             q_din,
  input  logic [2:0]        q_free,
  // held write data, for the data path
  output logic [LINE_W-1:0] wdata,
  // statistics
  output logic              hit,
  output logic              miss
);
  typedef enum logic [2:0] {S_IDLE, S_PRE, S_ACT, S_CAS, S_WAIT} state_e;

  state_e           state;
  logic             open_valid;
  logic [ROW_W-1:0] open_row;
  logic             cur_we;
  logic [ROW_W-1:0] cur_row;
  logic [COL_W-1:0] cur_col;
  logic             take;

  assign req_ready = (state == S_IDLE) && (q_free >= 3'd3);
  assign take      = req_valid && req_ready;
  assign hit       = take && open_valid && (open_row == req_row);
  assign miss      = take && !(open_valid && (open_row == req_row));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      open_valid <= 1'b0;
      open_row   <= '0;
      cur_we     <= 1'b0;
      cur_row    <= '0;
      cur_col    <= '0;
      wdata      <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (take) begin
          cur_we  <= req_we;
          cur_row <= req_row;
          cur_col <= req_col;
          wdata   <= req_wdata;
          if (!open_valid)              state <= S_ACT;
          else if (open_row != req_row) state <= S_PRE;
          else                          state <= S_CAS;
        end
        S_PRE:  state <= S_ACT;
        S_ACT: begin
          state      <= S_CAS;
          open_valid <= 1'b1;
          open_row   <= cur_row;
        end
        S_CAS:  state <= done ? S_IDLE : S_WAIT;
        S_WAIT: if (done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    q_push   = 1'b0;
    q_din    = '{kind: CMD_NOP, row: cur_row, col: cur_col};
    unique case (state)
      S_PRE: begin q_push = 1'b1; q_din.kind = CMD_PRE; end
      S_ACT: begin q_push = 1'b1; q_din.kind = CMD_ACT; end
      S_CAS: begin q_push = 1'b1; q_din.kind = cur_we ? CMD_WR : CMD_RD; end
      default: ;
    endcase
  end
endmodule
