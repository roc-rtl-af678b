// roc_cmd_queue: the command queue of one requestor.
//
// The front end of a requestor pushes the PRE, ACT and CAS commands of its
// request here, and the back end pops them, oldest first, when its
// arbitration lets one issue. The back end only looks at the head entry,
// so commands of one requestor always issue in order.
//
// Interface: push/din write one entry (not allowed while full), pop removes
// the head (not allowed while empty). head/head_valid show the oldest entry.
// The queue is a registered circular buffer: a pushed entry is visible at
// the head the cycle after the push. `free` counts empty slots.
//
// The depth is this design's choice (four entries, as many as the queue
// symbol of the back-end drawing shows); a request needs at most three.
module roc_cmd_queue
  import roc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  qcmd_t                      din,
  input  logic                       pop,
  output qcmd_t                      head,
  output logic                       head_valid,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  qcmd_t                       mem [DEPTH];
  logic [PW-1:0]               rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0]  count;

  function automatic logic [PW-1:0] ptr_inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= ptr_inc(wr_ptr);
      if (pop)  rd_ptr <= ptr_inc(rd_ptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= din;
  end

  assign head       = mem[rd_ptr];
  assign head_valid = (count != '0);
  assign free       = $clog2(DEPTH+1)'(DEPTH) - count;

  // Handshake rules.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (free != '0));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);
endmodule
