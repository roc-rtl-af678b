// tb_roc_cmd_queue: random pushes and pops against a reference queue;
// checks head, head_valid and free every cycle, and that the queue holds
// exactly DEPTH entries.
module tb_roc_cmd_queue;
  import roc_pkg::*;
  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  push = 1'b0, pop = 1'b0, head_valid;
  qcmd_t din, head;
  logic [$clog2(DEPTH+1)-1:0] free;

  roc_cmd_queue #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .head, .head_valid, .free);

  int checks = 0, failures = 0;
  qcmd_t ref_q [$];
  int    max_fill = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check("free", int'(free) == DEPTH - ref_q.size());
      check("head_valid", head_valid == (ref_q.size() != 0));
      if (ref_q.size() != 0) check("head", head == ref_q[0]);
      push = (ref_q.size() < DEPTH) && ($urandom % 100 < (i < 1500 ? 65 : 35));
      pop  = (ref_q.size() != 0) && ($urandom % 100 < 50);
      din  = '{kind: cmd_e'(3'($urandom % 4 + 1)), row: ROW_W'($urandom), col: COL_W'($urandom)};
      @(posedge clk);
      if (pop)  void'(ref_q.pop_front());
      if (push) ref_q.push_back(din);
      if (ref_q.size() > max_fill) max_fill = ref_q.size();
    end
    check("queue filled to its depth", max_fill == DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
