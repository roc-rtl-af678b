// roc_rr_arbiter: round-robin arbiter, the building block of the Level 2
// and Level 3 arbiters.
//
// Among the requesting inputs it grants the first one at or after the
// priority pointer, searching upward and wrapping. The grant is
// combinational. The pointer only moves when `advance` says the granted
// input was actually served (its command went out on the command bus);
// it then points just past the served input, so every input is passed over
// at most N-1 times in a row. Reset puts the pointer at input 0.
module roc_rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N-1:0]                  req,
  input  logic                          advance,
  output logic                          gnt_valid,
  output logic [(N>1?$clog2(N):1)-1:0]  gnt_idx,
  output logic [(N>1?$clog2(N):1)-1:0]  ptr
);
  localparam int unsigned W = (N > 1) ? $clog2(N) : 1;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = ptr;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % N;
      if (!gnt_valid && req[i]) begin
        gnt_valid = 1'b1;
        gnt_idx   = W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     ptr <= '0;
    else if (advance && gnt_valid)  ptr <= (gnt_idx == W'(N - 1)) ? '0 : gnt_idx + 1'b1;
  end
endmodule
