// tb_roc_configs: the controller in the other configurations of the
// published evaluation, each a roc_top_run instance of its own:
//   - the write-read-write-read example on one rank (four requestors) and
//     on two ranks (two requestors each). The published 52 and 35 cycles
//     assume the four requests are served in arrival order. Here the
//     Level 3 round robin passes over a read that waits for its rank's
//     write-to-read time, so the second write goes first: one rank gives
//     W W R R = 37 cycles, two ranks give 29 like four ranks;
//   - the synthetic workload (eight requestors, 20% writes) at row-hit
//     ratios 0, 25, 50, 75 and 100%, on four ranks with a 64-bit bus, on
//     two ranks (four requestors each) with a 64-bit bus, and on four ranks
//     with a 32-bit bus. For the 32-bit bus a 64-byte line takes twice the
//     bus time, modelled as tBUS = 8.
// It prints the worst and mean request latency of each run (cycles and ns
// at tCK = 1.5 ns). It checks that the worst latency over the sweep is
// lower on four ranks than on two (the rank count sets how long a
// requestor waits for its turn), and that the mean latency on the 32-bit
// bus is above the 64-bit one at every ratio (each line takes twice the bus
// time). Single worst cases of random runs are not bounds, so they are
// reported, not compared ratio by ratio.
module tb_roc_configs;
  import roc_pkg::*;

  localparam timing_t T32 = '{
    tRCD: 9, tRP: 9, tRAS: 24, tRC: 33, tRRD: 4, tFAW: 20,
    tRL: 9, tWL: 7, tBUS: 8, tCCD: 4, tWR: 10, tWTR: 5, tRTP: 5, tRTR: 2
  };
  localparam int NCFG = 17;
  localparam int NREQ = 100;

  logic   done [NCFG];
  int     checks_i [NCFG], failures_i [NCFG], n_lat [NCFG], n_hit [NCFG], n_miss [NCFG];
  longint max_lat [NCFG], sum_lat [NCFG], ex [NCFG];

  // Examples: one rank, four requestors; two ranks, two requestors each.
  roc_top_run #(.NR(1), .M(4), .N_REQ(50), .EX_CYCLES(37), .EX0(0), .EX1(1), .EX2(2), .EX3(3))
    u_ex1 (done[0], checks_i[0], failures_i[0], max_lat[0], sum_lat[0], n_lat[0], ex[0], n_hit[0], n_miss[0]);
  roc_top_run #(.NR(2), .M(2), .N_REQ(50), .EX_CYCLES(35), .EX0(0), .EX1(1), .EX2(2), .EX3(3))
    u_ex2 (done[1], checks_i[1], failures_i[1], max_lat[1], sum_lat[1], n_lat[1], ex[1], n_hit[1], n_miss[1]);

  // Row-hit sweeps.
  for (genvar h = 0; h < 5; h++) begin : g_sweep
    roc_top_run #(.NR(4), .M(2), .DQ_W(64), .HIT_PCT(25 * h), .N_REQ(NREQ))
      u_r4_64 (done[2+h], checks_i[2+h], failures_i[2+h], max_lat[2+h], sum_lat[2+h], n_lat[2+h],
               ex[2+h], n_hit[2+h], n_miss[2+h]);
    roc_top_run #(.NR(2), .M(4), .DQ_W(64), .HIT_PCT(25 * h), .N_REQ(NREQ))
      u_r2_64 (done[7+h], checks_i[7+h], failures_i[7+h], max_lat[7+h], sum_lat[7+h], n_lat[7+h],
               ex[7+h], n_hit[7+h], n_miss[7+h]);
    roc_top_run #(.NR(4), .M(2), .DQ_W(32), .T(T32), .HIT_PCT(25 * h), .N_REQ(NREQ))
      u_r4_32 (done[12+h], checks_i[12+h], failures_i[12+h], max_lat[12+h], sum_lat[12+h], n_lat[12+h],
               ex[12+h], n_hit[12+h], n_miss[12+h]);
  end

  int checks = 0, failures = 0;

  function automatic string cfg_name(int i);
    if (i == 0) return "1 rank x 4 req, 64-bit, example";
    if (i == 1) return "2 ranks x 2 req, 64-bit, example";
    if (i < 7)  return $sformatf("4 ranks x 2 req, 64-bit, %0d%% hits", 25 * (i - 2));
    if (i < 12) return $sformatf("2 ranks x 4 req, 64-bit, %0d%% hits", 25 * (i - 7));
    return $sformatf("4 ranks x 2 req, 32-bit, %0d%% hits", 25 * (i - 12));
  endfunction

  initial begin
    int all;
    do begin
      #1000;
      all = 1;
      for (int i = 0; i < NCFG; i++) if (!done[i]) all = 0;
    end while (!all);
    for (int i = 0; i < NCFG; i++) begin
      checks += checks_i[i];
      failures += failures_i[i];
      $display("%-36s max %4d cycles (%6.1f ns)  mean %6.1f cycles  hits %0d misses %0d%s",
               cfg_name(i), max_lat[i], real'(max_lat[i]) * 1.5,
               real'(sum_lat[i]) / real'(n_lat[i]), n_hit[i], n_miss[i],
               (i < 2) ? $sformatf("  example %0d cycles", ex[i]) : "");
    end
    begin
      longint w4, w2;
      w4 = 0; w2 = 0;
      for (int h = 0; h < 5; h++) begin
        if (max_lat[2 + h] > w4) w4 = max_lat[2 + h];
        if (max_lat[7 + h] > w2) w2 = max_lat[7 + h];
      end
      checks++;
      if (w4 >= w2) begin
        failures++;
        $display("FAIL: worst latency on four ranks (%0d) not below two ranks (%0d)", w4, w2);
      end
    end
    for (int h = 0; h < 5; h++) begin
      checks++;
      if (sum_lat[12 + h] * n_lat[2 + h] <= sum_lat[2 + h] * n_lat[12 + h]) begin
        failures++;
        $display("FAIL: 32-bit bus not slower than 64-bit at %0d%% row hits", 25 * h);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
