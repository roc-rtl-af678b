// roc_pkg: types and constants shared by the ROC (rank-switching, open-row)
// DRAM controller.
//
// The controller drives a multi-rank DDR3 device. Every requestor owns one
// private bank in one rank, so a command queue entry does not need to carry
// a rank or bank: both follow from the queue it sits in. Commands on the
// DRAM command bus do carry them.
//
// Timing is counted in controller clock cycles, one controller cycle being
// one DRAM clock (tCK). The default set, DDR3_1333H, is the speed grade the
// controller is evaluated with; the cycle values are those of the JEDEC
// DDR3-1333H (9-9-9) grade, since only the names of the constraints are
// part of the design description. tRL=9, tWL=7, tBUS=4 and tRTR=2 reproduce
// the 29-cycle four-rank write-read-write-read example of the design.
package roc_pkg;

  // DRAM commands. NOP means "no command this cycle".
  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_PRE = 3'd1,
    CMD_ACT = 3'd2,
    CMD_RD  = 3'd3,
    CMD_WR  = 3'd4
  } cmd_e;

  localparam int ROW_W  = 15;  // DDR3 row address bits (2 Gb x8 part)
  localparam int COL_W  = 10;  // DDR3 column address bits
  localparam int RANK_W = 2;   // up to four ranks
  localparam int BANK_W = 3;   // eight banks per DDR3 rank
  localparam int CNT_W  = 6;   // width of every timing countdown

  // One entry of a per-requestor command queue.
  typedef struct packed {
    cmd_e              kind;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
  } qcmd_t;

  // One command on the DRAM command bus.
  typedef struct packed {
    logic              valid;
    cmd_e              kind;
    logic [RANK_W-1:0] rank;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
  } bus_cmd_t;

  // DDR3 timing constraints, in cycles.
  typedef struct packed {
    int unsigned tRCD;  // ACT to CAS, same bank
    int unsigned tRP;   // PRE to ACT, same bank
    int unsigned tRAS;  // ACT to PRE, same bank
    int unsigned tRC;   // ACT to ACT, same bank
    int unsigned tRRD;  // ACT to ACT, same rank
    int unsigned tFAW;  // window holding at most four ACTs, same rank
    int unsigned tRL;   // RD to first read data
    int unsigned tWL;   // WR to first write data
    int unsigned tBUS;  // data burst length on the bus (BL8 = 4 cycles)
    int unsigned tCCD;  // CAS to CAS, same rank
    int unsigned tWR;   // end of write data to PRE, same bank
    int unsigned tWTR;  // end of write data to RD, same rank
    int unsigned tRTP;  // RD to PRE, same bank
    int unsigned tRTR;  // gap between data bursts of different ranks
  } timing_t;

  localparam timing_t DDR3_1333H = '{
    tRCD: 9, tRP: 9, tRAS: 24, tRC: 33, tRRD: 4, tFAW: 20,
    tRL: 9, tWL: 7, tBUS: 4, tCCD: 4, tWR: 10, tWTR: 5, tRTP: 5, tRTR: 2
  };

  // Next value of a timing countdown: it counts down by one per cycle and,
  // when a command sets a new constraint of `delay` cycles, it keeps the
  // later of the two deadlines. A countdown of zero means "allowed now";
  // loading delay-1 makes the command legal exactly `delay` cycles later.
  function automatic logic [CNT_W-1:0] cnt_next(input logic [CNT_W-1:0] cur,
                                                input logic              load,
                                                input int unsigned       delay);
    logic [CNT_W-1:0] dec;
    logic [CNT_W-1:0] ld;
    dec = (cur == '0) ? '0 : cur - 1'b1;
    ld  = (delay == 0) ? '0 : CNT_W'(delay - 1);
    return (load && ld > dec) ? ld : dec;
  endfunction

endpackage
