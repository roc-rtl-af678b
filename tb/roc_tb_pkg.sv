// roc_tb_pkg: helpers shared by the ROC testbenches and the DDR3 model.
//
// init_beat gives the contents a DRAM location holds before anything was
// written to it, as a function of its address, so a testbench can predict
// reads of never-written lines without asking the device model.
package roc_tb_pkg;
  function automatic logic [127:0] init_beat(input int unsigned rank, input int unsigned bank,
                                             input int unsigned row,  input int unsigned col,
                                             input int unsigned beat);
    logic [31:0] h;
    h = 32'h9E37_79B9 * (rank + 1) ^ 32'h85EB_CA6B * (bank + 3) ^
        32'hC2B2_AE35 * (row + 7)  ^ 32'h27D4_EB2F * (col + 11) ^ 32'h1656_67B1 * (beat + 13);
    return {h, ~h, h ^ 32'hA5A5_5A5A, h + 32'd1};
  endfunction
endpackage
