// End-to-end test of the accelerator at its default size (TI = 4, TO = 64,
// output tile 2 x 14 x 14): the same four layers as the reduced test, each
// a complete two-group engine run over the whole tile. See
// accel_tb_body.svh.
module tb_wino_accel_full;
  localparam int TI = 4, TO = 64, TZ = 2, TR = 14, TC = 14, BW_ON = 64;
  localparam int WATCHDOG = 2000000;

  `include "accel_tb_body.svh"

  wino_accel_top dut (.*);
endmodule
