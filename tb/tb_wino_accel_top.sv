// End-to-end test of the accelerator at reduced size (TI = 4 PEs per PU,
// TO = 4 PUs, output tile 2 x 4 x 6): four layers (2D with ReLU and
// pooling, 3D with pooling bypassed, 3D with saturation and 2x2x2 pooling,
// 2D plain), two input-channel groups each. See accel_tb_body.svh.
module tb_wino_accel_top;
  localparam int TI = 4, TO = 4, TZ = 2, TR = 4, TC = 6, BW_ON = 64;
  localparam int WATCHDOG = 200000;

  `include "accel_tb_body.svh"

  wino_accel_top #(.TI(TI), .TO(TO), .TZ(TZ), .TR(TR), .TC(TC), .BW_ON(BW_ON)) dut (.*);
endmodule
