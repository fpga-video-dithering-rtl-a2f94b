// fpga_dither_top_tb: end-to-end test of the whole design at a reduced size
// (16 x 8 frames, a 46 x 39 video raster, short debounce, 4 calibration
// frames).  The checks are described in fpga_dither_top_tb_body.svh.
module fpga_dither_top_tb;
  import dither_pkg::*;
  localparam int W = 16;
  localparam int H = 8;
  localparam int X_FRAMES = 4;
  localparam int DEBOUNCE = 8;
  localparam int SCALE = 2;
  localparam int SS_PERIOD = 4;
  localparam int WATCHDOG = 2_000_000;

  `include "fpga_dither_top_tb_body.svh"

  fpga_dither_top #(
    .W(W), .H(H), .DEBOUNCE(DEBOUNCE), .X_FRAMES(X_FRAMES), .SS_PERIOD(SS_PERIOD), .SCALE(SCALE),
    .H_ACTIVE(40), .H_FP(2), .H_SYNC(2), .H_BP(2),
    .V_ACTIVE(36), .V_FP(1), .V_SYNC(1), .V_BP(1), .N_FRAMES(4)
  ) dut (.*);
endmodule
