// fpga_dither_top_full_tb: the end-to-end test of fpga_dither_top at the
// design's real size -- 320 x 240 frames, the 1280 x 720 video raster,
// 16 calibration frames, the full button debounce -- with no parameter of
// the top overridden.  The checks are described in
// fpga_dither_top_tb_body.svh.
module fpga_dither_top_full_tb;
  import dither_pkg::*;
  localparam int W = 320;
  localparam int H = 240;
  localparam int X_FRAMES = 16;
  localparam int DEBOUNCE = 371_250;
  localparam int SCALE = 2;
  localparam int SS_PERIOD = 100_000;
  localparam int WATCHDOG = 80_000_000;

  `include "fpga_dither_top_tb_body.svh"

  fpga_dither_top dut (.*);
endmodule
