// Full-size system test: the top with all parameters at their defaults
// (640x480 display at the 800x524 raster, 1280x960 camera readout, the
// design's reset delays, I2C clock divider and SDRAM start-up wait). Same
// checks as the reduced test (top_harness.svh), over two checked frames.
`define TOP_PARAMS
module tb_face_detect_full;
  localparam int W = 640, H = 480, WIN = 9, THRESH = 78, NFRAMES = 2;
  localparam longint WATCHDOG_NS = 400_000_000;
  `include "top_harness.svh"
endmodule
`undef TOP_PARAMS
