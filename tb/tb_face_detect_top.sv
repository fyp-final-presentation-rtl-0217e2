// End-to-end test of the face detection system at a reduced frame size
// (64x48 display, 128x96 camera readout, short blanking, short reset and
// start-up delays): camera configuration, capture, frame buffer, detection,
// display and the Sobel side design. See top_harness.svh for the checks.
`define TOP_PARAMS #(.H_FRONT(4), .H_SYNC(8), .H_BACK(8), .H_ACT(64), .V_FRONT(2), .V_SYNC(2), .V_BACK(6), .V_ACT(48), \
  .MIN_AREA(40), .BURST(48), .INIT_WAIT(200), .RST_D0(10), .RST_D1(20), .RST_D2(30), .I2C_DIV(2), .I2C_WAIT(10), .SOBEL_W(16))
module tb_face_detect_top;
  localparam int W = 64, H = 48, WIN = 9, THRESH = 78, NFRAMES = 3;
  localparam longint WATCHDOG_NS = 20_000_000;
  `include "top_harness.svh"
endmodule
`undef TOP_PARAMS
