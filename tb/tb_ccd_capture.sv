// Drives three small frames of FVAL/LVAL-framed pixels whose value encodes
// their position and checks every captured pixel's data and X/Y, the number
// of pixels, and the frame counter. The first frame is sent before i_start and
// must be ignored.
// Stimulus timing is this testbench's choice; the expected pixel stream
// follows FVAL/LVAL framing.
module tb_ccd_capture;
  `include "tb_util.svh"
  localparam int W = 10, H = 6;
  logic clk = 0, rst_n = 0, start = 0;
  logic [11:0] d, od, ox, oy;
  logic fval = 0, lval = 0, ov;
  logic [31:0] fc;
  int got = 0, frame_no = 0;
  always #5 clk = ~clk;
  ccd_capture dut (.i_clk(clk), .i_rst_n(rst_n), .i_start(start), .i_stop(1'b0),
    .i_data(d), .i_fval(fval), .i_lval(lval), .o_data(od), .o_valid(ov), .o_x(ox), .o_y(oy), .o_frame_cnt(fc));
  initial begin repeat (5000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  always @(posedge clk) if (rst_n && ov) begin
    got++;
    `CHECK(od == 12'(oy * 64 + ox), $sformatf("pixel data %h at (%0d,%0d)", od, ox, oy));
    `CHECK(ox < W && oy < H, "coordinates in range");
  end
  task automatic frame();
    fval <= 1; repeat (3) @(posedge clk);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin lval <= 1; d <= 12'(y * 64 + x); @(posedge clk); end
      lval <= 0; d <= '0; repeat (4) @(posedge clk);
    end
    fval <= 0; repeat (6) @(posedge clk);
  endtask
  initial begin
    d = 0; repeat (3) @(posedge clk); rst_n = 1;
    frame();
    `CHECK(got == 0 && fc == 0, "no capture before start");
    start <= 1; @(posedge clk); start <= 0;
    frame(); frame();
    repeat (5) @(posedge clk);
    `CHECK(got == 2 * W * H, $sformatf("pixel count %0d", got));
    `CHECK(fc == 2, $sformatf("frame count %0d", fc));
    finish_tb();
  end
endmodule
