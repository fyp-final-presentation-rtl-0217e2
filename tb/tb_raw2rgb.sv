// Builds a Bayer mosaic (G1 R / B G2) from a random RGB image, streams it in
// raster order and checks every output pixel: R and B copied, G the mean of
// the two greens, coordinates halved, one pixel per 2x2 quad.
// The quad-based interpolation checked is this implementation's reading of
// the design's Bayer-to-RGB step.
module tb_raw2rgb;
  `include "tb_util.svh"
  localparam int RW = 16, RH = 8;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  logic [11:0] d, ix, iy, r, g, b;
  logic [10:0] ox, oy;
  logic [11:0] img_r [RH/2][RW/2], img_g1 [RH/2][RW/2], img_g2 [RH/2][RW/2], img_b [RH/2][RW/2];
  int got = 0;
  always #5 clk = ~clk;
  raw2rgb #(.RAW_W(RW)) dut (.i_clk(clk), .i_rst_n(rst_n), .i_valid(iv), .i_data(d), .i_x(ix), .i_y(iy),
    .o_valid(ov), .o_r(r), .o_g(g), .o_b(b), .o_x(ox), .o_y(oy));
  initial begin repeat (5000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  always @(posedge clk) if (rst_n && ov) begin
    got++;
    `CHECK(r == img_r[oy][ox] && b == img_b[oy][ox], $sformatf("R/B at (%0d,%0d)", ox, oy));
    `CHECK(g == 12'((13'(img_g1[oy][ox]) + 13'(img_g2[oy][ox])) >> 1), $sformatf("G at (%0d,%0d)", ox, oy));
  end
  initial begin
    for (int y = 0; y < RH/2; y++) for (int x = 0; x < RW/2; x++) begin
      img_r[y][x] = 12'($urandom); img_g1[y][x] = 12'($urandom);
      img_g2[y][x] = 12'($urandom); img_b[y][x] = 12'($urandom);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int fr = 0; fr < 2; fr++)
    for (int y = 0; y < RH; y++) begin
      for (int x = 0; x < RW; x++) begin
        iv <= 1; ix <= 12'(x); iy <= 12'(y);
        case ({y[0], x[0]})
          2'b00: d <= img_g1[y/2][x/2];
          2'b01: d <= img_r[y/2][x/2];
          2'b10: d <= img_b[y/2][x/2];
          default: d <= img_g2[y/2][x/2];
        endcase
        @(posedge clk);
        if (x % 5 == 4) begin iv <= 0; @(posedge clk); end   // gaps inside the line
      end
      iv <= 0; repeat (3) @(posedge clk);
    end
    repeat (3) @(posedge clk);
    `CHECK(got == RW * RH / 2, $sformatf("output count %0d", got));
    finish_tb();
  end
endmodule
