// Streams random and structured 12x8 grey images through the Sobel filter and
// compares every output with the gradient magnitude computed by the testbench
// (floor of the square root, clamped to 255, zero outside the image), plus
// coordinates, output count and the 2-clock latency.
// The kernels and magnitude checked are the design's; saturation at 255 and
// border handling are this implementation's.
module tb_sobel_filter;
  `include "tb_util.svh"
  localparam int W = 12, H = 8;
  logic clk = 0, rst_n = 0, iv = 0, ov;
  logic [7:0] pix, mag;
  logic [10:0] ix, iy, ox, oy;
  int img [H][W];
  int got = 0, edges = 0;
  always #5 clk = ~clk;
  sobel_filter #(.WIDTH(W)) dut (.i_clk(clk), .i_rst_n(rst_n), .i_valid(iv), .i_pix(pix), .i_x(ix), .i_y(iy),
    .o_valid(ov), .o_mag(mag), .o_x(ox), .o_y(oy));
  function automatic int px(int x, int y);
    return (x < 0 || y < 0 || x >= W || y >= H) ? 0 : img[y][x];
  endfunction
  function automatic int ref_mag(int x, int y);
    int g1, g2, s, r;
    g1 = px(x-1,y-1) + 2*px(x,y-1) + px(x+1,y-1) - px(x-1,y+1) - 2*px(x,y+1) - px(x+1,y+1);
    g2 = px(x+1,y-1) + 2*px(x+1,y) + px(x+1,y+1) - px(x-1,y-1) - 2*px(x-1,y) - px(x-1,y+1);
    s = g1*g1 + g2*g2;
    r = 0; while ((r+1)*(r+1) <= s) r++;
    return r > 255 ? 255 : r;
  endfunction
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  always @(posedge clk) if (rst_n && ov) begin
    int e;
    e = ref_mag(int'(ox), int'(oy));
    `CHECK(int'(mag) == e, $sformatf("(%0d,%0d) mag %0d expected %0d", ox, oy, mag, e));
    got++; if (e > 100) edges++;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        img[y][x] = (f == 0) ? ((x < W/2) ? 20 : 200) : (f == 1) ? int'($urandom % 256) : ((x + y) % 3) * 100;
      got = 0;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin iv <= 1; pix <= 8'(img[y][x]); ix <= 11'(x); iy <= 11'(y); @(posedge clk); end
        iv <= 0; repeat (2) @(posedge clk);
      end
      repeat (3) @(posedge clk);
      `CHECK(got == (W - 1) * (H - 1), $sformatf("outputs %0d", got));
    end
    `CHECK(edges > 0, "edges found");
    finish_tb();
  end
endmodule
