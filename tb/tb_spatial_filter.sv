// Streams random skin masks (dense and sparse areas) through a 9x9 spatial
// filter on a 20x14 frame, two frames back to back, and compares every output
// with a window count computed directly from the stored mask, treating pixels
// outside the frame as non-skin. Checks the count, the decision against the
// threshold, the centre coordinates and the number of outputs.
// The window and threshold are the design's; edge handling checked is this
// implementation's.
module tb_spatial_filter;
  `include "tb_util.svh"
  localparam int W = 20, H = 14, WIN = 9, TH = 40, HF = 4;
  logic clk = 0, rst_n = 0, iv = 0, is, ov, os;
  logic [10:0] ix, iy, ox, oy;
  logic [6:0] cnt;
  bit m [H][W];
  int got = 0, kept = 0, dropped = 0;
  always #5 clk = ~clk;
  spatial_filter #(.WIN(WIN), .THRESH(TH), .H_ACT(W)) dut (.i_clk(clk), .i_rst_n(rst_n), .i_valid(iv), .i_skin(is),
    .i_x(ix), .i_y(iy), .o_valid(ov), .o_skin(os), .o_x(ox), .o_y(oy), .o_count(cnt));
  function automatic int wc(int cx, int cy);
    int s = 0;
    for (int yy = cy - HF; yy <= cy + HF; yy++) for (int xx = cx - HF; xx <= cx + HF; xx++)
      if (yy >= 0 && xx >= 0 && yy < H && xx < W && m[yy][xx]) s++;
    return s;
  endfunction
  initial begin repeat (5000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  always @(posedge clk) if (rst_n && ov) begin
    int e;
    got++;
    e = wc(int'(ox), int'(oy));
    `CHECK(int'(cnt) == e, $sformatf("count %0d expected %0d at (%0d,%0d)", cnt, e, ox, oy));
    `CHECK(os == (e >= TH), "decision");
    if (os) kept++; else dropped++;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        m[y][x] = (x < W / 2) ? ($urandom % 100 < 85) : ($urandom % 100 < 20);
      got = 0;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          iv <= 1; is <= m[y][x]; ix <= 11'(x); iy <= 11'(y); @(posedge clk);
        end
        iv <= 0; repeat (3) @(posedge clk);
      end
      repeat (2) @(posedge clk);
      `CHECK(got == (W - HF) * (H - HF), $sformatf("outputs %0d", got));
    end
    `CHECK(kept > 0 && dropped > 0, $sformatf("both outcomes seen kept=%0d dropped=%0d", kept, dropped));
    finish_tb();
  end
endmodule
