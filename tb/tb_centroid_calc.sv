// Feeds random skin pixels in a 40x20 frame with a dense blob on the left and,
// in alternate frames, one on the right, and compares the reported centroids
// (integer mean of X and Y per half), the areas and the face flags against
// sums kept by the testbench. Also checks the result latency after frame end.
// Expected centroids are the integer means of the X and Y sums, as the
// design describes; the split and minimum area are this design's rules.
module tb_centroid_calc;
  `include "tb_util.svh"
  import face_pkg::*;
  localparam int W = 40, H = 20, MINA = 20;
  logic clk = 0, rst_n = 0, iv = 0, is, fe = 0, done;
  logic [10:0] ix, iy;
  face_t face [2];
  logic [19:0] area [2];
  longint sx [2], sy [2], n [2];
  int cyc = 0, t_end = 0;
  always #5 clk = ~clk;
  always @(negedge clk) cyc++;
  centroid_calc #(.H_ACT(W), .V_ACT(H), .MIN_AREA(MINA)) dut (.i_clk(clk), .i_rst_n(rst_n), .i_valid(iv), .i_skin(is),
    .i_x(ix), .i_y(iy), .i_frame_end(fe), .o_done(done), .o_face(face), .o_area(area));
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      for (int r = 0; r < 2; r++) begin sx[r] = 0; sy[r] = 0; n[r] = 0; end
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        bit s;
        s = (x >= 3 && x < 15 && y >= 4 && y < 17) ? ($urandom % 10 < 9) :
            (f[0] && x >= 25 && x < 36 && y >= 2 && y < 12) ? ($urandom % 10 < 8) : ($urandom % 50 == 0);
        iv <= 1; is <= s; ix <= 11'(x); iy <= 11'(y);
        fe <= (x == W - 1 && y == H - 1);
        if (s) begin
          int r; r = (x >= W / 2);
          sx[r] += x; sy[r] += y; n[r]++;
        end
        @(posedge clk);
      end
      t_end = cyc;
      iv <= 0; fe <= 0;
      @(posedge clk iff done);
      `CHECK(cyc - t_end == 35, $sformatf("latency %0d", cyc - t_end));
      @(negedge clk);
      for (int r = 0; r < 2; r++) begin
        `CHECK(area[r] == 20'(n[r]), $sformatf("frame %0d area %0d", f, r));
        `CHECK(face[r].valid == (n[r] >= MINA), $sformatf("frame %0d valid %0d", f, r));
        if (n[r] > 0) begin
          `CHECK(face[r].cx == 11'(sx[r] / n[r]) && face[r].cy == 11'(sy[r] / n[r]),
                 $sformatf("frame %0d centroid %0d: (%0d,%0d) expected (%0d,%0d)", f, r, face[r].cx, face[r].cy, sx[r]/n[r], sy[r]/n[r]));
        end
      end
      `CHECK(face[1].valid == f[0], "right face only in odd frames");
      repeat (5) @(posedge clk);
    end
    finish_tb();
  end
endmodule
