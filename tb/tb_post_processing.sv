// Streams skin masks of a 48x32 frame through post-processing: frame 1 has a
// solid block on the left plus scattered specks, frames 2 and 3 add a second
// block on the right. Checks that the specks are removed by the spatial
// filter, the per-frame centroids match the filtered pixels' means, and the
// temporal filter reports a face only from its second consecutive frame.
// The 9x9 window and threshold 78 are the design's; frame sizes here are
// reduced to keep the run short.
module tb_post_processing;
  `include "tb_util.svh"
  import face_pkg::*;
  localparam int W = 48, H = 32, MINA = 30;
  logic clk = 0, rst_n = 0, iv = 0, is, ov, os, fdone, done;
  logic [10:0] ix, iy, ox, oy;
  face_t fface [2], face [2];
  int n_speck_kept = 0;
  always #5 clk = ~clk;
  post_processing #(.H_ACT(W), .V_ACT(H), .MIN_AREA(MINA)) dut (.i_clk(clk), .i_rst_n(rst_n), .i_valid(iv), .i_skin(is),
    .i_x(ix), .i_y(iy), .o_valid(ov), .o_skin(os), .o_x(ox), .o_y(oy),
    .o_frame_done(fdone), .o_frame_face(fface), .o_done(done), .o_face(face));
  function automatic bit blk0(int x, int y); return x >= 4 && x < 20 && y >= 6 && y < 26; endfunction
  function automatic bit blk1(int x, int y); return x >= 30 && x < 44 && y >= 2 && y < 20; endfunction
  longint sx [2], sy [2], n [2];
  always @(posedge clk) if (rst_n && ov && os) begin
    int r; r = ox >= W/2;
    sx[r] += ox; sy[r] += oy; n[r]++;
    if (!blk0(ox, oy) && !blk1(ox, oy)) n_speck_kept++;
  end
  initial begin repeat (30000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int r = 0; r < 2; r++) begin sx[r] = 0; sy[r] = 0; n[r] = 0; end
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          iv <= 1; ix <= 11'(x); iy <= 11'(y);
          is <= blk0(x, y) || (f > 0 && blk1(x, y)) || ((x * 7 + y * 13) % 23 == 0);
          @(posedge clk);
        end
        iv <= 0; repeat (4) @(posedge clk);
      end
      @(posedge clk iff done); @(negedge clk);
      for (int r = 0; r < 2; r++) begin
        if (n[r] > 0)
          `CHECK(fface[r].cx == 11'(sx[r] / n[r]) && fface[r].cy == 11'(sy[r] / n[r]),
                 $sformatf("frame %0d region %0d centroid (%0d,%0d) expected (%0d,%0d)", f, r, fface[r].cx, fface[r].cy, sx[r]/n[r], sy[r]/n[r]));
        `CHECK(fface[r].valid == (n[r] >= MINA), $sformatf("frame %0d region %0d found", f, r));
      end
      `CHECK(face[0].valid == (f >= 1), $sformatf("frame %0d left face reported", f));
      `CHECK(face[1].valid == (f >= 2), $sformatf("frame %0d right face reported", f));
    end
    `CHECK(n_speck_kept == 0, $sformatf("specks kept %0d", n_speck_kept));
    // the left block is centred at (11.5, 15.5); the filtered block shrinks symmetrically
    `CHECK(face[0].cx >= 10 && face[0].cx <= 12 && face[0].cy >= 14 && face[0].cy <= 16, "left centroid near block centre");
    finish_tb();
  end
endmodule
