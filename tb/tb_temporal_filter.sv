// Presents a sequence of per-frame face results and checks that a face is
// reported only after two consecutive frames with a face in the same half,
// at the mean position of the two.
// The two-frame rule checked is this implementation's temporal filter.
module tb_temporal_filter;
  `include "tb_util.svh"
  import face_pkg::*;
  logic clk = 0, rst_n = 0, idone = 0, odone;
  face_t fin [2], fout [2];
  face_t prev [2];
  always #5 clk = ~clk;
  temporal_filter dut (.i_clk(clk), .i_rst_n(rst_n), .i_done(idone), .i_face(fin), .o_done(odone), .o_face(fout));
  initial begin repeat (5000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  initial begin
    for (int r = 0; r < 2; r++) begin fin[r] = '0; prev[r] = '0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      @(negedge clk);
      for (int r = 0; r < 2; r++) begin
        fin[r].valid = ($urandom % 3 != 0);
        fin[r].cx = 11'($urandom % 640); fin[r].cy = 11'($urandom % 480);
      end
      idone = 1; @(negedge clk); idone = 0;
      `CHECK(odone, "done follows");
      for (int r = 0; r < 2; r++) begin
        `CHECK(fout[r].valid == (fin[r].valid && prev[r].valid), $sformatf("frame %0d valid %0d", f, r));
        `CHECK(fout[r].cx == 11'((fin[r].cx + prev[r].cx) / 2) && fout[r].cy == 11'((fin[r].cy + prev[r].cy) / 2),
               $sformatf("frame %0d mean %0d", f, r));
        prev[r] = fin[r];
      end
      repeat (3) @(negedge clk);
      `CHECK(fout[0] == fout[0], "hold");
    end
    finish_tb();
  end
endmodule
