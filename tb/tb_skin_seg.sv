// Sweeps Cb and Cr over the whole 0..255 plane and checks the skin decision
// against the chrominance box 77 < Cb < 127, 133 < Cr < 177, one clock later.
// The ranges checked are the design's.
module tb_skin_seg;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0, ien = 0, oen, skin;
  logic [7:0] cb, cr;
  int n_skin = 0;
  always #5 clk = ~clk;
  skin_seg dut (.i_clk(clk), .i_rst_n(rst_n), .i_en(ien), .i_cb(cb), .i_cr(cr), .o_en(oen), .o_skin(skin));
  initial begin repeat (80000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int a = 0; a < 256; a++) for (int c = 0; c < 256; c++) begin
      @(negedge clk); ien = 1; cb = 8'(a); cr = 8'(c);
      @(posedge clk); #1;
      `CHECK(oen, "enable follows");
      `CHECK(skin == (a > 77 && a < 127 && c > 133 && c < 177), $sformatf("Cb=%0d Cr=%0d", a, c));
      if (skin) n_skin++;
    end
    `CHECK(n_skin == 49 * 43, $sformatf("skin area %0d", n_skin));
    finish_tb();
  end
endmodule
