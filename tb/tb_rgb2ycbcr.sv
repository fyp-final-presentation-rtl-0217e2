// Sends random and corner RGB values, one per clock, and compares each result
// with the colour-space formula evaluated in floating point (within 1 LSB).
// Also checks that the result arrives exactly 3 clocks after its input.
// The matrix and offsets are the design's; the 1-LSB tolerance covers the
// rounding of its 10-bit fixed-point coefficients.
module tb_rgb2ycbcr;
  `include "tb_util.svh"
  logic clk = 0, rst = 1, ien = 0, oen;
  logic [7:0] r, g, b, y, cb, cr;
  int q_r[$], q_g[$], q_b[$], q_t[$];
  int cyc = 0;
  always #5 clk = ~clk;
  always @(negedge clk) cyc++;
  rgb2ycbcr dut (.i_clk(clk), .i_rst(rst), .i_en(ien), .i_data_r(r), .i_data_g(g), .i_data_b(b),
    .o_en(oen), .o_data_y(y), .o_data_cb(cb), .o_data_cr(cr));
  function automatic int ref_v(real v);
    int k; k = $rtoi(v + 0.5 + 1000.0) - 1000;
    if (k < 0) k = 0; if (k > 255) k = 255; return k;
  endfunction
  function automatic bit close(int a, int e); return (a - e <= 1) && (e - a <= 1); endfunction
  initial begin repeat (3000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  always @(posedge clk) if (oen) begin
    int rr, gg, bb, t;
    rr = q_r.pop_front(); gg = q_g.pop_front(); bb = q_b.pop_front(); t = q_t.pop_front();
    `CHECK(close(y,  ref_v( 0.299*rr + 0.587*gg + 0.114*bb)), $sformatf("Y %0d for %0d,%0d,%0d", y, rr, gg, bb));
    `CHECK(close(cb, ref_v(-0.169*rr - 0.331*gg + 0.500*bb + 128.0)), $sformatf("Cb %0d", cb));
    `CHECK(close(cr, ref_v( 0.500*rr - 0.419*gg - 0.081*bb + 128.0)), $sformatf("Cr %0d", cr));
    `CHECK(cyc - t == 3, $sformatf("latency %0d", cyc - t));
  end
  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    for (int i = 0; i < 500; i++) begin
      ien <= (i % 7 != 3);
      if (i < 8) begin r <= {8{i[0]}}; g <= {8{i[1]}}; b <= {8{i[2]}}; end
      else begin r <= 8'($urandom); g <= 8'($urandom); b <= 8'($urandom); end
      @(posedge clk);
      if (ien) begin q_r.push_back(r); q_g.push_back(g); q_b.push_back(b); q_t.push_back(cyc); end
    end
    ien <= 0; repeat (6) @(posedge clk);
    `CHECK(q_r.size() == 0, "all results received");
    finish_tb();
  end
endmodule
