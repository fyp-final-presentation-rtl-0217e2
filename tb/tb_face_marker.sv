// Scans a 64x48 area with two faces placed and checks that exactly the pixels
// inside the 17x17 squares around the centroids take the marker colours, the
// others keep the camera colour, and nothing is marked for an invalid face.
// Marker size and colours checked here are this design's choices.
module tb_face_marker;
  `include "tb_util.svh"
  import face_pkg::*;
  logic clk = 0, rst_n = 0, iv = 0, mk;
  logic [10:0] x, y;
  logic [9:0] r, g, b, orr, og, ob;
  face_t face [2];
  int n_mark = 0;
  always #5 clk = ~clk;
  face_marker dut (.i_clk(clk), .i_rst_n(rst_n), .i_valid(iv), .i_x(x), .i_y(y), .i_r(r), .i_g(g), .i_b(b),
    .i_face(face), .o_r(orr), .o_g(og), .o_b(ob), .o_marked(mk));
  initial begin repeat (20000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  initial begin
    face[0] = '{valid: 1'b1, cx: 11'd12, cy: 11'd20};
    face[1] = '{valid: 1'b1, cx: 11'd50, cy: 11'd5};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      if (pass == 1) face[1].valid = 1'b0;
      for (int yy = 0; yy < 48; yy++) for (int xx = 0; xx < 64; xx++) begin
        bit in0, in1;
        @(negedge clk);
        iv = 1; x = 11'(xx); y = 11'(yy); r = 10'($urandom); g = 10'($urandom); b = 10'($urandom);
        in0 = (xx >= 4 && xx <= 20 && yy >= 12 && yy <= 28);
        in1 = (pass == 0) && (xx >= 42 && xx <= 58 && yy <= 13);
        @(negedge clk);
        iv = 0;
        if (in0) begin `CHECK({orr, og, ob} == {10'h3FF, 10'h0, 10'h0} && mk, $sformatf("marker 0 at %0d,%0d", xx, yy)); n_mark++; end
        else if (in1) begin `CHECK({orr, og, ob} == {10'h0, 10'h0, 10'h3FF} && mk, $sformatf("marker 1 at %0d,%0d", xx, yy)); n_mark++; end
        else `CHECK({orr, og, ob} == {r, g, b} && !mk, $sformatf("video at %0d,%0d", xx, yy));
      end
    end
    `CHECK(n_mark == 17 * 17 * 2 + 17 * 14, $sformatf("marked %0d", n_mark));
    finish_tb();
  end
endmodule
