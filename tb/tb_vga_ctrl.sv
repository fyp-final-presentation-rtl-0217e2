// Runs the VGA timing generator at its 640x480 defaults for two frames and
// checks: line and frame length (800 x 524 clocks, the porch values give 524 lines), horizontal and vertical
// sync pulse widths and positions, the number of active pixels per frame,
// the coordinates and frame address of every active pixel (raster order),
// and that counting stops while i_en is low.
// Porch and sync lengths checked are the design's; the blanking-first
// counter order and active-low syncs are this implementation's.
module tb_vga_ctrl;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0, en = 1;
  logic [10:0] hc, vc, x, y;
  logic hs, vs, req;
  logic [21:0] addr;
  int ex_x, ex_y, act, hs_low, vs_lines, bad;
  always #5 clk = ~clk;
  vga_ctrl dut (.i_clk(clk), .i_rst_n(rst_n), .i_en(en), .o_h_count(hc), .o_v_count(vc),
    .o_h_sync(hs), .o_v_sync(vs), .o_request(req), .o_x(x), .o_y(y), .o_addr(addr));
  initial begin repeat (900000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      act = 0; hs_low = 0; vs_lines = 0; bad = 0; ex_x = 0; ex_y = 0;
      for (int l = 0; l < 524; l++) begin
        for (int p = 0; p < 800; p++) begin
          if (hc != 11'(p) || vc != 11'(l)) begin bad++; if (bad < 3) $display("at %0d,%0d got %0d,%0d", p, l, hc, vc); end
          if (!hs) begin hs_low++; if (p < 16 || p >= 112) bad++; end
          if (p == 0 && !vs) begin vs_lines++; if (l < 11 || l >= 13) bad++; end
          if (req) begin
            act++;
            if (x != 11'(ex_x) || y != 11'(ex_y) || addr != 22'(ex_y * 640 + ex_x)) bad++;
            ex_x++; if (ex_x == 640) begin ex_x = 0; ex_y++; end
          end
          @(posedge clk); #1;
        end
      end
      `CHECK(bad == 0, $sformatf("frame %0d timing mismatches %0d", f, bad));
      `CHECK(act == 640 * 480, $sformatf("active pixels %0d", act));
      `CHECK(hs_low == 96 * 524, $sformatf("hsync low clocks %0d", hs_low));
      `CHECK(vs_lines == 2, $sformatf("vsync lines %0d", vs_lines));
    end
    `CHECK(hc == 0 && vc == 0, "wrap to origin");
    en = 0; repeat (10) @(posedge clk); #1;
    `CHECK(hc == 0 && vc == 0, "hold while disabled");
    finish_tb();
  end
endmodule
