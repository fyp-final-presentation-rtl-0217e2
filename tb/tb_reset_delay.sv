// Checks that the three staged resets release exactly D0, D1 and D2 clocks
// (plus the output register) after the reset input goes high, and that a new
// reset pulls them all low again.
// The delays are parameters of this implementation; a short set is used.
module tb_reset_delay;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0;
  logic [2:0] rn;
  int cyc = 0;
  int rel [3];
  always #5 clk = ~clk;
  reset_delay #(.D0(5), .D1(10), .D2(20)) dut (.i_clk(clk), .i_rst_n(rst_n), .o_rst_n(rn));
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); finish_tb();
  end
  initial begin
    repeat (3) @(posedge clk);
    `CHECK(rn == 3'b000, "all resets held");
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 3; k++) rel[k] = -1;
    for (cyc = 1; cyc < 40; cyc++) begin
      @(posedge clk); #1;
      for (int k = 0; k < 3; k++) if (rn[k] && rel[k] < 0) rel[k] = cyc;
    end
    `CHECK(rel[0] == 6,  $sformatf("rst0 released at %0d", rel[0]));
    `CHECK(rel[1] == 11, $sformatf("rst1 released at %0d", rel[1]));
    `CHECK(rel[2] == 21, $sformatf("rst2 released at %0d", rel[2]));
    `CHECK(rn == 3'b111, "all released");
    rst_n = 0; #1;
    `CHECK(rn == 3'b000, "asynchronous reassert");
    finish_tb();
  end
endmodule
