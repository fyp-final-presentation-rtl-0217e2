// Writes 3000 random words from a 10 ns clock and reads them on a 17 ns clock
// with random gaps on both sides, and checks order and content, that the
// FIFO fills (full seen) and drains (empty seen), that writes while full are
// dropped, and that a reset clears it.
// The clock ratio and word count are this testbench's choice; the FIFO's
// role follows the design's per-port FIFOs.
module tb_async_fifo;
  `include "tb_util.svh"
  logic wclk = 0, rclk = 0, rst_n = 0, we = 0, re = 0, full, empty;
  logic [15:0] wd, rd;
  logic [4:0] wc, rc;
  logic [15:0] model[$];
  int n_rd = 0, saw_full = 0, saw_empty = 0, pending = 0;
  always #5 wclk = ~wclk;
  always #8.5 rclk = ~rclk;
  async_fifo #(.W(16), .DEPTH(16)) dut (.i_wclk(wclk), .i_wrst_n(rst_n), .i_we(we), .i_wdata(wd), .o_full(full), .o_wcount(wc),
    .i_rclk(rclk), .i_rrst_n(rst_n), .i_re(re), .o_rdata(rd), .o_empty(empty), .o_rcount(rc));
  initial begin #2000000; failures++; $display("watchdog"); finish_tb(); end
  // writer
  initial begin
    repeat (3) @(posedge wclk); rst_n = 1;
    for (int i = 0; i < 3000; ) begin
      @(negedge wclk);
      we = ($urandom % 4 != 0) && (i < 1500 || $urandom % 3 == 0);
      wd = 16'($urandom);
      @(posedge wclk);
      if (full) saw_full++;
      if (we && !full) begin model.push_back(wd); i++; end
      #1 we = 0;
    end
  end
  // reader: slow in the first half so the FIFO fills
  initial begin
    repeat (5) @(posedge rclk);
    while (n_rd < 3000) begin
      @(negedge rclk);
      re = (n_rd < 1000) ? ($urandom % 8 == 0) : ($urandom % 2 == 0);
      @(posedge rclk);
      if (empty) saw_empty++;
      pending = re && !empty;
      #1 re = 0;
      if (pending) begin
        logic [15:0] e;
        e = model.pop_front();
        `CHECK(rd == e, $sformatf("word %0d: %h expected %h", n_rd, rd, e));
        n_rd++;
      end
    end
    `CHECK(saw_full > 0, "full reached");
    `CHECK(saw_empty > 0, "empty reached");
    repeat (4) @(posedge wclk);
    `CHECK(empty && wc == 0, "empty at end");
    // fill a few words, then reset clears
    @(negedge wclk); we = 1; wd = 16'h1234; repeat (5) @(negedge wclk); we = 0;
    repeat (6) @(posedge rclk);
    `CHECK(!empty && rc == 5, $sformatf("5 words visible, rcount %0d", rc));
    rst_n = 0; #20; rst_n = 1;
    @(posedge rclk); #1;
    `CHECK(empty && wc == 0 && rc == 0, "reset clears");
    finish_tb();
  end
endmodule
