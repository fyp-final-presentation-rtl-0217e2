// Runs the camera configuration sequence against the I2C slave model and
// checks that all 25 register writes arrive in table order with the device
// address 0xBA and the expected register/value pairs, that one refused
// transaction is retried, and that o_done is raised at the end.
// The fixed table values checked are the design's; the retry behaviour
// checked is this implementation's own.
module tb_i2c_ccd_config;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0, scl, sda_oe, sda, done;
  logic [4:0] idx;
  logic [7:0] retries;
  bit nack = 0;
  logic [23:0] exp_tab [25];
  always #5 clk = ~clk;
  i2c_ccd_config #(.CLK_DIV(3), .START_WAIT(20)) dut (.i_clk(clk), .i_rst_n(rst_n), .o_scl(scl), .o_sda_oe(sda_oe),
    .i_sda(sda), .o_done(done), .o_index(idx), .o_retries(retries));
  i2c_slave_model slv (.scl(scl), .master_sda_oe(sda_oe), .sda(sda), .nack_next(nack));
  initial begin repeat (200000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  initial begin
    exp_tab = '{24'h000000, 24'h20C000, 24'h0907C0, 24'h050000, 24'h060019, 24'h0A8000, 24'h2B0013,
                24'h2C009A, 24'h2D019C, 24'h2E0013, 24'h100051, 24'h111F04, 24'h120001, 24'h100053,
                24'h980000, 24'hA00000, 24'hA10000, 24'hA20FFF, 24'h010036, 24'h020010, 24'h03077F,
                24'h0409FF, 24'h220011, 24'h230011, 24'h4901A8};
    repeat (3) @(posedge clk); rst_n = 1;
    // refuse the transaction of entry 7 once
    wait (idx == 7); nack = 1; wait (retries == 1); nack = 0;
    wait (done);
    `CHECK(retries == 1, $sformatf("retries %0d", retries));
    `CHECK(slv.q.size() == 25, $sformatf("writes received %0d", slv.q.size()));
    for (int i = 0; i < 25 && i < slv.q.size(); i++)
      `CHECK(slv.q[i] == {8'hBA, exp_tab[i]}, $sformatf("entry %0d: %h", i, slv.q[i]));
    `CHECK(slv.n_nacked == 1, "one refused transaction");
    finish_tb();
  end
endmodule
