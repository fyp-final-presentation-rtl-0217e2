// Sends random 32-bit words through the I2C master to the slave model and
// checks that the slave received the four bytes in order, that o_ack reports
// success, that a refused transaction reports failure, that SCL toggles at
// f_clk/(4*CLK_DIV), and that the transaction takes the expected number of
// clocks (38 bit slots of 4*CLK_DIV clocks). Every other write is followed by
// a read of the same register (48 slots), whose o_rdata must equal the value
// written; one read is refused and must report no acknowledge.
// Byte order and acknowledge rules are those of standard I2C write and read
// transactions; the timing checked is this implementation's.
module tb_i2c_controller;
  `include "tb_util.svh"
  localparam int DIV = 4;
  logic clk = 0, rst_n = 0, go = 0, w_r = 0, ack, fin, scl, sda_oe, sda;
  logic [15:0] rdata;
  logic [31:0] data;
  bit nack = 0;
  int t0, cyc = 0, scl_rises = 0;
  always #5 clk = ~clk;
  always @(negedge clk) cyc++;
  i2c_controller #(.CLK_DIV(DIV)) dut (.i_clk(clk), .i_rst_n(rst_n), .i_go(go), .i_w_r(w_r), .i_data(data),
    .o_ack(ack), .o_end(fin), .o_rdata(rdata), .o_scl(scl), .o_sda_oe(sda_oe), .i_sda(sda));
  i2c_slave_model slv (.scl(scl), .master_sda_oe(sda_oe), .sda(sda), .nack_next(nack));
  always @(posedge scl) scl_rises++;
  initial begin repeat (200000) @(posedge clk); failures++; $display("watchdog"); finish_tb(); end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      nack = (i == 5);
      @(negedge clk); data = $urandom & 32'hFEFF_FFFF; go = 1; t0 = cyc; scl_rises = 0;
      @(negedge clk); go = 0;
      @(posedge fin); @(negedge clk);
      `CHECK(cyc - t0 == 38 * 4 * DIV + 1, $sformatf("transaction length %0d", cyc - t0));
      `CHECK(scl_rises == 37, $sformatf("SCL pulses %0d", scl_rises));
      if (i == 5) begin
        `CHECK(!ack, "refused transaction reports no acknowledge");
        `CHECK(slv.q.size() == 0, "refused transaction not stored");
      end else begin
        `CHECK(ack, "acknowledged");
        `CHECK(slv.q.size() == 1 && slv.q[0] == data, $sformatf("slave got %h expected %h", slv.q.size() ? slv.q[0] : 0, data));
        void'(slv.q.pop_front());
      end
      repeat (10) @(negedge clk);
      `CHECK(scl && sda, "bus idle high");
      if (i % 2 == 0 && i != 5) begin
        // read back the register just written
        nack = (i == 8);
        @(negedge clk); w_r = 1; data = {data[31:16], 16'($urandom)}; go = 1; t0 = cyc; scl_rises = 0;
        @(negedge clk); go = 0; w_r = 0;
        @(posedge fin); @(negedge clk);
        `CHECK(cyc - t0 == 48 * 4 * DIV + 1, $sformatf("read length %0d", cyc - t0));
        `CHECK(scl_rises == 47, $sformatf("read SCL pulses %0d", scl_rises));
        if (i == 8) begin `CHECK(!ack, "refused read reports no acknowledge"); end
        else begin
          `CHECK(ack, "read acknowledged");
          `CHECK(rdata == slv.regs[data[23:16]], $sformatf("read %h expected %h", rdata, slv.regs[data[23:16]]));
        end
        `CHECK(slv.q.size() == 0, "read stores nothing");
        repeat (10) @(negedge clk);
        `CHECK(scl && sda, "bus idle high after read");
      end
    end
    `CHECK(slv.n_reads == 5, $sformatf("%0d reads completed", slv.n_reads));
    finish_tb();
  end
endmodule
