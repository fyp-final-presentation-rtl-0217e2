// Exercises the four-port SDRAM controller against the SDRAM model.
// Port clocks differ from the SDRAM clock. Write port 1 and 2 each stream a
// known pattern into their own ring (one crossing a row boundary), then the
// read ports, reloaded with LOAD, read the rings back and every word is
// compared. Checks that the model saw no protocol error, that refreshes run
// during traffic, that all four ports got bursts, and that a second LOAD of
// a read port restarts it at its start address.
module tb_sdram_control;
  `include "tb_util.svh"
  localparam int AW = 25, N = 1536, LEN = 64;
  localparam int BASE0 = 0, BASE1 = 3000;   // port 2 ring crosses row boundaries (3072, 4096)
  logic clk = 0, wclk = 0, rclk = 0, rst_n = 0;
  logic [1:0] wr = 0, wload = 0, rd = 0, rload = 0, wfull, rempty;
  logic [1:0][15:0] wdata, rdata;
  logic [12:0] sa; logic [1:0] ba; logic cs_n, ras_n, cas_n, we_n, cke, dq_oe, init_done, refresh;
  logic [1:0] dqm; logic [15:0] dq_o, dq_i; logic [3:0] burst;
  int errors, n_ref, n_act, n_rd, n_wr; bit mode_set;
  int bursts [4], refs = 0;
  always #5 clk = ~clk;        // SDRAM clock
  always #13 wclk = ~wclk;     // camera-side clock
  always #19 rclk = ~rclk;     // display-side clock
  sdram_control #(.INIT_WAIT(50), .REF_INTERVAL(300)) dut (
    .i_clk(clk), .i_rst_n(rst_n),
    .i_wr_clk({wclk, wclk}), .i_wr(wr), .i_wr_data(wdata),
    .i_wr_addr({AW'(BASE1), AW'(BASE0)}), .i_wr_max_addr({AW'(BASE1 + N), AW'(BASE0 + N)}),
    .i_wr_length({10'(LEN), 10'(LEN)}), .i_wr_load(wload), .o_wr_full(wfull),
    .i_rd_clk({rclk, rclk}), .i_rd(rd), .o_rd_data(rdata),
    .i_rd_addr({AW'(BASE1), AW'(BASE0)}), .i_rd_max_addr({AW'(BASE1 + N), AW'(BASE0 + N)}),
    .i_rd_length({10'(LEN), 10'(LEN)}), .i_rd_load(rload), .o_rd_empty(rempty),
    .o_sa(sa), .o_ba(ba), .o_cs_n(cs_n), .o_ras_n(ras_n), .o_cas_n(cas_n), .o_we_n(we_n), .o_cke(cke),
    .o_dqm(dqm), .o_dq(dq_o), .o_dq_oe(dq_oe), .i_dq(dq_i), .o_init_done(init_done), .o_refresh(refresh), .o_burst(burst));
  sdram_model mem (.clk(clk), .sa(sa), .ba(ba), .cs_n(cs_n), .ras_n(ras_n), .cas_n(cas_n), .we_n(we_n),
    .dq_in(dq_o), .dq_oe(dq_oe), .dq_out(dq_i), .errors(errors), .n_ref(n_ref), .n_act(n_act), .n_rd(n_rd), .n_wr(n_wr), .mode_set(mode_set));
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 4; p++) if (burst[p]) bursts[p]++;
    if (refresh) refs++;
  end
  function automatic logic [15:0] pat(int p, int i); return 16'(i * 7 + p * 16'h5000 + (i >> 3)); endfunction
  initial begin #3000000; failures++; $display("watchdog"); finish_tb(); end
  initial begin
    for (int p = 0; p < 4; p++) bursts[p] = 0;
    wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (init_done);
    `CHECK(mode_set, "mode register loaded");
    // write both rings, words pushed on every other camera clock
    @(negedge wclk); wload = 2'b11; repeat (4) @(negedge wclk); wload = 0; repeat (4) @(negedge wclk);
    for (int i = 0; i < N; i++) begin
      @(negedge wclk);
      wr = 2'b11; wdata[0] = pat(0, i); wdata[1] = pat(1, i);
      `CHECK(!wfull[0] && !wfull[1], "no overflow");
      @(negedge wclk); wr = 0;
    end
    // wait until the controller has drained the write FIFOs
    repeat (2000) @(posedge clk);
    `CHECK(n_wr == 2 * N, $sformatf("SDRAM writes %0d", n_wr));
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge rclk); rload = 2'b11; repeat (4) @(negedge rclk); rload = 0;
      repeat (200) @(negedge rclk);
      for (int i = 0; i < (pass == 0 ? N : 300); i++) begin
        int k = 0;
        @(negedge rclk);
        while (rempty != 2'b00 && k < 1000) begin @(negedge rclk); k++; end
        rd = 2'b11;
        @(negedge rclk); rd = 0;
        `CHECK(rdata[0] == pat(0, i) && rdata[1] == pat(1, i),
               $sformatf("pass %0d word %0d: %h %h", pass, i, rdata[0], rdata[1]));
      end
    end
    `CHECK(errors == 0, $sformatf("SDRAM protocol errors %0d", errors));
    `CHECK(refs > 3 && n_ref >= refs, $sformatf("refreshes %0d", refs));
    `CHECK(bursts[0] > 0 && bursts[1] > 0 && bursts[2] > 0 && bursts[3] > 0, "all ports served");
    finish_tb();
  end
endmodule
