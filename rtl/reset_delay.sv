// Power-up reset sequencer.
// After the board reset input is released, a free-running counter releases
// three active-low resets one after another: o_rst_n[0] at D0 cycles,
// o_rst_n[1] at D1 and o_rst_n[2] at D2. The camera configuration, the
// SDRAM controller and the capture/display chain can so come out of reset in
// order, each once the blocks it depends on are running. The design only
// states that one reset-delay unit manages the reset functions; the three
// stages and their cycle counts are this implementation's choice.
// Interface: i_clk, i_rst_n (asynchronous, active low); outputs are
// synchronous to i_clk and stay released until i_rst_n is asserted again.
module reset_delay #(
  parameter int unsigned D0 = 32'h001F_FFFF,
  parameter int unsigned D1 = 32'h002F_FFFF,
  parameter int unsigned D2 = 32'h003F_FFFF
) (
  input  logic       i_clk,
  input  logic       i_rst_n,
  output logic [2:0] o_rst_n
);
  logic [31:0] cnt;

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      cnt     <= '0;
      o_rst_n <= '0;
    end else begin
      if (cnt != D2) cnt <= cnt + 32'd1;
      if (cnt >= D0) o_rst_n[0] <= 1'b1;
      if (cnt >= D1) o_rst_n[1] <= 1'b1;
      if (cnt >= D2) o_rst_n[2] <= 1'b1;
    end
  end

  initial assert (D0 <= D1 && D1 <= D2) else $error("reset_delay: D0 <= D1 <= D2 required");
endmodule
