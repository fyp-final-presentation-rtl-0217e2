// Skin-colour thresholding.
// A pixel is classed as skin when its chrominance lies inside the box
// CB_LO < Cb < CB_HI and CR_LO < Cr < CR_HI; luminance is ignored so that the
// test is less sensitive to lighting. The bounds are parameters (defaults
// 77/127 and 133/177) because they have to be tuned to the lighting of the
// scene. Interface: i_en qualifies the Cb/Cr inputs; o_en/o_skin give the
// one-bit result. Timing: one pixel per clock, latency 1 clock.
// The bounds and the strict comparisons follow the design; the register stage
// is this implementation's choice.
module skin_seg #(
  parameter logic [7:0] CB_LO = 8'd77,
  parameter logic [7:0] CB_HI = 8'd127,
  parameter logic [7:0] CR_LO = 8'd133,
  parameter logic [7:0] CR_HI = 8'd177
) (
  input  logic       i_clk,
  input  logic       i_rst_n,
  input  logic       i_en,
  input  logic [7:0] i_cb,
  input  logic [7:0] i_cr,
  output logic       o_en,
  output logic       o_skin
);
  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      o_en   <= 1'b0;
      o_skin <= 1'b0;
    end else begin
      o_en   <= i_en;
      o_skin <= i_en && (i_cb > CB_LO) && (i_cb < CB_HI) && (i_cr > CR_LO) && (i_cr < CR_HI);
    end
  end
endmodule
