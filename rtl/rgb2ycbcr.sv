// RGB to YCbCr colour-space conversion.
// Computes
//   Y  =  0.299 R + 0.587 G + 0.114 B
//   Cb = -0.169 R - 0.331 G + 0.500 B + 128
//   Cr =  0.500 R - 0.419 G - 0.081 B + 128
// in fixed point: every coefficient is scaled by 2^FRAC (FRAC = 10) and rounded
// to an integer, the products are summed with the offset, and the sum is
// shifted back by FRAC bits with rounding and clamped to 0..255. The three rows
// are three multiply-accumulate units working in parallel.
// Interface: i_en qualifies the 8-bit R, G, B inputs; o_en qualifies the
// 8-bit Y, Cb, Cr outputs.
// Timing: fully pipelined, one pixel per clock, latency 3 clocks
// (multiply, add, round/clamp).
// The matrix, the offsets and the 10-bit scaling follow the design; the
// pipeline split and rounding are this implementation's choice.
module rgb2ycbcr #(
  parameter int unsigned FRAC = 10
) (
  input  logic       i_clk,
  input  logic       i_rst,
  input  logic       i_en,
  input  logic [7:0] i_data_r,
  input  logic [7:0] i_data_g,
  input  logic [7:0] i_data_b,
  output logic       o_en,
  output logic [7:0] o_data_y,
  output logic [7:0] o_data_cb,
  output logic [7:0] o_data_cr
);
  localparam real SC = real'(2 ** FRAC);
  // coefficient matrix, rows Y/Cb/Cr, columns R/G/B, scaled by 2^FRAC
  localparam int signed K [3][3] = '{
    '{ int'( 0.299 * SC),  int'( 0.587 * SC),  int'( 0.114 * SC)},
    '{ int'(-0.169 * SC),  int'(-0.331 * SC),  int'( 0.500 * SC)},
    '{ int'( 0.500 * SC),  int'(-0.419 * SC),  int'(-0.081 * SC)}
  };
  localparam int signed OFS [3] = '{0, 128 << FRAC, 128 << FRAC};

  logic signed [31:0] prod [3][3];
  logic signed [31:0] acc  [3];
  logic [2:0] en_pipe;
  logic [7:0] res [3];

  function automatic logic [7:0] clamp_round(input logic signed [31:0] v);
    logic signed [31:0] s;
    s = (v + (32'sd1 <<< (FRAC - 1))) >>> FRAC;
    if (s < 0)        return 8'd0;
    else if (s > 255) return 8'd255;
    else              return s[7:0];
  endfunction

  always_ff @(posedge i_clk) begin
    if (i_rst) begin
      en_pipe <= '0;
      for (int i = 0; i < 3; i++) begin
        acc[i] <= '0;
        res[i] <= '0;
        for (int j = 0; j < 3; j++) prod[i][j] <= '0;
      end
    end else begin
      en_pipe <= {en_pipe[1:0], i_en};
      for (int i = 0; i < 3; i++) begin
        prod[i][0] <= 32'(K[i][0]) * $signed({24'd0, i_data_r});
        prod[i][1] <= 32'(K[i][1]) * $signed({24'd0, i_data_g});
        prod[i][2] <= 32'(K[i][2]) * $signed({24'd0, i_data_b});
        acc[i]     <= prod[i][0] + prod[i][1] + prod[i][2] + 32'(OFS[i]);
        res[i]     <= clamp_round(acc[i]);
      end
    end
  end

  assign o_en = en_pipe[2];
  assign o_data_y  = res[0];
  assign o_data_cb = res[1];
  assign o_data_cr = res[2];
endmodule
