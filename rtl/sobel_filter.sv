// Sobel edge detector (the edge-detection trial design).
// An 8-bit grey image streams in raster order. Two line buffers of WIDTH
// pixels hold the previous two rows, so every incoming pixel completes a 3x3
// neighbourhood whose centre is one row up and one column left. The
// neighbourhood is convolved with the vertical-derivative kernel
//   G1 = [ 1  2  1;  0  0  0; -1 -2 -1]
// and the horizontal-derivative kernel
//   G2 = [-1  0  1; -2  0  2; -1  0  1],
// and the edge strength is the gradient magnitude sqrt(G1^2 + G2^2), computed
// with an integer square root and clamped to 255. Pixels outside the image
// count as 0.
// Interface: i_valid/i_pix with coordinates i_x/i_y; o_valid/o_mag with the
// centre coordinates o_x/o_y (input minus 1). Centres in the last column and
// row are not produced.
// Timing: one pixel per clock, latency 2 clocks (convolution, square root).
// Kernels and magnitude follow the design; the line-buffer arrangement,
// edge handling and pipeline are this implementation's choices.
module sobel_filter #(
  parameter int unsigned WIDTH = 640
) (
  input  logic        i_clk,
  input  logic        i_rst_n,
  input  logic        i_valid,
  input  logic [7:0]  i_pix,
  input  logic [10:0] i_x,
  input  logic [10:0] i_y,
  output logic        o_valid,
  output logic [7:0]  o_mag,
  output logic [10:0] o_x,
  output logic [10:0] o_y
);
  localparam int unsigned XW = $clog2(WIDTH);

  logic [15:0] lines [WIDTH];     // {row y-2, row y-1} per column
  logic [15:0] lrd;
  logic [7:0]  w [3][3];          // w[row][col], row 0 = top, col 2 = newest
  logic [7:0]  col_new [3];

  assign lrd = lines[i_x[XW-1:0]];

  always_comb begin
    col_new[0] = (i_y >= 11'd2) ? lrd[15:8] : 8'd0;
    col_new[1] = (i_y >= 11'd1) ? lrd[7:0]  : 8'd0;
    col_new[2] = i_pix;
  end

  always_ff @(posedge i_clk) begin
    if (i_valid) lines[i_x[XW-1:0]] <= {lrd[7:0], i_pix};
  end

  // window registers hold columns x-1 and x-2; column x comes straight in
  logic [7:0] c1 [3], c2 [3];
  always_comb begin
    for (int r = 0; r < 3; r++) begin
      w[r][2] = col_new[r];
      w[r][1] = (i_x >= 11'd1) ? c1[r] : 8'd0;   // columns left of the image are 0
      w[r][0] = (i_x >= 11'd2) ? c2[r] : 8'd0;
    end
  end

  int g1, g2;
  always_comb begin
    g1 = int'(w[0][0]) + 2 * int'(w[0][1]) + int'(w[0][2])
       - int'(w[2][0]) - 2 * int'(w[2][1]) - int'(w[2][2]);
    g2 = int'(w[0][2]) + 2 * int'(w[1][2]) + int'(w[2][2])
       - int'(w[0][0]) - 2 * int'(w[1][0]) - int'(w[2][0]);
  end

  function automatic logic [10:0] isqrt(input logic [21:0] v);
    logic [21:0] rem;
    logic [10:0] root;
    logic [21:0] trial;
    rem = v; root = '0;
    for (int b = 10; b >= 0; b--) begin
      trial = ({11'd0, root} << (b + 1)) + (22'd1 << (2 * b));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | (11'd1 << b);
      end
    end
    return root;
  endfunction

  logic        s1_valid;
  logic [21:0] s1_sq;
  logic [10:0] s1_x, s1_y;
  logic [10:0] root;
  assign root = isqrt(s1_sq);

  always_ff @(posedge i_clk or negedge i_rst_n) begin
    if (!i_rst_n) begin
      for (int r = 0; r < 3; r++) begin c1[r] <= '0; c2[r] <= '0; end
      s1_valid <= 1'b0; s1_sq <= '0; s1_x <= '0; s1_y <= '0;
      o_valid <= 1'b0; o_mag <= '0; o_x <= '0; o_y <= '0;
    end else begin
      if (i_valid) begin
        for (int r = 0; r < 3; r++) begin c1[r] <= col_new[r]; c2[r] <= c1[r]; end
      end
      s1_valid <= i_valid && (i_x >= 11'd1) && (i_y >= 11'd1);
      s1_sq    <= 22'(g1 * g1 + g2 * g2);
      s1_x     <= i_x - 11'd1;
      s1_y     <= i_y - 11'd1;
      o_valid  <= s1_valid;
      o_mag    <= (root > 11'd255) ? 8'd255 : root[7:0];
      o_x      <= s1_x;
      o_y      <= s1_y;
    end
  end
endmodule
